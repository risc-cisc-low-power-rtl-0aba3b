// dt_regbank: the registers R1, R2 and R3 and the bus that joins them.
//
// Each register has a bus-output enable (RiOut) and a load enable (Riin).
// The bus carries the register whose output enable is high; a register whose
// load enable is high takes the bus value on the next rising clock edge. Only
// one output enable may be high at a time, as with a tri-state bus; here the
// bus is an AND-OR selection, which reads 0 when no register drives it. An
// assertion flags two drivers at once.
//
// For loading operands and reading results the bank also has an external
// write port (ld_we per register, ld_data shared) and shows all three
// registers. An external write takes priority over a bus load of the same
// register.
//
// Interface: clk; out_en[i], in_en[i] for register i+1; ld_we, ld_data;
// q[i] holds register i+1, bus is the current bus value. One clock from an
// enable to the loaded value.
// The three registers and their enable names follow the document; the word
// width, the bus built as a selection and the external port are this design's
// own choices. The registers have no reset: they hold data, not state.
module dt_regbank
  import dt_pkg::*;
#(
  parameter int unsigned WIDTH = 8
) (
  input  logic                  clk,
  input  logic [NREG-1:0]       out_en,
  input  logic [NREG-1:0]       in_en,
  input  logic [NREG-1:0]       ld_we,
  input  logic [WIDTH-1:0]      ld_data,
  output logic [WIDTH-1:0]      q   [NREG],
  output logic [WIDTH-1:0]      bus
);

  always_comb begin
    bus = '0;
    for (int i = 0; i < NREG; i++)
      if (out_en[i]) bus |= q[i];
  end

  for (genvar i = 0; i < NREG; i++) begin : g_reg
    always_ff @(posedge clk) begin
      if (ld_we[i])      q[i] <= ld_data;
      else if (in_en[i]) q[i] <= bus;
    end
  end

  // One driver on the bus at a time.
  a_one_driver: assert property (@(posedge clk) $onehot0(out_en))
    else $error("dt_regbank: several registers drive the bus: %b", out_en);

endmodule
