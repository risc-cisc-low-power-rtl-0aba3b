// tb_dt_regbank: checks the three-register bank against a reference model.
//
// Every cycle picks at most one bus driver, random load enables and random
// external writes. The bench keeps its own copy of the three registers,
// computes the expected bus value from it and the expected contents after the
// edge (external write first, then bus load), and compares both. WIDTH is left
// at its default. 3000 cycles, with a watchdog.
module tb_dt_regbank;
  import dt_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0;
  logic [NREG-1:0] out_en, in_en, ld_we;
  logic [W-1:0] ld_data, bus;
  logic [W-1:0] q [NREG];
  logic [W-1:0] model [NREG];
  logic [W-1:0] exp_bus;
  int checks = 0, failures = 0;
  int bus_loads = 0;

  dt_regbank #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    out_en = '0; in_en = '0;
    // Initialise all registers through the external port.
    ld_we = '1; ld_data = 8'h5A;
    @(posedge clk); #1;
    for (int i = 0; i < NREG; i++) model[i] = 8'h5A;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      case ($urandom_range(0, 3))
        0: out_en = '0;
        1: out_en = 3'b001;
        2: out_en = 3'b010;
        default: out_en = 3'b100;
      endcase
      in_en   = 3'($urandom);
      ld_we   = ($urandom_range(0, 3) == 0) ? 3'($urandom) : '0;
      ld_data = 8'($urandom);
      #1;
      exp_bus = '0;
      for (int i = 0; i < NREG; i++) if (out_en[i]) exp_bus = model[i];
      checks++;
      if (bus !== exp_bus) begin
        failures++;
        $display("FAIL bus=%h expected %h (out_en=%b)", bus, exp_bus, out_en);
      end
      @(posedge clk); #1;
      for (int i = 0; i < NREG; i++) begin
        if (ld_we[i])      model[i] = ld_data;
        else if (in_en[i]) begin model[i] = exp_bus; bus_loads++; end
        checks++;
        if (q[i] !== model[i]) begin
          failures++;
          $display("FAIL R%0d=%h expected %h", i + 1, q[i], model[i]);
        end
      end
    end
    checks++;
    if (bus_loads == 0) begin failures++; $display("FAIL no bus load happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
