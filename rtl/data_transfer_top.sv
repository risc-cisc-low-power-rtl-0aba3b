// data_transfer_top: register swap R1 <-> R2 through R3 under a Moore
// control unit.
//
// A rising request on w, seen by the controller in its idle state, starts a
// transfer of three clock cycles: R3 <- R2, then R2 <- R1, then R1 <- R3,
// with done high in the last of them. When the controller is back in its idle
// state, R1 and R2 are exchanged and R3 holds the old R2. While a transfer
// runs, w is ignored; rst (active high, asynchronous) stops it in any state
// and returns the controller to idle, leaving the registers as far as the
// transfer had got.
//
// GATE_LEVEL selects the controller: 1 (default) the netlist of transfer-gate
// AND/OR cells and D flip-flops, 0 the state-machine description. Both behave
// the same on every cycle.
//
// Interface: clk, rst, w; ld_we / ld_data to write the registers from outside;
// r[i] is register i+1; ctrl the seven controller outputs; state {y2,y1}.
// Latency: w sampled at edge 0, done high during the cycle after edge 2,
// R1 and R2 exchanged after edge 3.
// The controller, its outputs and the three-cycle timing follow the document;
// the word width and the external write port are this design's choices.
module data_transfer_top
  import dt_pkg::*;
#(
  parameter int unsigned WIDTH      = 8,
  parameter bit          GATE_LEVEL = 1'b1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              w,
  input  logic [NREG-1:0]   ld_we,
  input  logic [WIDTH-1:0]  ld_data,
  output logic [WIDTH-1:0]  r   [NREG],
  output logic [WIDTH-1:0]  bus,
  output ctrl_t             ctrl,
  output logic [1:0]        state,
  output logic              done
);

  if (GATE_LEVEL) begin : g_ctrl
    dt_control_gates u_ctrl (
      .clk, .rst, .w,
      .r1_out(ctrl.r1_out), .r1_in(ctrl.r1_in),
      .r2_out(ctrl.r2_out), .r2_in(ctrl.r2_in),
      .r3_out(ctrl.r3_out), .r3_in(ctrl.r3_in),
      .done(ctrl.done), .state_bits(state)
    );
  end else begin : g_ctrl
    dt_control_fsm u_ctrl (
      .clk, .rst, .w,
      .r1_out(ctrl.r1_out), .r1_in(ctrl.r1_in),
      .r2_out(ctrl.r2_out), .r2_in(ctrl.r2_in),
      .r3_out(ctrl.r3_out), .r3_in(ctrl.r3_in),
      .done(ctrl.done), .state_bits(state)
    );
  end

  dt_regbank #(.WIDTH(WIDTH)) u_regs (
    .clk,
    .out_en ({ctrl.r3_out, ctrl.r2_out, ctrl.r1_out}),
    .in_en  ({ctrl.r3_in,  ctrl.r2_in,  ctrl.r1_in}),
    .ld_we, .ld_data,
    .q(r), .bus
  );

  assign done = ctrl.done;

endmodule
