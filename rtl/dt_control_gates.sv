// dt_control_gates: circuit-level control unit of the register swap.
//
// The same Moore machine as dt_control_fsm, written as a netlist of two
// D flip-flops (state bits y2, y1), four transfer-gate AND cells and two
// transfer-gate OR cells. The next-state and output equations, worked out from
// the state table with A = 00, B = 01, C = 10, D = 11, are
//   Y1 = w.~y1 + y2.~y1          Y2 = y1.~y2 + y2.~y1
//   R2out = R3in = y1.~y2        (state B)
//   R1out = R2in = y2.~y1        (state C)
//   R3out = R1in = DONE = y1.y2  (state D)
// so the product y2.~y1 is shared by both next-state sums and the state-C
// outputs, and y1.~y2 by Y2 and the state-B outputs. That is six gates and
// two flip-flops, the count of the document's synthesised controller
// (6 x 6 + 16 x 2 = 68 transistors in static CMOS). The complement of each
// state bit comes from the flip-flop's qn output.
//
// Interface and timing are those of dt_control_fsm: clk, rst (active high,
// asynchronous), w in; seven control outputs; one state step per clock.
module dt_control_gates (
  input  logic clk,
  input  logic rst,
  input  logic w,
  output logic r1_out,
  output logic r1_in,
  output logic r2_out,
  output logic r2_in,
  output logic r3_out,
  output logic r3_in,
  output logic done,
  output logic [1:0] state_bits   // {y2, y1}, for observation
);

  logic y1, y1_n, y2, y2_n;       // state bits and their complements
  logic next_y1, next_y2;         // D inputs
  logic p_w_y1n;                  // w.~y1
  logic p_y2_y1n;                 // y2.~y1   (state C)
  logic p_y1_y2n;                 // y1.~y2   (state B)
  logic p_y1_y2;                  // y1.y2    (state D)

  pt_and2 u_and_w  (.in0(w),  .in1(y1_n), .out(p_w_y1n));
  pt_and2 u_and_c  (.in0(y2), .in1(y1_n), .out(p_y2_y1n));
  pt_and2 u_and_b  (.in0(y1), .in1(y2_n), .out(p_y1_y2n));
  pt_and2 u_and_d  (.in0(y1), .in1(y2),   .out(p_y1_y2));

  pt_or2  u_or_y1  (.in0(p_w_y1n),  .in1(p_y2_y1n), .out(next_y1));
  pt_or2  u_or_y2  (.in0(p_y1_y2n), .in1(p_y2_y1n), .out(next_y2));

  dt_dff  u_ff_y1  (.clk(clk), .rst(rst), .d(next_y1), .q(y1), .qn(y1_n));
  dt_dff  u_ff_y2  (.clk(clk), .rst(rst), .d(next_y2), .q(y2), .qn(y2_n));

  assign r2_out = p_y1_y2n;
  assign r3_in  = p_y1_y2n;
  assign r1_out = p_y2_y1n;
  assign r2_in  = p_y2_y1n;
  assign r3_out = p_y1_y2;
  assign r1_in  = p_y1_y2;
  assign done   = p_y1_y2;

  assign state_bits = {y2, y1};

endmodule
