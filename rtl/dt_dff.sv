// dt_dff: D flip-flop of the control unit, with its complement output.
//
// q takes d on the rising edge of clk; rst (active high) clears q at once,
// independent of the clock. qn is the complement of q, as the flip-flop
// symbol of the gate-level controller has both outputs.
//
// Interface: clk, rst, d in; q, qn out. One clock of latency from d to q.
// The document builds this flip-flop from 16 transistors and gives its
// function only; the asynchronous reset is this design's choice.
module dt_dff (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= 1'b0;
    else     q <= d;
  end

  assign qn = ~q;

endmodule
