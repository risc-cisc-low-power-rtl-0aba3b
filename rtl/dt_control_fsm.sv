// dt_control_fsm: architecture-level control unit of the register swap.
//
// A Moore machine with four states that moves the contents of R2 to R3, then
// R1 to R2, then R3 to R1, so that R1 and R2 end up exchanged. In the idle
// state A it waits for w = 1; after that w is ignored and the machine steps
// A -> B -> C -> D -> A, one state per clock. The outputs depend on the state
// only:
//   A: nothing           B: R2out, R3in
//   C: R1out, R2in       D: R3out, R1in, DONE
// so a transfer takes three clock cycles after w is sampled, and DONE is high
// for exactly one cycle, the one in which R1 is loaded.
//
// Interface: clk, rst (active high), w in; the seven control outputs out.
// The state table, the state encoding {y2,y1} and the active-high reset that
// stops a transfer in any state follow the document. The reset is asynchronous
// here, which is this design's own choice.
module dt_control_fsm
  import dt_pkg::*;
(
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

  state_t state, state_next;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) state <= ST_A;
    else     state <= state_next;
  end

  always_comb begin
    unique case (state)
      ST_A:    state_next = w ? ST_B : ST_A;
      ST_B:    state_next = ST_C;
      ST_C:    state_next = ST_D;
      ST_D:    state_next = ST_A;
      default: state_next = ST_A;
    endcase
  end

  always_comb begin
    {r1_out, r1_in, r2_out, r2_in, r3_out, r3_in, done} = '0;
    unique case (state)
      ST_A: ;
      ST_B: begin r2_out = 1'b1; r3_in = 1'b1; end
      ST_C: begin r1_out = 1'b1; r2_in = 1'b1; end
      ST_D: begin r3_out = 1'b1; r1_in = 1'b1; done = 1'b1; end
      default: ;
    endcase
  end

  assign state_bits = state;

endmodule
