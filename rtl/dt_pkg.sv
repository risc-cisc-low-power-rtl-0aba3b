// dt_pkg: types and constants shared by the register-transfer controller and
// its datapath.
//
// The controller is a four-state Moore machine on two state bits (y2, y1).
// The state encoding below is the one of the state table of the design:
// A = 00 (idle), B = 01, C = 10, D = 11. The control word collects the seven
// Moore outputs: one bus-output enable and one load enable per register, and
// DONE. Its field order is this design's own choice.
package dt_pkg;

  // Number of registers taking part in the transfer (R1, R2, R3).
  localparam int unsigned NREG = 3;

  // Controller state, {y2, y1}.
  typedef enum logic [1:0] {
    ST_A = 2'b00,  // no transfer, waits for w = 1
    ST_B = 2'b01,  // R2out = 1, R3in = 1   (R3 <- R2)
    ST_C = 2'b10,  // R1out = 1, R2in = 1   (R2 <- R1)
    ST_D = 2'b11   // R3out = 1, R1in = 1, DONE = 1  (R1 <- R3)
  } state_t;

  // Moore outputs of the controller.
  typedef struct packed {
    logic r1_out;
    logic r1_in;
    logic r2_out;
    logic r2_in;
    logic r3_out;
    logic r3_in;
    logic done;
  } ctrl_t;

endpackage
