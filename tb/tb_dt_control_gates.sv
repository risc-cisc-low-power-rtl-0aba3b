// tb_dt_control_gates: checks the gate-level controller against the state table.
//
// The reference is the state table itself, held as constants: next state for
// w = 0 and w = 1, and the seven outputs, per present state. w is random on
// every cycle and reset is pulsed at random, so every state, every branch and
// a reset from every state are exercised. Besides the per-cycle comparison the
// bench measures each transfer: from the edge that samples w = 1 in state A,
// DONE must rise after exactly two more edges, be high for one cycle, and the
// controller must be back in A after the third.
module tb_dt_control_gates;
  logic clk = 1'b0, rst, w;
  logic r1_out, r1_in, r2_out, r2_in, r3_out, r3_in, done;
  logic [1:0] state_bits;
  int checks = 0, failures = 0;

  dt_control_gates dut (.*);

  always #5 clk = ~clk;

  // State table: index = present state {y2,y1}.
  localparam logic [1:0] NEXT_W0 [4] = '{2'b00, 2'b10, 2'b11, 2'b00};
  localparam logic [1:0] NEXT_W1 [4] = '{2'b01, 2'b10, 2'b11, 2'b00};
  // Outputs {R1out, R1, R2out, R2, R3out, R3, done}.
  localparam logic [6:0] OUTS    [4] = '{7'b0000000, 7'b0010010,
                                         7'b1001000, 7'b0100101};

  logic [1:0] ref_state;
  int reset_from [4];
  int transfers = 0;
  int start_cycle, cycle = 0;
  bit in_transfer = 0;

  task automatic compare();
    checks++;
    if (state_bits !== ref_state ||
        {r1_out, r1_in, r2_out, r2_in, r3_out, r3_in, done} !== OUTS[ref_state]) begin
      failures++;
      $display("FAIL cycle %0d: state=%b outs=%b expected state=%b outs=%b", cycle,
               state_bits, {r1_out, r1_in, r2_out, r2_in, r3_out, r3_in, done},
               ref_state, OUTS[ref_state]);
    end
  endtask

  initial begin
    rst = 1'b0; w = 1'b0; ref_state = 2'b00;
    #1 rst = 1'b1;
    #2; compare();
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      w = 1'($urandom);
      @(posedge clk);
      cycle++;
      if (ref_state == 2'b00 && w) begin
        in_transfer = 1; start_cycle = cycle;
      end
      ref_state = w ? NEXT_W1[ref_state] : NEXT_W0[ref_state];
      #1; compare();
      // Cycle count of a transfer.
      if (in_transfer && done) begin
        checks++;
        if (cycle - start_cycle != 2) begin
          failures++;
          $display("FAIL DONE %0d edges after start, expected 2", cycle - start_cycle);
        end
      end
      if (in_transfer && ref_state == 2'b00) begin
        checks++;
        if (cycle - start_cycle != 3) begin
          failures++;
          $display("FAIL transfer took %0d cycles, expected 3", cycle - start_cycle);
        end
        transfers++;
        in_transfer = 0;
      end
      @(negedge clk);
      if ($urandom_range(0, 19) == 0) begin
        reset_from[ref_state]++;
        rst = 1'b1; #1;
        ref_state = 2'b00; in_transfer = 0;
        compare();
        #1 rst = 1'b0;
      end
    end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (reset_from[s] == 0) begin
        failures++;
        $display("FAIL no reset was applied in state %0d", s);
      end
    end
    checks++;
    if (transfers == 0) begin failures++; $display("FAIL no complete transfer"); end
    $display("transfers=%0d resets per state=%0d,%0d,%0d,%0d", transfers,
             reset_from[0], reset_from[1], reset_from[2], reset_from[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
