// tb_dt_dff: checks the D flip-flop against a one-cycle delay of d.
// Random d on every cycle, with random reset pulses applied between clock
// edges; q must follow d one edge later, clear at once on reset, and qn must
// always be the complement of q. 200 cycles, with a watchdog.
module tb_dt_dff;
  logic clk = 1'b0, rst, d, q, qn;
  logic expect_q;
  int checks = 0, failures = 0;

  dt_dff dut (.clk, .rst, .d, .q, .qn);

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q !== expect_q || qn !== ~expect_q) begin
      failures++;
      $display("FAIL %s t=%0t q=%b qn=%b expected q=%b", what, $time, q, qn, expect_q);
    end
  endtask

  initial begin
    rst = 1'b0; d = 1'b1;
    #1 rst = 1'b1;
    #2; expect_q = 1'b0; check("reset");
    @(negedge clk); rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      d = 1'($urandom);
      @(posedge clk); #1;
      expect_q = d;
      check("capture");
      if ($urandom_range(0, 9) == 0) begin
        #2 rst = 1'b1;
        #1 expect_q = 1'b0; check("async reset");
        @(negedge clk); rst = 1'b0;
      end else begin
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
