// tb_pt_or2: exhaustive check of the transfer-gate OR cell.
// All four input pairs are applied, each held for 10 time units, and out is
// compared with the OR truth table. A watchdog ends the run if it hangs.
module tb_pt_or2;
  logic in0, in1, out;
  int checks = 0, failures = 0;

  pt_or2 dut (.in0, .in1, .out);

  // OR truth table, indexed by {in1, in0}.
  localparam logic [3:0] TRUTH = 4'b1110;

  initial begin
    for (int k = 0; k < 4; k++) begin
      {in1, in0} = 2'(k);
      #10;
      checks++;
      if (out !== TRUTH[k]) begin
        failures++;
        $display("FAIL in1=%b in0=%b out=%b expected %b", in1, in0, out, TRUTH[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
