// tb_data_transfer_full: one complete swap through the design at its default
// parameters (8-bit registers, gate-level controller).
// R1 = 8'hA5, R2 = 8'h3C and R3 = 8'h00 are written through the external port;
// one pulse on w must leave R1 = 8'h3C, R2 = 8'hA5, R3 = 8'h3C after three
// clock edges, with DONE high for exactly one of those cycles.
module tb_data_transfer_full;
  import dt_pkg::*;

  logic clk = 1'b0, rst, w;
  logic [NREG-1:0] ld_we;
  logic [7:0] ld_data, bus;
  logic [7:0] r [NREG];
  ctrl_t ctrl;
  logic [1:0] state;
  logic done;
  int checks = 0, failures = 0;
  int done_cycles = 0, edges = 0;

  data_transfer_top dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(string what, logic [7:0] got, logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    rst = 1'b0; w = 1'b0; ld_we = '0; ld_data = '0;
    #1 rst = 1'b1;
    #12 rst = 1'b0;
    @(negedge clk); ld_we = 3'b001; ld_data = 8'hA5;
    @(negedge clk); ld_we = 3'b010; ld_data = 8'h3C;
    @(negedge clk); ld_we = 3'b100; ld_data = 8'h00;
    @(negedge clk); ld_we = '0; w = 1'b1;
    @(posedge clk); #1 w = 1'b0;
    while (state != 2'b00 && edges < 10) begin
      if (done) done_cycles++;
      @(posedge clk); #1;
      edges++;
    end
    checks++;
    if (edges != 3) begin
      failures++;
      $display("FAIL transfer took %0d cycles, expected 3", edges);
    end
    checks++;
    if (done_cycles != 1) begin
      failures++;
      $display("FAIL DONE high for %0d cycles, expected 1", done_cycles);
    end
    expect_eq("R1", r[0], 8'h3C);
    expect_eq("R2", r[1], 8'hA5);
    expect_eq("R3", r[2], 8'h3C);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
