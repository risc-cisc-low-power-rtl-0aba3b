// tb_data_transfer_top: end-to-end test of the register swap.
//
// Two copies of the design run side by side on the same stimulus: one with
// the gate-level controller (default) and one with the state-machine
// controller. The bench loads random values into R1 and R2 (and R3), raises w,
// and checks, against its own record of the loaded values:
//   - the bus and register contents after each of the three transfer cycles
//     (R3 <- R2, R2 <- R1, R1 <- R3),
//   - that DONE is high in exactly the third cycle and that the swap is
//     complete three edges after w was sampled,
//   - that w held high through a transfer does not disturb it and starts the
//     next transfer straight away (back-to-back),
//   - that w = 0 in the idle state leaves everything unchanged,
//   - that reset in the middle of a transfer stops it and leaves the
//     registers as far as it had got.
// Each of these mechanisms is counted, and one that never happened is a
// failure. Both copies must agree on every output in every cycle.
module tb_data_transfer_top;
  import dt_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst, w;
  logic [NREG-1:0] ld_we;
  logic [W-1:0] ld_data;
  logic [W-1:0] r_g [NREG], r_f [NREG];
  logic [W-1:0] bus_g, bus_f;
  ctrl_t ctrl_g, ctrl_f;
  logic [1:0] state_g, state_f;
  logic done_g, done_f;
  int checks = 0, failures = 0;
  int n_swaps = 0, n_idle = 0, n_back_to_back = 0, n_abort = 0, n_w_high_during = 0;

  data_transfer_top dut_g (
    .clk, .rst, .w, .ld_we, .ld_data,
    .r(r_g), .bus(bus_g), .ctrl(ctrl_g), .state(state_g), .done(done_g));

  data_transfer_top #(.GATE_LEVEL(1'b0)) dut_f (
    .clk, .rst, .w, .ld_we, .ld_data,
    .r(r_f), .bus(bus_f), .ctrl(ctrl_f), .state(state_f), .done(done_f));

  always #5 clk = ~clk;

  // The two controllers must agree on every cycle once the registers hold
  // loaded values.
  bit loaded = 0;
  always @(negedge clk) if (loaded) begin
    checks++;
    if (r_g != r_f || bus_g != bus_f || ctrl_g != ctrl_f || state_g != state_f) begin
      failures++;
      $display("FAIL gate-level and state-machine copies differ at %0t", $time);
    end
  end

  task automatic expect_eq(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %b expected %b (t=%0t)", what, got, exp, $time);
    end
  endtask

  task automatic load(logic [W-1:0] a, logic [W-1:0] b, logic [W-1:0] c);
    @(negedge clk);
    ld_we = 3'b001; ld_data = a; @(negedge clk);
    ld_we = 3'b010; ld_data = b; @(negedge clk);
    ld_we = 3'b100; ld_data = c; @(negedge clk);
    ld_we = '0;
    loaded = 1;
  endtask

  // One transfer; w is raised at a negedge and sampled on the next posedge.
  // hold_w keeps w high for the whole transfer.
  task automatic swap(logic [W-1:0] a, logic [W-1:0] b, bit hold_w);
    w = 1'b1;
    @(posedge clk); #1;             // edge 0: A -> B
    if (!hold_w) w = 1'b0; else n_w_high_during++;
    expect_bit("B state", state_g == 2'b01, 1'b1);
    expect_eq ("bus in B", bus_g, b);
    expect_bit("done in B", done_g, 1'b0);
    @(posedge clk); #1;             // edge 1: R3 <- R2
    expect_eq ("R3 after B", r_g[2], b);
    expect_eq ("bus in C", bus_g, a);
    expect_bit("done in C", done_g, 1'b0);
    @(posedge clk); #1;             // edge 2: R2 <- R1
    expect_eq ("R2 after C", r_g[1], a);
    expect_eq ("bus in D", bus_g, b);
    expect_bit("done in D", done_g, 1'b1);
    @(posedge clk); #1;             // edge 3: R1 <- R3, back to A
    expect_eq ("R1 after swap", r_g[0], b);
    expect_eq ("R2 after swap", r_g[1], a);
    expect_eq ("R3 after swap", r_g[2], b);
    expect_bit("done after swap", done_g, 1'b0);
    expect_bit("idle after swap", state_g == 2'b00, 1'b1);
    n_swaps++;
  endtask

  initial begin
    logic [W-1:0] a, b, c;
    rst = 1'b0; w = 1'b0; ld_we = '0; ld_data = '0;
    #1 rst = 1'b1;
    #12 rst = 1'b0;

    for (int t = 0; t < 40; t++) begin
      a = 8'($urandom); b = 8'($urandom); c = 8'($urandom);
      load(a, b, c);
      // Idle: w = 0 for a few cycles changes nothing.
      repeat ($urandom_range(1, 3)) @(posedge clk);
      #1;
      expect_eq("R1 idle", r_g[0], a);
      expect_eq("R2 idle", r_g[1], b);
      expect_eq("R3 idle", r_g[2], c);
      expect_bit("done idle", done_g, 1'b0);
      n_idle++;
      @(negedge clk);
      case (t % 4)
        0, 1: swap(a, b, 1'b0);
        2: begin
          // w held high: the second transfer starts at once and swaps back.
          swap(a, b, 1'b1);
          swap(b, a, 1'b0);
          n_back_to_back++;
        end
        default: begin
          // Reset after the first transfer cycle: R3 already holds R2, the
          // rest is untouched, and the controller is idle.
          w = 1'b1;
          @(posedge clk); #1; w = 1'b0;
          @(posedge clk); #1;
          rst = 1'b1; #1;
          expect_bit("idle at reset", state_g == 2'b00, 1'b1);
          expect_bit("done at reset", done_g, 1'b0);
          @(negedge clk); rst = 1'b0;
          @(posedge clk); #1;
          expect_eq("R1 after abort", r_g[0], a);
          expect_eq("R2 after abort", r_g[1], b);
          expect_eq("R3 after abort", r_g[2], b);
          expect_bit("idle after abort", state_g == 2'b00, 1'b1);
          n_abort++;
        end
      endcase
      @(negedge clk);
    end

    checks++; if (n_swaps == 0)        begin failures++; $display("FAIL no swap"); end
    checks++; if (n_idle == 0)         begin failures++; $display("FAIL no idle wait"); end
    checks++; if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back transfer"); end
    checks++; if (n_w_high_during == 0) begin failures++; $display("FAIL w never high during a transfer"); end
    checks++; if (n_abort == 0)        begin failures++; $display("FAIL no reset abort"); end
    $display("swaps=%0d idle=%0d back_to_back=%0d w_high_during=%0d aborts=%0d",
             n_swaps, n_idle, n_back_to_back, n_w_high_during, n_abort);
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
