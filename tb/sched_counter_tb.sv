// sched_counter_tb: self-checking testbench for the schedule counter.
//
// Holds C at 0 until first_use, then expects C to count up by one per cycle
// modulo 2^LG_N (later first_use pulses are ignored). In every cycle the slot
// decode is checked directly against the schedule equations: rd_level = i
// exactly when C = 2^i - 1 (mod 2^(i+1)), wr_level = i exactly when
// C - ALPHA = 2^i - 1 (mod 2^(i+1)), and LG_N when no level matches. A reset
// in the middle must stop the counter until the next first use. Run with the
// default n = 16, ALPHA = 20 and with n = 64, ALPHA = 7.
module sched_counter_tb;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  task automatic expect_level(input string what, input int got, input int cval, input int lg_n);
    int want;
    want = lg_n;
    for (int i = 0; i < lg_n; i++)
      if ((cval % (1 << (i + 1))) == (1 << i) - 1) want = i;
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL: %s level %0d expected %0d (C=%0d)", what, got, want, cval);
    end
  endtask

  // instance A: defaults
  logic       rst_a = 1'b0, fu_a = 1'b0;
  logic       st_a;
  logic [3:0] c_a;
  logic [2:0] rl_a, wl_a;
  sched_counter dut_a (.clk, .rst_n(rst_a), .first_use(fu_a), .started(st_a),
                       .c(c_a), .rd_level(rl_a), .wr_level(wl_a));

  // instance B: n = 64, short pipeline
  logic       rst_b = 1'b0, fu_b = 1'b0;
  logic       st_b;
  logic [5:0] c_b;
  logic [2:0] rl_b, wl_b;
  sched_counter #(.LG_N(6), .ALPHA(7)) dut_b (.clk, .rst_n(rst_b), .first_use(fu_b), .started(st_b),
                       .c(c_b), .rd_level(rl_b), .wr_level(wl_b));

  int exp_a = 0, exp_b = 0;
  bit run_a = 0, run_b = 0;

  always @(negedge clk) begin
    checks += 2;
    if (int'(c_a) != (run_a ? exp_a % 16 : 0)) begin failures++; $display("FAIL: C_a %0d expected %0d", c_a, exp_a % 16); end
    if (int'(c_b) != (run_b ? exp_b % 64 : 0)) begin failures++; $display("FAIL: C_b %0d expected %0d", c_b, exp_b % 64); end
    checks += 2;
    if (st_a != run_a) begin failures++; $display("FAIL: started_a"); end
    if (st_b != run_b) begin failures++; $display("FAIL: started_b"); end
    expect_level("rd_a", int'(rl_a), int'(c_a), 4);
    expect_level("wr_a", int'(wl_a), (int'(c_a) - 20 + 1600) % 16, 4);
    expect_level("rd_b", int'(rl_b), int'(c_b), 6);
    expect_level("wr_b", int'(wl_b), (int'(c_b) - 7 + 6400) % 64, 6);
  end

  // reference count: C is 0 in the cycle of first use, then counts every cycle
  always @(posedge clk) begin
    if (!rst_a) begin run_a <= 0; exp_a <= 0; end
    else if (run_a) exp_a <= exp_a + 1;
    else if (fu_a) begin run_a <= 1; exp_a <= 1; end
    if (!rst_b) begin run_b <= 0; exp_b <= 0; end
    else if (run_b) exp_b <= exp_b + 1;
    else if (fu_b) begin run_b <= 1; exp_b <= 1; end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_a <= 1'b1; rst_b <= 1'b1;
    repeat (5) @(posedge clk);
    fu_a <= 1'b1;
    @(posedge clk);
    fu_a <= 1'b0;
    repeat (3) @(posedge clk);
    fu_b <= 1'b1;
    @(posedge clk);
    fu_b <= 1'b0;
    for (int i = 0; i < 300; i++) begin
      fu_a <= ($urandom_range(3, 0) == 0);   // ignored while running
      @(posedge clk);
    end
    fu_a <= 1'b0;
    rst_a <= 1'b0;
    repeat (3) @(posedge clk);
    rst_a <= 1'b1;
    repeat (4) @(posedge clk);
    fu_a <= 1'b1;
    @(posedge clk);
    fu_a <= 1'b0;
    repeat (200) @(posedge clk);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
