// reduction_scale_tb: the reduction circuit at the sizes and formats it is
// meant to scale to.
//
// Three instances run side by side:
//   u64  64-bit values, sets of up to 2^24 values (LG_N = 24);
//   u32  32-bit values, sets of up to 2^24 values (LG_N = 24);
//   s32  32-bit values, sets of up to 16 values (LG_N = 4).
// Phase 1 sends the two large instances one set of 2^24 values and then one
// of 2^20. Phase 2 sends all three instances the same 400 back-to-back sets
// of random size 2..16, with random gaps. Values are small integers, so
// every partial sum is exact in both formats; the expected sums are computed
// here as integers and converted to each format. Checked: bit-exact sums,
// right set numbers, every set out once, no overflow or error, and for the
// two large sets the latency bound 3n + (ALPHA-1)lg(n) - 1 after their last
// value. The storage stays at 4 words per level whatever n is.
module reduction_scale_tb;
  localparam int unsigned ALPHA = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // shared stimulus
  logic        v_big = 1'b0, v_small = 1'b0;
  longint      val = 0;
  logic [15:0] set_no = '0;
  int          lg = 1;

  function automatic logic [31:0] to_f32(input longint x);
    logic [63:0] d;
    d = $realtobits(real'(x));
    if (x == 0) return 32'h0;
    // exact conversion: |x| < 2^24, so the low 29 fraction bits are zero
    return {d[63], 8'(int'(d[62:52]) - 1023 + 127), d[51:29]};
  endfunction

  function automatic logic [63:0] to_f64(input longint x);
    return $realtobits(real'(x));
  endfunction

  // instances
  logic        o64_v, o32_v, s32_v;
  logic [63:0] o64_d;
  logic [31:0] o32_d, s32_d;
  logic [15:0] o64_s, o32_s, s32_s;
  logic        f64_o, f64_e, f32_o, f32_e, fs_o, fs_e;

  reduction_circuit #(.LG_N(24)) u64 (
    .clk, .clk2x(1'b0), .rst_n, .in_valid(v_big | v_small), .in_data(to_f64(val)), .in_set(set_no),
    .in_lgsize(5'(lg)), .out_valid(o64_v), .out_data(o64_d), .out_set(o64_s),
    .overflow(f64_o), .error(f64_e));

  reduction_circuit #(.LG_N(24), .EXP_W(8), .MAN_W(23)) u32 (
    .clk, .clk2x(1'b0), .rst_n, .in_valid(v_big | v_small), .in_data(to_f32(val)), .in_set(set_no),
    .in_lgsize(5'(lg)), .out_valid(o32_v), .out_data(o32_d), .out_set(o32_s),
    .overflow(f32_o), .error(f32_e));

  reduction_circuit #(.LG_N(4), .EXP_W(8), .MAN_W(23)) s32 (
    .clk, .clk2x(1'b0), .rst_n, .in_valid(v_small), .in_data(to_f32(val)), .in_set(set_no),
    .in_lgsize(3'(lg)), .out_valid(s32_v), .out_data(s32_d), .out_set(s32_s),
    .overflow(fs_o), .error(fs_e));

  // scoreboard: expected integer sum per set, one pending flag per instance
  longint exp_sum [int];
  longint last_in [int];
  int     set_lg  [int];
  bit     big_set [int];
  int     pend [3];

  task automatic check_out(input int inst, input int s, input logic [63:0] got);
    logic [63:0] want;
    checks++;
    if (!exp_sum.exists(s)) begin
      failures++;
      $display("FAIL: instance %0d unknown set %0d", inst, s);
      return;
    end
    want = (inst == 0) ? to_f64(exp_sum[s]) : {32'h0, to_f32(exp_sum[s])};
    if (got !== want) begin
      failures++;
      $display("FAIL: instance %0d set %0d sum %h expected %h", inst, s, got, want);
    end
    if (big_set[s]) begin
      longint bound;
      bound = 3 * (longint'(1) << set_lg[s]) + (ALPHA - 1) * set_lg[s] - 1;
      checks++;
      if (cycle - last_in[s] > bound) begin
        failures++;
        $display("FAIL: instance %0d set of 2^%0d latency %0d above %0d", inst, set_lg[s], cycle - last_in[s], bound);
      end else
        $display("instance %0d: set of 2^%0d done %0d cycles after its last value (bound %0d)",
                 inst, set_lg[s], cycle - last_in[s], bound);
    end
    pend[inst]--;
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (o64_v) check_out(0, int'(o64_s), o64_d);
      if (o32_v) check_out(1, int'(o32_s), {32'h0, o32_d});
      if (s32_v) check_out(2, int'(s32_s), {32'h0, s32_d});
    end
  end

  task automatic wait_idle(input longint limit);
    longint t = 0;
    while ((pend[0] + pend[1] + pend[2]) > 0 && t < limit) begin
      @(posedge clk);
      t++;
    end
  endtask

  initial begin
    int s;
    s = 0;
    pend[0] = 0; pend[1] = 0; pend[2] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // phase 1: two large sets on the large instances
    foreach (set_lg[i]) ;
    for (int k = 0; k < 2; k++) begin
      longint acc;
      int l;
      l = (k == 0) ? 24 : 20;
      acc = 0;
      for (longint j = 0; j < (longint'(1) << l); j++) begin
        longint x;
        x = longint'($urandom_range(2, 0)) - 1;
        acc += x;
        v_big <= 1'b1; val <= x; set_no <= 16'(s); lg <= l;
        @(posedge clk);
      end
      v_big <= 1'b0;
      exp_sum[s] = acc; last_in[s] = cycle - 1; set_lg[s] = l; big_set[s] = 1;
      pend[0]++; pend[1]++;
      s++;
      wait_idle(longint'(4) << l);
    end
    // phase 2: small sets to all three instances
    for (int k = 0; k < 400; k++) begin
      longint acc;
      int l;
      l = int'($urandom_range(4, 1));
      acc = 0;
      for (int j = 0; j < (1 << l); j++) begin
        longint x;
        while ($urandom_range(9, 0) == 0) begin
          v_small <= 1'b0;
          @(posedge clk);
        end
        x = longint'($urandom_range(2000000, 0)) - 1000000;
        acc += x;
        v_small <= 1'b1; val <= x; set_no <= 16'(s); lg <= l;
        @(posedge clk);
      end
      exp_sum[s] = acc; last_in[s] = cycle - 1; set_lg[s] = l; big_set[s] = 0;
      pend[0]++; pend[1]++; pend[2]++;
      s++;
    end
    v_small <= 1'b0;
    wait_idle(5000);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (pend[i] != 0) begin failures++; $display("FAIL: instance %0d has %0d sets missing", i, pend[i]); end
    end
    checks++;
    if (f64_o | f64_e | f32_o | f32_e | fs_o | fs_e) begin failures++; $display("FAIL: overflow/error flag"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
