// reduction_circuit_tb: end-to-end test of the reduction circuit at its
// default size (n = 16, 64-bit values, 18-stage adder, 20-cycle schedule).
//
// Stimulus, in three phases:
//   1. isolated sets of every legal size 2..16, one at a time, to check the
//      latency bound 3n + (ALPHA-1)lg(n) - 1 from the last input of a set to
//      its sum;
//   2. a continuous stream (one value every cycle) of sets of random sizes;
//   3. the same with random gaps in the input.
// Values are integers times powers of two, small enough that every partial
// sum is exact, so the expected sum (computed here in double precision) does
// not depend on the order in which the circuit adds. Each set must come out
// exactly once, with the right set number and bit-exact value, and the
// overflow and error flags must stay low. The testbench also counts how
// often each mechanism of the design happened and fails if one never did:
// reads from every level buffer, exits at every set size, both write ports
// used in one cycle, a slot left unused because its buffer held fewer than
// two words, a buffer holding three words, and input gaps. The circuit is
// instantiated with all parameters at their defaults.
module reduction_circuit_tb;
  localparam int unsigned LG_N  = 4;
  localparam int unsigned ALPHA = 20;
  localparam int unsigned NSETS_STREAM = 600;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [63:0] in_data = '0;
  logic [15:0] in_set = '0;
  logic [2:0]  in_lgsize = 3'd1;
  logic        out_valid;
  logic [63:0] out_data;
  logic [15:0] out_set;
  logic        overflow, error;

  logic        clk2x = 1'b0;

  reduction_circuit dut (
    .clk, .clk2x, .rst_n, .in_valid, .in_data, .in_set, .in_lgsize,
    .out_valid, .out_data, .out_set, .overflow, .error
  );

  // the default circuit uses the single-clock buffer memory: clk2x stays low
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // scoreboard, indexed by set number
  logic [63:0] exp_sum  [int];
  longint      last_in  [int];
  int          set_lg   [int];
  bit          isolated [int];
  int          outstanding = 0;
  int          next_set = 0;

  // mechanism counters
  int n_read [LG_N];
  int n_exit [LG_N+1];
  int n_dual_write = 0, n_skip_slot = 0, n_three = 0, n_gap = 0;

  function automatic real rnd_value();
    int m, k;
    real v;
    m = int'($urandom_range(2097152, 0)) - 1048576;
    k = int'($urandom_range(16, 0)) - 8;
    v = real'(m);
    if (k >= 0) repeat (k) v = v * 2.0;
    else        repeat (-k) v = v / 2.0;
    return v;
  endfunction

  task automatic send_set(input int lg, input bit iso, input int gap_pct);
    real acc;
    int  s;
    acc = 0.0;
    s = next_set;
    next_set++;
    for (int j = 0; j < (1 << lg); j++) begin
      real v;
      while (gap_pct > 0 && int'($urandom_range(99, 0)) < gap_pct) begin
        in_valid <= 1'b0;
        n_gap++;
        @(posedge clk);
      end
      v = rnd_value();
      acc = acc + v;
      in_valid  <= 1'b1;
      in_data   <= $realtobits(v);
      in_set    <= 16'(s);
      in_lgsize <= 3'(lg);
      @(posedge clk);
    end
    exp_sum[s]  = $realtobits(acc);
    last_in[s]  = cycle - 1;
    set_lg[s]   = lg;
    isolated[s] = iso;
    outstanding++;
  endtask

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int s;
      s = int'(out_set);
      checks++;
      if (!exp_sum.exists(s)) begin
        failures++;
        $display("FAIL: unexpected or repeated result for set %0d", s);
      end else begin
        if (out_data !== exp_sum[s]) begin
          failures++;
          $display("FAIL: set %0d sum %h expected %h", s, out_data, exp_sum[s]);
        end
        if (isolated[s]) begin
          longint lat, bound;
          int n;
          n = 1 << set_lg[s];
          lat = cycle - last_in[s];
          bound = 3 * longint'(n) + (longint'(ALPHA) - 1) * longint'(set_lg[s]) - 1;
          checks++;
          if (lat > bound) begin
            failures++;
            $display("FAIL: set of %0d latency %0d above bound %0d", n, lat, bound);
          end
        end
        n_exit[set_lg[s]]++;
        exp_sum.delete(s);
        outstanding--;
      end
    end
  end

  // mechanism monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.rd_fire) n_read[dut.rd_level[1:0]]++;
      if (dut.rd_level < 3'(LG_N) && !dut.rd_fire && dut.started) n_skip_slot++;
      if (dut.we0 && dut.we1) n_dual_write++;
      for (int i = 0; i < int'(LG_N); i++)
        if (dut.u_ctrl.cnt_q[i] == 3'd3) n_three++;
    end
  end

  task automatic drain();
    int t;
    t = 0;
    in_valid <= 1'b0;
    while (outstanding > 0 && t < 2000) begin
      @(posedge clk);
      t++;
    end
  endtask

  initial begin
    foreach (n_read[i]) n_read[i] = 0;
    foreach (n_exit[i]) n_exit[i] = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // phase 1: isolated sets of each size
    for (int lg = 1; lg <= int'(LG_N); lg++) begin
      repeat (2) begin
        send_set(lg, 1'b1, 0);
        drain();
      end
    end
    // phase 2: continuous stream
    for (int k = 0; k < int'(NSETS_STREAM); k++)
      send_set(int'($urandom_range(LG_N, 1)), 1'b0, 0);
    // phase 3: stream with gaps
    for (int k = 0; k < int'(NSETS_STREAM); k++)
      send_set(int'($urandom_range(LG_N, 1)), 1'b0, 20);
    drain();

    checks++;
    if (outstanding != 0) begin
      failures++;
      $display("FAIL: %0d sets never came out", outstanding);
    end
    checks++;
    if (overflow || error) begin
      failures++;
      $display("FAIL: overflow=%0d error=%0d", overflow, error);
    end
    for (int i = 0; i < int'(LG_N); i++) begin
      checks++;
      if (n_read[i] == 0) begin failures++; $display("FAIL: level %0d never read", i); end
      checks++;
      if (n_exit[i+1] == 0) begin failures++; $display("FAIL: no exit at size %0d", 1 << (i+1)); end
    end
    checks++; if (n_dual_write == 0) begin failures++; $display("FAIL: no dual write"); end
    checks++; if (n_skip_slot == 0)  begin failures++; $display("FAIL: no skipped slot"); end
    checks++; if (n_three == 0)      begin failures++; $display("FAIL: no 3-word buffer"); end
    checks++; if (n_gap == 0)        begin failures++; $display("FAIL: no input gap"); end
    $display("mechanisms: reads/level %0d %0d %0d %0d, exits/size %0d %0d %0d %0d, dual writes %0d, skipped slots %0d, 3-word buffers %0d, gaps %0d",
             n_read[0], n_read[1], n_read[2], n_read[3], n_exit[1], n_exit[2], n_exit[3], n_exit[4],
             n_dual_write, n_skip_slot, n_three, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);  // far above the ~11000 cycles needed
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
