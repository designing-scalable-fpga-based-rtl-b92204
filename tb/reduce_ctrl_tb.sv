// reduce_ctrl_tb: self-checking testbench for the control and address logic.
//
// The controller is run on its own, in a token-level model of the rest of
// the circuit built into the testbench: its own schedule counter (C starts at
// 0 on the first read and counts every cycle; level = trailing ones of C or
// of C - ALPHA), a shadow memory at the controller's addresses, and an
// ALPHA-deep pipeline. A token is an integer count of how many inputs it
// sums, with its set number and set size. Checks: every pair read comes from
// buffer rd_level, from two consecutive slots, holds two tokens of one set
// each summing 2^rd_level inputs; every result written back or sent out sums
// 2^(wr_level+1) inputs; done is raised exactly when that equals the set
// size; every set comes out once; the buffers never overflow. Sets of random
// size 2..16 arrive with random gaps.
module reduce_ctrl_tb;
  localparam int unsigned LG_N  = 4;
  localparam int unsigned ALPHA = 20;
  localparam int unsigned NSETS = 1500;

  typedef struct packed {
    logic [15:0] set;
    logic [2:0]  lg;
    logic [15:0] cnt;
  } tok_t;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       in_valid = 1'b0;
  logic [2:0] rd_level, wr_level;
  logic       pipe_valid;
  logic [2:0] pipe_lgsize;
  logic       rd_fire, we0, we1, done, overflow, error;
  logic [3:0] raddr0, raddr1, waddr0, waddr1;

  reduce_ctrl #(.LG_N(LG_N), .SLOTS(4)) dut (
    .clk, .rst_n, .in_valid, .rd_level, .wr_level, .pipe_valid, .pipe_lgsize,
    .rd_fire, .raddr0, .raddr1, .we0, .waddr0, .we1, .waddr1,
    .done, .overflow, .error
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL: %s", msg);
  endtask

  // testbench schedule counter
  bit   run = 0;
  int   cval = 0;
  function automatic int tones(input int v);
    int n = 0;
    while (n < int'(LG_N) && ((v >> n) & 1) == 1) n++;
    return n;
  endfunction
  assign rd_level = 3'(tones(run ? cval : 0));
  assign wr_level = 3'(tones(((run ? cval : 0) - int'(ALPHA) + 16 * 1000) % 16));

  // pipeline model
  tok_t pipe [ALPHA];
  bit   pv   [ALPHA];
  tok_t in_tok;
  assign pipe_valid  = pv[ALPHA-1];
  assign pipe_lgsize = pipe[ALPHA-1].lg;

  tok_t shadow [16];
  int   seen [int];
  int   sent = 0, received = 0;

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ALPHA); i++) pv[i] <= 1'b0;
      run <= 0;
      cval <= 0;
    end else begin
      tok_t r0, r1, s, o;
      int lvl, wl;
      // counter
      if (run) cval <= (cval + 1) % 16;
      else if (rd_fire) begin run <= 1; cval <= 1; end
      // reads see the memory before this cycle's writes
      lvl = int'(rd_level);
      if (rd_fire) begin
        r0 = shadow[raddr0];
        r1 = shadow[raddr1];
        checks++;
        if (int'(raddr0[3:2]) != lvl || int'(raddr1[3:2]) != lvl || raddr1[1:0] != raddr0[1:0] + 2'd1)
          fail($sformatf("read addresses %h %h for level %0d", raddr0, raddr1, lvl));
        checks++;
        if (r0.set != r1.set || r0.lg != r1.lg) fail($sformatf("pair mixes sets %0d and %0d", r0.set, r1.set));
        checks++;
        if (r0.cnt != 16'(1 << lvl) || r1.cnt != 16'(1 << lvl))
          fail($sformatf("level %0d pair holds %0d + %0d inputs", lvl, r0.cnt, r1.cnt));
        s = '{set: r0.set, lg: r0.lg, cnt: r0.cnt + r1.cnt};
      end
      pipe[0] <= s;
      pv[0]   <= rd_fire;
      for (int i = 1; i < int'(ALPHA); i++) begin
        pipe[i] <= pipe[i-1];
        pv[i]   <= pv[i-1];
      end
      // results
      if (pv[ALPHA-1]) begin
        o = pipe[ALPHA-1];
        wl = int'(wr_level);
        checks++;
        if (o.cnt != 16'(1 << (wl + 1))) fail($sformatf("result of level %0d sums %0d inputs", wl, o.cnt));
        checks++;
        if (done != (int'(o.lg) == wl + 1)) fail("done wrong");
        if (done) begin
          checks++;
          if (seen.exists(int'(o.set))) fail("set came out twice");
          seen[int'(o.set)] = 1;
          received++;
        end else begin
          checks++;
          if (!we1 || int'(waddr1[3:2]) != wl + 1) fail($sformatf("write-back to %h for level %0d", waddr1, wl));
        end
      end else begin
        checks++;
        if (we1 || done) fail("write-back without a result");
      end
      checks++;
      if (we0 != in_valid) fail("input not written");
      if (we0) shadow[waddr0] <= in_tok;
      if (we1) shadow[waddr1] <= o;
      checks++;
      if (overflow || error) fail("overflow or error");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int s = 0; s < int'(NSETS); s++) begin
      int lg;
      lg = int'($urandom_range(LG_N, 1));
      for (int j = 0; j < (1 << lg); j++) begin
        while ($urandom_range(9, 0) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_tok   <= '{set: 16'(s), lg: 3'(lg), cnt: 16'd1};
        @(posedge clk);
      end
      sent++;
    end
    in_valid <= 1'b0;
    repeat (300) @(posedge clk);
    checks++;
    if (received != sent) fail($sformatf("%0d of %0d sets came out", received, sent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSETS * 20 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
