// fp_add_tb: self-checking testbench for the pipelined floating-point adder.
//
// Drives the double-precision adder with random operand pairs (random bit
// patterns, near-cancelling pairs, subnormals, zeros, infinities and NaNs,
// operands with nearby exponents), with occasional idle cycles. Each result
// is compared bit for bit with the simulator's own IEEE double addition
// (round to nearest even); where that is NaN, any NaN is accepted. The cycle
// at which each result leaves is checked against the 18-cycle latency.
// A second, single-precision instance (EXP_W = 8, MAN_W = 23) gets its own
// random pairs. Its reference adds the two values in double precision, which
// is exact enough that rounding that sum once more to single precision (by
// the round-to-nearest-even conversion written below) gives the correctly
// rounded single-precision sum, since 53 >= 2*24 + 2.
module fp_add_tb;
  localparam int unsigned STAGES = 18;
  localparam int unsigned NOPS   = 20000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        in_valid = 1'b0;
  logic [63:0] a = '0, b = '0;
  logic        out_valid;
  logic [63:0] sum;

  int checks = 0, failures = 0;
  longint cycle = 0;

  fp_add #(.EXP_W(11), .MAN_W(52), .STAGES(STAGES)) dut (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid, .sum
  );

  // single-precision instance
  logic        in_valid_s = 1'b0;
  logic [31:0] as = '0, bs = '0;
  logic        out_valid_s;
  logic [31:0] sum_s;

  fp_add #(.EXP_W(8), .MAN_W(23), .STAGES(STAGES)) dut_s (
    .clk, .rst_n, .in_valid(in_valid_s), .a(as), .b(bs), .out_valid(out_valid_s), .sum(sum_s)
  );

  always #5 clk = ~clk;

  function automatic logic is_nan32(input logic [31:0] v);
    return (v[30:23] == 8'hff) && (v[22:0] != '0);
  endfunction

  // exact single -> double
  function automatic real f32_to_real(input logic [31:0] v);
    real m;
    int  e;
    e = int'(v[30:23]);
    if (e == 255) return (v[22:0] != '0) ? $bitstoreal(64'h7ff8_0000_0000_0000)
                                         : $bitstoreal({v[31], 63'h7ff0_0000_0000_0000});
    m = real'(v[22:0]);
    if (e == 0) m = m * (2.0 ** (-149));
    else        m = (m + 8388608.0) * (2.0 ** (e - 150));
    if (v[31]) m = -m;
    if (e == 0 && v[22:0] == '0) return $bitstoreal({v[31], 63'h0});
    return m;
  endfunction

  // double -> single, round to nearest even
  function automatic logic [31:0] f64_to_f32(input logic [63:0] d);
    logic        sg;
    int          e, sh;
    logic [63:0] m, q, rem, half;
    sg = d[63];
    e  = int'(d[62:52]);
    if (e == 2047) return (d[51:0] != '0) ? 32'h7fc0_0000 : {sg, 31'h7f80_0000};
    if (e == 0) return {sg, 31'h0};          // far below the single range
    e = e - 1023;                            // value = m * 2^(e-52)
    m = {11'h0, 1'b1, d[51:0]};
    sh = (e >= -126) ? 29 : 29 + (-126 - e);
    if (sh > 60) return {sg, 31'h0};
    q    = m >> sh;
    rem  = m & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (e >= -126) begin
      if (q == (64'd1 << 24)) begin q = q >> 1; e = e + 1; end
      if (e > 127) return {sg, 31'h7f80_0000};
      return {sg, 8'(e + 127), q[22:0]};
    end
    return {sg, 8'(q >> 23), q[22:0]};       // subnormal, or rounded up to the smallest normal
  endfunction

  function automatic logic [31:0] rnd32(input int mode);
    logic [31:0] x;
    x = $urandom;
    case (mode)
      0: ;
      1: x[30:23] = 8'h00;                                  // subnormal
      2: x = (($urandom_range(1, 0) == 1) ? 32'h7f80_0000 : 32'h0) | {$urandom_range(1, 0) == 1, 31'h0};
      3: x[30:23] = 8'h7f + 8'($urandom_range(8, 0)) - 8'd4;  // near 1.0
      default: x[30:23] = 8'hfe;                            // near overflow
    endcase
    return x;
  endfunction

  logic [31:0] exp_s_q[$];
  longint      t_s_q[$];

  always @(posedge clk) begin
    if (rst_n && out_valid_s) begin
      logic [31:0] e;
      checks++;
      if (exp_s_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected single output %h", sum_s);
      end else begin
        e = exp_s_q.pop_front();
        if (is_nan32(e) ? !is_nan32(sum_s) : (sum_s !== e)) begin
          failures++;
          if (failures < 10) $display("FAIL: single got %h expected %h", sum_s, e);
        end
        checks++;
        if (cycle - t_s_q.pop_front() != STAGES) begin
          failures++;
          if (failures < 10) $display("FAIL: single latency");
        end
      end
    end
  end
  always @(posedge clk) cycle <= cycle + 1;

  logic [63:0] exp_q[$];
  longint      t_q[$];

  function automatic logic is_nan(input logic [63:0] v);
    return (v[62:52] == 11'h7ff) && (v[51:0] != '0);
  endfunction

  function automatic logic [63:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  function automatic logic [63:0] special_val(input int k);
    case (k % 6)
      0: return 64'h0000_0000_0000_0000;
      1: return 64'h8000_0000_0000_0000;
      2: return 64'h7ff0_0000_0000_0000;
      3: return 64'hfff0_0000_0000_0000;
      4: return 64'h7ff8_0000_0000_0001;
      default: return {$urandom_range(1, 0) == 1, 11'h000, rnd64() >> 12};
    endcase
  endfunction

  task automatic make_pair(output logic [63:0] x, output logic [63:0] y);
    int m;
    m = $urandom_range(5, 0);
    x = rnd64();
    y = rnd64();
    case (m)
      0: ;
      1: begin // near cancellation
        y = x ^ 64'h8000_0000_0000_0000;
        y[10:0] = 11'($urandom);
        if ($urandom_range(1, 0) == 1) y[62:52] = x[62:52] - 11'($urandom_range(2, 0));
      end
      2: begin // subnormals, alone or with tiny normals
        x[62:52] = 11'h000;
        y[62:52] = 11'($urandom_range(2, 0));
      end
      3: begin
        x = special_val($urandom);
        if ($urandom_range(1, 0) == 1) y = special_val($urandom);
      end
      4: begin // nearby exponents so alignment and rounding are exercised
        y[62:52] = x[62:52] + 11'($urandom_range(60, 0)) - 11'd30;
        if (y[62:52] == 11'h7ff) y[62:52] = 11'h400;
        if (x[62:52] == 11'h7ff) x[62:52] = 11'h3ff;
      end
      default: begin // results near overflow
        x[62:52] = 11'h7fe;
        y[62:52] = 11'h7fe - 11'($urandom_range(3, 0));
        y[63] = x[63];
      end
    endcase
  endtask

  // result checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [63:0] e;
      longint t;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %h", sum);
      end else begin
        e = exp_q.pop_front();
        t = t_q.pop_front();
        if (is_nan(e) ? !is_nan(sum) : (sum !== e)) begin
          failures++;
          if (failures < 10) $display("FAIL: got %h expected %h", sum, e);
        end
        checks++;
        if (cycle - t != STAGES) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d", cycle - t);
        end
      end
    end
  end

  initial begin
    logic [63:0] x, y;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < int'(NOPS); i++) begin
      make_pair(x, y);
      a <= x;
      b <= y;
      in_valid <= ($urandom_range(9, 0) != 0);
      begin
        int ma, mb;
        ma = int'($urandom_range(4, 0));
        mb = (ma == 3 && $urandom_range(1, 0) == 1) ? 3 : int'($urandom_range(4, 0));
        as <= rnd32(ma);
        bs <= rnd32(mb);
        if ($urandom_range(3, 0) == 0) bs <= rnd32(ma) ^ 32'h8000_0000;
      end
      in_valid_s <= ($urandom_range(9, 0) != 0);
      @(posedge clk);
      if (in_valid_s) begin
        exp_s_q.push_back(f64_to_f32($realtobits(f32_to_real(as) + f32_to_real(bs))));
        t_s_q.push_back(cycle);
      end
      if (in_valid) begin
        exp_q.push_back($realtobits($bitstoreal(a) + $bitstoreal(b)));
        t_q.push_back(cycle);
      end
    end
    in_valid <= 1'b0;
    in_valid_s <= 1'b0;
    repeat (STAGES + 5) @(posedge clk);
    checks++;
    if (exp_s_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d single results missing", exp_s_q.size());
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NOPS + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
