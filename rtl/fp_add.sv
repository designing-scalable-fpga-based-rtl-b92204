// fp_add: deeply pipelined IEEE-754 binary floating-point adder.
//
// One addition enters per cycle; the rounded sum leaves STAGES clock edges
// later together with its valid bit. The reduction circuit needs only that
// the adder is a fixed-latency pipeline that can accept a new operand pair
// every cycle; the default latency of 18 cycles and the 64-bit format are the
// numbers of the double-precision adder used in the reference implementation.
// How the adder works inside is this design's own choice:
//   stage 1  unpack, order the operands by magnitude, align the smaller one
//            (guard, round and sticky bits kept), detect NaN/infinity;
//   stage 2  add or subtract the significands, count leading zeros;
//   stage 3  normalise (left shift limited so subnormals come out right),
//            round to nearest even, pack, saturate to infinity.
// A plain register chain then pads the latency to STAGES (STAGES >= 3), which
// stands in for the finer pipelining a high-clock-rate core would have.
// Subnormal inputs and outputs are handled exactly; any NaN result is the
// canonical quiet NaN; an exact zero sum is -0 only when both operands are -0.
// Only the valid chain is reset; data registers need no reset.
module fp_add #(
  parameter int unsigned EXP_W  = 11,
  parameter int unsigned MAN_W  = 52,
  parameter int unsigned STAGES = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [EXP_W+MAN_W:0]   a,
  input  logic [EXP_W+MAN_W:0]   b,
  output logic                   out_valid,
  output logic [EXP_W+MAN_W:0]   sum
);
  localparam int unsigned W  = 1 + EXP_W + MAN_W;
  localparam int unsigned SW = MAN_W + 4;        // hidden bit, fraction, G, R, S
  localparam int unsigned LZW = $clog2(SW + 1);
  localparam logic [EXP_W-1:0] EMAX = '1;
  localparam logic [W-1:0] QNAN = {1'b0, EMAX, 1'b1, {(MAN_W-1){1'b0}}};

  initial begin
    if (STAGES < 3) $error("fp_add: STAGES must be at least 3");
  end

  function automatic logic [LZW-1:0] lzc(input logic [SW-1:0] v);
    logic [LZW-1:0] n;
    logic           seen;
    n = '0;
    seen = 1'b0;
    for (int i = SW - 1; i >= 0; i--) begin
      if (v[i]) seen = 1'b1;
      else if (!seen) n = n + 1'b1;
    end
    return n;
  endfunction

  // ---------------- stage 1: unpack, order, align ----------------
  typedef struct packed {
    logic             special;     // result is NaN or infinity, held in spec_val
    logic [W-1:0]     spec_val;
    logic             sign;        // sign of the larger-magnitude operand
    logic             zsign;       // sign of an exact-zero result
    logic             eff_sub;
    logic [EXP_W-1:0] exp;         // exponent of the larger operand (>= 1)
    logic [SW-1:0]    sig_hi;
    logic [SW-1:0]    sig_lo;       // aligned, sticky folded into bit 0
  } s1_t;

  s1_t s1_d, s1_q;

  always_comb begin
    logic [W-1:0]     x, y;
    logic [EXP_W-1:0] ex, ey, exe, eye;
    logic [MAN_W-1:0] fx, fy;
    logic             x_nan, y_nan, x_inf, y_inf;
    logic [EXP_W-1:0] d;
    logic [2*SW-1:0]  ext;
    int unsigned      dd;

    if (b[W-2:0] > a[W-2:0]) begin
      x = b; y = a;
    end else begin
      x = a; y = b;
    end
    ex = x[W-2:MAN_W];  fx = x[MAN_W-1:0];
    ey = y[W-2:MAN_W];  fy = y[MAN_W-1:0];
    x_nan = (ex == EMAX) && (fx != '0);
    y_nan = (ey == EMAX) && (fy != '0);
    x_inf = (ex == EMAX) && (fx == '0);
    y_inf = (ey == EMAX) && (fy == '0);

    s1_d.special  = 1'b0;
    s1_d.spec_val = x;
    if (x_nan || y_nan || (x_inf && y_inf && (x[W-1] != y[W-1]))) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = QNAN;
    end else if (x_inf) begin
      s1_d.special  = 1'b1;          // x is the larger, so an infinite y implies infinite x
      s1_d.spec_val = x;
    end

    exe = (ex == '0) ? EXP_W'(1) : ex;
    eye = (ey == '0) ? EXP_W'(1) : ey;
    d   = exe - eye;
    dd  = (int'(d) > int'(SW)) ? SW : int'(d);
    ext = {(ey != '0), fy, 3'b000, {SW{1'b0}}} >> dd;

    s1_d.sign    = x[W-1];
    s1_d.zsign   = x[W-1] & y[W-1];
    s1_d.eff_sub = x[W-1] ^ y[W-1];
    s1_d.exp     = exe;
    s1_d.sig_hi     = {(ex != '0), fx, 3'b000};
    s1_d.sig_lo   = {ext[2*SW-1:SW+1], ext[SW] | (|ext[SW-1:0])};
  end

  // ---------------- stage 2: add/subtract, leading-zero count ----------------
  typedef struct packed {
    logic             special;
    logic [W-1:0]     spec_val;
    logic             sign;
    logic             zsign;
    logic [EXP_W-1:0] exp;
    logic [SW:0]      sum;         // one carry bit above the SW-bit significand
    logic [LZW-1:0]   lz;
  } s2_t;

  s2_t s2_d, s2_q;

  always_comb begin
    s2_d.special  = s1_q.special;
    s2_d.spec_val = s1_q.spec_val;
    s2_d.sign     = s1_q.sign;
    s2_d.zsign    = s1_q.zsign;
    s2_d.exp      = s1_q.exp;
    if (s1_q.eff_sub) s2_d.sum = {1'b0, s1_q.sig_hi} - {1'b0, s1_q.sig_lo};
    else              s2_d.sum = {1'b0, s1_q.sig_hi} + {1'b0, s1_q.sig_lo};
    s2_d.lz = lzc(s2_d.sum[SW-1:0]);
  end

  // ---------------- stage 3: normalise, round, pack ----------------
  logic [W-1:0] res_d, res_q;

  always_comb begin
    logic [SW-1:0]    nrm;
    logic [EXP_W:0]   e1;
    logic [LZW-1:0]   sh;
    logic [MAN_W:0]   mant;
    logic [MAN_W+1:0] mr;
    logic             rup;

    nrm = '0;
    sh  = '0;
    e1  = {1'b0, s2_q.exp};
    if (s2_q.sum[SW]) begin
      nrm = {s2_q.sum[SW:2], s2_q.sum[1] | s2_q.sum[0]};
      e1  = e1 + 1'b1;
    end else begin
      // never shift below exponent 1: what is left unnormalised is subnormal
      if ({{(EXP_W+1-LZW){1'b0}}, s2_q.lz} < e1) sh = s2_q.lz;
      else                                     sh = LZW'(e1 - 1'b1);
      nrm = s2_q.sum[SW-1:0] << sh;
      e1  = e1 - (EXP_W+1)'(sh);
    end

    mant = nrm[SW-1:3];
    rup  = nrm[2] & (nrm[1] | nrm[0] | mant[0]);
    mr   = {1'b0, mant} + (MAN_W+2)'(rup);
    if (mr[MAN_W+1]) begin
      mr = mr >> 1;
      e1 = e1 + 1'b1;
    end

    if (s2_q.special) begin
      res_d = s2_q.spec_val;
    end else if (s2_q.sum == '0) begin
      res_d = {s2_q.zsign, {(W-1){1'b0}}};
    end else if (e1 >= {1'b0, EMAX}) begin
      res_d = {s2_q.sign, EMAX, {MAN_W{1'b0}}};
    end else if (!mr[MAN_W]) begin
      res_d = {s2_q.sign, {EXP_W{1'b0}}, mr[MAN_W-1:0]};
    end else begin
      res_d = {s2_q.sign, e1[EXP_W-1:0], mr[MAN_W-1:0]};
    end
  end

  always_ff @(posedge clk) begin
    s1_q  <= s1_d;
    s2_q  <= s2_d;
    res_q <= res_d;
  end

  // ---------------- valid chain and latency padding ----------------
  logic [STAGES-1:0] vld_q;

  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[STAGES-2:0], in_valid};
  end
  assign out_valid = vld_q[STAGES-1];

  generate
    if (STAGES > 3) begin : g_pad
      logic [W-1:0] pad_q [STAGES-3];
      always_ff @(posedge clk) begin
        pad_q[0] <= res_q;
        for (int i = 1; i < int'(STAGES) - 3; i++) pad_q[i] <= pad_q[i-1];
      end
      assign sum = pad_q[STAGES-4];
    end else begin : g_nopad
      assign sum = res_q;
    end
  endgenerate

endmodule
