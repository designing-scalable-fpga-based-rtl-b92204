// reduction_circuit: stall-free reduction of many sets of sequentially
// arriving floating-point values with a single pipelined adder.
//
// A binary reduction tree over n inputs is folded onto one adder: level i of
// the tree becomes a small buffer (level buffer i) that collects partial sums
// of that level, and every level's additions are interleaved in the same
// ALPHA-deep adder pipeline. Buffer 0 takes one input per cycle and needs
// only every other pipeline slot; buffer 1 needs one slot in four, buffer 2
// one in eight, and so on, so the slots never run out. The schedule counter
// gives level i the slots where C = 2^i - 1 (mod 2^(i+1)); the sum leaving
// the pipeline in a cycle therefore came from the level given by C - ALPHA
// and goes to the next level up, or out of the circuit when that level is
// lg(set size). Each buffer never holds more than 3 words; with 4-word buffers
// the storage is LG_N * 4 words, i.e. Theta(lg n).
//
// Blocks: sched_counter (counter C and slot decode), reduce_ctrl (buffer head
// pointers, fill counts, addresses, exit test), buffer_ram (all buffers in
// one memory, 2 read + 2 write ports, 2-cycle read delay), fp_add (the
// pipelined adder, ADD_STAGES deep) and meta_pipe (set number and set size
// travelling beside the adder). With DOUBLE_PUMP set, buffer_ram_2x replaces
// buffer_ram: the same storage as a dual-port RAM on clk2x, a clock of twice
// the system rate aligned with clk, as on an FPGA block RAM; otherwise clk2x
// is unused and may be tied off. The full pipeline delay used by the schedule
// is ALPHA = ADD_STAGES + 2 (the memory read delay), 20 by default.
//
// Interface: one element per cycle may be presented with in_valid, carrying
// its value, set number and lg of its set size (1..LG_N: sets of 2 to 2^LG_N
// values, each a power of two). Elements of one set are contiguous in the
// stream; gaps between elements are allowed. There is no ready signal: the
// circuit never stalls its input. Each set's sum appears for one cycle on
// out_valid / out_data / out_set; sums of different sets can come out in a
// different order from the sets. overflow (a buffer write into a full
// buffer) and error (a set size above 2^LG_N) are sticky flags that cannot
// be set by legal input. The 64-bit format, n = 16 and the 18-stage adder
// are the defaults of the reference implementation; the set-number width,
// input gaps and the flags are this design's own choices.
module reduction_circuit #(
  parameter int unsigned LG_N       = 4,
  parameter int unsigned EXP_W      = 11,
  parameter int unsigned MAN_W      = 52,
  parameter int unsigned ADD_STAGES = 18,
  parameter int unsigned SET_W      = 16,
  parameter bit          DOUBLE_PUMP = 1'b0,
  localparam int unsigned DW        = 1 + EXP_W + MAN_W,
  localparam int unsigned LW        = $clog2(LG_N + 1)
) (
  input  logic             clk,
  input  logic             clk2x,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [DW-1:0]    in_data,
  input  logic [SET_W-1:0] in_set,
  input  logic [LW-1:0]    in_lgsize,
  output logic             out_valid,
  output logic [DW-1:0]    out_data,
  output logic [SET_W-1:0] out_set,
  output logic             overflow,
  output logic             error
);
  localparam int unsigned SLOTS  = 4;
  localparam int unsigned RD_LAT = 2;
  localparam int unsigned ALPHA  = ADD_STAGES + RD_LAT;
  localparam int unsigned AW     = $clog2(LG_N) + $clog2(SLOTS);

  typedef struct packed {
    logic [LW-1:0]    lgsize;
    logic [SET_W-1:0] set;
  } meta_t;

  typedef struct packed {
    meta_t         meta;
    logic [DW-1:0] value;
  } elem_t;

  // schedule counter
  logic            rd_fire, started;
  logic [LG_N-1:0] c;
  logic [LW-1:0]   rd_level, wr_level;

  sched_counter #(.LG_N(LG_N), .ALPHA(ALPHA)) u_counter (
    .clk, .rst_n,
    .first_use (rd_fire),
    .started   (started),
    .c         (c),
    .rd_level  (rd_level),
    .wr_level  (wr_level)
  );

  // control and address logic
  logic          pipe_valid;
  logic [DW-1:0] pipe_sum;
  meta_t         pipe_meta;
  logic [AW-1:0] raddr0, raddr1, waddr0, waddr1;
  logic          we0, we1, done, ovf, err;

  reduce_ctrl #(.LG_N(LG_N), .SLOTS(SLOTS)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .rd_level, .wr_level,
    .pipe_valid, .pipe_lgsize(pipe_meta.lgsize),
    .rd_fire, .raddr0, .raddr1,
    .we0, .waddr0, .we1, .waddr1,
    .done, .overflow(ovf), .error(err)
  );

  // level buffers
  elem_t in_elem, wb_elem, rd0, rd1;

  assign in_elem = '{meta: '{lgsize: in_lgsize, set: in_set}, value: in_data};
  assign wb_elem = '{meta: pipe_meta, value: pipe_sum};

  generate
    if (DOUBLE_PUMP) begin : g_bram_2x
      buffer_ram_2x #(.WIDTH($bits(elem_t)), .NBUF(LG_N), .SLOTS(SLOTS), .RD_LAT(RD_LAT)) u_bufs (
        .clk, .clk2x,
        .re     (rd_fire),
        .raddr0 (raddr0), .raddr1 (raddr1),
        .rdata0 (rd0),    .rdata1 (rd1),
        .we0    (we0),    .waddr0 (waddr0), .wdata0 (in_elem),
        .we1    (we1),    .waddr1 (waddr1), .wdata1 (wb_elem)
      );
    end else begin : g_ram_4port
      buffer_ram #(.WIDTH($bits(elem_t)), .NBUF(LG_N), .SLOTS(SLOTS), .RD_LAT(RD_LAT)) u_bufs (
        .clk,
        .re     (rd_fire),
        .raddr0 (raddr0), .raddr1 (raddr1),
        .rdata0 (rd0),    .rdata1 (rd1),
        .we0    (we0),    .waddr0 (waddr0), .wdata0 (in_elem),
        .we1    (we1),    .waddr1 (waddr1), .wdata1 (wb_elem)
      );
    end
  endgenerate

  // the operand pair is valid RD_LAT cycles after the read was issued
  logic [RD_LAT-1:0] rdv_q;
  always_ff @(posedge clk) begin
    if (!rst_n) rdv_q <= '0;
    else        rdv_q <= {rdv_q[RD_LAT-2:0], rd_fire};
  end

  // adder and its companion pipeline
  fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W), .STAGES(ADD_STAGES)) u_add (
    .clk, .rst_n,
    .in_valid  (rdv_q[RD_LAT-1]),
    .a         (rd0.value),
    .b         (rd1.value),
    .out_valid (pipe_valid),
    .sum       (pipe_sum)
  );

  meta_pipe #(.WIDTH($bits(meta_t)), .DEPTH(ADD_STAGES)) u_meta (
    .clk,
    .din  (rd0.meta),
    .dout (pipe_meta)
  );

  // results
  assign out_valid = done;
  assign out_data  = pipe_sum;
  assign out_set   = pipe_meta.set;

  logic ovf_q, err_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ovf_q <= 1'b0;
      err_q <= 1'b0;
    end else begin
      ovf_q <= ovf_q | ovf;
      err_q <= err_q | err;
    end
  end
  assign overflow = ovf_q;
  assign error    = err_q;

  // rules of the schedule: buffers never overflow, pairs never mix sets
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !ovf)
    else $error("reduction_circuit: level buffer overflow");
  a_pair_same_set: assert property (@(posedge clk) disable iff (!rst_n)
      rdv_q[RD_LAT-1] |-> (rd0.meta == rd1.meta))
    else $error("reduction_circuit: operand pair mixes two sets");
  a_legal_size: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid |-> (in_lgsize >= LW'(1) && in_lgsize <= LW'(LG_N)))
    else $error("reduction_circuit: illegal set size");

  // c and started are kept for observation in simulation; clk2x is only
  // used by the double-pumped memory
  logic unused;
  assign unused = started ^ (^c) ^ (DOUBLE_PUMP ? 1'b0 : clk2x);

endmodule
