// reduce_ctrl: control and address logic of the reduction circuit.
//
// Keeps, for each of the LG_N level buffers, a head pointer and a fill count
// (0..SLOTS), and turns the slot decode of the schedule counter into memory
// operations every cycle:
//   * input: a valid input word is written to buffer 0 at its tail
//     (write port 0);
//   * read: if the counter says it is buffer i's slot (rd_level = i) and
//     buffer i holds two or more words, the two oldest words are read as one
//     operand pair (read ports 0 and 1, addresses {i, head} and {i, head+1})
//     and rd_fire is raised; the pair enters the adder after the memory
//     read delay;
//   * write-back: when a valid sum leaves the adder, it came from buffer
//     wr_level, so its destination is level wr_level + 1. If that equals the
//     lg of its set size (pipe_lgsize) the sum is the set's final result and
//     done is raised instead of writing; otherwise it is written to the tail
//     of buffer wr_level + 1 (write port 1).
// Reading in FIFO order is what keeps sets from mixing: a set of 2^k values
// puts an even number of words into every level below k, so pairs never
// straddle two sets. The fill count tested is the one at the start of the
// cycle; a word written in a cycle can be read from the next cycle on.
// overflow flags a write into a full buffer and error a sum whose destination
// does not exist (set size above 2^LG_N); neither can happen for legal input.
// All outputs are combinational from the state and inputs of this cycle.
// Synchronous, active-low reset empties every buffer.
module reduce_ctrl #(
  parameter int unsigned LG_N  = 4,
  parameter int unsigned SLOTS = 4,
  localparam int unsigned LW   = $clog2(LG_N + 1),
  localparam int unsigned BW   = $clog2(LG_N),
  localparam int unsigned PW   = $clog2(SLOTS),
  localparam int unsigned AW   = BW + PW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [LW-1:0] rd_level,
  input  logic [LW-1:0] wr_level,
  input  logic          pipe_valid,
  input  logic [LW-1:0] pipe_lgsize,
  output logic          rd_fire,
  output logic [AW-1:0] raddr0,
  output logic [AW-1:0] raddr1,
  output logic          we0,
  output logic [AW-1:0] waddr0,
  output logic          we1,
  output logic [AW-1:0] waddr1,
  output logic          done,
  output logic          overflow,
  output logic          error
);
  logic [PW-1:0] head_q [LG_N];
  logic [PW:0]   cnt_q  [LG_N];

  logic [LW:0]   dest;
  logic [BW-1:0] rd_buf, wr_buf;

  always_comb begin
    rd_buf = rd_level[BW-1:0];
    dest   = {1'b0, wr_level} + 1'b1;
    wr_buf = dest[BW-1:0];

    rd_fire = (rd_level < LW'(LG_N)) && (cnt_q[rd_buf] >= (PW+1)'(2));
    raddr0  = {rd_buf, head_q[rd_buf]};
    raddr1  = {rd_buf, head_q[rd_buf] + 1'b1};

    we0     = in_valid;
    waddr0  = {BW'(0), head_q[0] + cnt_q[0][PW-1:0]};

    done    = pipe_valid && (dest == {1'b0, pipe_lgsize});
    error   = pipe_valid && !done && (dest >= (LW+1)'(LG_N));
    we1     = pipe_valid && !done && !error;
    waddr1  = {wr_buf, head_q[wr_buf] + cnt_q[wr_buf][PW-1:0]};

    overflow = (we0 && cnt_q[0] == (PW+1)'(SLOTS)) ||
               (we1 && cnt_q[wr_buf] == (PW+1)'(SLOTS));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LG_N); i++) begin
        head_q[i] <= '0;
        cnt_q[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < int'(LG_N); i++) begin
        logic rd_i, w0_i, w1_i;
        rd_i = rd_fire && (rd_buf == BW'(i));
        w0_i = we0 && (i == 0);
        w1_i = we1 && (wr_buf == BW'(i));
        if (rd_i) head_q[i] <= head_q[i] + PW'(2);
        cnt_q[i] <= cnt_q[i] - (rd_i ? (PW+1)'(2) : '0)
                             + (PW+1)'(w0_i) + (PW+1)'(w1_i);
      end
    end
  end

endmodule
