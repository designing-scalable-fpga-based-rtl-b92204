// sched_counter: the schedule counter C of the reduction circuit and the
// decoding of its read and write slots.
//
// C is an LG_N-bit counter that is 0 in the cycle buffer 0 is read for the
// first time (first_use) and counts up by one every cycle after that,
// wrapping freely. It interleaves all tree levels in one adder pipeline:
//   read  buffer i      when  C         = 2^i - 1 + a*2^(i+1)
//   write buffer i + 1  when  C - ALPHA = 2^i - 1 + a*2^(i+1)
// i.e. buffer 0 owns the slots where C ends in 0, buffer 1 those ending in
// 01, buffer 2 those ending in 011, and so on. The level is therefore the
// number of trailing ones of C (rd_level) or of C - ALPHA (wr_level); a value
// of LG_N (C all ones) is a slot no buffer owns. ALPHA is the full pipeline
// delay from issuing a buffer read to the sum leaving the adder (default 20:
// 18 adder stages plus 2 cycles of memory read delay).
// Before first use C reads as 0, so rd_level is 0 and buffer 0 may start
// the schedule; started tells that the counter is running. Synchronous,
// active-low reset stops the counter.
module sched_counter #(
  parameter int unsigned LG_N  = 4,
  parameter int unsigned ALPHA = 20,
  localparam int unsigned LW   = $clog2(LG_N + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            first_use,
  output logic            started,
  output logic [LG_N-1:0] c,
  output logic [LW-1:0]   rd_level,
  output logic [LW-1:0]   wr_level
);
  logic            run_q;
  logic [LG_N-1:0] cnt_q;
  logic [LG_N-1:0] c_wr;

  function automatic logic [LW-1:0] trailing_ones(input logic [LG_N-1:0] v);
    logic [LW-1:0] n;
    logic          stop;
    n = '0;
    stop = 1'b0;
    for (int i = 0; i < int'(LG_N); i++) begin
      if (!v[i]) stop = 1'b1;
      else if (!stop) n = n + 1'b1;
    end
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q <= 1'b0;
      cnt_q <= '0;
    end else if (run_q) begin
      cnt_q <= cnt_q + 1'b1;
    end else if (first_use) begin
      run_q <= 1'b1;
      cnt_q <= LG_N'(1);
    end
  end

  assign started  = run_q;
  assign c        = run_q ? cnt_q : '0;
  assign c_wr     = c - LG_N'(ALPHA);
  assign rd_level = trailing_ones(c);
  assign wr_level = trailing_ones(c_wr);

endmodule
