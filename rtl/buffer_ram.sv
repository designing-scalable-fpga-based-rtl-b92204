// buffer_ram: the storage that holds every level buffer of the reduction
// circuit in one memory.
//
// Instead of lg(n) separate buffers with a multiplexer in front of each adder
// port, all buffers live in one array of NBUF x SLOTS words. A word address is
// {buffer number, slot}: the upper clog2(NBUF) bits select the buffer and the
// lower clog2(SLOTS) bits the entry inside it; with three buffers, the second
// entry of buffer 1 is address 4'b0101. Buffers have 4 words (one more than
// the 3 the schedule needs) so that the slot is just the low address bits.
//
// Ports: two read ports deliver the operand pair of one buffer read; two
// write ports take, in the same cycle, the new input (always to buffer 0) and
// the adder result (to buffer i+1). The reference implementation gets these
// four ports from a dual-port block RAM clocked at twice the system clock;
// this version is a single-clock array with two read and two write ports,
// which behaves the same seen from the system clock.
//
// Timing: a read issued with re in cycle t samples the array in cycle t and
// the words appear on rdata0/rdata1 after RD_LAT clock edges (default 2, the
// block RAM read delay that adds to the adder latency). A read and a write to
// the same address in the same cycle return the old word. The two write
// ports must not address the same word in one cycle.
module buffer_ram #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned NBUF   = 4,
  parameter int unsigned SLOTS  = 4,
  parameter int unsigned RD_LAT = 2,
  localparam int unsigned AW    = $clog2(NBUF) + $clog2(SLOTS)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr0,
  input  logic [AW-1:0]    raddr1,
  output logic [WIDTH-1:0] rdata0,
  output logic [WIDTH-1:0] rdata1,
  input  logic             we0,
  input  logic [AW-1:0]    waddr0,
  input  logic [WIDTH-1:0] wdata0,
  input  logic             we1,
  input  logic [AW-1:0]    waddr1,
  input  logic [WIDTH-1:0] wdata1
);
  initial begin
    if (RD_LAT < 1) $error("buffer_ram: RD_LAT must be at least 1");
  end

  logic [WIDTH-1:0] mem [2**AW];
  logic [WIDTH-1:0] rd0_q [RD_LAT];
  logic [WIDTH-1:0] rd1_q [RD_LAT];

  always_ff @(posedge clk) begin
    if (we0) mem[waddr0] <= wdata0;
    if (we1) mem[waddr1] <= wdata1;
  end

  always_ff @(posedge clk) begin
    if (re) begin
      rd0_q[0] <= mem[raddr0];
      rd1_q[0] <= mem[raddr1];
    end
    for (int i = 1; i < int'(RD_LAT); i++) begin
      rd0_q[i] <= rd0_q[i-1];
      rd1_q[i] <= rd1_q[i-1];
    end
  end

  assign rdata0 = rd0_q[RD_LAT-1];
  assign rdata1 = rd1_q[RD_LAT-1];

endmodule
