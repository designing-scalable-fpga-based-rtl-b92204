// buffer_ram_2x: the level-buffer storage built from a dual-port RAM that
// is clocked at twice the system clock ("double pumped").
//
// The reduction circuit needs four memory accesses per system cycle: two
// reads (the operand pair) and two writes (new input, returning sum). A
// dual-port block RAM offers two, so it runs on clk2x and serves the four
// accesses in two halves of each system cycle:
//   mid-cycle clk2x edge      port A reads raddr0, port B reads raddr1;
//   clk2x edge at clk's rise  port A writes wdata0, port B writes wdata1.
// The ports, address layout ({buffer, slot}) and timing are those of
// buffer_ram, so either can be used. A read issued in system cycle t sees
// every write of earlier cycles and not the write of cycle t (read-first).
// Its words are captured into the system clock domain at the next clk edge
// and appear on rdata0/rdata1 RD_LAT clk edges after the read (default 2).
// clk2x must be phase aligned with clk: one rising edge at each rising edge
// of clk and one midway. The half-cycle phase is found without a reset: a
// flop toggling on clk is compared with its copy sampled on clk2x; they
// differ exactly at the mid-cycle edge (self-aligning after one clk2x edge).
// This is the memory scheme of the reference FPGA implementation; the phase
// detector is this design's own choice.
module buffer_ram_2x #(
  parameter int unsigned WIDTH  = 64,
  parameter int unsigned NBUF   = 4,
  parameter int unsigned SLOTS  = 4,
  parameter int unsigned RD_LAT = 2,
  localparam int unsigned AW    = $clog2(NBUF) + $clog2(SLOTS)
) (
  input  logic             clk,
  input  logic             clk2x,
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
    if (RD_LAT < 1) $error("buffer_ram_2x: RD_LAT must be at least 1");
  end

  // half-cycle phase detection
  logic tog, tog_2x;
  logic mid;

  always_ff @(posedge clk)   tog    <= ~tog;
  always_ff @(posedge clk2x) tog_2x <= tog;
  assign mid = (tog != tog_2x);

  // dual-port RAM on clk2x: reads in the first half, writes in the second
  logic [WIDTH-1:0] mem [2**AW];
  logic [WIDTH-1:0] qa, qb;

  always_ff @(posedge clk2x) begin
    if (mid) begin
      if (re) begin
        qa <= mem[raddr0];
        qb <= mem[raddr1];
      end
    end else begin
      if (we0) mem[waddr0] <= wdata0;
      if (we1) mem[waddr1] <= wdata1;
    end
  end

  // back into the system clock domain
  logic [WIDTH-1:0] rd0_q [RD_LAT];
  logic [WIDTH-1:0] rd1_q [RD_LAT];

  always_ff @(posedge clk) begin
    rd0_q[0] <= qa;
    rd1_q[0] <= qb;
    for (int i = 1; i < int'(RD_LAT); i++) begin
      rd0_q[i] <= rd0_q[i-1];
      rd1_q[i] <= rd1_q[i-1];
    end
  end

  assign rdata0 = rd0_q[RD_LAT-1];
  assign rdata1 = rd1_q[RD_LAT-1];

endmodule
