// buffer_ram_2x_tb: self-checking testbench for the double-pumped level-buffer
// storage (dual-port RAM on a clock of twice the system rate).
//
// A shadow array in the testbench follows every write. Random writes on both
// ports (never to the same word in one cycle) are mixed with random pair
// reads; each read result is checked against the shadow contents at the time
// of the read, which also checks that a read and a write to the same word in
// one cycle return the old word, and that data arrive exactly 2 cycles after
// the read. The address layout is checked with the example of three buffers:
// address 4'b0101 is the second entry of buffer 1.
module buffer_ram_2x_tb;
  localparam int unsigned WIDTH = 24;
  localparam int unsigned NBUF  = 3;
  localparam int unsigned SLOTS = 4;
  localparam int unsigned AW    = 4;
  localparam int unsigned N     = 4000;

  logic             clk = 1'b0;
  logic             clk2x = 1'b0;
  logic             re = 1'b0, we0 = 1'b0, we1 = 1'b0;
  logic [AW-1:0]    raddr0 = '0, raddr1 = '0, waddr0 = '0, waddr1 = '0;
  logic [WIDTH-1:0] wdata0 = '0, wdata1 = '0;
  logic [WIDTH-1:0] rdata0, rdata1;

  buffer_ram_2x #(.WIDTH(WIDTH), .NBUF(NBUF), .SLOTS(SLOTS), .RD_LAT(2)) dut (
    .clk, .clk2x, .re, .raddr0, .raddr1, .rdata0, .rdata1,
    .we0, .waddr0, .wdata0, .we1, .waddr1, .wdata1
  );

  // clk2x rises at every rise of clk and midway between them
  initial forever begin
    clk = 1'b1; clk2x = 1'b1; #5;
    clk2x = 1'b0; #5;
    clk = 1'b0; clk2x = 1'b1; #5;
    clk2x = 1'b0; #5;
  end

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [16];

  // reference: the read result is the shadow contents when the read was
  // issued, delayed by two clock edges
  logic             v1 = 1'b0, v2 = 1'b0;
  logic [WIDTH-1:0] e0_1, e1_1, e0_2, e1_2;

  always @(posedge clk) begin
    v1 <= re;
    e0_1 <= shadow[raddr0];
    e1_1 <= shadow[raddr1];
    v2 <= v1;
    e0_2 <= e0_1;
    e1_2 <= e1_1;
    if (we0) shadow[waddr0] <= wdata0;
    if (we1) shadow[waddr1] <= wdata1;
  end

  always @(negedge clk) begin
    if (v2) begin
      checks += 2;
      if (rdata0 !== e0_2) begin failures++; $display("FAIL: rdata0 %h expected %h", rdata0, e0_2); end
      if (rdata1 !== e1_2) begin failures++; $display("FAIL: rdata1 %h expected %h", rdata1, e1_2); end
    end
  end

  initial begin
    // fill every word so reads are defined
    for (int a = 0; a < 16; a += 2) begin
      we0 <= 1'b1; waddr0 <= AW'(a);   wdata0 <= WIDTH'($urandom);
      we1 <= 1'b1; waddr1 <= AW'(a+1); wdata1 <= WIDTH'($urandom);
      @(posedge clk);
    end
    // address layout: second entry of buffer 1 is 0101
    we0 <= 1'b1; waddr0 <= 4'b0101; wdata0 <= 24'hB1E1;
    we1 <= 1'b0;
    @(posedge clk);
    we0 <= 1'b0;
    re <= 1'b1; raddr0 <= {2'd1, 2'd1}; raddr1 <= {2'd1, 2'd0};
    @(posedge clk);
    re <= 1'b0;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (rdata0 !== 24'hB1E1) begin failures++; $display("FAIL: address 0101 read %h", rdata0); end
    @(posedge clk);   // inputs change only after a rising clock edge
    // random traffic
    for (int i = 0; i < int'(N); i++) begin
      logic [AW-1:0] w0a, w1a;
      w0a = AW'($urandom_range(11, 0));
      w1a = AW'($urandom_range(11, 0));
      if (w1a == w0a) w1a = AW'((int'(w0a) + 1) % 12);
      we0 <= ($urandom_range(1, 0) == 1); waddr0 <= w0a; wdata0 <= WIDTH'($urandom);
      we1 <= ($urandom_range(1, 0) == 1); waddr1 <= w1a; wdata1 <= WIDTH'($urandom);
      re  <= ($urandom_range(2, 0) != 0);
      raddr0 <= AW'($urandom_range(11, 0));
      raddr1 <= AW'($urandom_range(11, 0));
      @(posedge clk);
    end
    re <= 1'b0; we0 <= 1'b0; we1 <= 1'b0;
    repeat (4) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
