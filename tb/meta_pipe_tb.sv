// meta_pipe_tb: self-checking testbench for the companion metadata pipeline.
//
// Random words enter every cycle; each must leave exactly DEPTH (18) clock
// edges later, unchanged and in order. The expected output is taken from a
// history kept by the testbench.
module meta_pipe_tb;
  localparam int unsigned WIDTH = 19;
  localparam int unsigned DEPTH = 18;
  localparam int unsigned N     = 2000;

  logic             clk = 1'b0;
  logic [WIDTH-1:0] din = '0;
  logic [WIDTH-1:0] dout;

  meta_pipe #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .din, .dout);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] hist [$];   // value sampled at each edge, oldest first

  always @(posedge clk) hist.push_back(din);

  always @(negedge clk) begin
    if (hist.size() >= DEPTH) begin
      checks++;
      if (dout !== hist[hist.size() - DEPTH]) begin
        failures++;
        if (failures < 10) $display("FAIL: dout %h expected %h", dout, hist[hist.size() - DEPTH]);
      end
    end
  end

  initial begin
    for (int i = 0; i < int'(N); i++) begin
      din <= WIDTH'($urandom);
      @(posedge clk);
    end
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
