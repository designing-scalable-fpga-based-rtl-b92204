// meta_pipe: the companion pipeline of the reduction circuit.
//
// Every element in the adder pipeline carries metadata: its set number and
// the (log2) size of its set. This register chain runs beside the adder with
// the same depth, so the metadata of an operand pair leaves exactly when
// their sum does. din is sampled every cycle; dout is din delayed by DEPTH
// clock edges. The valid bit is carried by the adder itself. The default
// depth is the 18-cycle adder latency. No reset: the contents are ignored
// whenever the matching valid bit is low.
module meta_pipe #(
  parameter int unsigned WIDTH = 19,
  parameter int unsigned DEPTH = 18
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  initial begin
    if (DEPTH < 1) $error("meta_pipe: DEPTH must be at least 1");
  end

  logic [WIDTH-1:0] stage_q [DEPTH];

  always_ff @(posedge clk) begin
    stage_q[0] <= din;
    for (int i = 1; i < int'(DEPTH); i++) stage_q[i] <= stage_q[i-1];
  end

  assign dout = stage_q[DEPTH-1];

endmodule
