// tb_tgc_capture: behavioural stand-in for a circuit under test. It latches
// the pattern on every rising edge of its clock: in test mode it records the
// pattern in `got`, in normal mode it only counts the edges; edges
// during reset are ignored. The pattern is
// taken as it stood at the preceding falling edge of the system clock, which
// is the value a real flip-flop sees just before the gated edge; sampling it
// in the same zero-delay time step as the edge would race with the decoder
// state that changes at that edge.
module tb_tgc_capture #(
  parameter int N = 3
) (
  input logic         clk,
  input logic         rst_n,
  input logic         cut_clk,
  input logic         normal,
  input logic [N-1:0] pattern
);

  logic [N-1:0] got[$];
  int           normal_edges = 0;
  logic [N-1:0] pat_q;

  always @(negedge clk) pat_q <= pattern;

  always @(posedge cut_clk) begin
    if (normal) normal_edges++;
    else if (rst_n) got.push_back(pat_q);
  end

endmodule
