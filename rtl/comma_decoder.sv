// comma_decoder: pattern decoder for a Comma-encoded test set.
//
// A Comma codeword is i ones followed by a terminating zero and stands for the
// pattern of rank i (the (i+1)-th most frequent pattern). The decoder is a
// binary counter of the ones received plus a combinational map from the count
// to the pattern. A 0 bit ends the codeword: TEST_VEC, the inverted input bit,
// goes high, the mapped pattern is presented to the CUT, and the counter
// returns to zero so the next codeword starts from the first pattern.
//
// Interface and timing:
//   in_valid/in_bit  one encoded bit per cycle; a 1 increments the counter and
//                    a 0 clears it at the rising clock edge.
//   test_vec         combinational: in_valid and not in_bit.
//   pattern          PATTERNS[count], shown while test_vec is high, 0 otherwise.
//   idle             the counter is zero (no codeword partly received).
//   rst_n            asynchronous, active low, clears the counter.
// In the described circuit the counter is cleared on the falling clock edge,
// half a cycle after the CUT has latched the pattern. Here the clear happens at
// the same rising edge at which the CUT latches it; the pattern seen by the CUT
// at each edge is the same, and the whole design stays on one clock edge. The
// pattern table defaults to the s444 test set.
module comma_decoder
  import tgc_pkg::*;
#(
  parameter int unsigned N = S444_N,
  parameter int unsigned M = S444_M,
  parameter logic [N-1:0] PATTERNS [M] = S444_PATTERNS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic [N-1:0] pattern,
  output logic         test_vec,
  output logic         idle
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0] count;

  assign test_vec = in_valid && !in_bit;
  assign pattern  = test_vec ? PATTERNS[count] : '0;
  assign idle     = (count == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        count <= '0;
    else if (in_valid) count <= in_bit ? count + 1'b1 : '0;
  end

  // A codeword has at most M-1 ones.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid && in_bit |-> 32'(count) < M - 1)
    else $error("comma_decoder: codeword longer than %0d ones", M - 1);

endmodule
