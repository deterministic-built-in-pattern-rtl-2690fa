// huffman_decoder: finite-state pattern decoder for a Huffman-encoded test set.
//
// The encoded test set arrives one bit per cycle. The FSM has one state per
// non-leaf node of the Huffman tree; state 0 is the root. Each input bit
// follows one edge of the tree: an edge to an internal node moves the FSM to
// that node's state, an edge to a leaf completes a codeword, emits that leaf's
// test pattern with TEST_VEC high, and returns the FSM to the root. Because the
// code is prefix-free, a pattern is available in the very cycle its last bit
// arrives, so a codeword of w bits takes w cycles.
//
// The tree is given as three tables indexed [state][bit]: LEAF (the edge ends
// a codeword), NEXT (next state when it does not) and PATTERN (the pattern
// when it does). The defaults are the 7-state decoder of the s444 test set.
//
// Interface and timing:
//   in_valid/in_bit  one encoded bit; the state advances at the rising clock
//                    edge of a cycle with in_valid high.
//   test_vec         combinational (Mealy): high in the cycle whose bit ends a
//                    codeword; pattern is valid in that cycle and is meant to
//                    be captured by the CUT at the coming clock edge.
//   pattern          the decoded pattern; 0 when test_vec is low.
//   idle             the FSM is at the root (no codeword partly received).
//   rst_n            asynchronous, active low: back to the root.
// The state diagram, the Mealy TEST_VEC output and the one-bit-per-cycle rate
// follow the described decoder; the binary state encoding (root = 0) and the
// zero pattern outside TEST_VEC cycles are this design's choices.
module huffman_decoder
  import tgc_pkg::*;
#(
  parameter int unsigned N      = S444_N,
  parameter int unsigned STATES = S444_HUFF_STATES,
  parameter int unsigned SW     = S444_HUFF_SW,
  parameter logic          LEAF    [STATES][2] = S444_HUFF_LEAF,
  parameter logic [SW-1:0] NEXT    [STATES][2] = S444_HUFF_NEXT,
  parameter logic [N-1:0]  PATTERN [STATES][2] = S444_HUFF_PATTERN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_bit,
  output logic [N-1:0] pattern,
  output logic         test_vec,
  output logic         idle
);

  logic [SW-1:0] state;
  logic          leaf;

  assign leaf     = LEAF[state][in_bit];
  assign test_vec = in_valid && leaf;
  assign pattern  = test_vec ? PATTERN[state][in_bit] : '0;
  assign idle     = (state == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= '0;
    else if (in_valid) state <= leaf ? '0 : NEXT[state][in_bit];
  end

  // The state register must only hold states of the tree.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(state) < STATES)
    else $error("huffman_decoder: illegal state %0d", state);

endmodule
