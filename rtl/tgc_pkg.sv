// tgc_pkg: types and constants shared by the test generator circuit (TGC).
//
// The TGC applies a precomputed test sequence to a sequential circuit under
// test (CUT). The sequence is stored compressed: every test pattern is replaced
// by a variable-length prefix-free codeword (Huffman or Comma code), and the
// resulting bit stream may be compressed once more with a small run-length
// code. This package holds the code-selection enum and the default tables,
// which are those of the s444 benchmark test set: 3 primary inputs, 8 unique
// patterns, listed below in decreasing order of frequency.
//
//   rank  pattern  occurrences  Huffman code  Comma code
//     0     000       1631      0             0
//     1     010        139      10            10
//     2     001         93      110           110
//     3     011          7      1110          1110
//     4     110          5      11110         11110
//     5     101          3      111110        111110
//     6     111          2      1111110       1111110
//     7     100          1      1111111       11111110
//
// The run-length table maps a 3-bit run code to the repeated bit and the run
// length minus one (the value preset into the down counter):
//
//   code  run      code  run
//   000   (0,1)    100   (0,8)
//   001   (0,2)    101   (1,1)
//   010   (0,3)    110   (1,2)
//   011   (0,7)    111   (1,4)
//
// All tables and sizes follow the s444 example; the way they are laid out as
// parameter arrays is this design's own.
package tgc_pkg;

  // Which statistical code the pattern decoder implements.
  typedef enum logic {
    CODE_HUFFMAN = 1'b0,
    CODE_COMMA   = 1'b1
  } code_e;

  // s444 test set dimensions.
  localparam int unsigned S444_N        = 3;     // primary inputs (pattern width)
  localparam int unsigned S444_M        = 8;     // unique patterns
  localparam int unsigned S444_TD       = 1881;  // patterns in the test sequence
  localparam int unsigned S444_H_BITS   = 2280;  // Huffman-encoded bits
  localparam int unsigned S444_C_BITS   = 2281;  // Comma-encoded bits
  localparam int unsigned S444_HR_BITS  = 1953;  // Huffman + run-length bits
  localparam int unsigned S444_CR_BITS  = 2013;  // Comma + run-length bits

  // Unique patterns, most frequent first (index = Comma count = rank).
  localparam logic [S444_N-1:0] S444_PATTERNS [S444_M] = '{
    3'b000, 3'b010, 3'b001, 3'b011, 3'b110, 3'b101, 3'b111, 3'b100
  };

  // Huffman FSM of s444: 7 states, one per non-leaf node of the (skewed)
  // Huffman tree. Entry [s][b] describes the transition out of state s on
  // input bit b: whether it ends a codeword, the next internal state if it
  // does not, and the pattern it produces if it does. State 0 is the root.
  localparam int unsigned S444_HUFF_STATES = 7;
  localparam int unsigned S444_HUFF_SW     = 3;

  localparam logic S444_HUFF_LEAF [S444_HUFF_STATES][2] = '{
    '{1'b1, 1'b0}, '{1'b1, 1'b0}, '{1'b1, 1'b0}, '{1'b1, 1'b0},
    '{1'b1, 1'b0}, '{1'b1, 1'b0}, '{1'b1, 1'b1}
  };

  localparam logic [S444_HUFF_SW-1:0] S444_HUFF_NEXT [S444_HUFF_STATES][2] = '{
    '{3'd0, 3'd1}, '{3'd0, 3'd2}, '{3'd0, 3'd3}, '{3'd0, 3'd4},
    '{3'd0, 3'd5}, '{3'd0, 3'd6}, '{3'd0, 3'd0}
  };

  localparam logic [S444_N-1:0] S444_HUFF_PATTERN [S444_HUFF_STATES][2] = '{
    '{3'b000, 3'b000}, '{3'b010, 3'b000}, '{3'b001, 3'b000}, '{3'b011, 3'b000},
    '{3'b110, 3'b000}, '{3'b101, 3'b000}, '{3'b111, 3'b100}
  };

  // Run-length code table of s444 (3-bit codes, counter width 3).
  localparam int unsigned RL_CODE_W = 3;
  localparam int unsigned RL_CNT_W  = 3;

  localparam logic RL_BIT [2**RL_CODE_W] = '{
    1'b0, 1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1
  };

  localparam logic [RL_CNT_W-1:0] RL_LEN_M1 [2**RL_CODE_W] = '{
    3'd0, 3'd1, 3'd2, 3'd6, 3'd7, 3'd0, 3'd1, 3'd3
  };

endpackage
