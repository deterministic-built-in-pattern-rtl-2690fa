// tgc_tb_pkg: reference models shared by the testbenches of the test generator.
//
// Holds the s444 test-set statistics (patterns ranked by frequency, their
// occurrence counts and their Huffman and Comma codewords written out as
// strings), a generator for a synthetic test sequence with exactly those
// occurrence counts in random order, the two statistical encoders and the
// run-length encoder. None of it reuses the RTL tables, so the testbenches
// compare the hardware against an independent description of the codes.
package tgc_tb_pkg;

  localparam int NPAT = 8;

  // Patterns by rank and how often each occurs in the 1881-pattern sequence.
  localparam logic [2:0] PAT   [NPAT] = '{3'b000, 3'b010, 3'b001, 3'b011,
                                          3'b110, 3'b101, 3'b111, 3'b100};
  localparam int         COUNT [NPAT] = '{1631, 139, 93, 7, 5, 3, 2, 1};

  localparam string HUFF  [NPAT] = '{"0", "10", "110", "1110", "11110",
                                     "111110", "1111110", "1111111"};
  localparam string COMMA [NPAT] = '{"0", "10", "110", "1110", "11110",
                                     "111110", "1111110", "11111110"};

  // Random order of ranks with the exact s444 occurrence counts (scaled by
  // dividing every count by `div`, at least one of each).
  function automatic void make_test_set(ref int ranks[$], input int div = 1);
    int n;
    ranks.delete();
    for (int r = 0; r < NPAT; r++) begin
      n = COUNT[r] / div;
      if (n < 1) n = 1;
      repeat (n) ranks.push_back(r);
    end
    // Fisher-Yates shuffle
    for (int i = ranks.size() - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = ranks[i]; ranks[i] = ranks[j]; ranks[j] = t;
    end
  endfunction

  // Serial bit stream of the codewords, first bit first.
  function automatic void encode(input int ranks[$], input bit comma, ref bit bits[$]);
    string s;
    bits.delete();
    foreach (ranks[k]) begin
      s = comma ? COMMA[ranks[k]] : HUFF[ranks[k]];
      for (int i = 0; i < s.len(); i++) bits.push_back(s[i] == "1");
    end
  endfunction

  // Run code of (bit, length); -1 when the run has no code of its own.
  function automatic int run_code(bit b, int len);
    if (!b) case (len) 1: return 0; 2: return 1; 3: return 2; 7: return 3; 8: return 4; default: return -1; endcase
    else    case (len) 1: return 5; 2: return 6; 4: return 7; default: return -1; endcase
  endfunction

  // Split one run into coded runs: long runs of zeros into 8s and a 7, other
  // lengths into 3s, 2s and 1s; runs of ones into 4s, 2s and 1s.
  function automatic void rl_emit_run(bit b, int len, ref int codes[$]);
    while (len > 0) begin
      int take;
      if (!b) take = (len >= 8) ? 8 : (len == 7) ? 7 : (len >= 3) ? 3 : len;
      else    take = (len >= 4) ? 4 : (len >= 2) ? 2 : 1;
      codes.push_back(run_code(b, take));
      len -= take;
    end
  endfunction

  function automatic void rl_encode(input bit bits[$], ref int codes[$]);
    int len;
    bit cur;
    codes.delete();
    len = 0;
    cur = 1'b0;
    foreach (bits[i]) begin
      if (len > 0 && bits[i] != cur) begin
        rl_emit_run(cur, len, codes);
        len = 0;
      end
      cur = bits[i];
      len++;
    end
    if (len > 0) rl_emit_run(cur, len, codes);
  endfunction

  // Number of bits a run code stands for.
  function automatic int run_len(int code);
    case (code) 0: return 1; 1: return 2; 2: return 3; 3: return 7; 4: return 8;
                5: return 1; 6: return 2; default: return 4; endcase
  endfunction

  function automatic int rank_of(logic [2:0] p);
    for (int r = 0; r < NPAT; r++) if (PAT[r] == p) return r;
    return -1;
  endfunction

endpackage
