// tgc_top: deterministic built-in test generator circuit (TGC) for sequential
// circuits.
//
// A precomputed test sequence for a non-scan sequential circuit is stored on
// chip in compressed form and expanded during self test, one encoded bit per
// clock. The chain is:
//
//   sg_rom  -> [rl_decoder] -> huffman_decoder | comma_decoder -> CUT(s)
//                                   | TEST_VEC
//                             cut_clock_ctrl -> CUT clock(s)
//
// The sequence generator ROM holds the encoded test set. With USE_RL = 0 it is
// bit-serial and feeds one bit per clock to the pattern decoder; with
// USE_RL = 1 it holds 3-bit run codes and a run-length decoder rebuilds the
// bit stream, still at one bit per clock. The pattern decoder (Huffman FSM or
// Comma counter, chosen by CODE) turns each completed codeword into an N-bit
// test pattern and raises TEST_VEC for that cycle; the CUT clock is gated by
// TEST_VEC, so the CUT receives exactly the stored sequence, in order, and a
// pattern with a w-bit codeword costs w clock cycles. One decoder may feed
// NUM_CUTS circuits that share the same test set.
//
// Interface and timing:
//   normal       0 = test mode (the ROM is read, the CUT clock is gated),
//                1 = normal mode (the ROM and decoders hold their state, the
//                CUT clock is the system clock). Switching back to test mode
//                resumes the sequence where it stopped.
//   cut_pattern  the pattern for each CUT, valid while test_vec is high; the
//                CUT latches it on the rising edge of its cut_clk.
//   test_done    the whole stored sequence has been applied.
//   rst_n        asynchronous, active low: restart from the first pattern.
// Defaults are the s444 benchmark example with Huffman coding: a 2280-bit ROM,
// 3-bit patterns, one CUT. The ROM contents are loaded from INIT_FILE, or in
// simulation through the ROM array. The decomposition into SG, run-length
// decoder, pattern decoder and gated CUT clock follows the described scheme;
// the done flag and the way normal mode freezes the generator are this
// design's choices.
module tgc_top
  import tgc_pkg::*;
#(
  parameter code_e       CODE      = CODE_HUFFMAN,
  parameter bit          USE_RL    = 1'b0,
  parameter int unsigned N         = S444_N,
  parameter int unsigned M         = S444_M,
  parameter int unsigned NUM_CUTS  = 1,
  parameter int unsigned ROM_BITS  = S444_H_BITS,
  parameter int unsigned RL_WORDS  = S444_HR_BITS / RL_CODE_W,
  parameter string       INIT_FILE = "",
  // Huffman FSM tables
  parameter int unsigned HUFF_STATES = S444_HUFF_STATES,
  parameter int unsigned HUFF_SW     = S444_HUFF_SW,
  parameter logic               HUFF_LEAF    [HUFF_STATES][2] = S444_HUFF_LEAF,
  parameter logic [HUFF_SW-1:0] HUFF_NEXT    [HUFF_STATES][2] = S444_HUFF_NEXT,
  parameter logic [N-1:0]       HUFF_PATTERN [HUFF_STATES][2] = S444_HUFF_PATTERN,
  // Comma pattern map (rank -> pattern)
  parameter logic [N-1:0]       COMMA_PATTERNS [M] = S444_PATTERNS,
  // Run-length code table
  parameter logic                  RUN_BIT    [2**RL_CODE_W] = RL_BIT,
  parameter logic [RL_CNT_W-1:0]   RUN_LEN_M1 [2**RL_CODE_W] = RL_LEN_M1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         normal,
  output logic [N-1:0] cut_pattern [NUM_CUTS],
  output logic         cut_clk     [NUM_CUTS],
  output logic         test_vec,
  output logic         test_done
);

  logic         test_en;
  logic         bit_valid;
  logic         bit_val;
  logic         sg_empty;
  logic         rl_busy;
  logic         dec_idle;
  logic [N-1:0] pattern;
  logic         gated_clk;

  assign test_en = !normal;

  // ---------------------------------------------------------------------
  // Sequence generator, optionally followed by the run-length decoder
  // ---------------------------------------------------------------------
  if (USE_RL) begin : g_rl
    logic [RL_CODE_W-1:0] code;
    logic                 code_valid;
    logic                 code_rd;

    sg_rom #(.WIDTH(RL_CODE_W), .DEPTH(RL_WORDS), .INIT_FILE(INIT_FILE)) u_sg (
      .clk, .rst_n, .rd_en(code_rd), .data(code), .valid(code_valid)
    );

    rl_decoder #(
      .CODE_W(RL_CODE_W), .CNT_W(RL_CNT_W),
      .RUN_BIT(RUN_BIT), .RUN_LEN_M1(RUN_LEN_M1)
    ) u_rl (
      .clk, .rst_n, .en(test_en),
      .code, .code_valid, .code_rd,
      .out_valid(bit_valid), .out_bit(bit_val), .busy(rl_busy)
    );

    assign sg_empty = !code_valid;
  end else begin : g_serial
    logic rom_bit;
    logic rom_valid;

    sg_rom #(.WIDTH(1), .DEPTH(ROM_BITS), .INIT_FILE(INIT_FILE)) u_sg (
      .clk, .rst_n, .rd_en(test_en), .data(rom_bit), .valid(rom_valid)
    );

    assign bit_valid = test_en && rom_valid;
    assign bit_val   = rom_bit;
    assign sg_empty  = !rom_valid;
    assign rl_busy   = 1'b0;
  end

  // ---------------------------------------------------------------------
  // Pattern decoder
  // ---------------------------------------------------------------------
  if (CODE == CODE_HUFFMAN) begin : g_huffman
    huffman_decoder #(
      .N(N), .STATES(HUFF_STATES), .SW(HUFF_SW),
      .LEAF(HUFF_LEAF), .NEXT(HUFF_NEXT), .PATTERN(HUFF_PATTERN)
    ) u_dc (
      .clk, .rst_n, .in_valid(bit_valid), .in_bit(bit_val),
      .pattern, .test_vec, .idle(dec_idle)
    );
  end else begin : g_comma
    comma_decoder #(.N(N), .M(M), .PATTERNS(COMMA_PATTERNS)) u_dc (
      .clk, .rst_n, .in_valid(bit_valid), .in_bit(bit_val),
      .pattern, .test_vec, .idle(dec_idle)
    );
  end

  assign test_done = sg_empty && !rl_busy && dec_idle;

  // ---------------------------------------------------------------------
  // CUT clock and pattern fan-out
  // ---------------------------------------------------------------------
  cut_clock_ctrl u_clk (
    .clk, .rst_n, .normal, .test_vec, .cut_clk(gated_clk)
  );

  for (genvar c = 0; c < NUM_CUTS; c++) begin : g_cut
    assign cut_pattern[c] = pattern;
    assign cut_clk[c]     = gated_clk;
  end

endmodule
