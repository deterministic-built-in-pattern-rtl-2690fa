// tb_tgc_table1: the test generator retargeted, through parameters only, to a
// second test set: 80 patterns of 4 bits with 4 distinct patterns
//   0000 x45 (Huffman 0,   Comma 0)
//   0101 x15 (Huffman 10,  Comma 10)
//   1010 x15 (Huffman 110, Comma 110)
//   1111 x5  (Huffman 111, Comma 1110)
// Both a 3-state Huffman decoder and a 4-entry Comma decoder are built. Each
// applies the sequence in random order; the CUT must receive it exactly, and
// the test must take 135 (Huffman, 1.6875 bits per pattern) and 140 (Comma)
// cycles.
module tb_tgc_table1;
  import tgc_pkg::*;

  localparam logic [3:0] P4 [4] = '{4'b0000, 4'b0101, 4'b1010, 4'b1111};
  localparam int         CNT [4] = '{45, 15, 15, 5};
  localparam string      HC  [4] = '{"0", "10", "110", "111"};
  localparam string      CC  [4] = '{"0", "10", "110", "1110"};

  localparam logic       LEAF    [3][2] = '{'{1'b1, 1'b0}, '{1'b1, 1'b0}, '{1'b1, 1'b1}};
  localparam logic [1:0] NEXT    [3][2] = '{'{2'd0, 2'd1}, '{2'd0, 2'd2}, '{2'd0, 2'd0}};
  localparam logic [3:0] PATTERN [3][2] = '{'{4'b0000, 4'b0000}, '{4'b0101, 4'b0000},
                                           '{4'b1010, 4'b1111}};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic normal = 1'b0;
  logic [3:0] pat_h [1], pat_c [1];
  logic       clk_h [1], clk_c [1];
  logic       tv_h, tv_c, done_h, done_c;

  int checks = 0;
  int failures = 0;
  int cyc_h = 0, cyc_c = 0;

  tgc_top #(.CODE(CODE_HUFFMAN), .N(4), .M(4), .ROM_BITS(135),
            .HUFF_STATES(3), .HUFF_SW(2), .HUFF_LEAF(LEAF), .HUFF_NEXT(NEXT),
            .HUFF_PATTERN(PATTERN), .COMMA_PATTERNS(P4)) dut_h (
    .clk, .rst_n, .normal, .cut_pattern(pat_h), .cut_clk(clk_h), .test_vec(tv_h), .test_done(done_h));
  tgc_top #(.CODE(CODE_COMMA), .N(4), .M(4), .ROM_BITS(140),
            .HUFF_STATES(3), .HUFF_SW(2), .HUFF_LEAF(LEAF), .HUFF_NEXT(NEXT),
            .HUFF_PATTERN(PATTERN), .COMMA_PATTERNS(P4)) dut_c (
    .clk, .rst_n, .normal, .cut_pattern(pat_c), .cut_clk(clk_c), .test_vec(tv_c), .test_done(done_c));

  tb_tgc_capture #(.N(4)) cap_h (.clk, .rst_n, .cut_clk(clk_h[0]), .normal, .pattern(pat_h[0]));
  tb_tgc_capture #(.N(4)) cap_c (.clk, .rst_n, .cut_clk(clk_c[0]), .normal, .pattern(pat_c[0]));

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (rst_n) begin
    if (!done_h) cyc_h <= cyc_h + 1;
    if (!done_c) cyc_c <= cyc_c + 1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ranks[$];
    bit hb[$], cb[$];
    int bad;
    for (int r = 0; r < 4; r++) repeat (CNT[r]) ranks.push_back(r);
    ranks.shuffle();
    foreach (ranks[k]) begin
      for (int i = 0; i < HC[ranks[k]].len(); i++) hb.push_back(HC[ranks[k]][i] == "1");
      for (int i = 0; i < CC[ranks[k]].len(); i++) cb.push_back(CC[ranks[k]][i] == "1");
    end
    check(hb.size() == 135 && cb.size() == 140, $sformatf("stream sizes %0d, %0d", hb.size(), cb.size()));
    foreach (hb[i]) dut_h.g_serial.u_sg.mem[i] = hb[i];
    foreach (cb[i]) dut_c.g_serial.u_sg.mem[i] = cb[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_h && done_c);
    repeat (2) @(negedge clk);
    check(cyc_h == 135, $sformatf("Huffman: %0d cycles", cyc_h));
    check(cyc_c == 140, $sformatf("Comma: %0d cycles", cyc_c));
    check(cap_h.got.size() == 80 && cap_c.got.size() == 80,
          $sformatf("%0d and %0d patterns applied", cap_h.got.size(), cap_c.got.size()));
    bad = 0;
    foreach (ranks[k]) begin
      if (k < cap_h.got.size() && cap_h.got[k] !== P4[ranks[k]]) bad++;
      if (k < cap_c.got.size() && cap_c.got[k] !== P4[ranks[k]]) bad++;
    end
    check(bad == 0, $sformatf("%0d patterns differ", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
