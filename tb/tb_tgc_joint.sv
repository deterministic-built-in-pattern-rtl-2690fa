// tb_tgc_joint: one decoder shared by two CUTs whose test sets are encoded
// jointly. Both CUTs have 5 inputs and use the same 5 distinct patterns with
// different frequencies (per 200 patterns):
//   pattern  set 1  set 2  joint   Huffman  Comma
//   10110     160    150    310    0        0
//   00111      20     40     60    10       10
//   10100      10      8     18    110      110
//   00000       6      1      7    1110     1110
//   11111       4      1      5    1111     11110
// The joint sequence is set 1 followed by set 2 (each set in random order);
// both CUTs receive all of it. The joint Huffman stream has 532 bits, 1.33 bits
// per pattern, and the Comma stream 537 bits. Checks the sequence at both CUTs
// of the Huffman generator and at the Comma generator's CUT, and the cycle counts.
module tb_tgc_joint;
  import tgc_pkg::*;

  localparam logic [4:0] P5  [5] = '{5'b10110, 5'b00111, 5'b10100, 5'b00000, 5'b11111};
  localparam int         C1  [5] = '{160, 20, 10, 6, 4};
  localparam int         C2  [5] = '{150, 40, 8, 1, 1};
  localparam string      HC  [5] = '{"0", "10", "110", "1110", "1111"};
  localparam string      CC  [5] = '{"0", "10", "110", "1110", "11110"};

  localparam logic       LEAF    [4][2] = '{'{1'b1, 1'b0}, '{1'b1, 1'b0}, '{1'b1, 1'b0}, '{1'b1, 1'b1}};
  localparam logic [1:0] NEXT    [4][2] = '{'{2'd0, 2'd1}, '{2'd0, 2'd2}, '{2'd0, 2'd3}, '{2'd0, 2'd0}};
  localparam logic [4:0] PATTERN [4][2] = '{'{5'b10110, 5'b0}, '{5'b00111, 5'b0},
                                           '{5'b10100, 5'b0}, '{5'b00000, 5'b11111}};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic normal = 1'b0;
  logic [4:0] pat_h [2], pat_c [1];
  logic       clk_h [2], clk_c [1];
  logic       tv_h, tv_c, done_h, done_c;

  int checks = 0;
  int failures = 0;
  int cyc_h = 0, cyc_c = 0;

  tgc_top #(.CODE(CODE_HUFFMAN), .N(5), .M(5), .NUM_CUTS(2), .ROM_BITS(532),
            .HUFF_STATES(4), .HUFF_SW(2), .HUFF_LEAF(LEAF), .HUFF_NEXT(NEXT),
            .HUFF_PATTERN(PATTERN), .COMMA_PATTERNS(P5)) dut_h (
    .clk, .rst_n, .normal, .cut_pattern(pat_h), .cut_clk(clk_h), .test_vec(tv_h), .test_done(done_h));
  tgc_top #(.CODE(CODE_COMMA), .N(5), .M(5), .ROM_BITS(537),
            .HUFF_STATES(4), .HUFF_SW(2), .HUFF_LEAF(LEAF), .HUFF_NEXT(NEXT),
            .HUFF_PATTERN(PATTERN), .COMMA_PATTERNS(P5)) dut_c (
    .clk, .rst_n, .normal, .cut_pattern(pat_c), .cut_clk(clk_c), .test_vec(tv_c), .test_done(done_c));

  tb_tgc_capture #(.N(5)) cap_h0 (.clk, .rst_n, .cut_clk(clk_h[0]), .normal, .pattern(pat_h[0]));
  tb_tgc_capture #(.N(5)) cap_h1 (.clk, .rst_n, .cut_clk(clk_h[1]), .normal, .pattern(pat_h[1]));
  tb_tgc_capture #(.N(5)) cap_c  (.clk, .rst_n, .cut_clk(clk_c[0]), .normal, .pattern(pat_c[0]));

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

  task automatic compare(string name, logic [4:0] got[$], int exp[$]);
    int bad;
    bad = 0;
    foreach (exp[k]) if (k >= got.size() || got[k] !== P5[exp[k]]) bad++;
    check(got.size() == exp.size() && bad == 0,
          $sformatf("%s: %0d patterns applied, %0d wrong", name, got.size(), bad));
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s1[$], s2[$], ranks[$];
    bit hb[$], cb[$];
    for (int r = 0; r < 5; r++) begin
      repeat (C1[r]) s1.push_back(r);
      repeat (C2[r]) s2.push_back(r);
    end
    s1.shuffle();
    s2.shuffle();
    ranks = {s1, s2};
    foreach (ranks[k]) begin
      for (int i = 0; i < HC[ranks[k]].len(); i++) hb.push_back(HC[ranks[k]][i] == "1");
      for (int i = 0; i < CC[ranks[k]].len(); i++) cb.push_back(CC[ranks[k]][i] == "1");
    end
    check(hb.size() == 532 && cb.size() == 537, $sformatf("stream sizes %0d, %0d", hb.size(), cb.size()));
    foreach (hb[i]) dut_h.g_serial.u_sg.mem[i] = hb[i];
    foreach (cb[i]) dut_c.g_serial.u_sg.mem[i] = cb[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_h && done_c);
    repeat (2) @(negedge clk);
    check(cyc_h == 532, $sformatf("Huffman: %0d cycles", cyc_h));
    check(cyc_c == 537, $sformatf("Comma: %0d cycles", cyc_c));
    compare("huffman cut 1", cap_h0.got, ranks);
    compare("huffman cut 2", cap_h1.got, ranks);
    compare("comma", cap_c.got, ranks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
