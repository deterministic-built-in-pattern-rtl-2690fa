// tb_tgc_top: end-to-end test of the test generator in all four of its
// configurations at once, each applying a full s444-like test sequence
// (1881 patterns with the s444 occurrence counts, in random order):
//   dut_h   Huffman code, bit-serial ROM, three CUTs sharing the decoder
//   dut_c   Comma code, bit-serial ROM
//   dut_hr  Huffman code followed by run-length coding
//   dut_cr  Comma code followed by run-length coding
// The encoded streams are built by the reference encoders and written into
// the ROM arrays. Halfway through, the design is switched to normal mode for
// a while and back. Checks: every CUT receives exactly the sequence, in order;
// the test takes as many test-mode cycles as there are encoded bits (plus one
// load cycle with run-length decoding); in normal mode the CUT clock runs
// every cycle and the sequence does not advance; test_done rises at the end.
// Each mechanism (TEST_VEC pulses, codewords of every length, run-code
// fetches, mode switches, completion) is counted and must occur.
module tb_tgc_top;
  import tgc_pkg::*;
  import tgc_tb_pkg::*;

  localparam int RLW = 1000;  // run-code ROM words; unused words are padded

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic normal = 1'b0;

  int checks = 0;
  int failures = 0;

  logic [2:0] pat_h [3];
  logic       clk_h [3];
  logic [2:0] pat_c [1], pat_hr [1], pat_cr [1];
  logic       clk_c [1], clk_hr [1], clk_cr [1];
  logic       tv_h, tv_c, tv_hr, tv_cr;
  logic       done_h, done_c, done_hr, done_cr;

  tgc_top #(.CODE(CODE_HUFFMAN), .USE_RL(1'b0), .NUM_CUTS(3), .ROM_BITS(S444_H_BITS)) dut_h (
    .clk, .rst_n, .normal, .cut_pattern(pat_h), .cut_clk(clk_h), .test_vec(tv_h), .test_done(done_h));
  tgc_top #(.CODE(CODE_COMMA), .USE_RL(1'b0), .ROM_BITS(S444_C_BITS)) dut_c (
    .clk, .rst_n, .normal, .cut_pattern(pat_c), .cut_clk(clk_c), .test_vec(tv_c), .test_done(done_c));
  tgc_top #(.CODE(CODE_HUFFMAN), .USE_RL(1'b1), .RL_WORDS(RLW)) dut_hr (
    .clk, .rst_n, .normal, .cut_pattern(pat_hr), .cut_clk(clk_hr), .test_vec(tv_hr), .test_done(done_hr));
  tgc_top #(.CODE(CODE_COMMA), .USE_RL(1'b1), .RL_WORDS(RLW)) dut_cr (
    .clk, .rst_n, .normal, .cut_pattern(pat_cr), .cut_clk(clk_cr), .test_vec(tv_cr), .test_done(done_cr));

  tb_tgc_capture cap_h0 (.clk, .rst_n, .cut_clk(clk_h[0]), .normal, .pattern(pat_h[0]));
  tb_tgc_capture cap_h1 (.clk, .rst_n, .cut_clk(clk_h[1]), .normal, .pattern(pat_h[1]));
  tb_tgc_capture cap_h2 (.clk, .rst_n, .cut_clk(clk_h[2]), .normal, .pattern(pat_h[2]));
  tb_tgc_capture cap_c  (.clk, .rst_n, .cut_clk(clk_c[0]),  .normal, .pattern(pat_c[0]));
  tb_tgc_capture cap_hr (.clk, .rst_n, .cut_clk(clk_hr[0]), .normal, .pattern(pat_hr[0]));
  tb_tgc_capture cap_cr (.clk, .rst_n, .cut_clk(clk_cr[0]), .normal, .pattern(pat_cr[0]));

  always #5 clk = ~clk;

  // mechanism counters
  int n_tv [4];
  int n_fetch_hr = 0, n_fetch_cr = 0;
  int n_mode_switch = 0;
  int n_tv_normal = 0;
  int cyc [4];

  always_ff @(posedge clk) if (rst_n) begin
    if (normal && (tv_h || tv_c || tv_hr || tv_cr)) n_tv_normal <= n_tv_normal + 1;
    if (tv_h)  n_tv[0] <= n_tv[0] + 1;
    if (tv_c)  n_tv[1] <= n_tv[1] + 1;
    if (tv_hr) n_tv[2] <= n_tv[2] + 1;
    if (tv_cr) n_tv[3] <= n_tv[3] + 1;
    if (dut_hr.g_rl.code_rd) n_fetch_hr <= n_fetch_hr + 1;
    if (dut_cr.g_rl.code_rd) n_fetch_cr <= n_fetch_cr + 1;
    if (!normal && !done_h)  cyc[0] <= cyc[0] + 1;
    if (!normal && !done_c)  cyc[1] <= cyc[1] + 1;
    if (!normal && !done_hr) cyc[2] <= cyc[2] + 1;
    if (!normal && !done_cr) cyc[3] <= cyc[3] + 1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic compare(string name, logic [2:0] got[$], int exp[$]);
    int bad;
    bad = 0;
    check(got.size() == exp.size(), $sformatf("%s: %0d patterns applied, %0d expected", name, got.size(), exp.size()));
    foreach (exp[k]) if (k < got.size() && got[k] !== PAT[exp[k]]) bad++;
    foreach (exp[k]) if (k < got.size() && got[k] !== PAT[exp[k]]) begin $display("%s first diff at %0d", name, k); break; end
    check(bad == 0, $sformatf("%s: %0d patterns differ", name, bad));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ranks[$], ranks_hr[$], ranks_cr[$];
    bit hbits[$], cbits[$];
    int hcodes[$], ccodes[$];
    int hr_bits, cr_bits;
    int edges0, tv0;

    foreach (n_tv[i]) n_tv[i] = 0;
    foreach (cyc[i]) cyc[i] = 0;

    make_test_set(ranks, 1);
    encode(ranks, 1'b0, hbits);
    encode(ranks, 1'b1, cbits);
    check(hbits.size() == S444_H_BITS, $sformatf("Huffman stream %0d bits", hbits.size()));
    check(cbits.size() == S444_C_BITS, $sformatf("Comma stream %0d bits", cbits.size()));
    rl_encode(hbits, hcodes);
    rl_encode(cbits, ccodes);
    $display("run codes: Huffman %0d (%0d bits), Comma %0d (%0d bits)",
             hcodes.size(), 3 * hcodes.size(), ccodes.size(), 3 * ccodes.size());
    check(hcodes.size() <= RLW && ccodes.size() <= RLW, "run codes fit the ROM");
    // pad with code 000 = one 0 bit = one more pattern 000 after the sequence
    ranks_hr = ranks;
    ranks_cr = ranks;
    hr_bits = hbits.size();
    cr_bits = cbits.size();
    while (hcodes.size() < RLW) begin hcodes.push_back(0); ranks_hr.push_back(0); hr_bits++; end
    while (ccodes.size() < RLW) begin ccodes.push_back(0); ranks_cr.push_back(0); cr_bits++; end

    foreach (hbits[i])  dut_h.g_serial.u_sg.mem[i] = hbits[i];
    foreach (cbits[i])  dut_c.g_serial.u_sg.mem[i] = cbits[i];
    foreach (hcodes[i]) dut_hr.g_rl.u_sg.mem[i] = 3'(hcodes[i]);
    foreach (ccodes[i]) dut_cr.g_rl.u_sg.mem[i] = 3'(ccodes[i]);

    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // run part of the test, then normal mode for 50 cycles
    repeat (1000) @(negedge clk);
    tv0 = cap_h0.got.size();
    edges0 = cap_c.normal_edges;
    normal = 1'b1;
    n_mode_switch++;
    repeat (50) @(negedge clk);
    check(cap_h0.got.size() == tv0, "normal mode: no test pattern applied");
    check(cap_c.normal_edges - edges0 == 50, $sformatf("normal mode: %0d CUT clocks in 50 cycles", cap_c.normal_edges - edges0));
    check(cap_hr.normal_edges == 50 && cap_cr.normal_edges == 50 && cap_h2.normal_edges == 50,
          "normal mode: every CUT clocked every cycle");
    check(n_tv_normal == 0, $sformatf("normal mode: %0d TEST_VEC pulses", n_tv_normal));
    normal = 1'b0;
    n_mode_switch++;

    wait (done_h && done_c && done_hr && done_cr);
    repeat (3) @(negedge clk);

    compare("huffman cut0", cap_h0.got, ranks);
    compare("huffman cut1", cap_h1.got, ranks);
    compare("huffman cut2", cap_h2.got, ranks);
    compare("comma", cap_c.got, ranks);
    compare("huffman+rl", cap_hr.got, ranks_hr);
    compare("comma+rl", cap_cr.got, ranks_cr);

    // test time: one cycle per encoded bit (t = sum of the codeword lengths)
    check(cyc[0] == hbits.size(), $sformatf("huffman: %0d cycles for %0d bits", cyc[0], hbits.size()));
    check(cyc[1] == cbits.size(), $sformatf("comma: %0d cycles for %0d bits", cyc[1], cbits.size()));
    check(cyc[2] == hr_bits + 1, $sformatf("huffman+rl: %0d cycles for %0d bits", cyc[2], hr_bits));
    check(cyc[3] == cr_bits + 1, $sformatf("comma+rl: %0d cycles for %0d bits", cyc[3], cr_bits));
    check(n_fetch_hr == RLW && n_fetch_cr == RLW, "every run code fetched once");

    // every mechanism happened
    foreach (n_tv[i]) check(n_tv[i] > 0, $sformatf("TEST_VEC pulses in configuration %0d", i));
    check(n_fetch_hr > 0 && n_fetch_cr > 0, "run-code fetches happened");
    check(n_mode_switch == 2, "test/normal mode switches happened");
    check(done_h && done_c && done_hr && done_cr, "test_done reached");
    $display("mechanisms: test_vec %0d/%0d/%0d/%0d, run fetches %0d/%0d, mode switches %0d",
             n_tv[0], n_tv[1], n_tv[2], n_tv[3], n_fetch_hr, n_fetch_cr, n_mode_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
