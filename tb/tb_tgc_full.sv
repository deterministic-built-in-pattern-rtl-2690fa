// tb_tgc_full: the test generator at its default configuration (Huffman code,
// 2280-bit bit-serial ROM, one CUT, s444 code tables) applying one complete
// s444-like test sequence: 1881 patterns with the s444 occurrence counts in
// random order, whose Huffman encoding fills the 2280-bit ROM exactly. Checks
// that the CUT receives the whole sequence in order, that the test takes 2280
// clock cycles (one per stored bit) and that test_done is raised at the end.
module tb_tgc_full;
  import tgc_pkg::*;
  import tgc_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic normal = 1'b0;
  logic [2:0] cut_pattern [1];
  logic       cut_clk [1];
  logic       test_vec, test_done;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int pulses = 0;

  tgc_top dut (.clk, .rst_n, .normal, .cut_pattern, .cut_clk, .test_vec, .test_done);

  tb_tgc_capture cap (.clk, .rst_n, .cut_clk(cut_clk[0]), .normal, .pattern(cut_pattern[0]));

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (rst_n && !test_done) begin
    cycles <= cycles + 1;
    if (test_vec) pulses <= pulses + 1;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ranks[$];
    bit bits[$];
    int bad;
    make_test_set(ranks, 1);
    encode(ranks, 1'b0, bits);
    check(bits.size() == S444_H_BITS, $sformatf("encoded stream has %0d bits", bits.size()));
    foreach (bits[i]) dut.g_serial.u_sg.mem[i] = bits[i];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (test_done);
    repeat (2) @(negedge clk);
    check(cycles == S444_H_BITS, $sformatf("%0d cycles, expected %0d", cycles, S444_H_BITS));
    check(pulses == S444_TD, $sformatf("%0d TEST_VEC pulses, expected %0d", pulses, S444_TD));
    check(cap.got.size() == ranks.size(), $sformatf("%0d patterns applied", cap.got.size()));
    bad = 0;
    foreach (ranks[k]) if (k < cap.got.size() && cap.got[k] !== PAT[ranks[k]]) bad++;
    check(bad == 0, $sformatf("%0d patterns differ", bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
