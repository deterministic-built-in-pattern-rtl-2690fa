// tb_rl_decoder: checks the run-length decoder with the s444 run-code table.
// The code memory is modelled in the testbench and advances on code_rd. First
// the worked example stream 0000000 1111 0 1111 00000 (codes 011 111 000 111
// 010 001) is decoded, then the Huffman encoding of a random s444-like
// sequence, run-length encoded by the reference encoder. The output must
// reproduce the bit stream exactly, one bit per clock with no gaps after the
// first code is loaded (one load cycle, then one bit per enabled cycle), and every code of the table must be used.
module tb_rl_decoder;
  import tgc_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0;
  logic [2:0] code;
  logic code_valid;
  logic code_rd;
  logic out_valid;
  logic out_bit;
  logic busy;

  int checks = 0;
  int failures = 0;

  int codes[$];
  int rd_ptr;

  rl_decoder dut (.clk, .rst_n, .en, .code, .code_valid, .code_rd, .out_valid, .out_bit, .busy);

  assign code_valid = (rd_ptr < codes.size());
  assign code       = code_valid ? 3'(codes[rd_ptr]) : 3'b000;

  always #5 clk = ~clk;

  always_ff @(posedge clk) if (code_rd) rd_ptr <= rd_ptr + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Run one code list through the decoder and compare with `bits`.
  task automatic run(input bit bits[$], input bit pause);
    bit got[$];
    int cycles, gaps;
    int used [8];
    foreach (used[c]) used[c] = 0;
    foreach (codes[k]) used[codes[k]]++;
    rst_n = 1'b0;
    en = 1'b0;
    rd_ptr = 0;
    @(negedge clk);
    rst_n = 1'b1;
    en = 1'b1;
    cycles = 0;
    gaps = 0;
    while (got.size() < bits.size() && cycles < 10000) begin
      @(negedge clk);
      if (pause) en = ($urandom_range(5, 0) != 0);
      #1;
      if (en) begin
        cycles++;
        if (out_valid) got.push_back(out_bit);
        else gaps++;
      end
    end
    check(got == bits, $sformatf("decoded stream (%0d bits) matches (%0d bits)", got.size(), bits.size()));
    check(gaps == 0, $sformatf("%0d gaps in the output stream", gaps));
    check(cycles == bits.size(), $sformatf("%0d cycles for %0d bits", cycles, bits.size()));
    @(negedge clk);
    en = 1'b1;
    @(negedge clk);
    #1 check(!busy && !out_valid, "decoder stops after the last run");
  endtask

  initial begin
    bit bits[$];
    int ranks[$];
    int used [8];

    // worked example
    bits = {1'b0,1'b0,1'b0,1'b0,1'b0,1'b0,1'b0, 1'b1,1'b1,1'b1,1'b1, 1'b0,
            1'b1,1'b1,1'b1,1'b1, 1'b0,1'b0,1'b0,1'b0,1'b0};
    rl_encode(bits, codes);
    check(codes.size() == 6 && codes[0] == 3 && codes[1] == 7 && codes[2] == 0 &&
          codes[3] == 7 && codes[4] == 2 && codes[5] == 1, "reference encoder reproduces the example codes");
    repeat (2) @(posedge clk);
    run(bits, 1'b0);

    // random s444-like stream, with pauses of the enable
    make_test_set(ranks, 1);
    encode(ranks, 1'b0, bits);
    rl_encode(bits, codes);
    foreach (used[c]) used[c] = 0;
    foreach (codes[k]) used[codes[k]]++;
    foreach (used[c]) check(used[c] > 0, $sformatf("run code %0d exercised", c));
    run(bits, 1'b0);
    // same again, with pauses on the enable (cycles counted while enabled)
    run(bits, 1'b1);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
