// tb_comma_decoder: checks the Comma decoder with the s444 code.
// Every codeword is first sent once on its own, then a random sequence with
// the s444 pattern frequencies is encoded by the reference encoder and fed in
// with random idle cycles. Each TEST_VEC pulse must carry the next expected
// pattern, TEST_VEC must stay low on all other bits, and the number of input
// bits must equal the summed codeword lengths (w cycles for a w-bit codeword).
module tb_comma_decoder;
  import tgc_tb_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_bit = 1'b0;
  logic [2:0] pattern;
  logic test_vec;
  logic idle;

  int checks = 0;
  int failures = 0;

  comma_decoder dut (.clk, .rst_n, .in_valid, .in_bit, .pattern, .test_vec, .idle);

  always #5 clk = ~clk;

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

  initial begin
    int ranks[$];
    bit bits[$];
    int exp_idx, bit_cycles, pulses;
    int len_seen [NPAT];

    ranks.delete();
    for (int r = 0; r < NPAT; r++) ranks.push_back(r);
    begin
      int rnd[$];
      make_test_set(rnd, 1);
      ranks = {ranks, rnd};
    end
    encode(ranks, 1'b1, bits);

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    exp_idx = 0;
    bit_cycles = 0;
    pulses = 0;
    foreach (len_seen[r]) len_seen[r] = 0;

    foreach (bits[i]) begin
      // random idle cycles must not disturb the decoder
      while ($urandom_range(4, 0) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        in_bit = 1'($urandom);
        #1 check(!test_vec, "no TEST_VEC without a valid bit");
      end
      @(negedge clk);
      in_valid = 1'b1;
      in_bit = bits[i];
      bit_cycles++;
      #1;
      if (test_vec) begin
        pulses++;
        check(exp_idx < ranks.size(), "pattern beyond the sequence");
        if (exp_idx < ranks.size()) begin
          check(pattern == PAT[ranks[exp_idx]],
                $sformatf("pattern %0d: got %b expected %b", exp_idx, pattern, PAT[ranks[exp_idx]]));
          len_seen[ranks[exp_idx]]++;
        end
        exp_idx++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    #1;
    check(pulses == ranks.size(), $sformatf("%0d patterns for %0d codewords", pulses, ranks.size()));
    check(bit_cycles == bits.size(), "one bit consumed per valid cycle");
    begin
      int total;
      total = 0;
      foreach (ranks[k]) total += COMMA[ranks[k]].len();
      check(bit_cycles == total, $sformatf("cycles %0d, summed codeword lengths %0d", bit_cycles, total));
    end
    check(idle, "counter back at zero after the last codeword");
    foreach (len_seen[r]) check(len_seen[r] > 0, $sformatf("codeword of rank %0d exercised", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
