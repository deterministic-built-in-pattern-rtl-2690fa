// tb_sg_rom: checks the sequence generator ROM and its address counter.
// A small 3-bit-wide ROM is filled through the array with random words; the
// testbench then reads it with random read enables and checks every word, the
// valid flag, that the counter stops after the last word, and reset. A second
// instance is initialised from tb/sg_rom_test.hex, whose word i is
// (5*i + 3) mod 8, and is read out completely.
module tb_sg_rom;

  localparam int W = 3;
  localparam int D = 21;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rd_en = 1'b0;
  logic [W-1:0] data;
  logic valid;

  int checks = 0;
  int failures = 0;
  logic [W-1:0] ref_mem [D];

  sg_rom #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .rd_en, .data, .valid);

  logic [W-1:0] data_f;
  logic         valid_f;
  logic         rd_f = 1'b0;

  sg_rom #(.WIDTH(W), .DEPTH(D), .INIT_FILE("tb/sg_rom_test.hex")) dut_file (
    .clk, .rst_n, .rd_en(rd_f), .data(data_f), .valid(valid_f));

  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addr;
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = W'($urandom);
      dut.mem[i] = ref_mem[i];
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      addr = 0;
      while (addr < D + 4) begin
        @(negedge clk);
        check(valid == (addr < D), $sformatf("valid at address %0d", addr));
        if (addr < D) check(data == ref_mem[addr], $sformatf("data at %0d: %0h vs %0h", addr, data, ref_mem[addr]));
        rd_en = ($urandom_range(3, 0) != 0);
        if (rd_en) addr++;
      end
      @(negedge clk);
      check(!valid, "counter stays past the last word");
      rd_en = 1'b0;
      // reset restarts from word 0
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      check(valid && data == ref_mem[0], "reset returns to word 0");
    end
    // file-initialised ROM
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      check(valid_f && data_f == W'((5 * i + 3) % 8), $sformatf("file ROM word %0d = %0h", i, data_f));
      rd_f = 1'b1;
    end
    @(negedge clk);
    rd_f = 1'b0;
    check(!valid_f, "file ROM exhausted after its last word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
