// tb_cut_clock_ctrl: checks the CUT clock gating and the test/normal select.
// In test mode, test_vec is changed shortly after each rising clock edge the
// way a Mealy decoder output would be; cut_clk must rise exactly at the rising
// clock edges that end a cycle with test_vec high, and never otherwise. In
// normal mode cut_clk must follow the system clock in every cycle.
module tb_cut_clock_ctrl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic normal = 1'b0;
  logic test_vec = 1'b0;
  logic cut_clk;

  int checks = 0;
  int failures = 0;
  int cut_edges = 0;
  int gated_cycles = 0;

  cut_clock_ctrl dut (.clk, .rst_n, .normal, .test_vec, .cut_clk);

  always #5 clk = ~clk;

  always @(posedge cut_clk) cut_edges++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
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
    int n0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      #1;
      if (i == 200) normal = 1'b1;
      if (i == 400) normal = 1'b0;
      test_vec = 1'($urandom);
      n0 = cut_edges;
      @(posedge clk);
      #1;
      if (i != 200 && i != 400) begin
        if (normal) check(cut_edges == n0 + 1, "normal mode: cut_clk follows clk");
        else begin
          check(cut_edges == n0 + (test_vec ? 1 : 0),
                $sformatf("test mode cycle %0d: test_vec=%0b, %0d cut edges", i, test_vec, cut_edges - n0));
          if (!test_vec) gated_cycles++;
        end
      end
      // at the falling edge check that cut_clk is low while clk is low
      @(negedge clk);
      #1 check(cut_clk == 1'b0, "cut_clk low while clk is low");
    end
    check(gated_cycles > 100, "test mode suppressed the CUT clock in some cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
