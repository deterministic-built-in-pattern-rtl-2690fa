// cut_clock_ctrl: clock for the circuit under test (CUT).
//
// In test mode the CUT must see exactly the decoded test sequence, so it is
// clocked only in cycles in which the pattern decoder raises TEST_VEC; cycles
// spent on the earlier bits of a codeword give no CUT clock edge. In normal
// mode the system clock passes straight through. The select follows the
// Test/Normal convention: normal = 0 is test mode, normal = 1 normal mode.
//
// TEST_VEC is a Mealy output that settles during the first half of the clock
// period, so it is sampled into an enable flip-flop on the falling clock edge
// and ANDed with the clock; the enable only changes while the clock is low,
// which keeps the gated clock free of glitches. A rising edge of cut_clk thus
// coincides with the rising edge of clk that ends a TEST_VEC cycle, the edge at
// which the CUT latches the pattern.
//
// The AND of TEST_VEC with the clock and the test/normal multiplexer follow the
// described test application scheme; the falling-edge enable flip-flop is this
// design's choice to make the gate glitch-free.
module cut_clock_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic normal,
  input  logic test_vec,
  output logic cut_clk
);

  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= test_vec;
  end

  assign cut_clk = normal ? clk : (clk & en_q);

endmodule
