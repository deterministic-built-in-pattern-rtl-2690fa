// rl_decoder: run-length decoder placed between the sequence generator ROM and
// the Huffman or Comma pattern decoder.
//
// The ROM holds fixed-width run codes. Each code stands for a run of identical
// bits: a table maps it to the repeated bit and to the run length minus one,
// which is preset into a down counter. The repeated bit is sent out in every
// cycle while the counter counts down to zero; when it reaches zero a zero
// detector requests the next code from the ROM, which is loaded in that same
// cycle, so the output carries one bit per clock without gaps. Runs that have
// no code of their own are stored as several shorter runs.
//
// Interface and timing:
//   en             decoding enabled (test mode); nothing changes when low.
//   code/code_valid  the ROM word at the current address and whether one is
//                  left; code_rd asks the ROM to advance at the next edge.
//   out_valid/out_bit  one decoded bit per cycle once the first code is
//                  loaded (one cycle after en rises).
//   busy           a run is being sent out.
//   rst_n          asynchronous, active low.
// The code table, the down counter preset with length-1 and the zero-detect
// fetch follow the described decoder; the `active` flag that covers the start
// and the end of the stream is this design's addition.
module rl_decoder
  import tgc_pkg::*;
#(
  parameter int unsigned CODE_W = RL_CODE_W,
  parameter int unsigned CNT_W  = RL_CNT_W,
  parameter logic             RUN_BIT    [2**CODE_W] = RL_BIT,
  parameter logic [CNT_W-1:0] RUN_LEN_M1 [2**CODE_W] = RL_LEN_M1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [CODE_W-1:0] code,
  input  logic              code_valid,
  output logic              code_rd,
  output logic              out_valid,
  output logic              out_bit,
  output logic              busy
);

  logic [CNT_W-1:0] cnt;
  logic             bit_q;
  logic             active;
  logic             zero;

  assign zero      = (cnt == '0);
  assign code_rd   = en && code_valid && (!active || zero);
  assign out_valid = en && active;
  assign out_bit   = bit_q;
  assign busy      = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      bit_q  <= 1'b0;
      active <= 1'b0;
    end else if (en) begin
      if (!active || zero) begin
        active <= code_valid;
        if (code_valid) begin
          cnt   <= RUN_LEN_M1[code];
          bit_q <= RUN_BIT[code];
        end
      end else begin
        cnt <= cnt - 1'b1;
      end
    end
  end

endmodule
