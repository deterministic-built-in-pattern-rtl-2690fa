// sg_rom: sequence generator (SG) of the test generator circuit.
//
// A ROM that holds the encoded test set and an address counter that walks it
// from word 0 to word DEPTH-1, one word per enabled cycle. With WIDTH = 1 it
// is the bit-serial store of a Huffman- or Comma-encoded sequence, read one
// bit per clock; with WIDTH = 3 it holds run-length codes, read one code each
// time the run-length decoder asks for the next run.
//
// Interface and timing:
//   data   is the word at the current address (asynchronous read).
//   valid  is high while the address is below DEPTH.
//   rd_en  advances the address at the next rising clock edge (ignored when
//          valid is low, so the counter stops at DEPTH).
//   rst_n  asynchronous, active low: the address returns to 0.
// The address counter has $clog2(DEPTH+1) bits so it can hold DEPTH, the
// exhausted state.
//
// The contents come from INIT_FILE (hex, one word per line) when it is given;
// otherwise they are left to be loaded by other means (for example a
// simulation back door into `mem`). The ROM, its bit-serial readout and the
// address counter follow the described scheme; the asynchronous read, the
// valid flag and the file-based initialisation are choices of this design.
module sg_rom #(
  parameter int unsigned WIDTH     = 1,
  parameter int unsigned DEPTH     = 2280,
  parameter string       INIT_FILE = ""
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_en,
  output logic [WIDTH-1:0] data,
  output logic             valid
);

  localparam int unsigned AW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    addr;

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign valid = (addr < AW'(DEPTH));
  assign data  = valid ? mem[addr[$clog2(DEPTH)-1:0]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              addr <= '0;
    else if (rd_en && valid) addr <= addr + 1'b1;
  end

endmodule
