// data_ram: 16 x 4-bit data memory (general-purpose registers R0..R15).
//
// A plain RAM: asynchronous read of word addr, synchronous write of wd when
// we = 1. With the I/O ports moved to separate register banks, all 16 words
// are general purpose. Not reset; a program must STORE a word before it
// LOADs it. Read-during-write returns the old word.
// The 16 x 4 size follows the published design; the asynchronous read and
// the absence of reset are this design's choices.
module data_ram #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned W     = 4
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wd,
  output logic [W-1:0]             rd
);

  logic [W-1:0] mem [DEPTH];

  assign rd = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wd;
  end

endmodule
