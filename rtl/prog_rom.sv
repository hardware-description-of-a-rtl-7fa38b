// prog_rom: 256 x 8-bit program memory.
//
// Asynchronous read: data = mem[addr]. The contents are set at elaboration:
// all words are cleared to 0 and, when INIT_FILE is not empty, loaded from a
// hex file with $readmemh (one 8-bit word per line, from address 0). A
// testbench may also write mem[] hierarchically before reset is released.
// Size follows the published design; the loading mechanism is this design's.
module prog_rom #(
  parameter int unsigned DEPTH     = 256,
  parameter int unsigned W         = 8,
  parameter string       INIT_FILE = ""
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic [W-1:0]             data
);

  logic [W-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

endmodule
