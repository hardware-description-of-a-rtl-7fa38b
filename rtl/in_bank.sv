// in_bank: bank of N input registers (4 by default).
//
// Every clock, register i samples the external input pins pins[i], so the
// processor reads a registered copy (one cycle of latency, and a stable value
// for the whole instruction once it has settled). The IN instruction selects
// a register with its 2-bit port field: rd = regs[sel]. Registers reset to 0.
// Sampling on every clock (rather than on demand) is this design's choice.
module in_bank #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [W-1:0]         pins [N],
  input  logic [$clog2(N)-1:0] sel,
  output logic [W-1:0]         rd
);

  logic [W-1:0] regs [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) regs[i] <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++) regs[i] <= pins[i];
    end
  end

  assign rd = regs[sel];

endmodule
