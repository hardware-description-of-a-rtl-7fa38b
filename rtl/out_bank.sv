// out_bank: bank of N output registers (4 by default).
//
// The OUT instruction writes the accumulator into register sel on the clock
// edge that ends its Execute state (we = 1). Each register drives its own
// output pins continuously and keeps its value until the next OUT to it.
// The bank of four registers written by OUT follows the published design;
// the reset value 0 is this design's choice.
module out_bank #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 4
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 we,
  input  logic [$clog2(N)-1:0] sel,
  input  logic [W-1:0]         wd,
  output logic [W-1:0]         pins [N]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(N); i++) pins[i] <= '0;
    end else if (we) begin
      pins[sel] <= wd;
    end
  end

endmodule
