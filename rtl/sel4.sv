// sel4: 4-input selector, 4 bits wide by default.
//
// The processor uses two of these: one picks the operand (data memory word,
// instruction constant, input register or the accumulator itself) and one
// picks the value written into the accumulator (ALU result, operand, the old
// value or zero). Purely combinational: y = d[sel].
// The processor's block diagram has two 4-bit, 4-input selectors; what feeds
// each input is this design's own assignment (see cpu4_top).
module sel4 #(
  parameter int unsigned W = 4
) (
  input  logic [1:0]   sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic [W-1:0] d2,
  input  logic [W-1:0] d3,
  output logic [W-1:0] y
);

  always_comb begin
    unique case (sel)
      2'd0: y = d0;
      2'd1: y = d1;
      2'd2: y = d2;
      default: y = d3;
    endcase
  end

endmodule
