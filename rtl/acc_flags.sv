// acc_flags: the 4-bit accumulator ACC and the 1-bit flags Z, C and DC.
//
// Everything is written on the clock edge at the end of an Execute state
// (en = 1):
//   acc_we    ACC <= acc_d and Z <= (acc_d == 0)
//   arith_we  C <= c_d, DC <= dc_d (ALU flag outputs)
//   flag_op   SETC: C <= 1;  CLRC: C <= 0, DC <= 0;  CLRDC: DC <= 0
// The flag instructions come from the published instruction set. Z following
// every accumulator write (not only arithmetic) and the synchronous reset of
// all four registers to 0 are this design's choices.
module acc_flags
  import cpu4_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     en,
  input  logic     acc_we,
  input  nibble_t  acc_d,
  input  logic     arith_we,
  input  logic     c_d,
  input  logic     dc_d,
  input  flag_op_t flag_op,
  output nibble_t  acc,
  output logic     z,
  output logic     c,
  output logic     dc
);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0;
      z   <= 1'b0;
      c   <= 1'b0;
      dc  <= 1'b0;
    end else if (en) begin
      if (acc_we) begin
        acc <= acc_d;
        z   <= (acc_d == '0);
      end
      if (arith_we) begin
        c  <= c_d;
        dc <= dc_d;
      end
      unique case (flag_op)
        FLAG_SETC:  c <= 1'b1;
        FLAG_CLRC:  begin c <= 1'b0; dc <= 1'b0; end
        FLAG_CLRDC: dc <= 1'b0;
        default: ;
      endcase
    end
  end

endmodule
