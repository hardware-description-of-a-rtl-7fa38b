// alu: 4-bit arithmetic and logic unit of the accumulator processor.
//
// Combinational. Operand A is the accumulator, operand B comes from the
// operand selector (data memory word, constant or input register).
//
//   ALU_ADD  y = A + B + cin             (ADDDC)
//   ALU_SUB  y = A - B - cin             (SUBDC)
//   ALU_AND/OR/XOR  bitwise A op B
//   ALU_NOT  y = ~A
//   ALU_DA   y = A + 6 when DC is set, else A   (decimal adjust after ADDDC)
//   ALU_ROL  {c_out, y} = {A, c_in}      rotate left through the carry
//   ALU_ROR  {y, c_out} = {c_in, A}      rotate right through the carry
//
// As in the published design, the carry input of ADDDC/SUBDC is the OR of the
// carry flag C and the digit-carry flag DC ("addition with carry or digit
// carry"); that is why the ADD macro clears both flags first and ADDC clears
// only DC. Rotation goes through C, which makes "CLRC; ROL" a shift left.
// Own choices, where the source only gives the function:
//  * SUBDC uses the borrow convention: C = 1 means a borrow came out (and the
//    flag feeds in as a borrow).
//  * DC = C_out OR (4-bit result > 9). For an addition this is "the 5-bit
//    sum is above 9", the condition under which a BCD digit needs +6.
//  * DA adds 6 modulo 16 when DC is set and leaves C and DC unchanged, so the
//    decimal carry feeds the next ADDDC. It adjusts additions only.
//  * Logic operations, NOT and DA return c_out = c_in and dc_out = dc_in.
module alu
  import cpu4_pkg::*;
(
  input  alu_op_t op,
  input  nibble_t a,        // accumulator
  input  nibble_t b,        // selected operand
  input  logic    c_in,     // carry flag C
  input  logic    dc_in,    // digit-carry flag DC
  output nibble_t y,
  output logic    c_out,
  output logic    dc_out
);

  logic       cin;
  logic [4:0] sum, dif;

  assign cin = c_in | dc_in;
  assign sum = {1'b0, a} + {1'b0, b} + {4'b0, cin};
  assign dif = {1'b0, a} - {1'b0, b} - {4'b0, cin};

  always_comb begin
    y      = a;
    c_out  = c_in;
    dc_out = dc_in;
    unique case (op)
      ALU_ADD: begin
        y      = sum[3:0];
        c_out  = sum[4];
        dc_out = sum[4] | (sum[3:0] > 4'd9);
      end
      ALU_SUB: begin
        y      = dif[3:0];
        c_out  = dif[4];
        dc_out = dif[4] | (dif[3:0] > 4'd9);
      end
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOT: y = ~a;
      ALU_DA:  y = dc_in ? a + 4'd6 : a;
      ALU_ROL: begin
        y     = {a[2:0], c_in};
        c_out = a[3];
      end
      ALU_ROR: begin
        y     = {c_in, a[3:1]};
        c_out = a[0];
      end
      default: ;
    endcase
  end

endmodule
