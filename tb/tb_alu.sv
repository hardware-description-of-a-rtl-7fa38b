// tb_alu: exhaustive self-checking test of the ALU.
//
// Every operation is applied to every combination of A, B, C and DC (9216
// vectors) and compared with a reference computed in integer arithmetic:
// ADD/SUB with carry-in C|DC, borrow-out on SUB, DC = carry/borrow or result
// above 9, DA adding 6 when DC is set, rotations through C.
module tb_alu;
  import cpu4_pkg::*;

  int checks = 0, failures = 0;

  alu_op_t op;
  nibble_t a, b, y;
  logic    c_in, dc_in, c_out, dc_out;

  alu dut (.op, .a, .b, .c_in, .dc_in, .y, .c_out, .dc_out);

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ey, ec, edc, s, ci;

  alu_op_t ops [9] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
                       ALU_NOT, ALU_DA, ALU_ROL, ALU_ROR};

  initial begin
    foreach (ops[k]) begin
      for (int ia = 0; ia < 16; ia++)
        for (int ib = 0; ib < 16; ib++)
          for (int f = 0; f < 4; f++) begin
            op = ops[k]; a = 4'(ia); b = 4'(ib); c_in = f[0]; dc_in = f[1];
            #1;
            ci = (f != 0) ? 1 : 0;
            ec = int'(f[0]); edc = int'(f[1]);
            case (ops[k])
              ALU_ADD: begin s = ia + ib + ci; ey = s % 16; ec = int'(s > 15); edc = int'(s > 9); end
              ALU_SUB: begin
                s = ia - ib - ci; ey = (s + 32) % 16; ec = int'(s < 0);
                edc = int'((s < 0) || (ey > 9));
              end
              ALU_AND: ey = ia & ib;
              ALU_OR:  ey = ia | ib;
              ALU_XOR: ey = ia ^ ib;
              ALU_NOT: ey = 15 - ia;
              ALU_DA:  ey = f[1] ? (ia + 6) % 16 : ia;
              ALU_ROL: begin ey = (ia * 2) % 16 + int'(f[0]); ec = ia / 8; end
              ALU_ROR: begin ey = ia / 2 + 8 * int'(f[0]); ec = ia % 2; end
              default: ey = -1;
            endcase
            checks++;
            if (int'(y) != ey || int'(c_out) != ec || int'(dc_out) != edc) begin
              failures++;
              if (failures < 10)
                $display("FAIL %s a=%0d b=%0d c=%0d dc=%0d: y=%0d c=%0d dc=%0d exp %0d %0d %0d",
                         ops[k].name(), ia, ib, f[0], f[1], y, c_out, dc_out, ey, ec, edc);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
