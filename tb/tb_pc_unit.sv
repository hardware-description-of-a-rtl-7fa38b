// tb_pc_unit: self-checking test of the program counter. Random enable,
// source and offset; the expected PC is computed with integer arithmetic
// modulo 256 (sign-extension of the 6-bit JUMP offset done by hand).
module tb_pc_unit;
  import cpu4_pkg::*;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst, en;
  pc_sel_t sel;
  logic [5:0] offset;
  pc_t pc;
  int model, off;

  pc_unit dut (.clk, .rst, .en, .sel, .offset, .pc);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    rst = 1; en = 1; sel = PC_INC; offset = 0;
    @(posedge clk); #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    rst = 0; model = 0;
    for (int t = 0; t < 2000; t++) begin
      en = ($urandom % 4) != 0;
      case ($urandom % 3)
        0: sel = PC_INC;
        1: sel = PC_REL_S;
        default: sel = PC_REL_U;
      endcase
      offset = 6'($urandom);
      @(posedge clk); #1;
      if (en) begin
        if (sel == PC_INC) off = 1;
        else if (sel == PC_REL_S) off = (offset >= 32) ? int'(offset) - 64 : int'(offset);
        else off = int'(offset) % 16;
        model = (model + off + 256) % 256;
      end
      checks++;
      if (int'(pc) != model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d pc=%0d exp %0d", t, pc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
