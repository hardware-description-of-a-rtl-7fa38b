// tb_control_unit: self-checking test of the control unit.
//
// 1. State sequence: after reset the FSM must cycle Fetch, Decode, Execute
//    with ir_load only in Fetch and exec only in Execute (three clocks per
//    instruction).
// 2. Decoder: all 256 instruction codes under all 8 combinations of Z, C, DC
//    are compared with a reference decoder written from the opcode table as
//    a mnemonic lookup. Selector and ALU fields are only compared where the
//    instruction uses them.
module tb_control_unit;
  import cpu4_pkg::*;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst, z, c, dc, ir_load, exec;
  instr_t ir;
  state_t state;
  ctrl_t ctrl;

  control_unit dut (.clk, .rst, .ir, .z, .c, .dc, .state, .ir_load, .exec, .ctrl);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic string mnem(input logic [7:0] i);
    casez (i)
      8'b0000_????: return "ADDDC";
      8'b0001_????: return "SUBDC";
      8'b0010_????: return "AND";
      8'b0011_????: return "OR";
      8'b0100_????: return "XOR";
      8'b0101_0000: return "NOT";
      8'b0101_0001: return "DA";
      8'b0101_0010: return "ROL";
      8'b0101_0011: return "ROR";
      8'b0101_0100: return "SETC";
      8'b0101_0101: return "CLRC";
      8'b0101_0110: return "CLRDC";
      8'b0101_0111: return "SPARE";
      8'b0101_10??: return "SPARE";
      8'b0101_11??: return "IN";
      8'b0110_????: return "LOAD";
      8'b0111_????: return "LOADK";
      8'b10??_????: return "JUMP";
      8'b1100_????: return "JFIDC";
      8'b1101_????: return "JFIZ";
      8'b1110_????: return "STORE";
      default:      return "OUT";
    endcase
  endfunction

  task automatic check_decode(input logic [7:0] i, input logic fz, fc, fdc);
    string m = mnem(i);
    logic e_acc_we, e_arith_we, e_ram_we, e_out_we, uses_b;
    flag_op_t e_flag;
    pc_sel_t e_pc;
    acc_sel_t e_acc_sel;
    opnd_sel_t e_opnd;
    alu_op_t e_alu;
    logic bad;
    e_acc_we   = m inside {"ADDDC","SUBDC","AND","OR","XOR","NOT","DA","ROL","ROR","IN","LOAD","LOADK"};
    e_arith_we = m inside {"ADDDC","SUBDC","ROL","ROR"};
    e_ram_we   = (m == "STORE");
    e_out_we   = (m == "OUT");
    e_flag     = (m == "SETC") ? FLAG_SETC : (m == "CLRC") ? FLAG_CLRC :
                 (m == "CLRDC") ? FLAG_CLRDC : FLAG_NONE;
    e_pc       = (m == "JUMP") ? PC_REL_S :
                 ((m == "JFIDC" && (fc || fdc)) || (m == "JFIZ" && fz)) ? PC_REL_U : PC_INC;
    e_acc_sel  = (m inside {"IN","LOAD","LOADK"}) ? ACCSRC_OPND : ACCSRC_ALU;
    e_opnd     = (m == "IN") ? OPND_IN : (m == "LOADK") ? OPND_CONST : OPND_RAM;
    uses_b     = m inside {"ADDDC","SUBDC","AND","OR","XOR","IN","LOAD","LOADK"};
    case (m)
      "ADDDC": e_alu = ALU_ADD;  "SUBDC": e_alu = ALU_SUB;
      "AND":   e_alu = ALU_AND;  "OR":    e_alu = ALU_OR;
      "XOR":   e_alu = ALU_XOR;  "NOT":   e_alu = ALU_NOT;
      "DA":    e_alu = ALU_DA;   "ROL":   e_alu = ALU_ROL;
      "ROR":   e_alu = ALU_ROR;  default: e_alu = ALU_ADD;
    endcase
    bad = (ctrl.acc_we != e_acc_we) || (ctrl.arith_we != e_arith_we) ||
          (ctrl.ram_we != e_ram_we) || (ctrl.out_we != e_out_we) ||
          (ctrl.flag_op != e_flag) || (ctrl.pc_sel != e_pc);
    if (e_acc_we && ctrl.acc_sel != e_acc_sel) bad = 1;
    if (uses_b && ctrl.opnd_sel != e_opnd) bad = 1;
    if (e_acc_we && e_acc_sel == ACCSRC_ALU && ctrl.alu_op != e_alu) bad = 1;
    checks++;
    if (bad) begin
      failures++;
      if (failures < 10)
        $display("FAIL ir=%b (%s) zcd=%b%b%b ctrl=%p", i, m, fz, fc, fdc, ctrl);
    end
  endtask

  initial begin
    rst = 1; ir = 0; z = 0; c = 0; dc = 0;
    @(posedge clk); #1;
    rst = 0;
    for (int t = 0; t < 30; t++) begin
      state_t exp_s;
      exp_s = (t % 3 == 0) ? S_FETCH : (t % 3 == 1) ? S_DECODE : S_EXECUTE;
      checks++;
      if (state != exp_s || ir_load != (exp_s == S_FETCH) || exec != (exp_s == S_EXECUTE)) begin
        failures++;
        $display("FAIL cycle %0d state=%s ir_load=%b exec=%b", t, state.name(), ir_load, exec);
      end
      @(posedge clk); #1;
    end
    for (int i = 0; i < 256; i++)
      for (int f = 0; f < 8; f++) begin
        ir = 8'(i); z = f[0]; c = f[1]; dc = f[2];
        #1;
        check_decode(8'(i), f[0], f[1], f[2]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
