// control_unit: Fetch-Decode-Execute state machine and instruction decoder.
//
// Every instruction takes exactly three clock cycles and there is no
// pipelining:
//   S_FETCH    ir_load = 1: the instruction register takes ROM[PC].
//   S_DECODE   the decoder output and the operand selector settle.
//   S_EXECUTE  exec = 1: ACC, flags, data memory or output register are
//              written and the PC takes its next value, all on the same edge.
// The published design folds the PC increment into the execute state, which
// removed the separate wait state of its predecessor; this module does the
// same with a single execute state for every instruction.
//
// The decoder is combinational from the IR and the flags. Opcodes are those
// of the published codification: the first IR bit splits instructions that
// write the accumulator (0) from those that do not (1). JFIDC is taken when
// C or DC is set, JFIZ when Z is set. Own choices: the unused code 01010111
// and the codes 010110xx (absent from the opcode table) execute as a
// no-operation; reset is synchronous and active high and returns the FSM
// to S_FETCH.
module control_unit
  import cpu4_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  instr_t ir,
  input  logic   z,
  input  logic   c,
  input  logic   dc,
  output state_t state,
  output logic   ir_load,
  output logic   exec,
  output ctrl_t  ctrl
);

  // ---- state machine -----------------------------------------------------
  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH;
    else begin
      unique case (state)
        S_FETCH:  state <= S_DECODE;
        S_DECODE: state <= S_EXECUTE;
        default:  state <= S_FETCH;
      endcase
    end
  end

  assign ir_load = (state == S_FETCH);
  assign exec    = (state == S_EXECUTE);

  // the fourth state encoding is never entered
  a_state_legal: assert property (@(posedge clk) disable iff (rst)
    state == S_FETCH || state == S_DECODE || state == S_EXECUTE);

  // an instruction writes at most one of ACC, data memory or an output port
  a_one_dest: assert property (@(posedge clk) disable iff (rst)
    (32'(ctrl.acc_we) + 32'(ctrl.ram_we) + 32'(ctrl.out_we)) <= 1);

  // ---- decoder -----------------------------------------------------------
  always_comb begin
    ctrl          = '0;
    ctrl.alu_op   = ALU_ADD;
    ctrl.opnd_sel = OPND_RAM;
    ctrl.acc_sel  = ACCSRC_HOLD;
    ctrl.flag_op  = FLAG_NONE;
    ctrl.pc_sel   = PC_INC;

    if (ir[7:6] == OP_JUMP) begin
      ctrl.pc_sel = PC_REL_S;
    end else begin
      unique case (ir[7:4])
        OP_ADDDC, OP_SUBDC, OP_AND, OP_OR, OP_XOR: begin
          ctrl.opnd_sel = OPND_RAM;
          ctrl.acc_sel  = ACCSRC_ALU;
          ctrl.acc_we   = 1'b1;
          unique case (ir[6:4])
            3'b000:  begin ctrl.alu_op = ALU_ADD; ctrl.arith_we = 1'b1; end
            3'b001:  begin ctrl.alu_op = ALU_SUB; ctrl.arith_we = 1'b1; end
            3'b010:  ctrl.alu_op = ALU_AND;
            3'b011:  ctrl.alu_op = ALU_OR;
            default: ctrl.alu_op = ALU_XOR;
          endcase
        end
        OP_GRP5: begin
          if (ir[3:2] == OP_IN[1:0]) begin
            ctrl.opnd_sel = OPND_IN;
            ctrl.acc_sel  = ACCSRC_OPND;
            ctrl.acc_we   = 1'b1;
          end else begin
            unique case (ir)
              I_NOT: begin ctrl.alu_op = ALU_NOT; ctrl.acc_sel = ACCSRC_ALU; ctrl.acc_we = 1'b1; end
              I_DA:  begin ctrl.alu_op = ALU_DA;  ctrl.acc_sel = ACCSRC_ALU; ctrl.acc_we = 1'b1; end
              I_ROL: begin
                ctrl.alu_op = ALU_ROL; ctrl.acc_sel = ACCSRC_ALU;
                ctrl.acc_we = 1'b1;    ctrl.arith_we = 1'b1;
              end
              I_ROR: begin
                ctrl.alu_op = ALU_ROR; ctrl.acc_sel = ACCSRC_ALU;
                ctrl.acc_we = 1'b1;    ctrl.arith_we = 1'b1;
              end
              I_SETC:  ctrl.flag_op = FLAG_SETC;
              I_CLRC:  ctrl.flag_op = FLAG_CLRC;
              I_CLRDC: ctrl.flag_op = FLAG_CLRDC;
              default: ;   // I_SPARE: no operation
            endcase
          end
        end
        OP_LOAD: begin
          ctrl.opnd_sel = OPND_RAM;
          ctrl.acc_sel  = ACCSRC_OPND;
          ctrl.acc_we   = 1'b1;
        end
        OP_LOADK: begin
          ctrl.opnd_sel = OPND_CONST;
          ctrl.acc_sel  = ACCSRC_OPND;
          ctrl.acc_we   = 1'b1;
        end
        OP_JFIDC: if (c | dc) ctrl.pc_sel = PC_REL_U;
        OP_JFIZ:  if (z)      ctrl.pc_sel = PC_REL_U;
        OP_STORE: ctrl.ram_we = 1'b1;
        OP_OUT:   ctrl.out_we = 1'b1;
        default: ;
      endcase
    end
  end

endmodule
