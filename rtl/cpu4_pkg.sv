// cpu4_pkg: types and constants shared by the 4-bit BCD accumulator processor.
//
// The processor executes 8-bit instructions whose opcode field is 2, 4, 6 or
// 8 bits long (see the opcode constants below). The instruction set, the
// opcode values, the machine widths (4-bit data, 8-bit program address,
// 16-word data memory, 256-word program memory, 4 input and 4 output
// registers) and the three-state Fetch/Decode/Execute cycle follow the
// published design. The internal control encodings (ALU operation codes,
// selector codes, PC source codes) are this implementation's own.
package cpu4_pkg;

  localparam int unsigned DATA_W  = 4;    // accumulator / data memory word
  localparam int unsigned INSTR_W = 8;    // instruction word
  localparam int unsigned PC_W    = 8;    // program counter
  localparam int unsigned ROM_DEPTH = 256;
  localparam int unsigned RAM_DEPTH = 16;
  localparam int unsigned N_IN    = 4;    // input register bank
  localparam int unsigned N_OUT   = 4;    // output register bank

  typedef logic [DATA_W-1:0]  nibble_t;
  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [PC_W-1:0]    pc_t;

  // ---- opcode fields -----------------------------------------------------
  // 4-bit opcodes with a 4-bit operand (address, constant or forward offset)
  localparam logic [3:0] OP_ADDDC = 4'b0000;
  localparam logic [3:0] OP_SUBDC = 4'b0001;
  localparam logic [3:0] OP_AND   = 4'b0010;
  localparam logic [3:0] OP_OR    = 4'b0011;
  localparam logic [3:0] OP_XOR   = 4'b0100;
  localparam logic [3:0] OP_GRP5  = 4'b0101;   // inherent group and IN
  localparam logic [3:0] OP_LOAD  = 4'b0110;
  localparam logic [3:0] OP_LOADK = 4'b0111;
  localparam logic [3:0] OP_JFIDC = 4'b1100;
  localparam logic [3:0] OP_JFIZ  = 4'b1101;
  localparam logic [3:0] OP_STORE = 4'b1110;
  localparam logic [3:0] OP_OUT   = 4'b1111;   // 1111 xx P1 P0
  // 2-bit opcode with a 6-bit signed offset
  localparam logic [1:0] OP_JUMP  = 2'b10;
  // 8-bit inherent opcodes
  localparam instr_t I_NOT   = 8'b0101_0000;
  localparam instr_t I_DA    = 8'b0101_0001;
  localparam instr_t I_ROL   = 8'b0101_0010;
  localparam instr_t I_ROR   = 8'b0101_0011;
  localparam instr_t I_SETC  = 8'b0101_0100;
  localparam instr_t I_CLRC  = 8'b0101_0101;
  localparam instr_t I_CLRDC = 8'b0101_0110;
  localparam instr_t I_SPARE = 8'b0101_0111;   // unused code: executes as no operation
  // 6-bit opcode with a 2-bit port number
  localparam logic [5:0] OP_IN = 6'b0101_11;

  // ---- control encodings (implementation's own) --------------------------
  typedef enum logic [1:0] {
    S_FETCH   = 2'd0,   // IR <= ROM[PC]
    S_DECODE  = 2'd1,   // decoder and operand selector settle
    S_EXECUTE = 2'd2    // write ACC/flags/RAM/output, update PC
  } state_t;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_NOT, ALU_DA,  ALU_ROL, ALU_ROR
  } alu_op_t;

  // operand selector: which 4-bit value feeds the ALU's B input / LOAD path
  typedef enum logic [1:0] {
    OPND_RAM = 2'd0, OPND_CONST = 2'd1, OPND_IN = 2'd2, OPND_ACC = 2'd3
  } opnd_sel_t;

  // accumulator selector: which 4-bit value is written into ACC
  typedef enum logic [1:0] {
    ACCSRC_ALU = 2'd0, ACCSRC_OPND = 2'd1, ACCSRC_HOLD = 2'd2, ACCSRC_ZERO = 2'd3
  } acc_sel_t;

  typedef enum logic [1:0] {
    FLAG_NONE = 2'd0, FLAG_SETC = 2'd1, FLAG_CLRC = 2'd2, FLAG_CLRDC = 2'd3
  } flag_op_t;

  typedef enum logic [1:0] {
    PC_INC = 2'd0,    // PC + 1
    PC_REL_S = 2'd1,  // PC + sign-extended IR[5:0]   (JUMP)
    PC_REL_U = 2'd2   // PC + zero-extended IR[3:0]   (taken JFIDC / JFIZ)
  } pc_sel_t;

  // decoded control word, valid while the FSM is in S_EXECUTE
  typedef struct packed {
    alu_op_t   alu_op;
    opnd_sel_t opnd_sel;
    acc_sel_t  acc_sel;
    logic      acc_we;      // ACC (and Z) written
    logic      arith_we;    // C and DC take the ALU's flag outputs
    flag_op_t  flag_op;     // SETC / CLRC / CLRDC
    logic      ram_we;      // STORE
    logic      out_we;      // OUT
    pc_sel_t   pc_sel;
  } ctrl_t;

endpackage
