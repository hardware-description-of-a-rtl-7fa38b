// cpu4_top: 4-bit accumulator softcore processor with BCD support.
//
// A non-pipelined Harvard machine: a 256 x 8 program ROM addressed by an
// 8-bit PC, an 8-bit instruction register, a 16 x 4 data RAM, a 4-bit
// accumulator with zero (Z), carry (C) and digit-carry (DC) flags, a 4-bit
// ALU fed through an operand selector, an accumulator-source selector, and
// separate banks of 4 input and 4 output registers. Every instruction takes
// three clock cycles (Fetch, Decode, Execute); there are no interrupts.
//
// Interface: clk, rst (synchronous, active high; PC, ACC, flags, I/O
// registers and FSM go to 0 / Fetch), in_pins[4] (sampled every clock into
// the input bank), out_pins[N_OUT_PORTS] (the output registers). pc, acc,
// flags and state are brought out for observation. N_OUT_PORTS is 4 by
// default, the configuration the design is built around; since OUT's opcode
// needs only four bits, its operand field can address up to 16 output
// registers, which N_OUT_PORTS = 16 provides. The program is taken from
// ROM_INIT ($readmemh format) or written into u_rom.mem by a testbench.
//
// The block structure, widths, instruction set and three-cycle timing follow
// the published design. How the two selectors are assigned (operand and
// accumulator source) is this design's choice, as are the details listed in
// each submodule.
module cpu4_top
  import cpu4_pkg::*;
#(
  parameter string       ROM_INIT    = "",
  // number of output registers: 4 (OUT uses IR[1:0], IR[3:2] ignored) or,
  // using all four operand bits of OUT, up to 16
  parameter int unsigned N_OUT_PORTS = N_OUT
) (
  input  logic    clk,
  input  logic    rst,
  input  nibble_t in_pins  [N_IN],
  output nibble_t out_pins [N_OUT_PORTS],
  output pc_t     pc,
  output nibble_t acc,
  output logic    flag_z,
  output logic    flag_c,
  output logic    flag_dc,
  output state_t  state
);

  instr_t  rom_data, ir;
  logic    ir_load, exec;
  ctrl_t   ctrl;
  nibble_t ram_rd, in_rd, opnd, alu_y, acc_d;
  logic    alu_c, alu_dc;

  prog_rom #(.DEPTH(ROM_DEPTH), .W(INSTR_W), .INIT_FILE(ROM_INIT)) u_rom (
    .addr (pc),
    .data (rom_data)
  );

  ir_reg u_ir (
    .clk  (clk),
    .rst  (rst),
    .load (ir_load),
    .d    (rom_data),
    .q    (ir)
  );

  control_unit u_ctrl (
    .clk     (clk),
    .rst     (rst),
    .ir      (ir),
    .z       (flag_z),
    .c       (flag_c),
    .dc      (flag_dc),
    .state   (state),
    .ir_load (ir_load),
    .exec    (exec),
    .ctrl    (ctrl)
  );

  pc_unit u_pc (
    .clk    (clk),
    .rst    (rst),
    .en     (exec),
    .sel    (ctrl.pc_sel),
    .offset (ir[5:0]),
    .pc     (pc)
  );

  data_ram #(.DEPTH(RAM_DEPTH), .W(DATA_W)) u_ram (
    .clk  (clk),
    .we   (exec & ctrl.ram_we),
    .addr (ir[3:0]),
    .wd   (acc),
    .rd   (ram_rd)
  );

  in_bank #(.N(N_IN), .W(DATA_W)) u_in (
    .clk  (clk),
    .rst  (rst),
    .pins (in_pins),
    .sel  (ir[1:0]),
    .rd   (in_rd)
  );

  localparam int unsigned OSEL_W = (N_OUT_PORTS > 1) ? $clog2(N_OUT_PORTS) : 1;

  if (N_OUT_PORTS < 2 || N_OUT_PORTS > 16 || (N_OUT_PORTS & (N_OUT_PORTS - 1)) != 0) begin : g_bad_nout
    $error("N_OUT_PORTS must be 2, 4, 8 or 16");
  end

  out_bank #(.N(N_OUT_PORTS), .W(DATA_W)) u_out (
    .clk  (clk),
    .rst  (rst),
    .we   (exec & ctrl.out_we),
    .sel  (ir[OSEL_W-1:0]),
    .wd   (acc),
    .pins (out_pins)
  );

  // operand selector: RAM word, 4-bit constant, input register, accumulator
  sel4 #(.W(DATA_W)) u_sel_opnd (
    .sel (ctrl.opnd_sel),
    .d0  (ram_rd),
    .d1  (ir[3:0]),
    .d2  (in_rd),
    .d3  (acc),
    .y   (opnd)
  );

  alu u_alu (
    .op     (ctrl.alu_op),
    .a      (acc),
    .b      (opnd),
    .c_in   (flag_c),
    .dc_in  (flag_dc),
    .y      (alu_y),
    .c_out  (alu_c),
    .dc_out (alu_dc)
  );

  // accumulator-source selector: ALU result, operand, old ACC, zero
  sel4 #(.W(DATA_W)) u_sel_acc (
    .sel (ctrl.acc_sel),
    .d0  (alu_y),
    .d1  (opnd),
    .d2  (acc),
    .d3  ('0),
    .y   (acc_d)
  );

  acc_flags u_acc (
    .clk      (clk),
    .rst      (rst),
    .en       (exec),
    .acc_we   (ctrl.acc_we),
    .acc_d    (acc_d),
    .arith_we (ctrl.arith_we),
    .c_d      (alu_c),
    .dc_d     (alu_dc),
    .flag_op  (ctrl.flag_op),
    .acc      (acc),
    .z        (flag_z),
    .c        (flag_c),
    .dc       (flag_dc)
  );

endmodule
