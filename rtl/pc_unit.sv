// pc_unit: 8-bit program counter with relative branching.
//
// The PC holds the address of the instruction being executed for the whole
// Fetch/Decode/Execute cycle and is updated only at the end of Execute
// (en = 1), which is how the three-state cycle avoids a separate increment
// state. All jumps are relative to the address of the jump instruction:
//   PC_INC    PC + 1
//   PC_REL_S  PC + sign-extended 6-bit offset (JUMP, -32..+31)
//   PC_REL_U  PC + 4-bit unsigned offset       (taken JFIDC / JFIZ, 0..15)
// Arithmetic wraps modulo 256. Synchronous active-high reset to address 0.
// The offset base (the jump's own address) matches the published code
// example, where "JFIC 2" skips exactly one instruction; the reset address
// is this design's choice.
module pc_unit
  import cpu4_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  input  pc_sel_t    sel,
  input  logic [5:0] offset,   // IR[5:0]
  output pc_t        pc
);

  pc_t next;

  always_comb begin
    unique case (sel)
      PC_REL_S: next = pc + {{2{offset[5]}}, offset};
      PC_REL_U: next = pc + {4'b0, offset[3:0]};
      default:  next = pc + 8'd1;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= next;
  end

endmodule
