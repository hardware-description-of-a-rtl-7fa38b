// ir_reg: 8-bit instruction register.
//
// Loads the program-memory word on the clock edge at the end of the Fetch
// state (load = 1) and holds it through Decode and Execute, so that the
// decoder and the operand fields see a stable instruction. Synchronous,
// active-high reset to 0.
module ir_reg
  import cpu4_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  instr_t d,
  output instr_t q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
