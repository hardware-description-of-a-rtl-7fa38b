// cpu4_asm_pkg: a small assembler for the 4-bit processor, used by the
// testbenches to build programs in SystemVerilog.
//
// Each function returns one 8-bit instruction word; the macro-instructions
// (ADD, ADDC, SUB, SUBC, SHL, SHR, NOP) return two words, first word in
// bits [7:0], as the assembler expands them: a flag-clearing instruction
// followed by ADDDC/SUBDC/ROL/ROR, and NOP as NOT;NOT. The encodings are
// written out here bit by bit, independently of the RTL package.
package cpu4_asm_pkg;

  function automatic logic [7:0] a_adddc(input int r); return {4'b0000, 4'(r)}; endfunction
  function automatic logic [7:0] a_subdc(input int r); return {4'b0001, 4'(r)}; endfunction
  function automatic logic [7:0] a_and  (input int r); return {4'b0010, 4'(r)}; endfunction
  function automatic logic [7:0] a_or   (input int r); return {4'b0011, 4'(r)}; endfunction
  function automatic logic [7:0] a_xor  (input int r); return {4'b0100, 4'(r)}; endfunction
  function automatic logic [7:0] a_not  ();            return 8'b01010000;      endfunction
  function automatic logic [7:0] a_da   ();            return 8'b01010001;      endfunction
  function automatic logic [7:0] a_rol  ();            return 8'b01010010;      endfunction
  function automatic logic [7:0] a_ror  ();            return 8'b01010011;      endfunction
  function automatic logic [7:0] a_setc ();            return 8'b01010100;      endfunction
  function automatic logic [7:0] a_clrc ();            return 8'b01010101;      endfunction
  function automatic logic [7:0] a_clrdc();            return 8'b01010110;      endfunction
  function automatic logic [7:0] a_in   (input int p); return {6'b010111, 2'(p)}; endfunction
  function automatic logic [7:0] a_load (input int r); return {4'b0110, 4'(r)}; endfunction
  function automatic logic [7:0] a_loadk(input int k); return {4'b0111, 4'(k)}; endfunction
  function automatic logic [7:0] a_jump (input int s); return {2'b10, 6'(s)};   endfunction
  function automatic logic [7:0] a_jfidc(input int u); return {4'b1100, 4'(u)}; endfunction
  function automatic logic [7:0] a_jfiz (input int u); return {4'b1101, 4'(u)}; endfunction
  function automatic logic [7:0] a_store(input int r); return {4'b1110, 4'(r)}; endfunction
  function automatic logic [7:0] a_out  (input int p); return {4'b1111, 2'b00, 2'(p)}; endfunction

  // macro-instructions: {second word, first word}
  function automatic logic [15:0] m_add (input int r); return {a_adddc(r), a_clrc()};  endfunction
  function automatic logic [15:0] m_addc(input int r); return {a_adddc(r), a_clrdc()}; endfunction
  function automatic logic [15:0] m_sub (input int r); return {a_subdc(r), a_clrc()};  endfunction
  function automatic logic [15:0] m_subc(input int r); return {a_subdc(r), a_clrdc()}; endfunction
  function automatic logic [15:0] m_shl ();            return {a_rol(), a_clrc()};     endfunction
  function automatic logic [15:0] m_shr ();            return {a_ror(), a_clrc()};     endfunction
  function automatic logic [15:0] m_nop ();            return {a_not(), a_not()};      endfunction

endpackage
