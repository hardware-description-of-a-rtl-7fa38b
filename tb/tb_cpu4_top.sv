// tb_cpu4_top: end-to-end, self-checking test of the whole processor at its
// default size (256-word program memory, 16-word data memory, 4+4 I/O
// registers, no parameter overrides).
//
// Phase 1, 8-bit binary addition: a program reads two 8-bit numbers from the
//   four input ports (low/high nibbles), adds them with CLRC;ADDDC on the low
//   nibbles and CLRDC;ADDDC (the ADDC macro) on the high nibbles, and writes
//   the sum and the carry to output ports 0..2. 600 random operand pairs.
// Phase 1b, 8-bit binary subtraction: the same with the SUB and SUBC macros
//   (borrow chained through C); difference mod 256 and the borrow out are
//   checked for 600 random pairs.
// Phase 2, two-digit BCD addition: the same with ADD (macro), DA, ADDDC, DA
//   and a JFIDC/JUMP pair that turns the decimal carry into a hundreds digit.
//   All 100 x 100 operand pairs.
// Phase 2b, shifts: the SHL and SHR macros (CLRC;ROL and CLRC;ROR) and the
//   NOP macro (NOT;NOT) on all 16 input values; the bit shifted out is
//   recovered from C with LOADK 0;ROL.
// Phase 3, random programs: 40 random 256-byte programs run for 1500
//   instructions each; after every instruction PC, ACC, Z, C, DC, the data
//   memory and the output registers are compared with an instruction-set
//   model written in this file. Input pins change after every instruction.
// Throughout, the distance between consecutive Execute states must be
// exactly 3 clocks. Each mechanism of the design (carry chaining, borrow,
// digit carry, decimal adjust, rotations through carry, flag instructions,
// taken and untaken branches, backward jumps, I/O, the unused code) is
// counted, and one that never happens counts as a failure.
module tb_cpu4_top;
  import cpu4_pkg::*;
  import cpu4_asm_pkg::*;

  int checks = 0, failures = 0;
  longint cycles = 0;

  logic    clk = 0, rst;
  nibble_t in_pins [N_IN];
  nibble_t out_pins [N_OUT];
  pc_t     pc;
  nibble_t acc;
  logic    flag_z, flag_c, flag_dc;
  state_t  state;

  cpu4_top dut (.clk, .rst, .in_pins, .out_pins, .pc, .acc, .flag_z, .flag_c,
                .flag_dc, .state);

  always #5 clk = ~clk;

  // watchdog
  always @(posedge clk) begin
    cycles++;
    if (cycles > 64'd5_000_000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---- three clocks per instruction --------------------------------------
  longint last_exec = -1;
  int     n_exec = 0;
  always @(posedge clk) begin
    if (!rst && state == S_EXECUTE) begin
      if (last_exec >= 0) begin
        checks++;
        if (cycles - last_exec != 3) begin
          failures++;
          $display("FAIL instruction took %0d clocks", cycles - last_exec);
        end
      end
      last_exec = cycles;
      n_exec++;
    end
  end

  // ---- mechanism counters ------------------------------------------------
  typedef enum int {
    M_CARRY_IN, M_CARRY_OUT, M_BORROW, M_DC_SET, M_DA_ADJUST, M_ROL_CARRY,
    M_ROR_CARRY, M_SETC, M_CLRC, M_CLRDC, M_JUMP_BACK, M_JUMP_FWD,
    M_JFIDC_TAKEN, M_JFIDC_NOT, M_JFIZ_TAKEN, M_JFIZ_NOT, M_IN, M_OUT,
    M_STORE, M_LOAD, M_LOADK, M_LOGIC, M_NOT, M_SPARE, M_NUM
  } mech_t;
  int mech [M_NUM];

  // sample each instruction as it executes (before the edge that ends it)
  always @(posedge clk) begin
    if (!rst && state == S_EXECUTE) begin
      logic [7:0] i;
      i = dut.ir;
      casez (i)
        8'b000?_????: begin
          if (flag_c | flag_dc) mech[M_CARRY_IN]++;
          if (i[4] == 1'b0 && dut.alu_c) mech[M_CARRY_OUT]++;
          if (i[4] == 1'b1 && dut.alu_c) mech[M_BORROW]++;
          if (dut.alu_dc && !dut.alu_c) mech[M_DC_SET]++;
        end
        8'b0010_????, 8'b0011_????, 8'b0100_????: mech[M_LOGIC]++;
        8'b0101_0000: mech[M_NOT]++;
        8'b0101_0001: if (flag_dc) mech[M_DA_ADJUST]++;
        8'b0101_0010: if (acc[3]) mech[M_ROL_CARRY]++;
        8'b0101_0011: if (acc[0]) mech[M_ROR_CARRY]++;
        8'b0101_0100: mech[M_SETC]++;
        8'b0101_0101: mech[M_CLRC]++;
        8'b0101_0110: mech[M_CLRDC]++;
        8'b0101_0111, 8'b0101_10??: mech[M_SPARE]++;
        8'b0101_11??: mech[M_IN]++;
        8'b0110_????: mech[M_LOAD]++;
        8'b0111_????: mech[M_LOADK]++;
        8'b10??_????: if (i[5]) mech[M_JUMP_BACK]++; else mech[M_JUMP_FWD]++;
        8'b1100_????: if (flag_c | flag_dc) mech[M_JFIDC_TAKEN]++; else mech[M_JFIDC_NOT]++;
        8'b1101_????: if (flag_z) mech[M_JFIZ_TAKEN]++; else mech[M_JFIZ_NOT]++;
        8'b1110_????: mech[M_STORE]++;
        default:      mech[M_OUT]++;
      endcase
    end
  end

  // ---- helpers -----------------------------------------------------------
  logic [7:0] prog [$];

  function automatic void emit(input logic [7:0] w); prog.push_back(w); endfunction
  function automatic void emit2(input logic [15:0] w);
    prog.push_back(w[7:0]); prog.push_back(w[15:8]);
  endfunction

  task automatic load_program();
    for (int a = 0; a < 256; a++)
      dut.u_rom.mem[a] = (a < prog.size()) ? prog[a] : 8'h57;
  endtask

  task automatic do_reset();
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    last_exec = -1;
  endtask

  // run until the instruction at address 'a' has executed
  task automatic run_to(input int a);
    forever begin
      @(posedge clk);
      if (state == S_EXECUTE && int'(pc) == a) break;
    end
    #1;
  endtask

  // ---- instruction-set model ---------------------------------------------
  typedef struct {
    int pc, acc;
    bit z, c, dc;
    int ram [16];
    int outp [4];
  } arch_t;

  function automatic void iss_step(ref arch_t s, input logic [7:0] i, input int inval [4]);
    int cin, r, a, next;
    a = int'(i[3:0]);
    cin = (s.c || s.dc) ? 1 : 0;
    next = s.pc + 1;
    casez (i)
      8'b0000_????: begin r = s.acc + s.ram[a] + cin; s.c = (r > 15); s.dc = (r > 9); s.acc = r % 16; s.z = (s.acc == 0); end
      8'b0001_????: begin
        r = s.acc - s.ram[a] - cin; s.c = (r < 0); s.acc = (r + 16) % 16;
        s.dc = s.c | (s.acc > 9); s.z = (s.acc == 0);
      end
      8'b0010_????: begin s.acc = s.acc & s.ram[a]; s.z = (s.acc == 0); end
      8'b0011_????: begin s.acc = s.acc | s.ram[a]; s.z = (s.acc == 0); end
      8'b0100_????: begin s.acc = s.acc ^ s.ram[a]; s.z = (s.acc == 0); end
      8'b0101_0000: begin s.acc = 15 - s.acc; s.z = (s.acc == 0); end
      8'b0101_0001: begin if (s.dc) s.acc = (s.acc + 6) % 16; s.z = (s.acc == 0); end
      8'b0101_0010: begin r = s.acc * 2 + int'(s.c); s.c = (r > 15); s.acc = r % 16; s.z = (s.acc == 0); end
      8'b0101_0011: begin r = s.acc + 16 * int'(s.c); s.c = (r % 2 == 1); s.acc = r / 2; s.z = (s.acc == 0); end
      8'b0101_0100: s.c = 1;
      8'b0101_0101: begin s.c = 0; s.dc = 0; end
      8'b0101_0110: s.dc = 0;
      8'b0101_11??: begin s.acc = inval[i[1:0]]; s.z = (s.acc == 0); end
      8'b0110_????: begin s.acc = s.ram[a]; s.z = (s.acc == 0); end
      8'b0111_????: begin s.acc = a; s.z = (s.acc == 0); end
      8'b10??_????: next = s.pc + ((i[5]) ? int'(i[5:0]) - 64 : int'(i[5:0]));
      8'b1100_????: if (s.c | s.dc) next = s.pc + a;
      8'b1101_????: if (s.z) next = s.pc + a;
      8'b1110_????: s.ram[a] = s.acc;
      8'b1111_????: s.outp[i[1:0]] = s.acc;
      default: ;
    endcase
    s.pc = (next + 256) % 256;
  endfunction

  // ---- test phases -------------------------------------------------------
  task automatic phase_bin_add();
    int lp, last, x, y, sum;
    prog.delete();
    for (int p = 0; p < 4; p++) begin emit(a_in(p)); emit(a_store(p)); end  // R0..R3
    lp = 0;
    emit(a_load(0)); emit2(m_add(2)); emit(a_store(4));   // low nibbles, no carry in
    emit(a_load(1)); emit2(m_addc(3)); emit(a_store(5));  // high nibbles, carry in
    emit(a_out(1));
    emit(a_loadk(0)); emit(a_rol()); emit(a_out(2));      // carry out -> port 2
    emit(a_load(4)); emit(a_out(0));
    last = prog.size();
    emit(a_jump(lp - last));
    load_program();
    do_reset();
    for (int t = 0; t < 600; t++) begin
      x = $urandom % 256; y = $urandom % 256;
      if (t < 4) begin x = (t == 0) ? 255 : (t == 1) ? 5 : (t == 2) ? 0 : 128; y = (t == 0) ? 1 : (t == 1) ? 5 : (t == 2) ? 0 : 128; end
      in_pins[0] = 4'(x); in_pins[1] = 4'(x >> 4); in_pins[2] = 4'(y); in_pins[3] = 4'(y >> 4);
      run_to(last);
      sum = x + y;
      checks++;
      if ({out_pins[2], out_pins[1], out_pins[0]} != 12'(sum)) begin
        failures++;
        if (failures < 10)
          $display("FAIL bin add %0d + %0d: got %0d%h%h", x, y, out_pins[2], out_pins[1], out_pins[0]);
      end
    end
  endtask

  task automatic phase_bin_sub();
    int last, x, y, dif;
    prog.delete();
    for (int p = 0; p < 4; p++) begin emit(a_in(p)); emit(a_store(p)); end  // R0..R3
    emit(a_load(0)); emit2(m_sub(2)); emit(a_store(4));   // low nibbles, no borrow in
    emit(a_load(1)); emit2(m_subc(3)); emit(a_store(5));  // high nibbles, borrow in
    emit(a_out(1));
    emit(a_loadk(0)); emit(a_rol()); emit(a_out(2));      // borrow out -> port 2
    emit(a_load(4)); emit(a_out(0));
    last = prog.size();
    emit(a_jump(-last));
    load_program();
    do_reset();
    for (int t = 0; t < 600; t++) begin
      x = $urandom % 256; y = $urandom % 256;
      if (t == 0) begin x = 0; y = 1; end
      if (t == 1) begin x = 16; y = 1; end
      in_pins[0] = 4'(x); in_pins[1] = 4'(x >> 4); in_pins[2] = 4'(y); in_pins[3] = 4'(y >> 4);
      run_to(last);
      dif = (x - y + 256) % 256;
      checks++;
      if (int'({out_pins[1], out_pins[0]}) != dif || int'(out_pins[2]) != ((x < y) ? 1 : 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL bin sub %0d - %0d: got borrow %0d, %h%h", x, y, out_pins[2], out_pins[1], out_pins[0]);
      end
    end
  endtask

  task automatic phase_bcd_add();
    int lp, last, sum;
    prog.delete();
    for (int p = 0; p < 4; p++) begin emit(a_in(p)); emit(a_store(p)); end
    lp = 0;
    emit(a_load(0)); emit2(m_add(2)); emit(a_da()); emit(a_store(4)); emit(a_out(0));
    emit(a_load(1)); emit(a_adddc(3)); emit(a_da()); emit(a_store(5)); emit(a_out(1));
    emit(a_loadk(0)); emit(a_jfidc(2)); emit(a_jump(2)); emit(a_loadk(1));
    emit(a_out(2));
    last = prog.size();
    emit(a_jump(lp - last));
    load_program();
    do_reset();
    for (int x = 0; x < 100; x++)
      for (int y = 0; y < 100; y++) begin
        in_pins[0] = 4'(x % 10); in_pins[1] = 4'(x / 10);
        in_pins[2] = 4'(y % 10); in_pins[3] = 4'(y / 10);
        run_to(last);
        sum = x + y;
        checks++;
        if (int'(out_pins[2]) != sum / 100 || int'(out_pins[1]) != (sum / 10) % 10 ||
            int'(out_pins[0]) != sum % 10) begin
          failures++;
          if (failures < 10)
            $display("FAIL bcd add %0d + %0d: got %0d%0d%0d", x, y, out_pins[2], out_pins[1], out_pins[0]);
        end
      end
  endtask

  task automatic phase_shift();
    int last, x;
    prog.delete();
    emit(a_in(0)); emit2(m_shl()); emit(a_out(0));            // x << 1
    emit(a_loadk(0)); emit(a_rol()); emit(a_out(1));          // bit shifted out
    emit2(m_nop());
    emit(a_in(0)); emit2(m_shr()); emit(a_out(2));            // x >> 1
    emit(a_loadk(0)); emit(a_rol()); emit(a_out(3));          // bit shifted out
    last = prog.size();
    emit(a_jump(-last));
    load_program();
    do_reset();
    for (int t = 0; t < 64; t++) begin
      x = t % 16;
      in_pins[0] = 4'(x);
      run_to(last);
      checks++;
      if (int'(out_pins[0]) != (x * 2) % 16 || int'(out_pins[1]) != x / 8 ||
          int'(out_pins[2]) != x / 2 || int'(out_pins[3]) != x % 2) begin
        failures++;
        $display("FAIL shift x=%0d: got %0d %0d %0d %0d", x, out_pins[0], out_pins[1], out_pins[2], out_pins[3]);
      end
    end
  endtask

  task automatic phase_random(input int n_prog, input int n_steps);
    arch_t s;
    int inval [4];
    logic [7:0] w;
    bit bad;
    for (int p = 0; p < n_prog; p++) begin
      prog.delete();
      for (int a = 0; a < 256; a++) begin
        w = 8'($urandom);
        // avoid self-loops: JUMP 0 and conditional jumps by 0
        if (w[7:6] == 2'b10 && w[5:0] == 0) w[0] = 1'b1;
        if (w[7:5] == 3'b110 && w[3:0] == 0) w[0] = 1'b1;
        // fewer jumps, more data operations
        if (w[7] && ($urandom % 2 == 0)) w[7] = 1'b0;
        emit(w);
      end
      load_program();
      for (int k = 0; k < 4; k++) begin inval[k] = $urandom % 16; in_pins[k] = 4'(inval[k]); end
      do_reset();
      s.pc = 0; s.acc = 0; s.z = 0; s.c = 0; s.dc = 0;
      for (int k = 0; k < 16; k++) s.ram[k] = int'(dut.u_ram.mem[k]);
      for (int k = 0; k < 4; k++) s.outp[k] = 0;
      for (int n = 0; n < n_steps; n++) begin
        // wait for the end of this instruction's Execute state
        forever begin
          @(posedge clk);
          if (state == S_EXECUTE) break;
        end
        // the instruction executed now uses the input values set before it
        iss_step(s, prog[s.pc], inval);
        #1;
        bad = (int'(pc) != s.pc) || (int'(acc) != s.acc) || (flag_z != s.z) ||
              (flag_c != s.c) || (flag_dc != s.dc);
        for (int k = 0; k < 16; k++) if (int'(dut.u_ram.mem[k]) != s.ram[k]) bad = 1;
        for (int k = 0; k < 4; k++) if (int'(out_pins[k]) != s.outp[k]) bad = 1;
        checks++;
        if (bad) begin
          failures++;
          if (failures < 10)
            $display("FAIL prog %0d step %0d: pc=%0d acc=%0d zcd=%b%b%b model pc=%0d acc=%0d zcd=%0d%0d%0d",
                     p, n, pc, acc, flag_z, flag_c, flag_dc, s.pc, s.acc, s.z, s.c, s.dc);
          // resynchronise the model so one error is not counted forever
          s.pc = int'(pc); s.acc = int'(acc); s.z = flag_z; s.c = flag_c; s.dc = flag_dc;
          for (int k = 0; k < 16; k++) s.ram[k] = int'(dut.u_ram.mem[k]);
          for (int k = 0; k < 4; k++) s.outp[k] = int'(out_pins[k]);
        end
        // new input values, sampled long before the next Execute state
        for (int k = 0; k < 4; k++) begin inval[k] = $urandom % 16; in_pins[k] = 4'(inval[k]); end
      end
    end
  endtask

  initial begin
    foreach (mech[m]) mech[m] = 0;
    for (int k = 0; k < 4; k++) in_pins[k] = 0;
    rst = 1;
    phase_bin_add();
    phase_bin_sub();
    phase_bcd_add();
    phase_shift();
    phase_random(40, 1500);
    for (int m = 0; m < int'(M_NUM); m++) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never happened", mech_t'(m));
      end
    end
    $display("instructions executed: %0d, clocks: %0d", n_exec, cycles);
    for (int m = 0; m < int'(M_NUM); m++) $display("  %-14s %0d", mech_t'(m), mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
