// tb_cpu4_out16: self-checking test of the output-port addressing.
//
// The same program runs on two processors: one with 16 output registers
// (N_OUT_PORTS = 16, OUT decodes all four operand bits) and one with the
// default 4 (OUT decodes IR[1:0] only). The program writes the value
// (3*p + 7) mod 16 to port p = 0..15, each with its own OUT instruction
// (encoding 1111 pppp), then loops. Expected: in the 16-port processor,
// port p holds (3*p + 7) mod 16; in the 4-port one, port k holds the last
// value written to a port number congruent to k mod 4, that is p = k + 12.
module tb_cpu4_out16;
  import cpu4_pkg::*;
  import cpu4_asm_pkg::*;

  int checks = 0, failures = 0, cycles = 0;
  logic    clk = 0, rst;
  nibble_t in_pins [4];
  nibble_t out16 [16];
  nibble_t out4 [4];
  pc_t     pc16, pc4;
  nibble_t acc16, acc4;
  logic    z16, c16, dc16, z4, c4, dc4;
  state_t  st16, st4;

  cpu4_top #(.N_OUT_PORTS(16)) dut16 (.clk, .rst, .in_pins, .out_pins(out16), .pc(pc16),
    .acc(acc16), .flag_z(z16), .flag_c(c16), .flag_dc(dc16), .state(st16));
  cpu4_top dut4 (.clk, .rst, .in_pins, .out_pins(out4), .pc(pc4),
    .acc(acc4), .flag_z(z4), .flag_c(c4), .flag_dc(dc4), .state(st4));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    logic [7:0] prog [$];
    int last;
    for (int k = 0; k < 4; k++) in_pins[k] = 0;
    for (int p = 0; p < 16; p++) begin
      prog.push_back(a_loadk((3 * p + 7) % 16));
      prog.push_back({4'b1111, 4'(p)});
    end
    last = prog.size();
    prog.push_back(a_jump(0));
    for (int a = 0; a < 256; a++) begin
      dut16.u_rom.mem[a] = (a < prog.size()) ? prog[a] : 8'h57;
      dut4.u_rom.mem[a]  = (a < prog.size()) ? prog[a] : 8'h57;
    end
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // 32 instructions of 3 clocks, then the JUMP 0 loop
    repeat (3 * last + 6) @(posedge clk);
    #1;
    checks++;
    if (int'(pc16) != last || int'(pc4) != last) begin
      failures++;
      $display("FAIL pc16=%0d pc4=%0d, expected %0d after %0d instructions", pc16, pc4, last, last);
    end
    for (int p = 0; p < 16; p++) begin
      checks++;
      if (int'(out16[p]) != (3 * p + 7) % 16) begin
        failures++;
        $display("FAIL 16-port out[%0d]=%0d exp %0d", p, out16[p], (3 * p + 7) % 16);
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (int'(out4[k]) != (3 * (k + 12) + 7) % 16) begin
        failures++;
        $display("FAIL 4-port out[%0d]=%0d exp %0d", k, out4[k], (3 * (k + 12) + 7) % 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
