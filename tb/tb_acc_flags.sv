// tb_acc_flags: self-checking test of the accumulator and the Z, C, DC
// flags: random writes, ALU flag loads and SETC/CLRC/CLRDC, with and without
// the execute enable, against a behavioural model.
module tb_acc_flags;
  import cpu4_pkg::*;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst, en, acc_we, arith_we, c_d, dc_d, z, c, dc;
  nibble_t acc_d, acc;
  flag_op_t flag_op;
  nibble_t m_acc;
  logic m_z, m_c, m_dc;

  acc_flags dut (.clk, .rst, .en, .acc_we, .acc_d, .arith_we, .c_d, .dc_d,
                 .flag_op, .acc, .z, .c, .dc);

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
    rst = 1; en = 1; acc_we = 1; acc_d = 4'hF; arith_we = 1; c_d = 1; dc_d = 1;
    flag_op = FLAG_SETC;
    @(posedge clk); #1;
    checks++;
    if (acc !== 0 || z !== 0 || c !== 0 || dc !== 0) begin failures++; $display("FAIL reset"); end
    rst = 0; m_acc = 0; m_z = 0; m_c = 0; m_dc = 0;
    for (int t = 0; t < 3000; t++) begin
      en = ($urandom % 4) != 0;
      acc_we = 1'($urandom); arith_we = 1'($urandom);
      acc_d = ($urandom % 3 == 0) ? 4'h0 : 4'($urandom);
      c_d = 1'($urandom); dc_d = 1'($urandom);
      flag_op = flag_op_t'($urandom % 4);
      @(posedge clk); #1;
      if (en) begin
        if (acc_we) begin m_acc = acc_d; m_z = (acc_d == 0); end
        if (arith_we) begin m_c = c_d; m_dc = dc_d; end
        if (flag_op == FLAG_SETC) m_c = 1;
        if (flag_op == FLAG_CLRC) begin m_c = 0; m_dc = 0; end
        if (flag_op == FLAG_CLRDC) m_dc = 0;
      end
      checks++;
      if (acc != m_acc || z != m_z || c != m_c || dc != m_dc) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d acc=%0d z=%0d c=%0d dc=%0d exp %0d %0d %0d %0d",
                   t, acc, z, c, dc, m_acc, m_z, m_c, m_dc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
