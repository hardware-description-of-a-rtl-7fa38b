// tb_ir_reg: self-checking test of the instruction register: reset to 0,
// load on load = 1, hold on load = 0, against a one-variable model.
module tb_ir_reg;
  import cpu4_pkg::*;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst, load;
  instr_t d, q, model;

  ir_reg dut (.clk, .rst, .load, .d, .q);

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
    rst = 1; load = 0; d = 8'hA5;
    @(posedge clk); #1;
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL reset q=%h", q); end
    rst = 0; model = 0;
    for (int t = 0; t < 500; t++) begin
      load = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (load) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL t=%0d q=%h exp %h", t, q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
