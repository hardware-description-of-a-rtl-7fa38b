// tb_out_bank: self-checking test of the output register bank. Random
// writes with random enable; all four outputs compared with a model after
// every clock, and 0 after reset.
module tb_out_bank;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst, we;
  logic [1:0] sel;
  logic [3:0] wd;
  logic [3:0] pins [4];
  logic [3:0] model [4];

  out_bank dut (.clk, .rst, .we, .sel, .wd, .pins);

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
    rst = 1; we = 1; sel = 0; wd = 4'hF;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) model[i] = 0;
    rst = 0;
    for (int t = 0; t < 2000; t++) begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (pins[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d out %0d=%h exp %h", t, i, pins[i], model[i]);
        end
      end
      we = ($urandom % 3) == 0; sel = 2'($urandom); wd = 4'($urandom);
      @(posedge clk); #1;
      if (we) model[sel] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
