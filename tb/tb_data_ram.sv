// tb_data_ram: self-checking test of the 16 x 4 data memory. All words are
// written first, then random reads and writes are compared with a model
// array; a read in the cycle of a write must return the old word.
module tb_data_ram;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, we;
  logic [3:0] addr, wd, rd;
  logic [3:0] model [16];

  data_ram dut (.clk, .we, .addr, .wd, .rd);

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
    we = 0; addr = 0; wd = 0;
    for (int i = 0; i < 16; i++) begin
      model[i] = 4'($urandom);
      we = 1; addr = 4'(i); wd = model[i];
      @(posedge clk); #1;
    end
    for (int t = 0; t < 2000; t++) begin
      we = 1'($urandom); addr = 4'($urandom); wd = 4'($urandom);
      #1;
      checks++;
      if (rd !== model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr=%0d rd=%h exp %h", t, addr, rd, model[addr]);
      end
      @(posedge clk); #1;
      if (we) model[addr] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
