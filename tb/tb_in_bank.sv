// tb_in_bank: self-checking test of the input register bank. Random pin
// values every cycle; the register read through sel must equal the pins'
// value at the previous clock edge (one cycle of sampling latency), and all
// registers read 0 right after reset.
module tb_in_bank;
  int checks = 0, failures = 0, cycles = 0;
  logic clk = 0, rst;
  logic [3:0] pins [4];
  logic [3:0] prev [4];
  logic [1:0] sel;
  logic [3:0] rd;

  in_bank dut (.clk, .rst, .pins, .sel, .rd);

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
    rst = 1;
    for (int i = 0; i < 4; i++) pins[i] = 4'hF;
    @(posedge clk); #1;
    for (int i = 0; i < 4; i++) begin
      sel = 2'(i); #1;
      checks++; if (rd !== 0) begin failures++; $display("FAIL reset reg %0d=%h", i, rd); end
    end
    rst = 0;
    for (int t = 0; t < 1000; t++) begin
      for (int i = 0; i < 4; i++) pins[i] = 4'($urandom);
      prev = pins;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) pins[i] = 4'($urandom);   // new pins must not show yet
      for (int i = 0; i < 4; i++) begin
        sel = 2'(i); #1;
        checks++;
        if (rd !== prev[i]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d reg %0d=%h exp %h", t, i, rd, prev[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
