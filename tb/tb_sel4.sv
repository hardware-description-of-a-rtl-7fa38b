// tb_sel4: self-checking test of the 4-input selector at 4 and 8 bits.
// Random data on all four inputs, every select value, output compared with
// the selected input.
module tb_sel4;
  int checks = 0, failures = 0;

  logic [1:0] sel;
  logic [3:0] d4 [4];
  logic [3:0] y4;
  logic [7:0] d8 [4];
  logic [7:0] y8;

  sel4 u4 (.sel, .d0(d4[0]), .d1(d4[1]), .d2(d4[2]), .d3(d4[3]), .y(y4));
  sel4 #(.W(8)) u8 (.sel, .d0(d8[0]), .d1(d8[1]), .d2(d8[2]), .d3(d8[3]), .y(y8));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 4; i++) begin d4[i] = 4'($urandom); d8[i] = 8'($urandom); end
      sel = 2'(t);
      #1;
      checks++;
      if (y4 !== d4[t % 4] || y8 !== d8[t % 4]) begin
        failures++;
        $display("FAIL sel=%0d y4=%h exp %h y8=%h exp %h", sel, y4, d4[t % 4], y8, d8[t % 4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
