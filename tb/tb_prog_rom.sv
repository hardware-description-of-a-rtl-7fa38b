// tb_prog_rom: self-checking test of the 256 x 8 program memory.
// Instance u_file is loaded from tb/rom_test.hex, whose 32 words follow
// mem[i] = (37*i + 11) mod 256; the remaining words must read as 0.
// Instance u_hier is filled through hierarchical writes with random words
// and read back at every address.
module tb_prog_rom;
  int checks = 0, failures = 0;
  logic [7:0] addr, d_file, d_hier;
  logic [7:0] model [256];

  prog_rom #(.INIT_FILE("tb/rom_test.hex")) u_file (.addr, .data(d_file));
  prog_rom u_hier (.addr, .data(d_hier));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    for (int i = 0; i < 256; i++) begin
      model[i] = 8'($urandom);
      u_hier.mem[i] = model[i];
    end
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      #1;
      checks++;
      if (d_file !== ((i < 32) ? 8'((37 * i + 11) % 256) : 8'h00)) begin
        failures++;
        $display("FAIL file addr=%0d data=%h", i, d_file);
      end
      checks++;
      if (d_hier !== model[i]) begin
        failures++;
        $display("FAIL hier addr=%0d data=%h exp %h", i, d_hier, model[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
