// tb_nor_8: exhaustive test of the zero-flag NOR gate: Z = 1 only for 0x00.
module tb_nor_8;
  logic [7:0] a;
  logic z;
  int checks = 0, failures = 0;

  nor_8 dut (.a, .z);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 8'(i);
      #1;
      checks++;
      if (z !== (i == 0)) begin failures++; $display("a=%h z=%b", a, z); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
