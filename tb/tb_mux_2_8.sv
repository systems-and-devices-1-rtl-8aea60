// tb_mux_2_8: self-checking test of the 8-bit 2:1 multiplexer.
// Random A, B and SEL; Y must equal A for SEL=0 and B for SEL=1.
module tb_mux_2_8;
  logic [7:0] a, b, y;
  logic sel;
  int checks = 0, failures = 0;

  mux_2_8 dut (.a, .b, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = 8'($urandom); b = 8'($urandom); sel = 1'(i % 2);
      #1;
      checks++;
      if (y !== (i % 2 == 1 ? b : a)) begin
        failures++;
        $display("a=%h b=%h sel=%b y=%h", a, b, sel, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
