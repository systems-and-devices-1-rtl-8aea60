// tb_reg_16: self-checking test of the 16-bit instruction register.
// Drives random data and enables for 500 cycles and compares Q with a
// reference register kept in the testbench, including asynchronous clears
// applied between clock edges.
module tb_reg_16;
  logic clk = 0, clr = 1, ce = 0;
  logic [15:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  reg_16 dut (.clk, .clr, .ce, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    #12 clr = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (q !== ref_q) begin failures++; $display("mismatch q=%h ref=%h", q, ref_q); end
      checks++;
      if ($urandom_range(0, 31) == 0) begin
        clr = 1; #1;
        ref_q = '0;
        if (q !== 16'h0) begin failures++; $display("async clear failed"); end
        checks++;
        clr = 0;
      end
      ce = 1'($urandom_range(0, 1));
      d  = 16'($urandom);
      @(posedge clk); #1;
      if (ce) ref_q = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
