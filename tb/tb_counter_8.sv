// tb_counter_8: self-checking test of the 8-bit program counter.
// Applies random count, load and clear requests and compares Q with a
// reference model each cycle; also runs one full count from 0 through the
// wrap at 255 back to 0.
module tb_counter_8;
  logic clk = 0, clr = 1, ce = 0, ld = 0;
  logic [7:0] d = '0, q, ref_q;
  int checks = 0, failures = 0;

  counter_8 dut (.clk, .clr, .ce, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (q !== ref_q) begin
      failures++;
      $display("%s: q=%0d expected %0d", what, q, ref_q);
    end
  endtask

  initial begin
    ref_q = '0;
    #12 clr = 0;
    // Full count with wrap.
    @(negedge clk); ce = 1;
    for (int i = 0; i < 260; i++) begin
      @(posedge clk); #1 ref_q = ref_q + 8'd1;
      check("count");
    end
    // Random operations.
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 63) == 0) begin
        clr = 1; #1 ref_q = '0; check("clear"); clr = 0;
      end
      ce = 1'($urandom_range(0, 1));
      ld = ($urandom_range(0, 3) == 0);
      d  = 8'($urandom);
      @(posedge clk); #1;
      if (ld)      ref_q = d;
      else if (ce) ref_q = ref_q + 8'd1;
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
