// tb_alu: self-checking test of the ALU.
// Exhaustive over all A and B for each of the four functions (pass, add,
// subtract, AND), results taken modulo 256, plus the four instruction-set
// examples with a zero accumulator.
module tb_alu;
  import simple_cpu_pkg::*;
  logic [7:0] a, b, y;
  alu_ctl_t ctl;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .ctl, .y);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] expect_y(alu_ctl_t c, logic [7:0] x, logic [7:0] w);
    int r;
    case (c)
      ALU_ADD: r = (int'(x) + int'(w)) % 256;
      ALU_SUB: r = (int'(x) - int'(w) + 256) % 256;
      ALU_AND: r = int'(x & w);
      default: r = int'(w);
    endcase
    return 8'(r);
  endfunction

  initial begin
    alu_ctl_t fns[4] = '{ALU_PASS, ALU_ADD, ALU_SUB, ALU_AND};
    foreach (fns[f]) begin
      ctl = fns[f];
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j);
          #1;
          checks++;
          if (y !== expect_y(ctl, a, b)) begin
            failures++;
            if (failures < 10) $display("ctl=%s a=%h b=%h y=%h", ctl.name(), a, b, y);
          end
        end
    end
    // MOVE 0x12, ADD 0x34, SUB 0x56, AND 0x78 applied in turn from ACC = 0.
    a = 8'h00; b = 8'h12; ctl = ALU_PASS; #1 checks++; if (y !== 8'h12) failures++;
    a = y;     b = 8'h34; ctl = ALU_ADD;  #1 checks++; if (y !== 8'h46) failures++;
    a = y;     b = 8'h56; ctl = ALU_SUB;  #1 checks++; if (y !== 8'hF0) failures++;
    a = y;     b = 8'h78; ctl = ALU_AND;  #1 checks++; if (y !== 8'h70) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
