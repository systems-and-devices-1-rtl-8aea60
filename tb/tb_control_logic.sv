// tb_control_logic: self-checking test of the instruction sequencer.
// For 600 instructions with random opcodes (all 16 values) and random zero
// flag, it holds the opcode for three cycles, as the IR does, and compares
// every control line in each of FETCH, DECODE and EXECUTE with a table
// written from the instruction set: fetch reads memory at the PC into the IR;
// decode increments the PC except for jumps and selects IR(7:0) as address
// and memory as ALU input for LOAD/STORE/ADDM/SUBM; execute writes ACC, the
// memory (STORE) or the PC (jumps).
module tb_control_logic;
  import simple_cpu_pkg::*;
  logic clk = 0, clr = 1, z = 0;
  logic [3:0] opcode = '0;
  logic ir_en, pc_en, pc_ld, acc_en, addr_sel, data_sel, ram_en, ram_wr, rom_en;
  alu_ctl_t acc_ctl;
  int checks = 0, failures = 0;

  control_logic dut (.clk, .clr, .opcode, .z, .ir_en, .pc_en, .pc_ld, .acc_en,
                     .acc_ctl, .addr_sel, .data_sel, .ram_en, .ram_wr, .rom_en);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected {ir_en, pc_en, pc_ld, acc_en, addr_sel, data_sel, ram_en, ram_wr, rom_en}
  function automatic logic [8:0] expected(int ph, int op, bit zf);
    bit mem_op = (op >= 4 && op <= 7);
    bit jmp    = (op >= 8 && op <= 10);
    bit taken  = (op == 8) || (op == 9 && zf) || (op == 10 && !zf);
    bit wacc   = (op <= 4) || op == 6 || op == 7;
    case (ph)
      0: return 9'b1_0_0_0_0_0_1_0_1;
      1: return {1'b0, !jmp, 1'b0, 1'b0, mem_op, mem_op, mem_op, 1'b0, 1'b0};
      default: return {1'b0, jmp && !taken, jmp && taken, wacc, mem_op, mem_op, mem_op,
                       op == 5, 1'b0};
    endcase
  endfunction

  function automatic alu_ctl_t expected_ctl(int op);
    case (op)
      1, 6: return ALU_ADD;
      2, 7: return ALU_SUB;
      3:    return ALU_AND;
      default: return ALU_PASS;
    endcase
  endfunction

  initial begin
    logic [8:0] got;
    @(negedge clk);
    clr = 0;
    for (int n = 0; n < 600; n++) begin
      if (n > 0) @(negedge clk);
      opcode = 4'($urandom);
      z      = 1'($urandom_range(0, 1));
      for (int ph = 0; ph < 3; ph++) begin
        if (ph > 0) @(negedge clk);
        got = {ir_en, pc_en, pc_ld, acc_en, addr_sel, data_sel, ram_en, ram_wr, rom_en};
        checks++;
        if (got !== expected(ph, int'(opcode), z)) begin
          failures++;
          if (failures < 10)
            $display("op=%h z=%b phase=%0d got=%b expected=%b", opcode, z, ph, got,
                     expected(ph, int'(opcode), z));
        end
        if (ph > 0) begin
          checks++;
          if (acc_ctl !== expected_ctl(int'(opcode))) failures++;
        end
      end
    end
    // Clear in the middle of an instruction returns to FETCH.
    @(negedge clk); @(negedge clk);
    clr = 1; #1 clr = 0;
    checks++;
    if (!(ir_en && rom_en)) begin failures++; $display("clear did not return to fetch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
