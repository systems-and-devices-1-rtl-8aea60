// tb_simple_cpu_v1a: self-checking test of the processor against an
// instruction-level reference model.
//
// The testbench supplies the memory (combinational read, write at the clock
// edge while RAM_WR is high) and fills it with random instruction words,
// all sixteen opcodes included; operands are biased towards 0 and towards a
// small address range so that the zero flag and memory operands are hit
// often. After a clear, it follows the processor one instruction at a time:
//   FETCH    ROM_EN and RAM_EN high, the address bus equals the model's PC,
//            DATA_OUT equals the model's ACC;
//   DECODE   memory-operand instructions put IR(7:0) on the address bus;
//   EXECUTE  a STORE writes the model's ACC to the model's address; no
//            other instruction writes.
// Each instruction must take exactly three clock cycles. At the end the
// whole memory is compared with the model's memory, and every opcode and
// both outcomes of each conditional jump must have been seen.
module tb_simple_cpu_v1a;
  import simple_cpu_pkg::*;
  localparam int N_PROG  = 50;    // random programs, each started by a clear
  localparam int N_INSTR = 100;   // instructions run per program

  logic        clk = 0, clr = 0;
  logic [15:0] data_in, data_out;
  logic [7:0]  addr;
  logic        ram_en, ram_wr, rom_en;

  logic [15:0] mem   [256];   // memory seen by the processor
  logic [15:0] m_mem [256];   // reference model's memory
  logic [7:0]  m_pc, m_acc;
  int checks = 0, failures = 0, cycles = 0;
  int op_seen [16];
  int jz_taken = 0, jz_not = 0, jnz_taken = 0, jnz_not = 0;

  simple_cpu_v1a dut (.clk, .clr, .data_in, .data_out, .addr, .ram_en, .ram_wr, .rom_en);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  always_comb data_in = ram_en ? mem[addr] : 16'h0000;
  always @(posedge clk) if (ram_en && ram_wr) mem[addr] <= data_out;

  initial begin
    repeat (N_PROG * (3 * N_INSTR + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [15:0] got, logic [15:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("%0t %s: got %h expected %h (pc=%h)", $time, what, got, want, m_pc);
    end
  endtask

  // One instruction of the reference model.
  task automatic model_step();
    logic [15:0] instr = m_mem[m_pc];
    logic [3:0]  op    = instr[15:12];
    logic [7:0]  k     = instr[7:0];
    logic [7:0]  next  = m_pc + 8'd1;
    op_seen[op]++;
    case (op)
      4'h0: m_acc = k;
      4'h1: m_acc = m_acc + k;
      4'h2: m_acc = m_acc - k;
      4'h3: m_acc = m_acc & k;
      4'h4: m_acc = m_mem[k][7:0];
      4'h5: m_mem[k] = {8'h00, m_acc};
      4'h6: m_acc = m_acc + m_mem[k][7:0];
      4'h7: m_acc = m_acc - m_mem[k][7:0];
      4'h8: next = k;
      4'h9: if (m_acc == 0) begin next = k; jz_taken++; end else jz_not++;
      4'hA: if (m_acc != 0) begin next = k; jnz_taken++; end else jnz_not++;
      default: ;
    endcase
    m_pc = next;
  endtask

  function automatic logic [15:0] random_word();
    logic [3:0] op = 4'($urandom_range(0, 15));
    logic [7:0] k;
    case ($urandom_range(0, 3))
      0:       k = 8'h00;
      1:       k = 8'($urandom_range(0, 15));
      default: k = 8'($urandom);
    endcase
    return {op, 4'($urandom), k};
  endfunction

  initial begin
    int start;
    logic [15:0] instr;
    foreach (op_seen[i]) op_seen[i] = 0;
    #1;
    for (int p = 0; p < N_PROG; p++) begin
      clr = 1;   // a rising edge on the clear, as a reset pulse gives
      for (int i = 0; i < 256; i++) begin
        mem[i]   = random_word();
        m_mem[i] = mem[i];
      end
      m_pc = '0; m_acc = '0;
      @(negedge clk); clr = 0;
      // Each pass starts at the falling edge inside a FETCH cycle.
      for (int n = 0; n < N_INSTR; n++) begin
        start = cycles;
        instr = m_mem[m_pc];
        // FETCH
        expect_eq("fetch rom_en", 16'(rom_en), 1);
        expect_eq("fetch ram_wr", 16'(ram_wr), 0);
        expect_eq("fetch addr (PC)", 16'(addr), 16'(m_pc));
        expect_eq("ACC on data_out", data_out, {8'h00, m_acc});
        // DECODE
        @(negedge clk);
        if (instr[15:12] inside {[4'h4:4'h7]})
          expect_eq("decode operand address", 16'(addr), 16'(instr[7:0]));
        expect_eq("decode rom_en", 16'(rom_en), 0);
        // EXECUTE
        @(negedge clk);
        if (instr[15:12] == 4'h5) begin
          expect_eq("store ram_wr", 16'(ram_wr), 1);
          expect_eq("store address", 16'(addr), 16'(instr[7:0]));
          expect_eq("store data", data_out, {8'h00, m_acc});
        end else
          expect_eq("no write", 16'(ram_wr), 0);
        model_step();
        @(negedge clk);
        expect_eq("cycles per instruction", 16'(cycles - start), 3);
      end
      expect_eq("final ACC", data_out, {8'h00, m_acc});
      for (int i = 0; i < 256; i++) expect_eq($sformatf("final M[%0d]", i), mem[i], m_mem[i]);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (op_seen[i] == 0) begin failures++; $display("opcode %h never executed", i); end
    end
    checks++;
    if (jz_taken == 0 || jz_not == 0 || jnz_taken == 0 || jnz_not == 0) begin
      failures++;
      $display("conditional jump outcomes not all seen");
    end
    $display("JUMPZ taken %0d / not %0d, JUMPNZ taken %0d / not %0d",
             jz_taken, jz_not, jnz_taken, jnz_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
