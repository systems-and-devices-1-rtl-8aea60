// tb_simple_computer_hex: runs the 10 x 3 example from a memory image file.
//
// The computer is built with INIT_FILE pointing at tb/mul10x3.hex (one
// 16-bit word per line, address 0 first), the way an assembled program is
// handed to the memory. After the clear the processor must reach the stop
// (a jump to itself at address 0x0C) after 29 instructions, 87 cycles, and
// leave Total = 30 at 0x0D and Count = 0 at 0x0E. The testbench also
// watches the stores on the bus: the last value written to 0x0D must be 30.
module tb_simple_computer_hex;
  logic        clk = 0, clr = 0;
  logic [7:0]  addr;
  logic [15:0] cpu_data, mem_data;
  logic        ram_en, ram_wr, rom_en;
  int checks = 0, failures = 0, cycles = 0, stop_cycle = -1;
  int last_total = -1;

  simple_computer #(.INIT_FILE ("tb/mul10x3.hex")) dut (
    .clk, .clr, .addr, .cpu_data, .mem_data, .ram_en, .ram_wr, .rom_en);

  always #50 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!clr) begin
    cycles++;
    if (ram_wr && addr == 8'h0D) last_total = int'(cpu_data);
  end

  initial begin
    #1 clr = 1;
    @(negedge clk); clr = 0;
    // The image must be in memory before the first fetch.
    checks++;
    if (mem_data !== 16'h0000 || dut.u_ram.mem[4] !== 16'h900C) begin
      failures++; $display("memory image not loaded");
    end
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      if (rom_en && addr == 8'h0C) begin stop_cycle = cycles; break; end
    end
    checks++;
    if (stop_cycle != 87) begin failures++; $display("stop after %0d cycles, expected 87", stop_cycle); end
    checks++;
    if (last_total != 30) begin failures++; $display("last Total stored %0d, expected 30", last_total); end
    checks++;
    if (dut.u_ram.mem[13] !== 16'd30 || dut.u_ram.mem[14] !== 16'd0) begin
      failures++; $display("M[0x0D]=%0d M[0x0E]=%0d", dut.u_ram.mem[13], dut.u_ram.mem[14]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
