// tb_simple_computer: end-to-end test of the SimpleCPU_v1a computer with
// every parameter at its default.
//
// Program 0 runs an empty memory: every word 0x0000 is MOVE 0x00, so the
// PC must walk through all 256 addresses and wrap to 0 with ACC = 0.
//
// Program 1 is the lecture's worked example, 10 x 3 by repeated addition:
//     0 MOVE 0x00   1 STORE 0x0D   2 MOVE 0x03   3 STORE 0x0E
//     4 JUMPZ 0x0C  5 SUB 0x01     6 STORE 0x0E  7 LOAD 0x0D
//     8 ADD 0x0A    9 STORE 0x0D  10 LOAD 0x0E  11 JUMPU 0x04
//    12 JUMPU 0x0C (stop: a jump to itself)    13 Total  14 Count
// It must leave Total = 30 (0x1E) and Count = 0, store the running values
// 0,10,20,30 and 3,2,1,0 in that order, and reach the stop at address 12
// after 29 instructions, i.e. 87 clock cycles after the clear is released.
//
// Program 2 computes the same product with the memory-operand and remaining
// instructions (ADDM, SUBM, JUMPNZ, AND), then masks it:
//     0 MOVE 0x03   1 STORE 0x1E   2 MOVE 0x00   3 STORE 0x1D
//     4 LOAD 0x1D   5 ADDM 0x1F    6 STORE 0x1D  7 LOAD 0x1E
//     8 SUBM 0x1C   9 STORE 0x1E  10 JUMPNZ 0x04 11 LOAD 0x1D
//    12 AND 0x0F   13 STORE 0x1B  14 JUMPU 0x0E (stop)
//    M[0x1C] = 1, M[0x1F] = 10
// It must leave M[0x1D] = 30, M[0x1E] = 0, M[0x1B] = 30 & 15 = 14 and stop
// at address 14 after 28 instructions (84 cycles).
//
// The programs are written into the memory array before the clear is
// released. The testbench counts each mechanism of the processor (the
// three phases, PC increment, PC load, a conditional jump taken and not
// taken, the address multiplexer on IR, the data multiplexer on memory, a
// memory write, the zero flag set and clear, each opcode used) and counts a
// failure for any that never happened.
module tb_simple_computer;
  logic        clk = 0, clr = 0;
  logic [7:0]  addr;
  logic [15:0] cpu_data, mem_data;
  logic        ram_en, ram_wr, rom_en;
  int checks = 0, failures = 0, cycles = 0;

  simple_computer dut (.clk, .clr, .addr, .cpu_data, .mem_data, .ram_en, .ram_wr, .rom_en);

  always #50 clk = ~clk;   // 10 MHz

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, want, want);
    end
  endtask

  // Mechanism counters, sampled at every rising clock edge.
  int n_fetch, n_decode, n_execute, n_pc_inc, n_pc_load, n_addr_ir, n_data_mem;
  int n_write, n_zero_set, n_zero_clr, n_jump_not_taken;
  int n_op [16];
  int store_count;
  logic [7:0] store_addr [32];
  logic [7:0] store_val  [32];

  always @(posedge clk) if (!clr) begin
    cycles++;
    if (dut.u_cpu.u_ctrl.ir_en)  begin n_fetch++; n_op[mem_data[15:12]]++; end
    if (dut.u_cpu.u_ctrl.phase == simple_cpu_pkg::PH_DECODE)  n_decode++;
    if (dut.u_cpu.u_ctrl.phase == simple_cpu_pkg::PH_EXECUTE) n_execute++;
    if (dut.u_cpu.pc_en)    n_pc_inc++;
    if (dut.u_cpu.pc_ld)    n_pc_load++;
    if (dut.u_cpu.addr_sel) n_addr_ir++;
    if (dut.u_cpu.data_sel) n_data_mem++;
    if (dut.u_cpu.z) n_zero_set++; else n_zero_clr++;
    if (dut.u_cpu.u_ctrl.phase == simple_cpu_pkg::PH_EXECUTE &&
        dut.u_cpu.ir[15:12] inside {4'h9, 4'hA} && !dut.u_cpu.pc_ld) n_jump_not_taken++;
    if (ram_wr) begin
      n_write++;
      if (store_count < 32) begin
        store_addr[store_count] = addr;
        store_val[store_count]  = cpu_data[7:0];
      end
      store_count++;
    end
  end

  // Run from a clear until the processor fetches from stop_addr twice in a
  // row; return the number of cycles to the first fetch of stop_addr.
  task automatic run_program(input logic [15:0] image [], input int stop_addr,
                             output int stop_cycle);
    for (int i = 0; i < 256; i++) dut.u_ram.mem[i] = (i < image.size()) ? image[i] : 16'h0;
    store_count = 0;
    stop_cycle  = -1;
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0; cycles = 0;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      if (rom_en && addr == 8'(stop_addr)) begin
        if (stop_cycle < 0) stop_cycle = cycles;
        else break;
      end
    end
  endtask

  initial begin
    automatic logic [15:0] prog1 [] = '{16'h0000, 16'h500D, 16'h0003, 16'h500E, 16'h900C, 16'h2001,
                              16'h500E, 16'h400D, 16'h100A, 16'h500D, 16'h400E, 16'h8004,
                              16'h800C, 16'h0000, 16'h0000};
    automatic logic [15:0] prog2 [] = new[32];
    int t;
    automatic int exp_addr1 [8] = '{13, 14, 14, 13, 14, 13, 14, 13};
    automatic int exp_val1  [8] = '{0,  3,  2,  10, 1,  20, 0,  30};

    foreach (n_op[i]) n_op[i] = 0;
    {n_fetch, n_decode, n_execute, n_pc_inc, n_pc_load, n_addr_ir, n_data_mem} = '0;
    {n_write, n_zero_set, n_zero_clr, n_jump_not_taken} = '0;

    // Program 0: an empty (all 0x0000) memory is a string of MOVE 0x00, so
    // the PC must step through every address and wrap from 255 to 0.
    begin
      automatic int fetches = 0, bad = 0;
      for (int i = 0; i < 256; i++) dut.u_ram.mem[i] = 16'h0000;
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      while (fetches < 258) begin
        if (rom_en) begin
          if (addr != 8'(fetches % 256)) bad++;
          fetches++;
        end
        @(negedge clk);
      end
      expect_eq("empty memory: fetch addresses 0..255,0,1", bad, 0);
      expect_eq("empty memory: ACC", int'(cpu_data), 0);
    end

    // Program 1: the worked example.
    run_program(prog1, 12, t);
    $display("10 x 3: stop reached after %0d cycles (%0d ns at 10 MHz)", t, t * 100);
    expect_eq("program 1 cycles to stop", t, 87);
    expect_eq("program 1 Total M[0x0D]", int'(dut.u_ram.mem[13]), 30);
    expect_eq("program 1 Count M[0x0E]", int'(dut.u_ram.mem[14]), 0);
    expect_eq("program 1 ACC at stop", int'(cpu_data), 0);
    expect_eq("program 1 number of stores", store_count, 8);
    for (int i = 0; i < 8; i++) begin
      expect_eq($sformatf("program 1 store %0d address", i), int'(store_addr[i]), exp_addr1[i]);
      expect_eq($sformatf("program 1 store %0d value", i),   int'(store_val[i]),  exp_val1[i]);
    end

    // Program 2: memory operands, JUMPNZ and AND.
    foreach (prog2[i]) prog2[i] = 16'h0000;
    prog2[0]  = 16'h0003; prog2[1]  = 16'h501E; prog2[2]  = 16'h0000; prog2[3]  = 16'h501D;
    prog2[4]  = 16'h401D; prog2[5]  = 16'h601F; prog2[6]  = 16'h501D; prog2[7]  = 16'h401E;
    prog2[8]  = 16'h701C; prog2[9]  = 16'h501E; prog2[10] = 16'hA004; prog2[11] = 16'h401D;
    prog2[12] = 16'h300F; prog2[13] = 16'h501B; prog2[14] = 16'h800E;
    prog2[28] = 16'h0001; prog2[31] = 16'h000A;
    run_program(prog2, 14, t);
    expect_eq("program 2 cycles to stop", t, 84);
    expect_eq("program 2 M[0x1D]", int'(dut.u_ram.mem[29]), 30);
    expect_eq("program 2 M[0x1E]", int'(dut.u_ram.mem[30]), 0);
    expect_eq("program 2 M[0x1B]", int'(dut.u_ram.mem[27]), 14);
    expect_eq("program 2 ACC at stop", int'(cpu_data), 14);

    // Every mechanism must have happened.
    $display("fetch %0d decode %0d execute %0d pc+1 %0d pc load %0d addr=IR %0d data=mem %0d",
             n_fetch, n_decode, n_execute, n_pc_inc, n_pc_load, n_addr_ir, n_data_mem);
    $display("writes %0d zero set %0d clear %0d cond. jump not taken %0d",
             n_write, n_zero_set, n_zero_clr, n_jump_not_taken);
    foreach (n_op[i]) if (i <= 10) begin
      checks++;
      if (n_op[i] == 0) begin failures++; $display("opcode %h never fetched", i); end
    end
    begin
      int counts [11];
      counts = '{n_fetch, n_decode, n_execute, n_pc_inc, n_pc_load, n_addr_ir,
                          n_data_mem, n_write, n_zero_set, n_zero_clr, n_jump_not_taken};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
