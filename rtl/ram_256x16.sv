// ram_256x16: 256-word by 16-bit memory of the SimpleCPU_v1a computer.
//
// Holds both the program and its data. Reading is combinational: while EN is
// high DATA_OUT shows the word at ADDR_IN in the same cycle (0 while EN is
// low). Writing is synchronous: with EN and WE high, DATA_IN is stored at
// ADDR_IN on the rising edge of CLK. DUMP, sampled at the rising edge,
// prints every non-zero word to the simulation log; synthesis ignores it.
//
// The contents start at zero, or are read from the hex file named by
// INIT_FILE (one 16-bit word per line, address 0 first). Memory contents are
// not touched by the processor's clear.
//
// The port list and size follow the memory of the SimpleCPU_v1a system. The
// read timing, the zero initial contents and the meaning given to DUMP are
// this design's choices.
module ram_256x16 #(
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        en,
  input  logic        we,
  input  logic        dump,
  input  logic [7:0]  addr_in,
  input  logic [15:0] data_in,
  output logic [15:0] data_out
);

  logic [15:0] mem [256];

  initial begin
    for (int i = 0; i < 256; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en && we) mem[addr_in] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (dump) begin
      for (int i = 0; i < 256; i++)
        if (mem[i] != '0) $display("ram_256x16 dump: M[0x%02h] = 0x%04h", i, mem[i]);
    end
  end

  always_comb data_out = en ? mem[addr_in] : '0;

endmodule
