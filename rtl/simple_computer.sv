// simple_computer: the SimpleCPU_v1a stored-program computer.
//
// One simple_cpu_v1a processor and one ram_256x16 memory, wired as in the
// SimpleCPU_v1a system schematic: the address bus ADDR(7:0) and the
// processor's DATA_OUT go to the memory, the memory's output is the
// processor's DATA_IN, RAM_WR drives the memory's write enable, the memory
// enable is tied high and its DUMP input tied low. RAM_EN and ROM_EN are not
// used by this single memory and are brought out for observation, together
// with the buses.
//
// Load a program into the memory (INIT_FILE, or by writing the memory array
// before releasing CLR), hold CLR high, then release it: the processor
// fetches its first instruction from address 0 and takes three clock cycles
// per instruction. The 10 x 3 example program ends in a jump to itself,
// which is how a program stops on this processor.
module simple_computer #(
  parameter string INIT_FILE = ""
) (
  input  logic        clk,
  input  logic        clr,        // asynchronous clear, active high
  output logic [7:0]  addr,       // address bus
  output logic [15:0] cpu_data,   // processor DATA_OUT (accumulator)
  output logic [15:0] mem_data,   // memory output, processor DATA_IN
  output logic        ram_en,
  output logic        ram_wr,
  output logic        rom_en
);

  simple_cpu_v1a u_cpu (
    .clk      (clk),
    .clr      (clr),
    .data_in  (mem_data),
    .data_out (cpu_data),
    .addr     (addr),
    .ram_en   (ram_en),
    .ram_wr   (ram_wr),
    .rom_en   (rom_en)
  );

  ram_256x16 #(.INIT_FILE (INIT_FILE)) u_ram (
    .clk      (clk),
    .en       (1'b1),
    .we       (ram_wr),
    .dump     (1'b0),
    .addr_in  (addr),
    .data_in  (cpu_data),
    .data_out (mem_data)
  );

endmodule
