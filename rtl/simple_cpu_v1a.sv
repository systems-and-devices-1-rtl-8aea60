// simple_cpu_v1a: an 8-bit accumulator processor with 16-bit instructions.
//
// The processor talks to one memory over three buses: an 8-bit address bus
// ADDR (256 words), a 16-bit data-in bus DATA_IN carrying instructions and
// data, a 16-bit data-out bus DATA_OUT driven by the accumulator, and the
// control lines RAM_EN, RAM_WR and ROM_EN. Instructions and data share the
// memory (von Neumann organisation).
//
// Datapath, as in the SimpleCPU_v1a schematic:
//   IR   (reg_16)    loads DATA_IN in the FETCH phase.
//   PC   (counter_8) counts up, or loads the jump address IR(7:0).
//   ADDR (mux_2_8)   address bus = PC (0) or IR(7:0) (1).
//   DATA (mux_2_8)   ALU input B = IR(7:0) (0) or DATA_IN(7:0) (1).
//   ALU  (alu)       A = ACC, B = DATA mux, function from ACC_CTL(2:0).
//   ACC  (reg_8)     loads the ALU result in the EXECUTE phase.
//   ZERO (nor_8)     Z = 1 when ACC = 0.
//   control_logic    runs FETCH, DECODE, EXECUTE, three clocks per
//                    instruction, and drives every enable and select.
// DATA_OUT carries the accumulator in bits [7:0]; bits [15:8] are driven 0.
//
// Timing: all registers change on the rising edge of CLK; CLR (active high,
// asynchronous) clears IR, PC, ACC and the phase, so execution restarts at
// address 0 with ACC = 0. Memory is expected to return DATA_IN for ADDR in
// the same cycle (combinational read) and to write DATA_OUT at the rising
// edge that ends a cycle in which RAM_WR is high. A STORE raises RAM_WR for
// the single EXECUTE cycle.
//
// The block structure, bus widths and instruction set follow SimpleCPU_v1a.
// Zero-filling DATA_OUT[15:8], the ALU codes and the exact control timing
// are this design's choices.
module simple_cpu_v1a
  import simple_cpu_pkg::*;
(
  input  logic        clk,
  input  logic        clr,        // asynchronous clear, active high
  input  logic [15:0] data_in,    // DATA_IN(15:0), from memory
  output logic [15:0] data_out,   // DATA_OUT(15:0), to memory
  output logic [7:0]  addr,       // ADDR(7:0)
  output logic        ram_en,
  output logic        ram_wr,
  output logic        rom_en
);

  logic [INSTR_W-1:0] ir;
  logic [ADDR_W-1:0]  pc;
  logic [DATA_W-1:0]  acc, alu_b, alu_y;
  logic        z;
  logic        ir_en, pc_en, pc_ld, acc_en, addr_sel, data_sel;
  alu_ctl_t    acc_ctl;

  reg_16 u_ir (
    .clk (clk), .clr (clr), .ce (ir_en), .d (data_in), .q (ir)
  );

  counter_8 u_pc (
    .clk (clk), .clr (clr), .ce (pc_en), .ld (pc_ld),
    .d (ir[7:0]), .q (pc)
  );

  mux_2_8 u_addr_mux (
    .a (pc), .b (ir[7:0]), .sel (addr_sel), .y (addr)
  );

  mux_2_8 u_data_mux (
    .a (ir[7:0]), .b (data_in[7:0]), .sel (data_sel), .y (alu_b)
  );

  alu u_alu (
    .a (acc), .b (alu_b), .ctl (acc_ctl), .y (alu_y)
  );

  reg_8 u_acc (
    .clk (clk), .clr (clr), .ce (acc_en), .d (alu_y), .q (acc)
  );

  nor_8 u_zero (
    .a (acc), .z (z)
  );

  control_logic u_ctrl (
    .clk      (clk),
    .clr      (clr),
    .opcode   (ir[15:12]),
    .z        (z),
    .ir_en    (ir_en),
    .pc_en    (pc_en),
    .pc_ld    (pc_ld),
    .acc_en   (acc_en),
    .acc_ctl  (acc_ctl),
    .addr_sel (addr_sel),
    .data_sel (data_sel),
    .ram_en   (ram_en),
    .ram_wr   (ram_wr),
    .rom_en   (rom_en)
  );

  // DATA_OUT buffers: accumulator on the low byte, constant 0 above it.
  always_comb data_out = {8'h00, acc};

endmodule
