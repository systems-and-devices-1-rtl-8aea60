// control_logic: instruction sequencer of SimpleCPU_v1a.
//
// Every instruction takes three clock cycles, one per phase:
//   FETCH    the PC drives the address bus, memory is read and the
//            instruction word is written into the IR.
//   DECODE   the opcode IR(15:12) sets the ADDR and DATA multiplexers and
//            the ALU function; the PC is incremented, except for the jumps.
//            For the memory-operand instructions the operand address IR(7:0)
//            is already on the address bus in this phase.
//   EXECUTE  the result is written: ACC for MOVE/ADD/SUB/AND/LOAD/ADDM/SUBM,
//            memory for STORE, the PC for a jump. A conditional jump that is
//            not taken increments the PC here instead (PC <- PC + 1).
// A two-bit phase register steps FETCH -> DECODE -> EXECUTE -> FETCH; every
// output is decoded combinationally from the phase, the opcode and the zero
// flag Z. CLR returns the sequencer to FETCH.
//
// The three phases, the control line names and what each phase does follow
// the SimpleCPU_v1a description. Which cycle each line is raised in (beyond
// the phase descriptions), the phase encoding, the ALU code values, the
// treatment of the unused opcodes 0xB-0xF (no operation: the PC just steps
// on) and the use of ROM_EN to mark instruction fetches are this design's
// own choices.
//
// Assertions check that the PC is never incremented and loaded together and
// that a memory write is always enabled and addressed by IR(7:0). Their
// "disable iff (clr)" makes lint tools report CLR as used both synchronously
// and asynchronously; only the assertions sample it at the clock.
//
// Interface: IR_EN, PC_EN, PC_LD, ACC_EN are register enables; ADDR_SEL
// picks IR(7:0) (1) or PC (0) for the address bus; DATA_SEL picks the
// data-in bus (1) or IR(7:0) (0) for ALU input B; RAM_EN marks any memory
// access, RAM_WR a write, ROM_EN an instruction fetch.
module control_logic
  import simple_cpu_pkg::*;
(
  input  logic       clk,
  input  logic       clr,       // asynchronous clear, active high
  input  logic [3:0] opcode,    // IR(15:12)
  input  logic       z,         // zero flag, 1 when ACC = 0
  output logic       ir_en,
  output logic       pc_en,
  output logic       pc_ld,
  output logic       acc_en,
  output alu_ctl_t   acc_ctl,
  output logic       addr_sel,
  output logic       data_sel,
  output logic       ram_en,
  output logic       ram_wr,
  output logic       rom_en
);

  phase_t phase;

  // Phase sequencer.
  always_ff @(posedge clk or posedge clr) begin
    if (clr) phase <= PH_FETCH;
    else begin
      unique case (phase)
        PH_FETCH:  phase <= PH_DECODE;
        PH_DECODE: phase <= PH_EXECUTE;
        default:   phase <= PH_FETCH;
      endcase
    end
  end

  // Instruction groups.
  logic is_imm, is_abs, is_jump, writes_acc, jump_taken;

  always_comb begin
    is_imm     = (opcode inside {OP_MOVE, OP_ADD, OP_SUB, OP_AND});
    is_abs     = (opcode inside {OP_LOAD, OP_STORE, OP_ADDM, OP_SUBM});
    is_jump    = (opcode inside {OP_JUMPU, OP_JUMPZ, OP_JUMPNZ});
    writes_acc = is_imm || (is_abs && opcode != OP_STORE);
    unique case (opcode)
      OP_JUMPU:  jump_taken = 1'b1;
      OP_JUMPZ:  jump_taken = z;
      OP_JUMPNZ: jump_taken = ~z;
      default:   jump_taken = 1'b0;
    endcase
  end

  // ALU function for the opcode; held through DECODE and EXECUTE.
  always_comb begin
    unique case (opcode)
      OP_ADD, OP_ADDM: acc_ctl = ALU_ADD;
      OP_SUB, OP_SUBM: acc_ctl = ALU_SUB;
      OP_AND:          acc_ctl = ALU_AND;
      default:         acc_ctl = ALU_PASS;
    endcase
  end

  // Control lines per phase.
  always_comb begin
    ir_en    = 1'b0;
    pc_en    = 1'b0;
    pc_ld    = 1'b0;
    acc_en   = 1'b0;
    addr_sel = 1'b0;
    data_sel = 1'b0;
    ram_en   = 1'b0;
    ram_wr   = 1'b0;
    rom_en   = 1'b0;
    unique case (phase)
      PH_FETCH: begin
        ram_en = 1'b1;
        rom_en = 1'b1;
        ir_en  = 1'b1;
      end
      PH_DECODE: begin
        pc_en    = ~is_jump;
        addr_sel = is_abs;
        data_sel = is_abs;
        ram_en   = is_abs;
      end
      PH_EXECUTE: begin
        addr_sel = is_abs;
        data_sel = is_abs;
        ram_en   = is_abs;
        ram_wr   = (opcode == OP_STORE);
        acc_en   = writes_acc;
        pc_ld    = is_jump & jump_taken;
        pc_en    = is_jump & ~jump_taken;
      end
      default: ;
    endcase
  end

  // Bus and sequencing rules.
  a_pc_one_source: assert property (@(posedge clk) disable iff (clr) !(pc_en && pc_ld))
    else $error("PC incremented and loaded in the same cycle");
  a_write_enabled: assert property (@(posedge clk) disable iff (clr) ram_wr |-> ram_en)
    else $error("memory write without RAM_EN");
  a_write_at_ir:   assert property (@(posedge clk) disable iff (clr) ram_wr |-> addr_sel)
    else $error("memory write not addressed by IR(7:0)");
  a_phase_legal:   assert property (@(posedge clk) disable iff (clr) phase != 2'd3)
    else $error("illegal phase");

endmodule
