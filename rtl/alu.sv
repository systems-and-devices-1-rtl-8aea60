// alu: arithmetic and logic unit of SimpleCPU_v1a.
//
// An 8-bit combinational unit. Input A is the accumulator and input B comes
// from the DATA multiplexer (an immediate constant or a memory byte). The
// three control lines ACC_CTL(2:0) select one of the four functions the
// instruction set needs:
//   ALU_PASS  Y = B       (MOVE, LOAD)
//   ALU_ADD   Y = A + B   (ADD, ADDM)
//   ALU_SUB   Y = A - B   (SUB, SUBM)
//   ALU_AND   Y = A & B   (AND)
// Results wrap modulo 256; there is no carry or overflow flag, since the
// processor has only the zero flag. The code assigned to each function is
// this design's choice; unused codes pass B.
module alu
  import simple_cpu_pkg::*;
(
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  alu_ctl_t          ctl,
  output logic [DATA_W-1:0] y
);

  always_comb begin
    unique case (ctl)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      default: y = b;
    endcase
  end

endmodule
