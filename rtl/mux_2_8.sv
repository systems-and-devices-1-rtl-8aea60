// mux_2_8: 8-bit two-input multiplexer of SimpleCPU_v1a.
//
// Y = A when SEL = 0 and Y = B when SEL = 1. The CPU uses two of them: the
// ADDR multiplexer puts either the PC (input 0) or the instruction operand
// IR(7:0) (input 1) on the address bus, and the DATA multiplexer feeds the
// ALU's B input with either the immediate constant IR(7:0) (input 0) or the
// low byte of the data-in bus (input 1). Purely combinational.
module mux_2_8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       sel,
  output logic [7:0] y
);

  always_comb y = sel ? b : a;

endmodule
