// nor_8: 8-input NOR gate, the ZERO flag of SimpleCPU_v1a.
//
// Z = 1 exactly when all eight accumulator bits are 0. The flag is not a
// stored bit: it follows the accumulator combinationally, so the conditional
// jumps test the accumulator value left by the previous instruction.
module nor_8 (
  input  logic [7:0] a,
  output logic       z
);

  always_comb z = ~|a;

endmodule
