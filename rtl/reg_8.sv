// reg_8: 8-bit accumulator register (ACC) of SimpleCPU_v1a.
//
// Eight D flip-flops with clock enable and clear. With CE high the ALU
// result on D is captured at the rising clock edge; otherwise the value is
// held. CLR clears it to zero at once, as the reset rule "reset all DFF to 0"
// asks. Making the clear asynchronous is this design's choice.
//
// Timing: Q changes one rising edge after CE is sampled high.
module reg_8 (
  input  logic       clk,
  input  logic       clr,   // asynchronous clear, active high
  input  logic       ce,    // clock enable
  input  logic [7:0] d,
  output logic [7:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
