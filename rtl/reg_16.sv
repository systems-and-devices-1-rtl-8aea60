// reg_16: 16-bit instruction register (IR) of SimpleCPU_v1a.
//
// A bank of 16 D flip-flops with clock enable and clear. When CE is high the
// word on D (the memory data-in bus) is captured at the rising clock edge;
// otherwise the register holds. CLR clears it to zero at once, whatever the
// clock, which matches the reset rule "pulse clear line, reset all DFF to 0".
// The asynchronous form of the clear is this design's choice.
//
// Timing: Q changes one rising edge after CE is sampled high.
module reg_16 (
  input  logic        clk,
  input  logic        clr,   // asynchronous clear, active high
  input  logic        ce,    // clock enable
  input  logic [15:0] d,
  output logic [15:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= d;
  end

endmodule
