// counter_8: 8-bit program counter (PC) of SimpleCPU_v1a.
//
// A loadable up-counter. LD loads D (the instruction operand IR(7:0), the
// jump address) and CE adds one; both act at the rising clock edge and the
// count wraps from 255 to 0. CLR clears the count to zero at once, so a
// reset starts the program at address 0. Giving LD priority over CE when
// both are high, and the asynchronous clear, are this design's choices (the
// control logic never raises both together).
//
// Timing: Q changes one rising edge after LD or CE is sampled high.
module counter_8 (
  input  logic       clk,
  input  logic       clr,   // asynchronous clear, active high
  input  logic       ce,    // count enable: Q <- Q + 1
  input  logic       ld,    // load: Q <- D
  input  logic [7:0] d,
  output logic [7:0] q
);

  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ld) q <= d;
    else if (ce) q <= q + 8'd1;
  end

endmodule
