// lfsr_keygen: linear feedback shift register with XNOR feedback, the
// alternative key generator of the cipher.
//
// Bit 1 (state[0]) takes the XNOR of the tapped bits; every other bit takes
// the value of the bit before it, so the register shifts towards bit N.
// Default configuration: four flip-flops with the feedback XNOR fed from
// bit 2 and bit 4, as drawn in the design's LFSR diagram. With those taps
// the register does not reach maximal length: from the all-zero state it
// runs through a cycle of 6 states. Choosing TAPS = 4'b1100 (bits 3 and 4)
// gives the maximal 15-state cycle. With XNOR feedback the all-ones state
// locks up and the all-zero state is legal, so reset clears the register.
// The seed-load port, the step enable and the reset value are this
// design's choices.
//
// Interface: on a rising clock edge, load copies seed into the register;
// otherwise step shifts it by one; otherwise it holds. state is the key.
// Reset is asynchronous and active low.
module lfsr_keygen #(
  parameter int unsigned N           = 4,        // number of flip-flops
  parameter logic [N-1:0] TAPS       = 4'b1010,  // bit i set: bit i+1 feeds the XNOR
  parameter logic [N-1:0] RESET_SEED = '0        // state after reset
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // load seed this cycle
  input  logic [N-1:0] seed,
  input  logic         step,   // shift one place this cycle
  output logic [N-1:0] state   // register bits, state[0] = bit 1
);
  logic feedback;

  always_comb feedback = ~(^(state & TAPS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= RESET_SEED;
    else if (load)  state <= seed;
    else if (step)  state <= {state[N-2:0], feedback};
  end
endmodule
