// ca_keygen: one-dimensional hybrid cellular automaton used as the key
// generator of the cipher.
//
// Each cell is a flip-flop whose next value is the XOR of its two
// neighbours (rule 90) or of its two neighbours and itself (rule 150):
//   rule 90 : x[i](t+1) = x[i-1](t) ^ x[i+1](t)
//   rule 150: x[i](t+1) = x[i-1](t) ^ x[i](t) ^ x[i+1](t)
// The two ends see a constant 0 beyond the last cell (null boundary).
// There is no shift of data and no global feedback, so the register can be
// lengthened by adding cells.
//
// Default configuration: four cells, cell 1 (state[0]) under rule 150 and
// cells 2..4 under rule 90, as in the design's CA register. With these
// rules the 16 states split into two cycles of length 7 and two fixed
// points: all-zero, and cells 4..1 = 1101. A seed must avoid both fixed
// points to give a changing key; the reset value 0001 lies on a 7-cycle. The reset
// value, the seed-load port and the step enable are this design's choices.
//
// Interface: on a rising clock edge, load copies seed into the cells;
// otherwise step advances the automaton by one generation; otherwise the
// state holds. state shows the current cells and is the key.
// Reset is asynchronous and active low.
module ca_keygen #(
  parameter int unsigned N            = 4,        // number of cells
  parameter logic [N-1:0] RULE150     = 4'b0001,  // bit i set: cell i+1 uses rule 150
  parameter logic [N-1:0] RESET_SEED  = 4'b0001   // state after reset
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // load seed this cycle
  input  logic [N-1:0] seed,
  input  logic         step,   // advance one generation this cycle
  output logic [N-1:0] state   // cell values, state[0] = cell 1
);
  logic [N-1:0] nxt;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic left, right;
      left   = (i == 0)     ? 1'b0 : state[i-1];
      right  = (i == N - 1) ? 1'b0 : state[i+1];
      nxt[i] = left ^ right ^ (RULE150[i] & state[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= RESET_SEED;
    else if (load)  state <= seed;
    else if (step)  state <= nxt;
  end
endmodule
