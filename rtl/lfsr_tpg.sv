// lfsr_tpg: test pattern generator placed at a primary input.
//
// An autonomous W-bit LFSR in internal-XOR (Galois) form: every enabled
// clock the register shifts one place towards the MSB and, when the bit
// leaving the MSB is 1, XORs the feedback taps POLY into the result. A new
// pattern is therefore presented on 'pattern' every clock while 'en' is
// high, which is what non-scan BIST needs (a pattern per system clock).
// 'seed_load' loads 'seed' synchronously; an all-zero seed is replaced by
// 1 because the all-zero state is a fixed point of the LFSR.
// The document only names an LFSR as the TPG; the Galois form, the
// polynomial and the seed port are this design's choices.
// Reset: asynchronous, active low, to state 1.
module lfsr_tpg #(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] POLY = W'(bist_pkg::default_poly(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         seed_load,
  input  logic [W-1:0] seed,
  output logic [W-1:0] pattern
);
  logic [W-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= W'(1);
    else if (seed_load)
      state <= (seed == '0) ? W'(1) : seed;
    else if (en)
      state <= {state[W-2:0], 1'b0} ^ (state[W-1] ? POLY : '0);
  end

  assign pattern = state;
endmodule
