// misr_ra: response analyser placed at a primary output.
//
// A W-bit multiple-input signature register: every enabled clock it takes
// one Galois LFSR step (shift towards the MSB, XOR the taps POLY when the
// outgoing MSB is 1) and XORs in the W-bit response word 'din'. After a
// test session 'signature' is compared with the fault-free value. 'clear'
// sets the signature to zero synchronously before a session.
// The document names MISRs as RAs but not their structure; the Galois
// form and polynomial are this design's choices (shared with lfsr_tpg).
// Reset: asynchronous, active low, to zero.
module misr_ra #(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] POLY = W'(bist_pkg::default_poly(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         clear,
  input  logic [W-1:0] din,
  output logic [W-1:0] signature
);
  logic [W-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      state <= '0;
    else if (clear)
      state <= '0;
    else if (en)
      state <= ({state[W-2:0], 1'b0} ^ (state[W-1] ? POLY : '0)) ^ din;
  end

  assign signature = state;
endmodule
