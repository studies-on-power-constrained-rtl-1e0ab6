// scan_clock_controller: clock controller of the scan-chain-disable scheme.
//
// It turns the system clock CLK into one gated clock per scan chain. In
// normal mode (tc = 0) every chain receives the clock, so the circuit runs
// and captures as a conventional full-scan design. In test mode (tc = 1)
// only the chain whose index is on 'cs' receives the clock, both while
// shifting and on the capture cycle, so only that chain and the logic in
// its fan-out switch. That is how the scheme bounds peak as well as
// average test power.
// As the document says, it is a decoder (cs to one-hot) and a few gates;
// each gate is a latch-based clock gate: the enable is sampled by a latch
// that is transparent while CLK is low and is ANDed with CLK, so a change
// of tc or cs while CLK is high cannot produce a glitch or a short pulse.
// The latch is intended (it is the clock-gating latch), and so is the
// derived clock. tc and cs must be stable around the rising edge of CLK;
// a new selection takes effect from the next rising edge.
// A cs value of N_CHAINS or above in test mode clocks no chain; the
// assertion flags it.
module scan_clock_controller #(
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned CSW      = (N_CHAINS > 1) ? $clog2(N_CHAINS) : 1
) (
  input  logic                clk,
  input  logic                tc,              // 1: test mode, 0: normal mode
  input  logic [CSW-1:0]      cs,              // chain select
  output logic [N_CHAINS-1:0] chain_clk,       // gated clock per chain
  output logic [N_CHAINS-1:0] chain_en         // decoded enable (before the latch)
);
  logic [N_CHAINS-1:0] en_latched;

  // decoder
  always_comb begin
    for (int k = 0; k < N_CHAINS; k++)
      chain_en[k] = !tc || (int'(cs) == k);
  end

  // clock gates: latch transparent while clk is low
  always_latch begin
    if (!clk) en_latched = chain_en;
  end

  assign chain_clk = {N_CHAINS{clk}} & en_latched;

  a_cs_in_range: assert property (@(posedge clk) tc |-> (int'(cs) < N_CHAINS))
    else $error("chain select %0d out of range in test mode", cs);
endmodule
