// scan_disable_core: low-power scan architecture with scan chain disable.
//
// The NUM_FF flip-flops of a circuit under test are split into N_CHAINS
// scan chains of LEN = ceil(NUM_FF / N_CHAINS) cells. Flip-flop j sits in
// chain j / LEN at position j % LEN; which flip-flop of the circuit is
// wired to which index is decided at design time by the flip-flop
// grouping step, so the wiring of ppi/ppo carries the grouping. When
// N_CHAINS does not divide NUM_FF the last chain is padded with cells that
// capture 0, so every chain has the same length.
//   * Scan-in and Scan_En are shared by all chains.
//   * The clock controller clocks all chains in normal mode (tc = 0) and
//     only chain cs in test mode (tc = 1), for shift and capture alike.
//   * The output multiplexer puts chain cs on Scan-out.
// The combinational logic of the circuit under test is outside: it reads
// the flip-flop values on ppi and returns the next state on ppo.
// Shifting a vector into the active chain takes LEN clocks, one capture
// takes one clock; the response leaves on scan_out while the next vector
// of the same chain enters, as in the document's test procedure.
// Structure as in the document; cell ordering, padding and reset are this
// design's choices.
module scan_disable_core #(
  parameter int unsigned NUM_FF   = 32,
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned CSW      = (N_CHAINS > 1) ? $clog2(N_CHAINS) : 1,
  parameter int unsigned LEN      = (NUM_FF + N_CHAINS - 1) / N_CHAINS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tc,        // test control: 1 test, 0 normal
  input  logic              scan_en,
  input  logic [CSW-1:0]    cs,        // active chain in test mode
  input  logic              scan_in,
  output logic              scan_out,
  output logic [NUM_FF-1:0] ppi,       // flip-flop values to the logic
  input  logic [NUM_FF-1:0] ppo        // next state from the logic
);
  localparam int unsigned TOTAL = LEN * N_CHAINS;

  logic [N_CHAINS-1:0] chain_clk, chain_out;
  logic [TOTAL-1:0]    d_all, q_all;

  assign d_all = TOTAL'(ppo);       // padding cells capture 0
  assign ppi   = q_all[NUM_FF-1:0];

  scan_clock_controller #(.N_CHAINS(N_CHAINS), .CSW(CSW)) u_clkctl (
    .clk      (clk),
    .tc       (tc),
    .cs       (cs),
    .chain_clk(chain_clk),
    .chain_en ()                    // decoder output, observed only in tests
  );

  for (genvar k = 0; k < N_CHAINS; k++) begin : g_chain
    scan_chain #(.LEN(LEN)) u_chain (
      .clk     (chain_clk[k]),
      .rst_n   (rst_n),
      .scan_en (scan_en),
      .scan_in (scan_in),
      .d       (d_all[k*LEN +: LEN]),
      .q       (q_all[k*LEN +: LEN]),
      .scan_out(chain_out[k])
    );
  end

  scan_out_mux #(.N_CHAINS(N_CHAINS), .CSW(CSW)) u_omux (
    .chain_out(chain_out),
    .cs       (cs),
    .scan_out (scan_out)
  );
endmodule
