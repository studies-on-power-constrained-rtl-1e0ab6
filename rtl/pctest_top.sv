// pctest_top: the two power-constrained test architectures side by side.
//
// Part 1, u_paulin: the Paulin data path with non-scan BIST hardware
// (pattern generators at the primary inputs, signature registers at the
// primary outputs, BILBO registers R2/R6/R7 inside, thru functions on
// Add.1, Mult.1 and Sub.1). Its control lines (normally driven by the
// data-path controller and, in self-test, by a test sequencer, neither of
// which is part of this RTL) are the port dp_ctrl.
// Part 2, u_scan: a scan core of NUM_FF flip-flops in N_CHAINS chains
// with scan chain disable. The combinational logic of the circuit under
// test is outside: the flip-flop values leave on scan_ppi and the next
// state returns on scan_ppo. The tester-side pins are TC, Cs, Scan_En,
// Scan-in and Scan-out.
// The two parts share nothing and have their own clocks and resets.
module pctest_top
  import bist_pkg::*;
#(
  parameter int unsigned W        = 32,
  parameter int unsigned NUM_FF   = 32,
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned CSW      = (N_CHAINS > 1) ? $clog2(N_CHAINS) : 1
) (
  // Paulin data path with non-scan BIST
  input  logic              dp_clk,
  input  logic              dp_rst_n,
  input  paulin_ctrl_t      dp_ctrl,
  input  logic [W-1:0]      dp_pi1,
  input  logic [W-1:0]      dp_pi2,
  input  logic              dp_scan_in,
  output logic              dp_scan_out,
  output logic [W-1:0]      dp_po1,
  output logic [W-1:0]      dp_po2,
  output logic [W-1:0]      dp_sig1,
  output logic [W-1:0]      dp_sig2,
  // scan core with scan chain disable
  input  logic              scan_clk,
  input  logic              scan_rst_n,
  input  logic              scan_tc,
  input  logic              scan_en,
  input  logic [CSW-1:0]    scan_cs,
  input  logic              scan_in,
  output logic              scan_out,
  output logic [NUM_FF-1:0] scan_ppi,
  input  logic [NUM_FF-1:0] scan_ppo
);
  paulin_nsbist #(.W(W)) u_paulin (
    .clk           (dp_clk),
    .rst_n         (dp_rst_n),
    .ctrl          (dp_ctrl),
    .pi1           (dp_pi1),
    .pi2           (dp_pi2),
    .bilbo_scan_in (dp_scan_in),
    .bilbo_scan_out(dp_scan_out),
    .po1           (dp_po1),
    .po2           (dp_po2),
    .sig1          (dp_sig1),
    .sig2          (dp_sig2)
  );

  scan_disable_core #(.NUM_FF(NUM_FF), .N_CHAINS(N_CHAINS), .CSW(CSW)) u_scan (
    .clk     (scan_clk),
    .rst_n   (scan_rst_n),
    .tc      (scan_tc),
    .scan_en (scan_en),
    .cs      (scan_cs),
    .scan_in (scan_in),
    .scan_out(scan_out),
    .ppi     (scan_ppi),
    .ppo     (scan_ppo)
  );
endmodule
