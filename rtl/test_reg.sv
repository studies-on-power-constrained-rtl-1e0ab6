// test_reg: one data-path register, built as the DFT step chose it.
//
// KIND selects the realisation behind a common interface:
//   REG_PLAIN  - functional register with a hold function: mode NORMAL
//                loads d, every other mode holds. It takes no part in the
//                serial test path (scan_in passes straight to scan_out).
//   REG_BILBO  - bilbo_reg: adds pattern generation, signature compaction,
//                serial shift and reset.
//   REG_CBILBO - cbilbo_reg: as a BILBO, plus CONC mode, in which it
//                generates patterns on q and compacts d in the same clock.
// A BILBO's signature is its q; a CBILBO's is its second rank. Both are
// read out through the serial path in SHIFT mode.
// Timing: rising clock edge; rst_n asynchronous, active low, to zero.
module test_reg
  import bist_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter reg_kind_e   KIND = REG_PLAIN
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bilbo_mode_e  mode,
  input  logic [W-1:0] d,
  input  logic         scan_in,
  output logic [W-1:0] q,
  output logic         scan_out
);
  if (KIND == REG_BILBO) begin : g_bilbo
    bilbo_reg #(.W(W)) u_reg (.clk, .rst_n, .mode, .d, .scan_in, .q, .scan_out);
  end else if (KIND == REG_CBILBO) begin : g_cbilbo
    logic [W-1:0] signature;
    cbilbo_reg #(.W(W)) u_reg (.clk, .rst_n, .mode, .d, .scan_in, .q, .signature, .scan_out);
  end else begin : g_plain
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    q <= '0;
      else if (mode == BILBO_NORMAL) q <= d;
    end
    assign scan_out = scan_in;
  end
endmodule
