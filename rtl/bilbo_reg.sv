// bilbo_reg: data-path register enhanced to a BILBO, with a hold function.
//
// In normal mode the register loads its functional input 'd' every clock;
// HOLD keeps its value (the hold function the DFT may add to a register).
// In TPG mode it runs as an autonomous Galois LFSR and its output feeds
// the modules downstream with a new pattern every clock. In MISR mode it
// compacts 'd' (the response of the module upstream) into a signature.
// SHIFT moves the contents one place towards the MSB with 'scan_in'
// entering at bit 0 and 'scan_out' taken from the MSB, so a signature can
// be read out serially; RESET clears it. A BILBO cannot generate and
// compact in the same cycle: two modules that would need that cannot share
// a test session (the CBILBO removes that limit).
// The document names the BILBO and its roles (TPG or RA); the mode set,
// encoding and feedback polynomial are this design's choices.
// Timing: all modes act on the rising clock edge; no reset of its own
// beyond the RESET mode and the asynchronous active-low rst_n.
module bilbo_reg
  import bist_pkg::*;
#(
  parameter int unsigned W    = 32,
  parameter logic [W-1:0] POLY = W'(default_poly(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  bilbo_mode_e  mode,
  input  logic [W-1:0] d,
  input  logic         scan_in,
  output logic [W-1:0] q,
  output logic         scan_out
);
  logic [W-1:0] step;   // one LFSR step of the current contents

  assign step = {q[W-2:0], 1'b0} ^ (q[W-1] ? POLY : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else begin
      unique case (mode)
        BILBO_NORMAL: q <= d;
        BILBO_TPG:    q <= (q == '0) ? W'(1) : step;  // leave the stuck all-zero state
        BILBO_MISR:   q <= step ^ d;
        BILBO_SHIFT:  q <= {q[W-2:0], scan_in};
        BILBO_RESET:  q <= '0;
        default:      q <= q;                          // HOLD (CONC is not a BILBO mode)
      endcase
    end
  end

  assign scan_out = q[W-1];
endmodule
