// cbilbo_reg: concurrent BILBO (CBILBO) register.
//
// Two ranks of W flip-flops. The generator rank drives the register output
// 'q' and the compactor rank holds a signature. In CONC mode both work in
// the same clock: the generator rank steps as a Galois LFSR while the
// compactor rank compacts the module response on 'd'. This lets the same
// register be the pattern source and the response analyser of one module
// (or of two modules in one session), which a plain BILBO cannot do.
// NORMAL loads 'd' into the generator rank (the functional register);
// TPG and MISR run one rank alone; SHIFT shifts the compactor rank
// serially (scan_in at bit 0, scan_out from the MSB) to read the signature;
// RESET clears both ranks; HOLD keeps both.
// The document names the CBILBO and uses it as TPG and RA at once; the
// two-rank structure and the encodings are this design's choices.
module cbilbo_reg
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
  output logic [W-1:0] q,          // generator rank / functional value
  output logic [W-1:0] signature,  // compactor rank
  output logic         scan_out
);
  logic [W-1:0] gen_step, cmp_step;

  assign gen_step = (q == '0) ? W'(1) : ({q[W-2:0], 1'b0} ^ (q[W-1] ? POLY : '0));
  assign cmp_step = {signature[W-2:0], 1'b0} ^ (signature[W-1] ? POLY : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q         <= '0;
      signature <= '0;
    end else begin
      unique case (mode)
        BILBO_NORMAL: q <= d;
        BILBO_TPG:    q <= gen_step;
        BILBO_MISR:   signature <= cmp_step ^ d;
        BILBO_CONC: begin
          q         <= gen_step;
          signature <= cmp_step ^ d;
        end
        BILBO_SHIFT:  signature <= {signature[W-2:0], scan_in};
        BILBO_RESET: begin
          q         <= '0;
          signature <= '0;
        end
        default: ;                                    // HOLD
      endcase
    end
  end

  assign scan_out = signature[W-1];
endmodule
