// bist_pkg: types and functions shared by the non-scan BIST elements.
//
// The test registers of the data path (LFSR pattern generators, MISR
// response analysers, BILBOs and CBILBOs) all advance with the same
// internal-XOR (Galois) linear feedback step defined here. The feedback
// polynomial is a choice of this design: x^32 + x^22 + x^2 + x + 1, a
// primitive polynomial, so a 32-bit generator cycles through all 2^32-1
// non-zero states. Narrower widths select their own primitive polynomial
// through default_poly().
package bist_pkg;

  // Operating modes of a BILBO register. The data path's registers get a
  // hold function in addition to normal loading; the four classic BILBO
  // modes (normal, shift, signature/pattern, reset) are split so that
  // pattern generation and signature compaction are named separately.
  typedef enum logic [2:0] {
    BILBO_NORMAL = 3'd0,  // parallel load of the functional input
    BILBO_HOLD   = 3'd1,  // keep the stored value
    BILBO_TPG    = 3'd2,  // autonomous LFSR: generate test patterns
    BILBO_MISR   = 3'd3,  // compact the functional input into a signature
    BILBO_SHIFT  = 3'd4,  // serial shift, scan_in enters at bit 0
    BILBO_RESET  = 3'd5,  // clear to zero
    BILBO_CONC   = 3'd6   // CBILBO only: generate and compact at once
  } bilbo_mode_e;

  // What a data-path register is built as. The DFT step chooses, per
  // register, a plain register (load/hold only), a BILBO or a CBILBO.
  typedef enum logic [1:0] {
    REG_PLAIN  = 2'd0,
    REG_BILBO  = 2'd1,
    REG_CBILBO = 2'd2
  } reg_kind_e;

  // Operation of a functional module.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2
  } fu_op_e;

  // Feedback taps (without the x^W term) of a primitive polynomial.
  function automatic logic [63:0] default_poly(input int unsigned w);
    case (w)
      4:       return 64'h3;          // x^4+x+1
      8:       return 64'h1D;         // x^8+x^4+x^3+x^2+1
      16:      return 64'h100B;       // x^16+x^12+x^3+x+1
      32:      return 64'h0040_0007;  // x^32+x^22+x^2+x+1
      default: return 64'h3;
    endcase
  endfunction

  // Control lines of the Paulin data path with its non-scan BIST
  // hardware. In normal operation the data-path controller drives the mux
  // selects and the register modes (NORMAL = load, HOLD); during self-test
  // the test controller also drives the pattern generators, the response
  // analysers, the T_MUXes at the primary inputs, the test modes of the
  // BILBO/CBILBO registers and the thru functions.
  // Every mux is 2:1; sel = 0 picks the first input listed in
  // paulin_nsbist, sel = 1 the second.
  typedef struct packed {
    logic                  tm1;       // T_MUX at PI1: 1 = pattern from TPG1
    logic                  tm2;       // T_MUX at PI2: 1 = pattern from TPG2
    logic [1:0]            tpg_en;    // step TPG2, TPG1
    logic                  tpg_seed;  // load the TPG seeds
    logic [1:0]            ra_en;     // compact into RA2, RA1
    logic                  ra_clear;  // clear both signatures
    logic [11:1]           msel;      // select of m1 .. m11
    bilbo_mode_e [7:1]     rmode;     // mode of R1 .. R7
    logic                  thru_add1, thru_mult1, thru_sub1;
  } paulin_ctrl_t;

endpackage
