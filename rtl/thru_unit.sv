// thru_unit: W-bit functional module (adder, subtractor or multiplier)
// with an optional thru function.
//
// In normal operation y = a op b. With 'thru' high the module becomes
// transparent and passes its right input b to y unchanged, so that test
// patterns can travel through it to the modules downstream and responses
// can travel through it to a response analyser. Two realisations are used,
// both shown in the document:
//   * adder: a mask element of AND gates forces the left input to zero,
//     so the adder itself computes 0 + b = b (no extra multiplexer);
//   * subtractor and multiplier: a 2:1 multiplexer after the operator
//     selects b when 'thru' is high (masking cannot give b here).
// THRU_EN = 0 builds the plain module without the DFT element (the 'thru'
// input is then ignored). The multiplier keeps the low W bits of the
// product, a choice of this design. Purely combinational.
module thru_unit
  import bist_pkg::*;
#(
  parameter int unsigned W       = 32,
  parameter fu_op_e      OP      = OP_ADD,
  parameter bit          THRU_EN = 1'b1
) (
  input  logic [W-1:0] a,     // left input port
  input  logic [W-1:0] b,     // right input port
  input  logic         thru,  // 1: pass b to y
  output logic [W-1:0] y
);
  logic         thru_on;
  logic [W-1:0] a_masked;
  logic [W-1:0] result;

  assign thru_on  = THRU_EN && thru;
  assign a_masked = a & {W{~thru_on}};

  always_comb begin
    result = '0;
    unique case (OP)
      OP_ADD:  y = a_masked + b;
      OP_SUB: begin
        result = a - b;
        y      = thru_on ? b : result;
      end
      default: begin
        result = W'(a * b);
        y      = thru_on ? b : result;
      end
    endcase
  end
endmodule
