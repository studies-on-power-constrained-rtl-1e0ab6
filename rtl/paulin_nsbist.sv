// paulin_nsbist: the Paulin data path with non-scan BIST hardware.
//
// The data path has one adder (Add.1), two multipliers (Mult.1, Mult.2),
// one subtractor (Sub.1), seven W-bit registers R1..R7, eleven 2:1
// multiplexers m1..m11, two primary inputs and two primary outputs
// (PO1 = R1, PO2 = R2). The constant "One" feeds m1, m2 and m3.
// Self-test hardware of the non-scan BIST configuration:
//   * TPG1/TPG2: LFSRs at PI1/PI2, switched in by a T_MUX at each input;
//   * RA1/RA2: MISRs observing PO1/PO2;
//   * R2, R6, R7 are BILBOs (pattern source or signature register inside
//     the data path); R1, R3, R4, R5 are plain registers with a load (hold)
//     input. The KIND parameter can make any register a plain register,
//     BILBO or CBILBO, the choices open to the DFT step; the default is
//     the configuration above;
//   * right-thru functions on Add.1, Mult.1 and Sub.1: with thru high the
//     module passes its right input (port b below) to its output.
// Connections (first input = select 0):
//   m5 = {PI1', R6} -> R5     m4 = {PI2', R2} -> R4     m3 = {Add.1, One} -> R3
//   m6 = {R3, R1}             Add.1 = m6 + R5 (thru passes R5)
//   m1 = {Add.1, One} -> R1   m7 = {R5, R3}             m8 = {m7, R1}
//   Mult.1 = m8 * R4 -> R6 (thru passes R4)
//   m9 = {R5, R7}             m10 = {R6, R2}            Mult.2 = m9 * m10 -> R7
//   m11 = {R7, R2}            Sub.1 = m11 - R6 (thru passes R6)
//   m2 = {Sub.1, One} -> R2
// PI1'/PI2' are the T_MUX outputs. The element list, the BILBO choice
// (R2, R6, R7), the thru functions, the TPG/RA placement and the 32-bit
// width follow the document; the exact mux inputs, operand order and the
// low-W-bit multiplier are this design's reading and choices.
// Test sessions of the document's schedule: {Add.1, Sub.1} then
// {Mult.1, Mult.2}. Add.1 and Sub.1 are tested over "type 3" paths, where
// one operand reaches the module by passing through the module itself:
//   Add.1: on thru cycles Add.1 passes the TPG1 pattern in R5 through m3
//          into R3; on compute cycles it adds R3 and R5; R1 feeds RA1.
//   Sub.1: on thru cycles Sub.1 passes the BILBO R6 pattern through m2 into
//          R2; on compute cycles it subtracts R6 from R2 (via m11); R2
//          feeds RA2.
// Each module thus gets a new operand pair every second clock, which is
// why a type-3 test takes twice as long as a direct one. Mult.1 gets TPG1
// (via R5, m7, m8) and TPG2 (via R4) and R6 compacts its responses;
// Mult.2 gets TPG1 (via R5, m9) and BILBO R2 (via m10) and R7 compacts.
// Timing: every register and TPG/RA acts on the rising clock edge; the
// modules and muxes are combinational, so a pattern launched from a
// register is compacted one clock later. rst_n is asynchronous, active
// low, and clears all registers (TPGs reset to 1).
module paulin_nsbist
  import bist_pkg::*;
#(
  parameter int unsigned  W     = 32,
  parameter logic [W-1:0] SEED1 = W'(32'h1),
  parameter logic [W-1:0] SEED2 = W'(32'h2F5A_11C3),
  // register kinds, index 1..7 = R1..R7 (index 0 unused)
  parameter reg_kind_e [7:0] KIND = {REG_BILBO, REG_BILBO, REG_PLAIN, REG_PLAIN,
                                     REG_PLAIN, REG_BILBO, REG_PLAIN, REG_PLAIN}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  paulin_ctrl_t ctrl,
  input  logic [W-1:0] pi1,
  input  logic [W-1:0] pi2,
  input  logic         bilbo_scan_in,   // serial test path through R1..R7
  output logic         bilbo_scan_out,
  output logic [W-1:0] po1,
  output logic [W-1:0] po2,
  output logic [W-1:0] sig1,            // RA1 signature
  output logic [W-1:0] sig2             // RA2 signature
);
  localparam logic [W-1:0] ONE = W'(1);

  logic [W-1:0] tpg1, tpg2, pi1x, pi2x;
  logic [W-1:0] r1, r2, r3, r4, r5, r6, r7;
  logic [W-1:0] m1, m2, m3, m4, m5, m6, m7, m8, m9, m10, m11;
  logic [W-1:0] add_y, mul1_y, mul2_y, sub_y;

  // pattern generators and T_MUXes at the primary inputs
  lfsr_tpg #(.W(W)) u_tpg1 (.clk, .rst_n, .en(ctrl.tpg_en[0]), .seed_load(ctrl.tpg_seed),
                            .seed(SEED1), .pattern(tpg1));
  lfsr_tpg #(.W(W)) u_tpg2 (.clk, .rst_n, .en(ctrl.tpg_en[1]), .seed_load(ctrl.tpg_seed),
                            .seed(SEED2), .pattern(tpg2));
  assign pi1x = ctrl.tm1 ? tpg1 : pi1;
  assign pi2x = ctrl.tm2 ? tpg2 : pi2;

  // multiplexers
  assign m5  = ctrl.msel[5]  ? r6    : pi1x;
  assign m4  = ctrl.msel[4]  ? r2    : pi2x;
  assign m3  = ctrl.msel[3]  ? ONE   : add_y;
  assign m6  = ctrl.msel[6]  ? r1    : r3;
  assign m1  = ctrl.msel[1]  ? ONE   : add_y;
  assign m7  = ctrl.msel[7]  ? r3    : r5;
  assign m8  = ctrl.msel[8]  ? r1    : m7;
  assign m9  = ctrl.msel[9]  ? r7    : r5;
  assign m10 = ctrl.msel[10] ? r2    : r6;
  assign m11 = ctrl.msel[11] ? r2    : r7;
  assign m2  = ctrl.msel[2]  ? ONE   : sub_y;

  // functional modules
  thru_unit #(.W(W), .OP(OP_ADD), .THRU_EN(1'b1)) u_add1 (.a(m6), .b(r5), .thru(ctrl.thru_add1),  .y(add_y));
  thru_unit #(.W(W), .OP(OP_MUL), .THRU_EN(1'b1)) u_mul1 (.a(m8), .b(r4), .thru(ctrl.thru_mult1), .y(mul1_y));
  thru_unit #(.W(W), .OP(OP_MUL), .THRU_EN(1'b0)) u_mul2 (.a(m9), .b(m10), .thru(1'b0),           .y(mul2_y));
  thru_unit #(.W(W), .OP(OP_SUB), .THRU_EN(1'b1)) u_sub1 (.a(m11), .b(r6), .thru(ctrl.thru_sub1),  .y(sub_y));

  // registers R1..R7 as test registers of the chosen kinds; the serial
  // test path runs R1 -> R2 -> ... -> R7 (plain registers pass it on)
  logic [W-1:0] rq [1:7];
  logic [W-1:0] rd [1:7];
  logic [7:0]   so;

  assign rd[1] = m1;     assign rd[2] = m2;     assign rd[3] = m3;
  assign rd[4] = m4;     assign rd[5] = m5;     assign rd[6] = mul1_y;
  assign rd[7] = mul2_y;
  assign so[0] = bilbo_scan_in;

  for (genvar i = 1; i <= 7; i++) begin : g_reg
    test_reg #(.W(W), .KIND(KIND[i])) u_reg (
      .clk, .rst_n, .mode(ctrl.rmode[i]), .d(rd[i]), .scan_in(so[i-1]),
      .q(rq[i]), .scan_out(so[i]));
  end

  assign {r1, r2, r3, r4, r5, r6, r7} = {rq[1], rq[2], rq[3], rq[4], rq[5], rq[6], rq[7]};
  assign bilbo_scan_out = so[7];

  assign po1 = r1;
  assign po2 = r2;

  // response analysers at the primary outputs
  misr_ra #(.W(W)) u_ra1 (.clk, .rst_n, .en(ctrl.ra_en[0]), .clear(ctrl.ra_clear), .din(po1), .signature(sig1));
  misr_ra #(.W(W)) u_ra2 (.clk, .rst_n, .en(ctrl.ra_en[1]), .clear(ctrl.ra_clear), .din(po2), .signature(sig2));
endmodule
