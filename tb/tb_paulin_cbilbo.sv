// tb_paulin_cbilbo: the Paulin data path built with concurrent BILBOs.
//
// The register kinds of the data path are a design-time choice. This test
// builds it with R1 and R2 as CBILBOs and R4..R7 as BILBOs (R3 stays a
// plain register), the register set that trades area for the shortest
// test. It then runs two sessions and reads the signatures out serially:
//   session A: Add.1 with CBILBO R1 as pattern source *and* signature
//              register in the same clocks (CONC mode, through m6 and m1),
//              BILBO R5 as the second source; Sub.1 with BILBOs R7 and R6
//              as sources and R2 compacting (MISR mode, second rank only);
//   session B: Mult.1 from BILBOs R5 (via m7, m8) and R4 into BILBO R6;
//              Mult.2 from R5 (via m9) and the generator rank of CBILBO R2
//              (via m10) into BILBO R7.
// The expected values come from a small model in this file, which steps
// every register by multiplication by x modulo the feedback polynomial.
// PO1/PO2 (the generator ranks of R1/R2) are compared every clock. At the
// end the serial chain (R1 and R2 compactor ranks, R4..R7; R3 passes the
// bit through) is shifted out for 192 clocks and compared bit by bit.
// Inputs change at the falling clock edge.
module tb_paulin_cbilbo;
  import bist_pkg::*;
  `include "paulin_ref.svh"

  localparam reg_kind_e [7:0] KIND_C = {REG_BILBO, REG_BILBO, REG_BILBO, REG_BILBO,
                                        REG_PLAIN, REG_CBILBO, REG_CBILBO, REG_PLAIN};

  logic clk = 1'b0, rst_n = 1'b0;
  paulin_ctrl_t ctrl;
  logic [31:0] pi1, pi2, po1, po2, sig1, sig2;
  logic scan_in, scan_out;
  int checks = 0, failures = 0;
  int n_conc = 0, n_misr = 0, n_tpg = 0;

  // model: generator and compactor ranks of R1, R2; R4..R7
  logic [31:0] r1q, r1s, r2q, r2s, r4, r5, r6, r7;

  always #5 clk = ~clk;

  paulin_nsbist #(.KIND(KIND_C)) dut (
    .clk, .rst_n, .ctrl, .pi1, .pi2, .bilbo_scan_in(scan_in),
    .bilbo_scan_out(scan_out), .po1, .po2, .sig1, .sig2);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  function automatic logic [31:0] gen(input logic [31:0] q);
    return (q == 0) ? 32'h1 : ref_times_x(q);
  endfunction

  task automatic step(input paulin_ctrl_t c);
    ctrl = c;
    @(negedge clk);
    check(po1, r1q, "PO1 (R1 generator rank)");
    check(po2, r2q, "PO2 (R2 generator rank)");
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    paulin_ctrl_t c;
    logic [31:0] add, sub, mul1, mul2;
    logic [191:0] chain;
    ctrl = ctrl_idle(); pi1 = 0; pi2 = 0; scan_in = 0;
    r1q = 0; r1s = 0; r2q = 0; r2s = 0; r4 = 0; r5 = 0; r6 = 0; r7 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // start the generators at different points of the sequence
    c = ctrl_idle(); c.rmode[7] = BILBO_TPG; c.rmode[5] = BILBO_TPG; c.rmode[4] = BILBO_TPG;
    for (int i = 0; i < 7; i++) begin
      if (i < 3) begin c.rmode[5] = BILBO_TPG; r5 = gen(r5); end else c.rmode[5] = BILBO_HOLD;
      if (i < 2) begin c.rmode[4] = BILBO_TPG; r4 = gen(r4); end else c.rmode[4] = BILBO_HOLD;
      r7 = gen(r7);
      step(c);
    end

    // session A: Add.1 (CBILBO R1 concurrent), Sub.1 (R7, R6 -> R2)
    c = ctrl_idle();
    c.msel[6] = 1'b1;                       // m6 = R1; m1 = Add.1, m11 = R7, m2 = Sub.1
    c.rmode[1] = BILBO_CONC; c.rmode[5] = BILBO_TPG;
    c.rmode[6] = BILBO_TPG;  c.rmode[7] = BILBO_TPG;
    c.rmode[2] = BILBO_MISR;
    for (int i = 0; i < 40; i++) begin
      add = r1q + r5;
      sub = r7 - r6;
      r1q = gen(r1q); r1s = ref_times_x(r1s) ^ add;
      r5 = gen(r5); r6 = gen(r6); r7 = gen(r7);
      r2s = ref_times_x(r2s) ^ sub;
      step(c);
      n_conc++; n_misr++;
    end

    // session B: Mult.1 (R5, R4 -> R6), Mult.2 (R5, CBILBO R2 -> R7)
    c = ctrl_idle();
    c.msel[10] = 1'b1;                      // m10 = R2; m7, m8, m9 = R5
    c.rmode[5] = BILBO_TPG; c.rmode[4] = BILBO_TPG; c.rmode[2] = BILBO_TPG;
    c.rmode[6] = BILBO_MISR; c.rmode[7] = BILBO_MISR;
    for (int i = 0; i < 40; i++) begin
      mul1 = 32'(64'(r5) * 64'(r4));
      mul2 = 32'(64'(r5) * 64'(r2q));
      r5 = gen(r5); r4 = gen(r4); r2q = gen(r2q);
      r6 = ref_times_x(r6) ^ mul1;
      r7 = ref_times_x(r7) ^ mul2;
      step(c);
      n_tpg++;
    end
    checks++;
    if (r1s == 0 || r2s == 0 || r6 == 0 || r7 == 0) begin
      failures++; $display("FAIL a model signature is zero");
    end

    // serial read-out: R1s -> R2s -> (R3) -> R4 -> R5 -> R6 -> R7 -> out
    chain = {r7, r6, r5, r4, r2s, r1s};
    c = ctrl_idle();
    for (int r = 1; r <= 7; r++) c.rmode[r] = BILBO_SHIFT;
    ctrl = c;
    for (int k = 0; k < 192; k++) begin
      scan_in = 1'($urandom);
      #1;
      check(32'(scan_out), 32'(chain[191]), "serial signature bit");
      chain = {chain[190:0], scan_in};
      @(negedge clk);
    end

    checks++;
    if (n_conc == 0 || n_misr == 0 || n_tpg == 0) begin
      failures++; $display("FAIL a CBILBO mode was never used");
    end
    $display("CBILBO clocks: concurrent %0d, compact only %0d, generate only %0d",
             n_conc, n_misr, n_tpg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
