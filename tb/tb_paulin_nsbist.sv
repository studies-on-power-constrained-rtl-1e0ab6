// tb_paulin_nsbist: self-checking test of the Paulin data path with
// non-scan BIST hardware.
//   1. Normal operation: loads two operands through PI1/PI2 and checks
//      PO1 = a (Add.1 with R3 = 0) and PO2 = 0 - a*b (Mult.1 into R6,
//      then Sub.1 with R7 = 0).
//   2. 400 clocks of random control words (mux selects, register modes,
//      thru functions, T_MUXes, TPG/RA enables), every output compared
//      each clock with a cycle-level reference model.
//   3. The two test sessions of the schedule: {Add.1, Sub.1}, both over
//      type-3 paths, and {Mult.1, Mult.2}, then the serial read-out of the
//      BILBO signatures. On a type-3 path a module sees a new operand pair
//      every second clock; each computed result must equal the sum (Add.1)
//      or difference (Sub.1) of two consecutive generator patterns
//      (checked against a separately computed LFSR sequence).
module tb_paulin_nsbist;
  import bist_pkg::*;
  `include "paulin_ref.svh"

  logic clk = 1'b0, rst_n = 1'b0;
  paulin_ctrl_t ctrl;
  logic [31:0] pi1, pi2, po1, po2, sig1, sig2;
  logic scan_in, scan_out;
  paulin_state_t st;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  paulin_nsbist dut (.clk, .rst_n, .ctrl, .pi1, .pi2, .bilbo_scan_in(scan_in),
                     .bilbo_scan_out(scan_out), .po1, .po2, .sig1, .sig2);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  // apply one control word for one clock, advance the model, compare
  task automatic step(input paulin_ctrl_t c);
    ctrl = c;
    #1;
    check(32'(scan_out), 32'(ref_scan_out(st, scan_in)), "scan_out");
    st = ref_clock(st, c, pi1, pi2, scan_in);
    @(negedge clk);
    check(po1, st.r[1], "po1");
    check(po2, st.r[2], "po2");
    check(sig1, st.s1, "sig1");
    check(sig2, st.s2, "sig2");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    paulin_ctrl_t c;
    logic [31:0] a, b, p [0:63];
    ctrl = ctrl_idle(); pi1 = 0; pi2 = 0; scan_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    st = ref_reset();

    // 1. normal operation
    a = $urandom; b = $urandom;
    pi1 = a; pi2 = b;
    c = ctrl_idle(); c.rmode[5] = BILBO_NORMAL; c.rmode[4] = BILBO_NORMAL;
    step(c);
    c = ctrl_idle(); c.rmode[6] = BILBO_NORMAL; c.rmode[1] = BILBO_NORMAL;
    step(c);
    c = ctrl_idle(); c.rmode[2] = BILBO_NORMAL;
    step(c);
    check(po1, a, "normal: Add.1 result");
    check(po2, 32'd0 - 32'(64'(a) * 64'(b)), "normal: Mult.1 then Sub.1 result (R7 = 0)");
    c = ctrl_idle(); c.msel[1] = 1; c.msel[2] = 1; c.rmode[1] = BILBO_NORMAL; c.rmode[2] = BILBO_NORMAL;
    step(c);
    check(po1, 32'h1, "constant One through m1");
    check(po2, 32'h1, "constant One through m2");

    // 2. random control
    for (int i = 0; i < 400; i++) begin
      c = paulin_ctrl_t'({$urandom, $urandom});
      c.tpg_seed = ($urandom % 16 == 0);
      c.ra_clear = ($urandom % 32 == 0);
      for (int r = 1; r <= 7; r++) c.rmode[r] = bilbo_mode_e'($urandom % 6);
      pi1 = $urandom; pi2 = $urandom; scan_in = 1'($urandom);
      step(c);
    end
    scan_in = 0;

    // 3. test sessions: seed the TPGs, clear the RAs
    c = ctrl_idle(); c.tpg_seed = 1; c.ra_clear = 1;
    c.rmode[6] = BILBO_RESET; c.rmode[7] = BILBO_RESET; c.rmode[2] = BILBO_RESET;
    step(c);
    c = ctrl_idle(); c.ra_clear = 1;
    step(c);
    p[0] = 32'h1;
    for (int j = 1; j < 64; j++) p[j] = ref_times_x(p[j-1]);
    for (int j = 0; j < 40; j++) begin
      step(ctrl_session1((j > 0) && (j % 2 == 0)));
      if (j > 0 && j % 2 == 0) begin
        check(po1, p[j-2] + p[j-1], "type-3 Add.1 result");
        check(po2, p[j-2] - p[j-1], "type-3 Sub.1 result");
      end
    end
    checks += 2;
    if (sig1 == 0) begin failures++; $display("FAIL RA1 signature is zero"); end
    if (sig2 == 0) begin failures++; $display("FAIL RA2 signature is zero"); end
    for (int j = 0; j < 40; j++) step(ctrl_session2());
    for (int j = 0; j < 96; j++) step(ctrl_unload());
    $display("signatures RA1 %h RA2 %h", sig1, sig2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
