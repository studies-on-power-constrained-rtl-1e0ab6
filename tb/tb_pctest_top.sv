// tb_pctest_top: end-to-end test of both architectures at their default
// sizes (32-bit Paulin data path; 32 scan flip-flops in 4 chains of 8).
//
// Paulin data path: a normal computation, random control words, then the
// complete self-test: TPG seeding, session {Add.1, Sub.1} (both on
// type-3 paths), session {Mult.1, Mult.2}, a pass of each thru function
// along a boundary test path, and the serial read-out of the BILBO
// signatures.
// Every output is compared every clock with a cycle-level reference model.
//
// Scan core: a deterministic scan test of 7 vectors in 3 D-compatible
// subsets, generated here (within a subset the bits of the disabled
// chains are equal, the active chain's bits are random). Every response
// bit on Scan-out and the chain contents after every capture are checked,
// no flip-flop outside the active chain may toggle in test mode, a normal
// capture must clock all chains, and the test must take
//   M*L*(N-1) + (n+r+1)*(L+1) - 1 clocks.
//
// Each mechanism is counted (shift, one-chain capture, normal capture,
// full reload at a subset boundary, chain switch; pattern generation at a
// PI, signature compaction at a PO, BILBO pattern, signature and shift
// modes, each thru function, each T_MUX); one that never happens counts
// as a failure.
module tb_pctest_top;
  import bist_pkg::*;
  `include "paulin_ref.svh"

  localparam int F = 32, N = 4, L = 8, CSW = 2;
  localparam int M = 3, NV = 7;

  // Paulin side
  logic dp_clk = 1'b0, dp_rst_n = 1'b0;
  paulin_ctrl_t dp_ctrl;
  logic [31:0] dp_pi1, dp_pi2, dp_po1, dp_po2, dp_sig1, dp_sig2;
  logic dp_scan_in, dp_scan_out;
  paulin_state_t st;

  // scan side
  logic scan_clk = 1'b0, scan_rst_n = 1'b0;
  logic scan_tc, scan_en, scan_in, scan_out;
  logic [CSW-1:0] scan_cs;
  logic [F-1:0] scan_ppi, scan_ppo, ppi_prev;
  int cycles = 0, stray_toggles = 0;
  bit counting = 0;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_shift = 0, n_test_capture = 0, n_normal_capture = 0, n_reload = 0, n_switch = 0;
  int n_tpg = 0, n_ra = 0, n_bilbo_tpg = 0, n_bilbo_misr = 0, n_bilbo_shift = 0;
  int n_thru_add = 0, n_thru_mul = 0, n_thru_sub = 0, n_tmux1 = 0, n_tmux2 = 0;

  always #5 dp_clk = ~dp_clk;
  always #5 scan_clk = ~scan_clk;

  pctest_top dut (
    .dp_clk, .dp_rst_n, .dp_ctrl, .dp_pi1, .dp_pi2, .dp_scan_in, .dp_scan_out,
    .dp_po1, .dp_po2, .dp_sig1, .dp_sig2,
    .scan_clk, .scan_rst_n, .scan_tc, .scan_en, .scan_cs, .scan_in, .scan_out,
    .scan_ppi, .scan_ppo);

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- Paulin data path ----------------
  task automatic dp_step(input paulin_ctrl_t c);
    dp_ctrl = c;
    if (c.tpg_en[0] || c.tpg_en[1]) n_tpg++;
    if (c.ra_en != 0) n_ra++;
    for (int r = 1; r <= 7; r++) begin
      if (REF_KIND[r] != REG_PLAIN && c.rmode[r] == BILBO_TPG)   n_bilbo_tpg++;
      if (REF_KIND[r] != REG_PLAIN && c.rmode[r] == BILBO_MISR)  n_bilbo_misr++;
      if (REF_KIND[r] != REG_PLAIN && c.rmode[r] == BILBO_SHIFT) n_bilbo_shift++;
    end
    if (c.thru_add1) n_thru_add++;
    if (c.thru_mult1) n_thru_mul++;
    if (c.thru_sub1) n_thru_sub++;
    if (c.tm1) n_tmux1++;
    if (c.tm2) n_tmux2++;
    #1;
    check(32'(dp_scan_out), 32'(ref_scan_out(st, dp_scan_in)), "dp scan_out");
    st = ref_clock(st, c, dp_pi1, dp_pi2, dp_scan_in);
    @(negedge dp_clk);
    check(dp_po1, st.r[1], "po1");
    check(dp_po2, st.r[2], "po2");
    check(dp_sig1, st.s1, "sig1");
    check(dp_sig2, st.s2, "sig2");
  endtask

  task automatic run_paulin();
    paulin_ctrl_t c;
    logic [31:0] a, b;
    dp_ctrl = ctrl_idle(); dp_pi1 = 0; dp_pi2 = 0; dp_scan_in = 0;
    repeat (2) @(negedge dp_clk);
    dp_rst_n = 1;
    st = ref_reset();
    // normal computation
    a = $urandom; b = $urandom; dp_pi1 = a; dp_pi2 = b;
    c = ctrl_idle(); c.rmode[5] = BILBO_NORMAL; c.rmode[4] = BILBO_NORMAL; dp_step(c);
    c = ctrl_idle(); c.rmode[6] = BILBO_NORMAL; c.rmode[1] = BILBO_NORMAL; dp_step(c);
    c = ctrl_idle(); c.rmode[2] = BILBO_NORMAL; dp_step(c);
    check(dp_po1, a, "normal Add.1");
    check(dp_po2, 32'd0 - 32'(64'(a) * 64'(b)), "normal Mult.1/Sub.1 (R7 = 0)");
    // random control
    for (int i = 0; i < 200; i++) begin
      c = paulin_ctrl_t'({$urandom, $urandom});
      c.tpg_seed = ($urandom % 16 == 0);
      c.ra_clear = ($urandom % 32 == 0);
      for (int r = 1; r <= 7; r++) c.rmode[r] = bilbo_mode_e'($urandom % 6);
      dp_pi1 = $urandom; dp_pi2 = $urandom; dp_scan_in = 1'($urandom);
      dp_step(c);
    end
    dp_scan_in = 0;
    // self-test
    c = ctrl_idle(); c.tpg_seed = 1;
    c.rmode[6] = BILBO_RESET; c.rmode[7] = BILBO_RESET; c.rmode[2] = BILBO_RESET;
    dp_step(c);
    c = ctrl_idle(); c.ra_clear = 1; dp_step(c);
    for (int j = 0; j < 40; j++) dp_step(ctrl_session1((j > 0) && (j % 2 == 0)));
    for (int j = 0; j < 40; j++) dp_step(ctrl_session2());
    // patterns and responses carried through the thru functions:
    // TPG2 -> R4 -> Mult.1 (thru) -> R6 -> Sub.1 (thru) -> R2 -> RA2,
    // TPG1 -> R5 -> Add.1 (thru) -> R1 -> RA1
    c = ctrl_idle();
    c.tm1 = 1; c.tm2 = 1; c.tpg_en = 2'b11; c.ra_en = 2'b11; c.msel = '0;
    c.rmode[5] = BILBO_NORMAL; c.rmode[4] = BILBO_NORMAL; c.rmode[6] = BILBO_NORMAL;
    c.rmode[1] = BILBO_NORMAL; c.rmode[2] = BILBO_NORMAL;
    c.thru_add1 = 1; c.thru_mult1 = 1; c.thru_sub1 = 1;
    repeat (16) dp_step(c);
    for (int j = 0; j < 96; j++) dp_step(ctrl_unload());
    checks += 2;
    if (dp_sig1 == 0) begin failures++; $display("FAIL RA1 signature is zero"); end
    if (dp_sig2 == 0) begin failures++; $display("FAIL RA2 signature is zero"); end
  endtask

  // ---------------- scan core ----------------
  function automatic logic [F-1:0] cut_logic(input logic [F-1:0] s);
    return {s[0], s[F-1:1]} ^ (s & {s[F-2:0], s[F-1]}) ^ {s[F-4:0], s[F-1:F-3]} ^ F'(32'h9E37_79B9);
  endfunction
  assign scan_ppo = cut_logic(scan_ppi);

  always @(posedge scan_clk) if (counting) cycles++;
  always @(negedge scan_clk) ppi_prev = scan_ppi;
  always @(posedge scan_clk) begin
    automatic int c = int'(scan_cs);
    automatic logic t = scan_tc && scan_rst_n;
    #1;
    if (t)
      for (int j = 0; j < F; j++)
        if (j / L != c && scan_ppi[j] != ppi_prev[j]) stray_toggles++;
  end

  task automatic shift_chain(input int c, input logic [F-1:0] v,
                             input bit compare, input logic [F-1:0] expect_out);
    if (int'(scan_cs) != c) n_switch++;
    scan_cs = CSW'(c); scan_en = 1;
    for (int p = L - 1; p >= 0; p--) begin
      scan_in = v[c * L + p];
      #1;
      if (compare) check(32'(scan_out), 32'(expect_out[c * L + p]), "scan-out bit");
      @(negedge scan_clk);
      n_shift++;
    end
  endtask

  task automatic run_scan();
    logic [F-1:0] vec [NV], resp, state;
    int act [NV];
    bit first [NV];
    int sub_size [M] = '{2, 3, 2};
    int k, prev;
    // generate the test set
    k = 0;
    for (int s = 0; s < M; s++) begin
      int a;
      a = (s == 1) ? 3 : s;          // active chains 0, 3, 1
      for (int i = 0; i < sub_size[s]; i++) begin
        act[k] = a; first[k] = (i == 0);
        vec[k] = {$urandom};
        if (i > 0)
          for (int j = 0; j < F; j++) if (j / L != a) vec[k][j] = vec[k-1][j];
        k++;
      end
    end
    scan_tc = 1; scan_en = 1; scan_cs = '0; scan_in = 0;
    repeat (2) @(negedge scan_clk);
    scan_rst_n = 1;
    @(negedge scan_clk);
    prev = -1; resp = '0;
    counting = 1;
    for (int i = 0; i < NV; i++) begin
      if (first[i]) begin
        n_reload++;
        for (int c = 0; c < N; c++) shift_chain(c, vec[i], c == prev, resp);
      end else begin
        shift_chain(act[i], vec[i], 1'b1, resp);
      end
      check(32'(scan_ppi), 32'(vec[i]), "vector loaded");
      if (int'(scan_cs) != act[i]) n_switch++;
      scan_cs = CSW'(act[i]); scan_en = 0;
      @(negedge scan_clk);
      n_test_capture++;
      resp = vec[i];
      for (int j = 0; j < F; j++) if (j / L == act[i]) resp[j] = cut_logic(vec[i])[j];
      check(32'(scan_ppi), 32'(resp), "capture in active chain only");
      prev = act[i];
    end
    shift_chain(prev, '0, 1'b1, resp);
    counting = 0;
    check(32'(cycles), 32'(M * L * (N - 1) + (NV + 1) * (L + 1) - 1), "test application time");
    check(32'(stray_toggles), 0, "toggles outside the active chain");
    $display("scan test: %0d vectors, %0d subsets, %0d clocks", NV, M, cycles);
    // normal mode
    scan_tc = 0; scan_en = 0;
    state = scan_ppi;
    @(negedge scan_clk);
    n_normal_capture++;
    check(32'(scan_ppi), 32'(cut_logic(state)), "normal capture of all chains");
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never exercised: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    fork
      run_paulin();
      run_scan();
    join
    $display("mechanisms:");
    need(n_shift, "scan shift clocks");
    need(n_test_capture, "one-chain captures");
    need(n_normal_capture, "normal-mode captures");
    need(n_reload, "subset reloads");
    need(n_switch, "chain switches");
    need(n_tpg, "TPG clocks");
    need(n_ra, "RA clocks");
    need(n_bilbo_tpg, "BILBO pattern clocks");
    need(n_bilbo_misr, "BILBO signature clocks");
    need(n_bilbo_shift, "BILBO shift clocks");
    need(n_thru_add, "Add.1 thru");
    need(n_thru_mul, "Mult.1 thru");
    need(n_thru_sub, "Sub.1 thru");
    need(n_tmux1, "T_MUX at PI1");
    need(n_tmux2, "T_MUX at PI2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
