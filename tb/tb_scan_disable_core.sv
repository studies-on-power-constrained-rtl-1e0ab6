// tb_scan_disable_core: self-checking test of the scan-chain-disable core.
//
// Runs the small worked example of the scheme: four flip-flops in two
// chains of two, five test vectors (four cubes plus one repeated with the
// other chain active) in three D-compatible subsets:
//   {1100, 0000} chain 0 active, {0110, 0101} chain 1 active,
//   {1110} chain 0 active.
// The first vector of a subset is shifted into every chain; the following
// vectors of a subset are shifted into the active chain only, since the
// disabled chains already hold the bits they need. Each capture clocks only
// the active chain. The circuit's logic is a small model in this file.
// Checks: every response bit on Scan-out, the contents of every chain
// after each capture (disabled chains unchanged), that no flip-flop of a
// disabled chain toggles in test mode, a normal-mode capture of all
// chains, and that the whole test takes exactly
//   TAT = M*L*(N-1) + (n+r+1)*(L+1) - 1  clocks (L = ceil(F/N)).
module tb_scan_disable_core;
  localparam int F = 4, N = 2, L = (F + N - 1) / N, CSW = 1;
  localparam int NV = 5, M = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tc, scan_en, scan_in, scan_out;
  logic [CSW-1:0] cs;
  logic [F-1:0] ppi, ppo;
  int checks = 0, failures = 0;
  int cycles = 0, counting = 0;
  int stray_toggles = 0;
  logic [F-1:0] ppi_prev;

  logic [F-1:0] vec    [NV] = '{4'b0011, 4'b0000, 4'b0110, 4'b1010, 4'b0111};  // bit j = flip-flop j+1
  int           act    [NV] = '{0, 0, 1, 1, 0};
  bit           first  [NV] = '{1, 0, 1, 0, 1};

  always #5 clk = ~clk;

  scan_disable_core #(.NUM_FF(F), .N_CHAINS(N)) dut (
    .clk, .rst_n, .tc, .scan_en, .cs, .scan_in, .scan_out, .ppi, .ppo);

  // model of the circuit's combinational logic
  function automatic logic [F-1:0] cut_logic(input logic [F-1:0] s);
    return {s[0], s[F-1:1]} ^ (s & {s[F-2:0], s[F-1]}) ^ F'('b1001);
  endfunction
  assign ppo = cut_logic(ppi);

  // cycle counter and toggle monitor (flip-flops outside the active chain)
  always @(posedge clk) if (counting) cycles++;
  always @(negedge clk) ppi_prev = ppi;
  always @(posedge clk) begin
    automatic int c = int'(cs);
    automatic logic t = tc && rst_n;
    #1;
    if (t)
      for (int j = 0; j < F; j++)
        if (j / L != c && ppi[j] != ppi_prev[j]) stray_toggles++;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // shift one chain: load bits of 'v', compare outgoing bits with 'expect_out'
  task automatic shift_chain(input int c, input logic [F-1:0] v,
                             input bit compare, input logic [F-1:0] expect_out);
    cs = CSW'(c); scan_en = 1;
    for (int p = L - 1; p >= 0; p--) begin
      scan_in = v[c * L + p];
      #1;
      if (compare) check(32'(scan_out), 32'(expect_out[c * L + p]), "scan-out bit");
      @(negedge clk);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [F-1:0] state, resp;
    int prev;
    tc = 1; scan_en = 1; cs = '0; scan_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    prev = -1; state = '0; resp = '0;
    counting = 1;
    for (int i = 0; i < NV; i++) begin
      if (first[i]) begin
        for (int c = 0; c < N; c++) shift_chain(c, vec[i], c == prev, resp);
      end else begin
        shift_chain(act[i], vec[i], 1'b1, resp);
      end
      // the chains now hold the vector (disabled ones from the subset's first vector)
      check(32'(ppi), 32'(vec[i]), "vector loaded");
      // capture into the active chain only
      cs = CSW'(act[i]); scan_en = 0;
      @(negedge clk);
      resp = vec[i];
      for (int j = 0; j < F; j++) if (j / L == act[i]) resp[j] = cut_logic(vec[i])[j];
      check(32'(ppi), 32'(resp), "capture in active chain only");
      prev = act[i];
    end
    shift_chain(prev, '0, 1'b1, resp);
    counting = 0;
    check(32'(cycles), 32'(M * L * (N - 1) + (NV + 1) * (L + 1) - 1), "test application time");
    check(32'(stray_toggles), 0, "disabled chains toggled");
    // normal mode: every chain captures
    tc = 0; scan_en = 0;
    state = ppi;
    @(negedge clk);
    check(32'(ppi), 32'(cut_logic(state)), "normal capture of all chains");
    $display("test application time %0d clocks", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
