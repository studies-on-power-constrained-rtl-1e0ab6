// scan_workload_run: one scan-chain-disable test run, used by
// tb_scan_workloads for each circuit size and chain count.
//
// It builds a scan_disable_core of F flip-flops in N chains
// (L = ceil(F/N) cells each, padded when N does not divide F) with its own
// clock. A stand-in next-state function closes the loop from ppi to ppo:
// the circuit's real logic is not part of this RTL, and the scan
// hardware does not depend on it. It then applies a deterministic-style
// test set: NSUB D-compatible subsets of SUB_LEN vectors each, subset s
// active on chain s mod N. Inside a subset, the bits of the disabled chains
// are repeated from the previous vector and the active chain's bits are
// random. The procedure is the one the hardware is built for: load every
// chain for the first vector of a subset, capture in the active chain,
// shift only the active chain for the following vectors (response out
// while the next vector goes in), and shift the last response out.
// Checked:
//   * every Scan-out bit and the flip-flop values after every load and
//     capture, against a model of all N*L cells (padding cells included);
//   * test time = M*L*(N-1) + (n+r+1)*(L+1) - 1 clocks, with M = NSUB and
//     n + r = NSUB*SUB_LEN;
//   * no flip-flop outside the selected chain ever changes in test mode,
//     and at most L flip-flops change in any clock (a single chain of F
//     cells would change up to F). The measured peak is reported.
// Inputs change on the falling clock edge; 'done' rises when the run ends.
module scan_workload_run #(
  parameter int F       = 32,
  parameter int N       = 4,
  parameter int NSUB    = 4,
  parameter int SUB_LEN = 3
) (
  output bit done,
  output int n_checks,
  output int n_failures,
  output int peak
);
  localparam int L     = (F + N - 1) / N;
  localparam int TOTAL = L * N;
  localparam int CSW   = (N > 1) ? $clog2(N) : 1;
  localparam int NV    = NSUB * SUB_LEN;

  logic clk = 1'b0, rst_n = 1'b0;
  logic tc, scan_en, scan_in, scan_out;
  logic [CSW-1:0] cs;
  logic [F-1:0] ppi, ppo, ppi_prev;
  logic [TOTAL-1:0] cells;          // model of every scan cell
  int cycles = 0, checks = 0, failures = 0, peak_toggles = 0;
  bit counting = 0;

  assign n_checks = checks;
  assign n_failures = failures;
  assign peak = peak_toggles;

  always #5 clk = ~clk;

  scan_disable_core #(.NUM_FF(F), .N_CHAINS(N)) dut (
    .clk, .rst_n, .tc, .scan_en, .cs, .scan_in, .scan_out, .ppi, .ppo);

  // stand-in next-state logic of the circuit under test
  function automatic logic [F-1:0] next_state(input logic [F-1:0] s);
    return {s[0], s[F-1:1]} ^ (s & {s[F-2:0], s[F-1]}) ^ {s[F-4:0], s[F-1:F-3]};
  endfunction
  assign ppo = next_state(ppi);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL F=%0d N=%0d %s at %0t", F, N, what, $time);
    end
  endtask

  // toggle monitor: flip-flops that changed at this rising edge
  always @(negedge clk) ppi_prev = ppi;
  always @(posedge clk) begin
    automatic int c = int'(cs);
    automatic logic t = tc && rst_n;
    automatic int n = 0, stray = 0;
    #1;
    if (t) begin
      for (int j = 0; j < F; j++)
        if (ppi[j] != ppi_prev[j]) begin
          n++;
          if (j / L != c) stray++;
        end
      if (stray != 0) check(1'b0, "flip-flop outside the selected chain changed");
      if (n > peak_toggles) peak_toggles = n;
    end
  end
  always @(posedge clk) if (counting) cycles++;

  task automatic shift_chain(input int c, input logic [TOTAL-1:0] v);
    cs = CSW'(c); scan_en = 1;
    for (int p = L - 1; p >= 0; p--) begin
      scan_in = v[c * L + p];
      #1;
      check(scan_out == cells[c * L + L - 1], "Scan-out bit");
      cells[c * L +: L] = {cells[c * L +: L - 1], scan_in};
      @(negedge clk);
    end
  endtask

  task automatic capture(input int c);
    logic [F-1:0] nx;
    nx = next_state(ppi);
    cs = CSW'(c); scan_en = 0;
    @(negedge clk);
    for (int i = 0; i < L; i++)
      cells[c * L + i] = (c * L + i < F) ? nx[c * L + i] : 1'b0;
  endtask

  initial begin
    logic [TOTAL-1:0] vec;
    int act;
    done = 0;
    tc = 1; scan_en = 1; cs = '0; scan_in = 0; cells = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    counting = 1;
    vec = '0;
    for (int s = 0; s < NSUB; s++) begin
      act = s % N;
      for (int i = 0; i < SUB_LEN; i++) begin
        for (int b = 0; b < TOTAL; b++)
          if (i == 0 || b / L == act) vec[b] = 1'($urandom);
        if (i == 0) for (int c = 0; c < N; c++) shift_chain(c, vec);
        else        shift_chain(act, vec);
        check(ppi == vec[F-1:0], "vector loaded");
        capture(act);
        check(ppi == cells[F-1:0], "capture in the selected chain only");
        vec = cells;              // the next vector starts from the chain contents
      end
    end
    shift_chain(act, '0);
    counting = 0;
    check(cycles == NSUB * L * (N - 1) + (NV + 1) * (L + 1) - 1, "test application time");
    check(peak_toggles > 0 && peak_toggles <= L, "peak flip-flop changes per clock within one chain");
    $display("F=%0d N=%0d L=%0d: %0d vectors in %0d subsets, %0d clocks, peak %0d of %0d flip-flops changed (%0.1f%% below one chain)",
             F, N, L, NV, NSUB, cycles, peak_toggles, F,
             100.0 * (1.0 - real'(peak_toggles) / real'(F)));
    done = 1;
  end
endmodule
