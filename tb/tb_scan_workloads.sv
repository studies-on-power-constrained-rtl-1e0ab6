// tb_scan_workloads: the scan-chain-disable hardware at the sizes of the
// benchmark circuits it is meant for, each with 2, 3 and 4 chains.
//
// Flip-flop counts: 32, 29, 18, 18, 74, 211 and 669 (the full-scan
// versions of s838, s953, s1196, s1238, s1423, s9234 and s13207). The
// circuits' logic and their test cubes are not part of this RTL, so each
// run (scan_workload_run) closes the loop with a stand-in next-state
// function and generates a random test set with the D-compatible subset
// structure. What is checked is what the hardware decides: every Scan-out
// bit, the flip-flop contents after each load and capture, the test time
// against M*L*(N-1) + (n+r+1)*(L+1) - 1 with L = ceil(F/N), and that in
// test mode only the selected chain's flip-flops change, so at most
// ceil(F/N) change per clock instead of up to F with one chain.
// For 32 flip-flops that bound is a peak reduction of 50.0 %, 65.6 % and
// 75.0 % for 2, 3 and 4 chains. All 21 runs go in parallel, each on its own
// clock.
module tb_scan_workloads;
  localparam int NC = 7;
  localparam int FF [NC] = '{32, 29, 18, 18, 74, 211, 669};

  bit  done  [NC][3];
  int  nchk  [NC][3];
  int  nfail [NC][3];

  for (genvar i = 0; i < NC; i++) begin : g_ckt
    for (genvar k = 0; k < 3; k++) begin : g_n
      scan_workload_run #(.F(FF[i]), .N(k + 2)) u_run (
        .done(done[i][k]), .n_checks(nchk[i][k]), .n_failures(nfail[i][k]),
        .peak());
    end
  end

  int checks = 0, failures = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    do begin
      #100;
      all = 1;
      for (int i = 0; i < NC; i++) for (int k = 0; k < 3; k++) all &= done[i][k];
    end while (!all);
    #1;
    for (int i = 0; i < NC; i++)
      for (int k = 0; k < 3; k++) begin
        checks += nchk[i][k];
        failures += nfail[i][k];
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
