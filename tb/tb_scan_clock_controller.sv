// tb_scan_clock_controller: self-checking test of the clock controller.
// Counts the rising edges each gated chain clock delivers: all chains in
// normal mode, only the selected chain in test mode, for every select
// value. Also changes tc and cs while CLK is high and checks that no
// chain clock produces a pulse shorter than the high phase of CLK.
module tb_scan_clock_controller;
  localparam int N = 4;
  logic clk = 1'b0;
  logic tc;
  logic [1:0] cs;
  logic [N-1:0] chain_clk, chain_en;
  int edges [N];
  realtime rise_t [N];
  int short_pulses = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_clock_controller #(.N_CHAINS(N)) dut (.clk, .tc, .cs, .chain_clk, .chain_en);

  for (genvar k = 0; k < N; k++) begin : g_mon
    always @(posedge chain_clk[k]) begin
      edges[k]++;
      rise_t[k] = $realtime;
    end
    always @(negedge chain_clk[k])
      if ($realtime > 1.0 && $realtime - rise_t[k] < 4.9) begin
        short_pulses++;
        $display("short pulse on chain %0d at %0t (rose %0t)", k, $realtime, rise_t[k]);
      end
  end

  task automatic count_window(input int cycles);
    for (int k = 0; k < N; k++) edges[k] = 0;
    repeat (cycles) @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tc = 0; cs = 0;
    repeat (2) @(negedge clk);
    // normal mode: every chain clocked
    count_window(10);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (edges[k] != 10) begin failures++; $display("FAIL normal chain %0d edges %0d", k, edges[k]); end
    end
    // test mode: only chain cs
    tc = 1;
    for (int s = 0; s < N; s++) begin
      cs = 2'(s);
      count_window(7);
      for (int k = 0; k < N; k++) begin
        checks++;
        if (edges[k] != ((k == s) ? 7 : 0)) begin
          failures++;
          $display("FAIL test cs=%0d chain %0d edges %0d", s, k, edges[k]);
        end
      end
    end
    // change the selection while clk is high: no runt pulses
    repeat (20) begin
      @(posedge clk); #2;
      cs = 2'($urandom); tc = 1'($urandom);
    end
    @(negedge clk);
    checks++;
    if (short_pulses != 0) begin failures++; $display("FAIL %0d short clock pulses", short_pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
