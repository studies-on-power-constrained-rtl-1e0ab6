// tb_lfsr_tpg: self-checking test of the LFSR pattern generator.
// Checks every pattern of a 32-bit generator against a polynomial model
// (multiply by x modulo x^32+x^22+x^2+x+1), the seed load (including the
// all-zero seed), holding while disabled, and that a 4-bit generator has
// the maximal period of 15 patterns.
module tb_lfsr_tpg;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, seed_load, en4;
  logic [31:0] seed, pattern, model;
  logic [3:0]  p4, first4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr_tpg #(.W(32)) dut (.clk, .rst_n, .en, .seed_load, .seed, .pattern);
  lfsr_tpg #(.W(4))  dut4 (.clk, .rst_n, .en(en4), .seed_load(1'b0), .seed(4'h0), .pattern(p4));

  function automatic logic [31:0] times_x(input logic [31:0] s);
    logic [32:0] t;
    t = {s, 1'b0};
    if (t[32]) t = t ^ 33'h1_0040_0007;
    return t[31:0];
  endfunction

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; seed_load = 0; seed = '0; en4 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(pattern, 32'h1, "reset state");
    // seed and run
    seed = 32'hDEAD_BEEF; seed_load = 1;
    @(negedge clk); seed_load = 0;
    check(pattern, 32'hDEAD_BEEF, "seed");
    model = 32'hDEAD_BEEF;
    en = 1;
    repeat (200) begin
      @(negedge clk);
      model = times_x(model);
      check(pattern, model, "pattern");
    end
    // hold
    en = 0;
    repeat (3) @(negedge clk);
    check(pattern, model, "hold");
    // zero seed is replaced by 1
    seed = '0; seed_load = 1;
    @(negedge clk); seed_load = 0;
    check(pattern, 32'h1, "zero seed");
    // 4-bit period
    en4 = 1;
    first4 = p4;
    begin
      int period;
      period = 0;
      do begin
        @(negedge clk);
        period++;
      end while (p4 != first4 && period < 100);
      check(32'(period), 32'd15, "4-bit period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
