// tb_cbilbo_reg: self-checking test of the concurrent BILBO.
// Checks normal load, that CONC mode generates patterns on q and compacts
// d into the second rank in the same clocks, the single-rank TPG and MISR
// modes, hold, the serial read-out of the signature and reset.
module tb_cbilbo_reg;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bilbo_mode_e mode;
  logic [31:0] d, q, signature, mq, ms;
  logic scan_in, scan_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cbilbo_reg #(.W(32)) dut (.clk, .rst_n, .mode, .d, .scan_in, .q, .signature, .scan_out);

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
    mode = BILBO_HOLD; d = '0; scan_in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mode = BILBO_NORMAL; d = 32'h1234_5678;
    @(negedge clk);
    check(q, d, "normal");
    check(signature, 32'h0, "normal leaves signature");
    mq = q; ms = 32'h0;
    // concurrent generate + compact
    mode = BILBO_CONC;
    repeat (30) begin
      d = $urandom;
      @(negedge clk);
      mq = times_x(mq);
      ms = times_x(ms) ^ d;
      check(q, mq, "conc pattern");
      check(signature, ms, "conc signature");
    end
    // single-rank modes
    mode = BILBO_TPG; d = $urandom;
    @(negedge clk);
    mq = times_x(mq);
    check(q, mq, "tpg"); check(signature, ms, "tpg keeps signature");
    mode = BILBO_MISR; d = $urandom;
    @(negedge clk);
    ms = times_x(ms) ^ d;
    check(q, mq, "misr keeps q"); check(signature, ms, "misr");
    mode = BILBO_HOLD;
    repeat (2) @(negedge clk);
    check(q, mq, "hold q"); check(signature, ms, "hold signature");
    // read the signature serially
    mode = BILBO_SHIFT;
    for (int i = 0; i < 32; i++) begin
      check(32'(scan_out), 32'(ms[31]), "scan_out");
      scan_in = 1'b1;
      @(negedge clk);
      ms = {ms[30:0], 1'b1};
    end
    check(signature, 32'hFFFF_FFFF, "shifted in");
    mode = BILBO_RESET;
    @(negedge clk);
    check(q, 32'h0, "reset q"); check(signature, 32'h0, "reset signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
