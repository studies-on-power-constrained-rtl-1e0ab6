// tb_bilbo_reg: self-checking test of the BILBO register.
// Walks the register through every mode (normal load, hold, pattern
// generation, signature compaction, serial shift, reset) and checks each
// clock against an independent model. The pattern mode must also leave
// the all-zero state.
module tb_bilbo_reg;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  bilbo_mode_e mode;
  logic [31:0] d, q, model;
  logic scan_in, scan_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bilbo_reg #(.W(32)) dut (.clk, .rst_n, .mode, .d, .scan_in, .q, .scan_out);

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
    check(q, 32'h0, "reset");
    // normal
    mode = BILBO_NORMAL;
    repeat (10) begin
      d = $urandom;
      @(negedge clk);
      check(q, d, "normal load");
    end
    model = q;
    // hold
    mode = BILBO_HOLD; d = $urandom;
    repeat (3) @(negedge clk);
    check(q, model, "hold");
    // signature
    mode = BILBO_MISR;
    repeat (20) begin
      d = $urandom;
      @(negedge clk);
      model = times_x(model) ^ d;
      check(q, model, "misr");
    end
    // serial shift: scan_out shows the MSB, scan_in enters bit 0
    mode = BILBO_SHIFT;
    for (int i = 0; i < 32; i++) begin
      check(32'(scan_out), 32'(model[31]), "scan_out");
      scan_in = i[0];
      @(negedge clk);
      model = {model[30:0], scan_in};
      check(q, model, "shift");
    end
    // reset mode, then pattern generation from zero
    mode = BILBO_RESET;
    @(negedge clk);
    check(q, 32'h0, "reset mode");
    mode = BILBO_TPG;
    @(negedge clk);
    model = 32'h1;
    check(q, model, "tpg leaves zero");
    repeat (40) begin
      @(negedge clk);
      model = times_x(model);
      check(q, model, "tpg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
