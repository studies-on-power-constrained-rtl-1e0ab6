// tb_scan_chain: self-checking test of one scan chain.
// Shifts random bits through an 8-cell chain and checks scan_out delays
// scan_in by exactly LEN clocks, checks a capture of the functional input
// and that the captured value then shifts out last-cell first.
module tb_scan_chain;
  localparam int LEN = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scan_en, scan_in, scan_out;
  logic [LEN-1:0] d, q, model;
  logic hist [$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_chain #(.LEN(LEN)) dut (.clk, .rst_n, .scan_en, .scan_in, .d, .q, .scan_out);

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
    scan_en = 0; scan_in = 0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(32'(q), 0, "reset");
    // shift 40 random bits: scan_out is scan_in delayed by LEN clocks
    scan_en = 1;
    model = '0;
    for (int i = 0; i < 40; i++) begin
      check(32'(scan_out), 32'(model[LEN-1]), "scan_out");
      scan_in = 1'($urandom);
      @(negedge clk);
      model = {model[LEN-2:0], scan_in};
      check(32'(q), 32'(model), "shift state");
    end
    // capture
    scan_en = 0; d = 8'hA5;
    @(negedge clk);
    check(32'(q), 32'hA5, "capture");
    // unload the captured response
    scan_en = 1; scan_in = 0;
    for (int i = LEN - 1; i >= 0; i--) begin
      check(32'(scan_out), 32'(d[i]), "unload");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
