// tb_misr_ra: self-checking test of the MISR response analyser.
// Feeds random response words and checks the signature each clock against
// a polynomial model, then checks clear, hold while disabled and that a
// single flipped response bit changes the final signature.
module tb_misr_ra;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, clear;
  logic [31:0] din, signature, model, good_sig;
  logic [31:0] stream [0:63];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr_ra #(.W(32)) dut (.clk, .rst_n, .en, .clear, .din, .signature);

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

  task automatic run_stream(input int flip_at);
    clear = 1; en = 0;
    @(negedge clk); clear = 0;
    model = '0;
    en = 1;
    for (int i = 0; i < 64; i++) begin
      din = stream[i] ^ ((i == flip_at) ? 32'h0000_0100 : 32'h0);
      @(negedge clk);
      model = times_x(model) ^ din;
      if (flip_at < 0) check(signature, model, "signature");
    end
    en = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clear = 0; din = '0;
    for (int i = 0; i < 64; i++) stream[i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(signature, 32'h0, "reset");
    run_stream(-1);
    good_sig = signature;
    din = 32'hFFFF_FFFF;
    repeat (4) @(negedge clk);
    check(signature, good_sig, "hold while disabled");
    run_stream(17);
    checks++;
    if (signature == good_sig) begin
      failures++;
      $display("FAIL single-bit error not seen in the signature");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
