// tb_thru_unit: self-checking test of the functional modules with thru.
// For an adder (mask-element thru), a subtractor and a multiplier (mux
// thru) and a multiplier without thru, checks random operands in normal
// mode and that thru passes the right input unchanged.
module tb_thru_unit;
  import bist_pkg::*;
  logic [31:0] a, b, y_add, y_sub, y_mul, y_mul_nt;
  logic thru;
  int checks = 0, failures = 0;

  thru_unit #(.W(32), .OP(OP_ADD), .THRU_EN(1'b1)) u_add (.a, .b, .thru, .y(y_add));
  thru_unit #(.W(32), .OP(OP_SUB), .THRU_EN(1'b1)) u_sub (.a, .b, .thru, .y(y_sub));
  thru_unit #(.W(32), .OP(OP_MUL), .THRU_EN(1'b1)) u_mul (.a, .b, .thru, .y(y_mul));
  thru_unit #(.W(32), .OP(OP_MUL), .THRU_EN(1'b0)) u_mnt (.a, .b, .thru, .y(y_mul_nt));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, got, exp);
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
    longint unsigned pa, pb;
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom;
      if (i == 0) begin a = 32'hFFFF_FFFF; b = 32'h1; end
      pa = 64'(a); pb = 64'(b);
      thru = 0;
      #1;
      check(y_add, 32'((pa + pb) & 64'hFFFF_FFFF), "add");
      check(y_sub, 32'((pa + (64'h1_0000_0000 - pb)) & 64'hFFFF_FFFF), "sub");
      check(y_mul, 32'((pa * pb) & 64'hFFFF_FFFF), "mul");
      check(y_mul_nt, 32'((pa * pb) & 64'hFFFF_FFFF), "mul without thru");
      thru = 1;
      #1;
      check(y_add, b, "add thru");
      check(y_sub, b, "sub thru");
      check(y_mul, b, "mul thru");
      check(y_mul_nt, 32'((pa * pb) & 64'hFFFF_FFFF), "thru ignored without THRU_EN");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
