// tb_scan_out_mux: exhaustive test of the scan-out multiplexer for
// four chains: every chain-output pattern with every select value,
// including the unused codes of a three-chain instance.
module tb_scan_out_mux;
  logic [3:0] chain_out;
  logic [1:0] cs;
  logic scan_out, scan_out3;
  int checks = 0, failures = 0;

  scan_out_mux #(.N_CHAINS(4)) dut  (.chain_out, .cs, .scan_out);
  scan_out_mux #(.N_CHAINS(3)) dut3 (.chain_out(chain_out[2:0]), .cs, .scan_out(scan_out3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int s = 0; s < 4; s++) begin
        chain_out = 4'(v); cs = 2'(s);
        #1;
        checks += 2;
        if (scan_out !== chain_out[s]) begin
          failures++;
          $display("FAIL 4 chains v=%0d cs=%0d got %b", v, s, scan_out);
        end
        if (scan_out3 !== ((s < 3) ? chain_out[s] : 1'b0)) begin
          failures++;
          $display("FAIL 3 chains v=%0d cs=%0d got %b", v, s, scan_out3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
