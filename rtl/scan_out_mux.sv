// scan_out_mux: the output multiplexer of the scan-chain-disable scheme.
//
// All chains share one Scan-out pin; the chain select cs that enables a
// chain's clock also routes that chain's last cell to scan_out, so the
// tester sees the response of the active chain while the next vector is
// shifted in. Purely combinational. An out-of-range cs gives 0.
module scan_out_mux #(
  parameter int unsigned N_CHAINS = 4,
  parameter int unsigned CSW      = (N_CHAINS > 1) ? $clog2(N_CHAINS) : 1
) (
  input  logic [N_CHAINS-1:0] chain_out,
  input  logic [CSW-1:0]      cs,
  output logic                scan_out
);
  always_comb begin
    scan_out = 1'b0;
    for (int k = 0; k < N_CHAINS; k++)
      if (int'(cs) == k) scan_out = chain_out[k];
  end
endmodule
