// scan_chain: one scan chain of LEN mux-D scan flip-flops.
//
// Each cell holds one flip-flop of the circuit under test. With scan_en = 1
// the chain shifts: scan_in enters cell 0, each cell takes its neighbour's
// value and cell LEN-1 drives scan_out. With scan_en = 0 every cell loads
// its functional input d (the next state from the combinational logic),
// which is a normal clock in normal mode or a test-response capture in
// test mode. The chain is clocked by its own gated clock from the clock
// controller, so a disabled chain simply does not change.
// Reset is asynchronous and active low, to zero (a choice of this design;
// the document does not discuss reset of the scan cells).
module scan_chain #(
  parameter int unsigned LEN = 8
) (
  input  logic           clk,      // gated chain clock
  input  logic           rst_n,
  input  logic           scan_en,
  input  logic           scan_in,
  input  logic [LEN-1:0] d,        // functional next state
  output logic [LEN-1:0] q,        // flip-flop values (pseudo-primary inputs)
  output logic           scan_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= '0;
    else if (scan_en) q <= (LEN > 1) ? {q[LEN-2:0], scan_in} : LEN'(scan_in);
    else              q <= d;
  end

  assign scan_out = q[LEN-1];
endmodule
