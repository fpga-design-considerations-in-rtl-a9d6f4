// fsd_delay: a plain register chain that delays a W-bit word by N clock cycles (N = 0 is
// a wire). It carries data that has to stay aligned with a computation running beside it,
// such as the context of a received vector travelling with its candidates through a PDU.
// No reset: the chain only carries data, validity travels in it as one of the bits and the
// owning module resets that bit separately where needed.
module fsd_delay #(
  parameter int W = 1,
  parameter int N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [N];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int k = 1; k < N; k++) r[k] <= r[k-1];
    end
    assign q = r[N-1];
  end
endmodule
