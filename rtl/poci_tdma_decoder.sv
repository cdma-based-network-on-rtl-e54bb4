// poci_tdma_decoder: parallel (P-OCI) decoder of one port using a T-OCI code.
//
// With all N chip sums present at once, the data bit of T-OCI code k is the XOR of the LSB of
// sum(k) and of sum(0), corrected by parity(orth_mix & k) when some orthogonal codes are idle
// (see oci_tdma_decoder). `data` is registered: 1 cycle latency.
module poci_tdma_decoder #(
  parameter int unsigned N    = 8,
  parameter int unsigned A    = 8,
  parameter int unsigned SLOT = 1
) (
  input  logic                      clk,
  input  logic [N-1:0][A-1:0]       sum_lsb,
  input  logic [$clog2(N)-1:0]      orth_mix,
  output logic [A-1:0]              data
);
  localparam int unsigned CW = $clog2(N);

  initial assert (SLOT >= 1 && SLOT < N) else $error("SLOT out of range");

  always_ff @(posedge clk)
    data <= sum_lsb[SLOT] ^ sum_lsb[0] ^ {A{^(orth_mix & CW'(SLOT))}};
endmodule
