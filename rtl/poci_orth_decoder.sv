// poci_orth_decoder: parallel (P-OCI) decoder of one port using an orthogonal Walsh code.
//
// The parallel crossbar delivers all N chip sums of a transaction in the same cycle, so the
// accumulator loop of the serial decoder is unrolled: each chip sum is negated where the
// despreading chip is 1, the N terms are added in a tree, and the sign bit of the total gives
// the data bit (value >= 0 decodes as 1; see oci_orth_decoder for why this is exact).
// Interface: `sum[j]` is the channel sum of slot j. `data` is registered: 1 cycle latency.
module poci_orth_decoder
  import oci_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned A        = 8,
  parameter int unsigned CODE_IDX = 1
) (
  input  logic                                clk,
  input  logic [N-1:0][A-1:0][$clog2(N):0]    sum,
  output logic [A-1:0]                        data
);
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned SW = CW + 1;
  localparam int unsigned AW = SW + CW + 1;

  initial assert (CODE_IDX >= 1 && CODE_IDX < N) else $error("CODE_IDX out of range");

  logic [N-1:0] despread;
  for (genvar j = 0; j < N; j++) begin : g_code
    oci_code_gen #(.N(N)) u_gen (
      .code('{kind: CODE_ORTH, idx: IDX_W'(CODE_IDX)}), .chip_idx(CW'(j)), .chip(despread[j]));
  end

  logic [A-1:0] dec;
  always_comb begin
    for (int b = 0; b < A; b++) begin
      logic signed [AW-1:0] total;
      total = '0;
      for (int j = 0; j < N; j++)
        total += despread[j] ? -$signed(AW'(sum[j][b])) : $signed(AW'(sum[j][b]));
      dec[b] = ~total[AW-1];
    end
  end

  always_ff @(posedge clk) data <= dec;
endmodule
