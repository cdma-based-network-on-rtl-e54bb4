// oci_crossbar_adder: the channel adder of the OCI crossbar, A bit slices wide.
//
// Of the M = 2(N-1) encoders, N-1 use orthogonal codes and N-1 use T-OCI codes. In any chip
// slot at most one T-OCI encoder can send a 1 (the one whose code owns that slot), so instead
// of adding all M chips the adder first picks that single T-OCI chip with a multiplexer
// steered by the slot number, and sums only N one-bit inputs (N-1 orthogonal + 1) in a binary
// tree. The sum needs log2(N)+1 bits, since all N inputs can be 1 at once.
//
// Pipeline: the chips and their slot number are caught in the encoded-data register; the
// multiplexer works from that register. With PIPELINED = 0 (reference variant) the whole tree
// is combinational and ends in the sum register: latency 2 cycles. With PIPELINED = 1 a
// register follows every one of the log2(N) tree levels, the last being the sum register:
// latency 1 + log2(N) cycles. `slot_out` is the slot number delayed to match `sum`.
// A parallel (P-OCI) crossbar instantiates N copies, each with `slot_in` tied to its slot.
module oci_crossbar_adder
  import oci_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned A         = 8,
  parameter bit          PIPELINED = 1'b1
) (
  input  logic                           clk,
  input  logic [N-2:0][A-1:0]            orth_chips,
  input  logic [N-2:0][A-1:0]            tdma_chips,  // entry t: T-OCI code t+1 (slot t+1)
  input  logic [$clog2(N)-1:0]           slot_in,
  output logic [A-1:0][$clog2(N):0]      sum,
  output logic [$clog2(N)-1:0]           slot_out
);
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned SW = CW + 1;
  localparam int unsigned LAT = adder_latency(N, PIPELINED);

  // encoded-data register
  logic [N-2:0][A-1:0] orth_r, tdma_r;
  logic [CW-1:0]       slot_r;
  always_ff @(posedge clk) begin
    orth_r <= orth_chips;
    tdma_r <= tdma_chips;
    slot_r <= slot_in;
  end

  // the single T-OCI chip that may be 1 in this slot; slot 0 carries no T-OCI code
  logic [A-1:0] tdma_sel;
  always_comb begin
    tdma_sel = '0;
    for (int t = 0; t < N - 1; t++)
      if (slot_r == CW'(t + 1)) tdma_sel = tdma_r[t];
  end

  // adder tree, one per bit slice; level 0 holds the N one-bit inputs
  for (genvar b = 0; b < A; b++) begin : g_slice
    logic [SW-1:0] in [N];
    for (genvar i = 0; i < N - 1; i++) begin : g_in
      assign in[i] = SW'(orth_r[i][b]);
    end
    assign in[N-1] = SW'(tdma_sel[b]);

    // level l holds N >> l partial sums
    for (genvar l = 1; l <= CW; l++) begin : g_lvl
      logic [SW-1:0] prev [N >> (l - 1)];
      logic [SW-1:0] v    [N >> l];
      if (l == 1) begin : g_from_in
        assign prev = in;
      end else begin : g_from_lvl
        assign prev = g_lvl[l-1].v;
      end
      for (genvar i = 0; i < (N >> l); i++) begin : g_node
        logic [SW-1:0] s;
        assign s = prev[2*i] + prev[2*i+1];
        if (PIPELINED || l == CW) begin : g_reg
          always_ff @(posedge clk) v[i] <= s;
        end else begin : g_comb
          assign v[i] = s;
        end
      end
    end

    assign sum[b] = g_lvl[CW].v[0];
  end

  // slot number delayed alongside the data
  logic [CW-1:0] slot_pipe [LAT];
  always_ff @(posedge clk) begin
    slot_pipe[0] <= slot_in;
    for (int k = 1; k < LAT; k++) slot_pipe[k] <= slot_pipe[k-1];
  end
  assign slot_out = slot_pipe[LAT-1];
endmodule
