// poci_crossbar: parallel overloaded-CDMA (P-OCI) crossbar with M = 2(N-1) ports.
//
// The same codes, port map and controller as the serial T-OCI crossbar, but all N chips of a
// transaction are produced at once: every port has N hybrid encoders (one per chip slot), the
// crossbar adder is replicated N times (copy j sums slot j, its T-OCI multiplexer fixed to
// slot j), and the decoders take all N sums together (unrolled accumulator for orthogonal
// codes, LSB(sum j) XOR LSB(sum 0) for T-OCI codes). A transaction therefore takes one clock
// cycle instead of N, so each port moves up to one A-bit flit per cycle, N times the serial
// crossbar, at the cost of N times the encoder and adder logic.
//
// Timing: the controller arbitrates every cycle and pulses `tx_start` for the winners, whose
// flits are registered; `rx_valid` follows adder_latency + 2 cycles after `tx_start`
// (6 for N = 8 with the pipelined adder). `rx_ready` is sampled at grant time; the receiver
// must have room for every flit that can be in flight in those cycles.
// As in the serial crossbar, the steering of encoders onto the adder inputs by code is this
// design's own addition.
module poci_crossbar
  import oci_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned A         = 8,
  parameter bit          PIPELINED = 1'b1,
  parameter int unsigned M         = 2 * (N - 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [M-1:0]                 tx_req,
  input  logic [M-1:0][$clog2(M)-1:0]  tx_dest,
  input  logic [M-1:0][A-1:0]          tx_data,
  output logic [M-1:0]                 tx_start,
  input  logic [M-1:0]                 rx_ready,
  output logic [M-1:0]                 rx_valid,
  output logic [M-1:0][A-1:0]          rx_data
);
  localparam int unsigned CW  = $clog2(N);
  localparam int unsigned SW  = CW + 1;
  localparam int unsigned LAT = adder_latency(N, PIPELINED);

  initial assert (N >= 4) else $error("N must be at least 4");

  code_t [M-1:0] tx_code;
  logic  [M-1:0] rx_active;
  logic  [CW-1:0] orth_mix;
  oci_controller #(.N(N), .M(M)) u_ctrl (
    .clk, .rst_n, .txn_load(1'b1), .tx_req, .tx_dest, .rx_ready,
    .tx_start, .tx_code, .rx_active, .orth_mix);

  logic [M-1:0][A-1:0] data_r;
  always_ff @(posedge clk)
    for (int i = 0; i < M; i++) if (tx_start[i]) data_r[i] <= tx_data[i];

  logic [N-1:0][A-1:0][SW-1:0] sum;
  logic [N-1:0][A-1:0]         sum_lsb;

  for (genvar j = 0; j < N; j++) begin : g_slot
    logic [M-1:0][A-1:0] chips;
    for (genvar i = 0; i < M; i++) begin : g_enc
      oci_hybrid_encoder #(.N(N), .A(A)) u_enc (
        .code(tx_code[i]), .chip_idx(CW'(j)), .data(data_r[i]), .chips(chips[i]));
    end

    logic [N-2:0][A-1:0] orth_in, tdma_in;
    always_comb begin
      orth_in = '0;
      tdma_in = '0;
      for (int i = 0; i < M; i++) begin
        for (int k = 1; k < N; k++) begin
          if (tx_code[i].kind == CODE_ORTH && tx_code[i].idx == IDX_W'(k)) orth_in[k-1] |= chips[i];
          if (tx_code[i].kind == CODE_TDMA && tx_code[i].idx == IDX_W'(k)) tdma_in[k-1] |= chips[i];
        end
      end
    end

    logic [CW-1:0] slot_unused;
    oci_crossbar_adder #(.N(N), .A(A), .PIPELINED(PIPELINED)) u_add (
      .clk, .orth_chips(orth_in), .tdma_chips(tdma_in), .slot_in(CW'(j)),
      .sum(sum[j]), .slot_out(slot_unused));

    for (genvar b = 0; b < A; b++) begin : g_lsb
      assign sum_lsb[j][b] = sum[j][b][0];
    end
  end

  // transaction facts delayed to the decoders: orth_mix to their inputs (LAT cycles),
  // rx_active to their registered outputs (LAT + 1 cycles)
  logic [M-1:0]  active_pipe [LAT+1];
  logic [CW-1:0] mix_pipe    [LAT];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k <= LAT; k++) active_pipe[k] <= '0;
      for (int k = 0; k < LAT; k++)  mix_pipe[k]    <= '0;
    end else begin
      active_pipe[0] <= rx_active;
      mix_pipe[0]    <= orth_mix;
      for (int k = 1; k <= LAT; k++) active_pipe[k] <= active_pipe[k-1];
      for (int k = 1; k < LAT; k++)  mix_pipe[k]    <= mix_pipe[k-1];
    end
  end

  for (genvar r = 0; r < N - 1; r++) begin : g_orth
    poci_orth_decoder #(.N(N), .A(A), .CODE_IDX(r + 1)) u_dec (
      .clk, .sum, .data(rx_data[r]));
  end
  for (genvar t = 0; t < N - 1; t++) begin : g_tdma
    poci_tdma_decoder #(.N(N), .A(A), .SLOT(t + 1)) u_dec (
      .clk, .sum_lsb, .orth_mix(mix_pipe[LAT-1]), .data(rx_data[N-1+t]));
  end

  assign rx_valid = active_pipe[LAT];
endmodule
