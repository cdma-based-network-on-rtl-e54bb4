// toci_crossbar: serial overloaded-CDMA (T-OCI) crossbar with M = 2(N-1) ports.
//
// N-1 receive ports despread the orthogonal Walsh codes 1..N-1 with accumulator decoders;
// the other N-1 receive ports despread T-OCI codes, each a single 1 chip in one of the slots
// 1..N-1, with parity decoders. One transaction moves at most one A-bit flit per port and
// takes N clock cycles, one chip per cycle on every bit slice; transactions follow each other
// without gaps, paced by a free-running chip counter.
//
// Flow of one transaction:
//   cycle with chip slot N-1: the controller grants transmitters (fixed priority per
//     destination) and pulses `tx_start`; granted flits are caught in the data registers and
//     the codes of their destinations are loaded into the encoders.
//   next N cycles: each hybrid encoder spreads its flit, chip by chip. A steering stage places
//     every encoder's chips on the adder input that belongs to its code (an orthogonal input
//     per Walsh code, a T-OCI input per slot); the adder sums them into the channel.
//   the decoders correlate the channel sums as they arrive; one cycle after the sum of slot
//     N-1, `rx_valid` pulses for every receive port that was sent a flit.
// Latency from `tx_start` to `rx_valid` is N + adder_latency + 1 cycles (13 for N = 8,
// pipelined adder). The receive side must be able to take the flit: `rx_ready` is sampled
// when the grant is made.
// The steering stage is this design's own addition, needed because a transmitter may be given
// either kind of code; the adder, encoders and decoders follow the described architecture.
module toci_crossbar
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

  initial assert (N >= 4 && LAT < N) else $error("N too small for this adder");

  // chip counter and controller
  logic [CW-1:0] chip_idx;
  logic          last;
  oci_chip_counter #(.N(N)) u_cnt (.clk, .rst_n, .en(1'b1), .chip_idx, .last);

  code_t [M-1:0] tx_code;
  logic  [M-1:0] rx_active;
  logic  [CW-1:0] orth_mix;
  oci_controller #(.N(N), .M(M)) u_ctrl (
    .clk, .rst_n, .txn_load(last), .tx_req, .tx_dest, .rx_ready,
    .tx_start, .tx_code, .rx_active, .orth_mix);

  // flit registers and encoders
  logic [M-1:0][A-1:0] data_r, chips;
  always_ff @(posedge clk)
    for (int i = 0; i < M; i++) if (tx_start[i]) data_r[i] <= tx_data[i];

  for (genvar i = 0; i < M; i++) begin : g_enc
    oci_hybrid_encoder #(.N(N), .A(A)) u_enc (
      .code(tx_code[i]), .chip_idx, .data(data_r[i]), .chips(chips[i]));
  end

  // steer each encoder to the adder input of its code
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

  logic [A-1:0][SW-1:0] sum;
  logic [CW-1:0]        sum_slot;
  oci_crossbar_adder #(.N(N), .A(A), .PIPELINED(PIPELINED)) u_add (
    .clk, .orth_chips(orth_in), .tdma_chips(tdma_in), .slot_in(chip_idx),
    .sum, .slot_out(sum_slot));

  // transaction facts, taken over when its first sum reaches the decoders
  logic [M-1:0]  dec_active;
  logic [CW-1:0] dec_mix;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dec_active <= '0;
      dec_mix    <= '0;
    end else if (sum_slot == '0) begin
      dec_active <= rx_active;
      dec_mix    <= orth_mix;
    end
  end

  logic [A-1:0] sum_lsb;
  always_comb for (int b = 0; b < A; b++) sum_lsb[b] = sum[b][0];

  logic [M-1:0] done;
  for (genvar r = 0; r < N - 1; r++) begin : g_orth
    oci_orth_decoder #(.N(N), .A(A), .CODE_IDX(r + 1)) u_dec (
      .clk, .rst_n, .sum, .slot(sum_slot), .data(rx_data[r]), .done(done[r]));
  end
  for (genvar t = 0; t < N - 1; t++) begin : g_tdma
    oci_tdma_decoder #(.N(N), .A(A), .SLOT(t + 1)) u_dec (
      .clk, .rst_n, .sum_lsb, .slot(sum_slot), .orth_mix(dec_mix),
      .data(rx_data[N-1+t]), .done(done[N-1+t]));
  end

  assign rx_valid = done & dec_active;
endmodule
