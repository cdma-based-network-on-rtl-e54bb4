// toci_router: CDMA network-on-chip router with M ports around the serial T-OCI crossbar.
//
// Each processing element (PE) has a transmit and a receive network interface (NI). The PE
// writes flits, each with the number of the port it is meant for, into its transmit NI FIFO;
// the crossbar takes the oldest flit of every FIFO that wins access to its destination in a
// transaction, and the decoded flits land in the receive NI FIFOs, where the PEs read them.
// Flow control is store and forward: a flit only enters the crossbar when the receive FIFO at
// its destination has room for it and for every flit already on its way there. The number of
// such flits follows from the crossbar latency (N + adder latency + 1 cycles) and the
// transaction length N, and is kept in reserve (RX_RESERVE).
//
// PE interface per port p: pe_tx_valid/pe_tx_dest/pe_tx_data with pe_tx_ready (write when
// both valid and ready), pe_rx_valid/pe_rx_data with pe_rx_pop (read when valid and pop).
// FIFO depths are this design's choice; DEPTH must be at least RX_RESERVE.
module toci_router
  import oci_pkg::*;
#(
  parameter int unsigned N         = 8,
  parameter int unsigned A         = 8,
  parameter bit          PIPELINED = 1'b1,
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned M         = 2 * (N - 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [M-1:0]                 pe_tx_valid,
  input  logic [M-1:0][$clog2(M)-1:0]  pe_tx_dest,
  input  logic [M-1:0][A-1:0]          pe_tx_data,
  output logic [M-1:0]                 pe_tx_ready,
  output logic [M-1:0]                 pe_rx_valid,
  output logic [M-1:0][A-1:0]          pe_rx_data,
  input  logic [M-1:0]                 pe_rx_pop
);
  localparam int unsigned DW = $clog2(M);
  localparam int unsigned FW = $clog2(DEPTH + 1);
  localparam int unsigned LAT = adder_latency(N, PIPELINED);
  localparam int unsigned RX_RESERVE = (N + LAT + 1) / N + 1;

  initial assert (DEPTH >= RX_RESERVE) else $error("DEPTH too small for the flits in flight");

  logic [M-1:0]          tx_empty, tx_full, tx_start, rx_empty, rx_full, rx_ready, rx_valid;
  logic [M-1:0][DW-1:0]  tx_dest;
  logic [M-1:0][A-1:0]   tx_data, rx_data;
  logic [M-1:0][FW-1:0]  rx_free;
  logic [M-1:0][FW-1:0]  tx_free;  // not needed on the transmit side

  for (genvar p = 0; p < M; p++) begin : g_port
    oci_fifo #(.W(DW + A), .DEPTH(DEPTH)) u_tx_ni (
      .clk, .rst_n,
      .wr_en(pe_tx_valid[p] && !tx_full[p]), .wr_data({pe_tx_dest[p], pe_tx_data[p]}),
      .rd_en(tx_start[p]), .rd_data({tx_dest[p], tx_data[p]}),
      .empty(tx_empty[p]), .full(tx_full[p]), .free(tx_free[p]));

    oci_fifo #(.W(A), .DEPTH(DEPTH)) u_rx_ni (
      .clk, .rst_n,
      .wr_en(rx_valid[p]), .wr_data(rx_data[p]),
      .rd_en(pe_rx_pop[p] && !rx_empty[p]), .rd_data(pe_rx_data[p]),
      .empty(rx_empty[p]), .full(rx_full[p]), .free(rx_free[p]));

    assign rx_ready[p] = rx_free[p] >= FW'(RX_RESERVE);
  end

  assign pe_tx_ready = ~tx_full;
  assign pe_rx_valid = ~rx_empty;

  toci_crossbar #(.N(N), .A(A), .PIPELINED(PIPELINED), .M(M)) u_xbar (
    .clk, .rst_n, .tx_req(~tx_empty), .tx_dest, .tx_data, .tx_start,
    .rx_ready, .rx_valid, .rx_data);

  // a decoded flit must always find room
  assert property (@(posedge clk) disable iff (!rst_n) (rx_valid & rx_full) == '0)
    else $error("receive NI overflow");
endmodule
