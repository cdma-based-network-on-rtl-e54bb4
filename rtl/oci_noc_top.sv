// oci_noc_top: the two overloaded-CDMA crossbar variants side by side.
//
// * t_*: a complete CDMA NoC router of M = 2(N-1) ports built on the serial T-OCI crossbar,
//   with transmit and receive NI FIFOs between the processing elements and the crossbar. One
//   A-bit flit per port every N cycles.
// * p_*: the parallel P-OCI crossbar on its own, without NI FIFOs. One A-bit flit per port
//   every cycle; the user supplies rx_ready and must leave room for the flits in flight.
// The processing elements are outside this module; their connections are the ports. Both
// parts share the clock and the synchronous active-low reset. Defaults: N = 8 (M = 14 ports),
// A = 8-bit flits, pipelined adder, NI FIFOs 4 deep.
module oci_noc_top
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
  // serial T-OCI router, PE side
  input  logic [M-1:0]                 t_pe_tx_valid,
  input  logic [M-1:0][$clog2(M)-1:0]  t_pe_tx_dest,
  input  logic [M-1:0][A-1:0]          t_pe_tx_data,
  output logic [M-1:0]                 t_pe_tx_ready,
  output logic [M-1:0]                 t_pe_rx_valid,
  output logic [M-1:0][A-1:0]          t_pe_rx_data,
  input  logic [M-1:0]                 t_pe_rx_pop,
  // parallel P-OCI crossbar
  input  logic [M-1:0]                 p_tx_req,
  input  logic [M-1:0][$clog2(M)-1:0]  p_tx_dest,
  input  logic [M-1:0][A-1:0]          p_tx_data,
  output logic [M-1:0]                 p_tx_start,
  input  logic [M-1:0]                 p_rx_ready,
  output logic [M-1:0]                 p_rx_valid,
  output logic [M-1:0][A-1:0]          p_rx_data
);
  toci_router #(.N(N), .A(A), .PIPELINED(PIPELINED), .DEPTH(DEPTH), .M(M)) u_toci (
    .clk, .rst_n,
    .pe_tx_valid(t_pe_tx_valid), .pe_tx_dest(t_pe_tx_dest), .pe_tx_data(t_pe_tx_data),
    .pe_tx_ready(t_pe_tx_ready), .pe_rx_valid(t_pe_rx_valid), .pe_rx_data(t_pe_rx_data),
    .pe_rx_pop(t_pe_rx_pop));

  poci_crossbar #(.N(N), .A(A), .PIPELINED(PIPELINED), .M(M)) u_poci (
    .clk, .rst_n, .tx_req(p_tx_req), .tx_dest(p_tx_dest), .tx_data(p_tx_data),
    .tx_start(p_tx_start), .rx_ready(p_rx_ready), .rx_valid(p_rx_valid), .rx_data(p_rx_data));
endmodule
