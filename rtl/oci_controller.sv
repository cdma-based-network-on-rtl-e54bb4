// oci_controller: crossbar controller (router arbiter) of an OCI crossbar with M ports.
//
// Code assignment is receiver based: every receive port has a fixed despreading code (see
// oci_pkg::rx_port_code), and a transmitter that wins access to a receive port is given that
// port's code for one transaction. Transmitters that ask for the same receive port are
// resolved by fixed priority: the lowest port number wins, the others wait and ask again in
// the next transaction. A receive port is only offered when it signals it can take a flit.
// Transmitters that are idle or lost get CODE_NONE and add nothing to the channel.
//
// Interface and timing: in a cycle with `txn_load` high the controller arbitrates on
// tx_req / tx_dest / rx_ready and pulses `tx_start` for the winners (they hand over their flit
// in that cycle); on the clock edge the codes, the set of receive ports that will get a flit
// (`rx_active`) and `orth_mix`, the XOR of the indices of the orthogonal codes in use, are
// registered and held until the next `txn_load`. A serial crossbar raises `txn_load` in the
// last chip slot of every transaction, a parallel one in every cycle.
module oci_controller
  import oci_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned M = 2 * (N - 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         txn_load,
  input  logic [M-1:0]                 tx_req,
  input  logic [M-1:0][$clog2(M)-1:0]  tx_dest,
  input  logic [M-1:0]                 rx_ready,
  output logic [M-1:0]                 tx_start,
  output code_t [M-1:0]                tx_code,
  output logic [M-1:0]                 rx_active,
  output logic [$clog2(N)-1:0]         orth_mix
);
  localparam int unsigned CW = $clog2(N);

  initial assert (M == 2 * (N - 1)) else $error("M must be 2(N-1)");

  logic [M-1:0] grant, taken;
  code_t [M-1:0] code_n;
  logic [CW-1:0] mix_n;

  always_comb begin
    grant  = '0;
    taken  = '0;
    code_n = '0;
    mix_n  = '0;
    for (int i = 0; i < M; i++) begin
      if (tx_req[i] && 32'(tx_dest[i]) < M && rx_ready[tx_dest[i]] && !taken[tx_dest[i]]) begin
        grant[i]            = 1'b1;
        taken[tx_dest[i]]   = 1'b1;
        code_n[i]           = rx_port_code(32'(tx_dest[i]), N);
        if (32'(tx_dest[i]) < N - 1) mix_n ^= CW'(tx_dest[i] + 1'b1);
      end
    end
  end

  assign tx_start = txn_load ? grant : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tx_code   <= '0;
      rx_active <= '0;
      orth_mix  <= '0;
    end else if (txn_load) begin
      tx_code   <= code_n;
      rx_active <= taken;
      orth_mix  <= mix_n;
    end
  end

  // a destination outside the port range would never be granted
  for (genvar i = 0; i < M; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) tx_req[i] |-> 32'(tx_dest[i]) < M);
  end
endmodule
