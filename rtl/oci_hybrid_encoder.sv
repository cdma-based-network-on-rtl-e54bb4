// oci_hybrid_encoder: the hybrid spreading encoder of one port, A bit slices wide.
//
// Every bit of the flit is spread by the same code chip. For an orthogonal code the chip sent
// is data XOR code chip; for a T-OCI code it is data AND code chip, so a 1 is sent only in the
// code's own time slot. A multiplexer picks the XOR or the AND result by the kind of code the
// controller assigned. A port with CODE_NONE sends all-zero chips and adds no interference.
// Combinational: the flit and code are held stable by the crossbar for the whole transaction.
// A serial crossbar uses one encoder per port and steps chip_idx through 0..N-1; a parallel
// crossbar uses N encoders per port with chip_idx tied to 0..N-1.
module oci_hybrid_encoder
  import oci_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned A = 8
) (
  input  code_t                code,
  input  logic [$clog2(N)-1:0] chip_idx,
  input  logic [A-1:0]         data,
  output logic [A-1:0]         chips
);
  logic code_bit;

  oci_code_gen #(.N(N)) u_gen (.code(code), .chip_idx(chip_idx), .chip(code_bit));

  always_comb begin
    for (int b = 0; b < A; b++) begin
      logic orth_chip, tdma_chip_v;
      orth_chip   = data[b] ^ code_bit;
      tdma_chip_v = data[b] & code_bit;
      unique case (code.kind)
        CODE_ORTH: chips[b] = orth_chip;
        CODE_TDMA: chips[b] = tdma_chip_v;
        default:   chips[b] = 1'b0;
      endcase
    end
  end
endmodule
