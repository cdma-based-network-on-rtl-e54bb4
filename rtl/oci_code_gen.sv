// oci_code_gen: spreading / despreading code generator.
//
// Given an assigned code (kind and index, see oci_pkg) and the current chip slot, it returns
// the code chip: parity(index & slot) for an orthogonal Walsh code, (slot == index) for a
// T-OCI code, 0 for CODE_NONE. Purely combinational. The Walsh construction and the single-chip
// T-OCI codes follow the encoding example of the design (N = 8); the bit-level formula is
// this implementation's own way of generating them without a code table.
module oci_code_gen
  import oci_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  code_t                code,
  input  logic [$clog2(N)-1:0] chip_idx,
  output logic                 chip
);
  assign chip = code_chip(code, IDX_W'(chip_idx));
endmodule
