// oci_pkg: types and code functions shared by the overloaded CDMA interconnect (OCI).
//
// Spreading codes. Two code families share one channel:
//   * orthogonal Walsh-Hadamard codes, index 1..N-1 (index 0, the all-zero row, is not used).
//     Chip j of code i is parity(i & j), the Sylvester construction with +1 written as 0 and
//     -1 as 1. For N = 8 this gives code 1 = 01010101, code 2 = 00110011, code 3 = 01100110.
//   * non-orthogonal T-OCI ("TDMA overloaded on CDMA") codes, index 1..N-1: a single 1 chip in
//     time slot i, zeros elsewhere. Slot 0 is never used by a T-OCI code; it is the reference
//     slot the overloaded decoders compare against.
// A port that is not granted a transfer gets CODE_NONE and adds nothing to the channel.
//
// Port-to-code map (fixed, receiver based): receive port r < N-1 despreads orthogonal code r+1;
// receive port r >= N-1 despreads T-OCI code r-(N-1)+1. A transmitter sending to port r is
// given that same code for the transaction.
package oci_pkg;

  localparam int unsigned IDX_W = 8;  // code index width, enough for N up to 256

  typedef enum logic [1:0] {
    CODE_NONE = 2'd0,
    CODE_ORTH = 2'd1,
    CODE_TDMA = 2'd2
  } code_kind_e;

  typedef struct packed {
    code_kind_e       kind;
    logic [IDX_W-1:0] idx;
  } code_t;

  // Chip j of orthogonal Walsh code i.
  function automatic logic walsh_chip(input logic [IDX_W-1:0] i, input logic [IDX_W-1:0] j);
    return ^(i & j);
  endfunction

  // Chip j of T-OCI code i.
  function automatic logic tdma_chip(input logic [IDX_W-1:0] i, input logic [IDX_W-1:0] j);
    return i == j;
  endfunction

  // Chip j of an assigned code of either kind; CODE_NONE gives 0.
  function automatic logic code_chip(input code_t c, input logic [IDX_W-1:0] j);
    unique case (c.kind)
      CODE_ORTH: return walsh_chip(c.idx, j);
      CODE_TDMA: return tdma_chip(c.idx, j);
      default:   return 1'b0;
    endcase
  endfunction

  // Code despread by receive port r of a crossbar with code length n.
  function automatic code_t rx_port_code(input int unsigned r, input int unsigned n);
    code_t c;
    if (r < n - 1) begin
      c.kind = CODE_ORTH;
      c.idx  = IDX_W'(r + 1);
    end else begin
      c.kind = CODE_TDMA;
      c.idx  = IDX_W'(r - (n - 1) + 1);
    end
    return c;
  endfunction

  // Clock cycles from chips at the adder input to the channel sum at its output:
  // encoded-data register plus sum register, or plus one register per adder-tree level.
  function automatic int unsigned adder_latency(input int unsigned n, input bit pipelined);
    return pipelined ? 1 + $clog2(n) : 2;
  endfunction

endpackage
