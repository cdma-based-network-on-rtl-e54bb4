// oci_tdma_decoder: serial (T-OCI) decoder of one port using a non-orthogonal T-OCI code.
//
// While all orthogonal codes are in use, the channel sum in any slot differs from the sum in
// slot 0 by an even number, whatever data they carry. A T-OCI code adds a single 1 in its own
// slot k, so the parity of sum(k) against sum(0) is its data bit. The decoder keeps a 2-bit
// register per bit slice, the sum's LSB in slot 0 and in slot k, and XORs them.
// When some orthogonal codes are idle, the parity of sum(k) - sum(0) contributed by the active
// ones is parity(X & k), X being the XOR of their code indices (Walsh chips are linear in the
// index). The controller supplies X as `orth_mix` and the decoder XORs in that correction; with
// all N-1 orthogonal codes active X = 0 and the decoder is the plain two-register XOR.
//
// Interface: `sum_lsb` and `slot` come from the adder, `orth_mix` must hold for the whole
// transaction being decoded. In the cycle after slot N-1, `data` holds the flit and `done`
// pulses for one cycle.
module oci_tdma_decoder #(
  parameter int unsigned N    = 8,
  parameter int unsigned A    = 8,
  parameter int unsigned SLOT = 1   // T-OCI code (time slot) 1..N-1 this port despreads
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [A-1:0]         sum_lsb,
  input  logic [$clog2(N)-1:0] slot,
  input  logic [$clog2(N)-1:0] orth_mix,
  output logic [A-1:0]         data,
  output logic                 done
);
  localparam int unsigned CW = $clog2(N);

  initial assert (SLOT >= 1 && SLOT < N) else $error("SLOT out of range");

  logic [A-1:0] lsb0_r, lsbk_r, lsbk;
  logic         corr;

  assign lsbk = (slot == CW'(SLOT)) ? sum_lsb : lsbk_r;
  assign corr = ^(orth_mix & CW'(SLOT));

  always_ff @(posedge clk) begin
    if (slot == '0)        lsb0_r <= sum_lsb;
    if (slot == CW'(SLOT)) lsbk_r <= sum_lsb;
    if (!rst_n) begin
      data <= '0;
      done <= 1'b0;
    end else begin
      done <= slot == CW'(N - 1);
      if (slot == CW'(N - 1)) data <= lsb0_r ^ lsbk ^ {A{corr}};
    end
  end
endmodule
