// oci_chip_counter: the chip-slot counter that paces a serial (T-OCI) crossbar transaction.
//
// A transaction lasts N clock cycles, one per chip of the spreading code. The counter runs
// freely from 0 to N-1 and wraps, so transactions follow each other back to back; its value
// is broadcast to every spreading-code generator. `last` is high in slot N-1, the cycle in
// which the controller loads the code assignment for the next transaction.
// Reset (synchronous, active low) puts the counter at slot 0. `en` low freezes it.
// The counter itself is part of the described architecture; running it freely so that
// transactions leave no idle cycles, and the enable, are this design's choices.
module oci_chip_counter #(
  parameter int unsigned N = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  output logic [$clog2(N)-1:0] chip_idx,
  output logic                 last
);
  localparam int unsigned CW = $clog2(N);

  initial assert (N >= 2 && (1 << CW) == N) else $error("N must be a power of two");

  always_ff @(posedge clk) begin
    if (!rst_n)  chip_idx <= '0;
    else if (en) chip_idx <= (chip_idx == CW'(N - 1)) ? '0 : chip_idx + 1'b1;
  end

  assign last = chip_idx == CW'(N - 1);
endmodule
