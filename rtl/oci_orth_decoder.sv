// oci_orth_decoder: serial (T-OCI) decoder of one port using an orthogonal Walsh code.
//
// A correlator built as one up/down accumulator instead of separate "zero" and "one"
// accumulators followed by a comparator: in each chip slot the channel sum is added when the
// despreading chip is 0 and subtracted when it is 1, and the accumulator restarts every N
// slots. A data 1 was sent as the inverted code, so its own contribution is +N/2; a data 0
// gives -N/2. Other orthogonal codes cancel exactly. Each active T-OCI code adds +1 or -1, so
// the total from them lies in [-N/2, N/2-1]. The final value therefore lies in [0, N-1] for a
// 1 and in [-N, -1] for a 0, and the sign bit alone decides: sign 0 (value >= 0) is a 1.
//
// Interface: `sum` and `slot` come from the crossbar adder. In the cycle after the sum of
// slot N-1 arrives, `data` holds the decoded flit and `done` pulses for one cycle.
// The accumulator is wide enough for any running sum (log2 N + 1 + log2 N + 1 bits).
module oci_orth_decoder
  import oci_pkg::*;
#(
  parameter int unsigned N        = 8,
  parameter int unsigned A        = 8,
  parameter int unsigned CODE_IDX = 1   // Walsh code 1..N-1 this port despreads
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [A-1:0][$clog2(N):0] sum,
  input  logic [$clog2(N)-1:0]      slot,
  output logic [A-1:0]              data,
  output logic                      done
);
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned SW = CW + 1;
  localparam int unsigned AW = SW + CW + 1;
  localparam code_t CODE = '{kind: CODE_ORTH, idx: IDX_W'(CODE_IDX)};

  initial assert (CODE_IDX >= 1 && CODE_IDX < N) else $error("CODE_IDX out of range");

  logic despread;
  oci_code_gen #(.N(N)) u_gen (.code(CODE), .chip_idx(slot), .chip(despread));

  logic signed [AW-1:0] acc  [A];
  logic signed [AW-1:0] next [A];

  always_comb begin
    for (int b = 0; b < A; b++) begin
      logic signed [AW-1:0] term;
      term    = despread ? -$signed(AW'(sum[b])) : $signed(AW'(sum[b]));
      next[b] = (slot == '0) ? term : acc[b] + term;
    end
  end

  always_ff @(posedge clk) begin
    for (int b = 0; b < A; b++) acc[b] <= next[b];
    if (!rst_n) begin
      data <= '0;
      done <= 1'b0;
    end else begin
      done <= slot == CW'(N - 1);
      if (slot == CW'(N - 1))
        for (int b = 0; b < A; b++) data[b] <= ~next[b][AW-1];
    end
  end
endmodule
