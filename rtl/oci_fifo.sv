// oci_fifo: first-in first-out buffer used as the transmit and receive network interface
// (NI) queue of a router port.
//
// A circular buffer of DEPTH words with show-ahead read: `rd_data` is the oldest word while
// `empty` is low, and `rd_en` removes it. A write and a read may happen in the same cycle.
// `free` counts the empty places, so a sender that has flits in flight can keep some in
// reserve. Writing when full or reading when empty is a protocol error (asserted).
// Reset (synchronous, active low) empties the buffer. The NI FIFOs are part of the described
// router; their organisation, depth and the `free` output are this design's choices.
module oci_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [W-1:0]             wr_data,
  input  logic                     rd_en,
  output logic [W-1:0]             rd_data,
  output logic                     empty,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] free
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned FW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [FW-1:0] count;

  function automatic logic [PW-1:0] bump(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= bump(wp);
      if (rd_en) rp <= bump(rp);
      count <= count + FW'(wr_en) - FW'(rd_en);
    end
  end

  assign rd_data = mem[rp];
  assign empty   = count == '0;
  assign full    = count == FW'(DEPTH);
  assign free    = FW'(DEPTH) - count;

  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("write to a full FIFO");
  assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("read from an empty FIFO");
endmodule
