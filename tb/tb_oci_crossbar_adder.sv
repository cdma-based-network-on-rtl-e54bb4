// tb_oci_crossbar_adder: random chips into both adder variants (pipelined and reference).
// Expected sum per bit slice: number of orthogonal chips that are 1, plus the T-OCI chip of
// the current slot (slots 1..N-1; slot 0 has none). T-OCI chips of other slots are set at
// random too and must be ignored. The sum must appear 1 + log2 N = 4 cycles (pipelined) or
// 2 cycles (reference) after its chips, together with its slot number. N = 8, A = 8.
module tb_oci_crossbar_adder;
  localparam int unsigned N = 8, A = 8, CW = 3, SW = 4;
  localparam int unsigned LAT_P = 4, LAT_R = 2;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-2:0][A-1:0] orth_chips, tdma_chips;
  logic [CW-1:0] slot_in, slot_p, slot_r;
  logic [A-1:0][SW-1:0] sum_p, sum_r;

  oci_crossbar_adder #(.N(N), .A(A), .PIPELINED(1'b1)) dut_p (
    .clk, .orth_chips, .tdma_chips, .slot_in, .sum(sum_p), .slot_out(slot_p));
  oci_crossbar_adder #(.N(N), .A(A), .PIPELINED(1'b0)) dut_r (
    .clk, .orth_chips, .tdma_chips, .slot_in, .sum(sum_r), .slot_out(slot_r));

  int checks = 0, failures = 0;
  logic [A-1:0][SW-1:0] hist_sum [$];
  logic [CW-1:0] hist_slot [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int c = 0; c < 500; c++) begin
      logic [A-1:0][SW-1:0] e;
      @(negedge clk);
      orth_chips = (c % 50 == 7) ? '1 : {$urandom, $urandom};
      tdma_chips = (c % 50 == 7) ? '1 : {$urandom, $urandom};
      slot_in = CW'(c % N);
      for (int b = 0; b < A; b++) begin
        int s;
        s = 0;
        for (int i = 0; i < N - 1; i++) s += orth_chips[i][b];
        if (slot_in != 0) s += tdma_chips[slot_in - 1][b];
        e[b] = SW'(s);
      end
      hist_sum.push_front(e);
      hist_slot.push_front(slot_in);
      @(posedge clk); #1;
      if (hist_sum.size() > LAT_P) begin
        check(sum_p == hist_sum[LAT_P-1], $sformatf("pipelined sum %h expected %h", sum_p, hist_sum[LAT_P-1]));
        check(slot_p == hist_slot[LAT_P-1], "pipelined slot");
        check(sum_r == hist_sum[LAT_R-1], $sformatf("reference sum %h expected %h", sum_r, hist_sum[LAT_R-1]));
        check(slot_r == hist_slot[LAT_R-1], "reference slot");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
