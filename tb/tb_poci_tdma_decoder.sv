// tb_poci_tdma_decoder: the seven parallel orthogonal decoders and the seven parallel T-OCI
// decoders of an N = 8 crossbar, given all N channel sums of a transaction at once. The sums
// are built here from random traffic (random sets of active orthogonal and T-OCI codes with
// random flits). Every decoder of an active code must return its flit one cycle later.
// The first transaction is the worked example (sums 0 3 3 2 0 2 2 2).
module tb_poci_tdma_decoder;
  localparam int unsigned N = 8, A = 8, CW = 3, SW = 4;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [N-1:0][A-1:0][SW-1:0] sum;
  logic [N-1:0][A-1:0] sum_lsb;
  logic [CW-1:0] orth_mix;
  logic [N-2:0][A-1:0] odata, tdata;

  always_comb for (int j = 0; j < N; j++) for (int b = 0; b < A; b++) sum_lsb[j][b] = sum[j][b][0];

  for (genvar k = 1; k < N; k++) begin : g_dec
    poci_orth_decoder #(.N(N), .A(A), .CODE_IDX(k)) dut_o (.clk, .sum, .data(odata[k-1]));
    poci_tdma_decoder #(.N(N), .A(A), .SLOT(k)) dut_t (.clk, .sum_lsb, .orth_mix, .data(tdata[k-1]));
  end

  int checks = 0, failures = 0;
  logic [N-1:1] o_act, t_act;
  logic [A-1:0] o_dat [N], t_dat [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic walsh(int k, int j);
    return ($countones(k & j) % 2) == 1;
  endfunction

  task automatic run_transaction(input bit show);
    @(negedge clk);
    orth_mix = '0;
    for (int k = 1; k < N; k++) if (o_act[k]) orth_mix ^= CW'(k);
    for (int j = 0; j < N; j++)
      for (int b = 0; b < A; b++) begin
        int s;
        s = 0;
        for (int k = 1; k < N; k++) begin
          if (o_act[k]) s += int'(o_dat[k][b] ^ walsh(k, j));
          if (t_act[k] && j == k) s += int'(t_dat[k][b]);
        end
        sum[j][b] = SW'(s);
      end
    if (show)
      for (int j = 0; j < N; j++)
        check(sum[j][0] == SW'(j == 0 || j == 4 ? 0 : (j == 1 || j == 2) ? 3 : 2), "example sum");
    @(posedge clk); #1;
    for (int k = 1; k < N; k++) begin
      if (o_act[k]) check(odata[k-1] == o_dat[k],
                          $sformatf("code %0d decoded %h expected %h", k, odata[k-1], o_dat[k]));
      if (t_act[k]) check(tdata[k-1] == t_dat[k],
                          $sformatf("slot %0d decoded %h expected %h", k, tdata[k-1], t_dat[k]));
    end
  endtask

  initial begin
    o_act = 7'b0000111; t_act = 7'b0000011;
    for (int k = 1; k < N; k++) begin o_dat[k] = '0; t_dat[k] = '1; end
    run_transaction(1);
    for (int n = 0; n < 1000; n++) begin
      o_act = ($urandom_range(1)) ? '1 : (N-1)'($urandom);
      t_act = (n % 10 == 0) ? '1 : (N-1)'($urandom);
      for (int k = 1; k < N; k++) begin o_dat[k] = A'($urandom); t_dat[k] = A'($urandom); end
      run_transaction(0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
