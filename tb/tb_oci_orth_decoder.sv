// tb_oci_orth_decoder: the seven serial orthogonal decoders of an N = 8 crossbar, fed with
// channel sums built here from random traffic: a random set of orthogonal codes carrying
// random flits (data XOR Walsh chip), plus a random set of T-OCI codes (data in their own
// slot), which act as interference. Each decoder of an active code must return its flit one
// cycle after slot N-1, with `done` high in that cycle only. The first transaction is the
// worked example of the design: orthogonal codes 1, 2, 3 carrying 0, T-OCI codes 1 and 2
// carrying 1, whose channel sums are 0 3 3 2 0 2 2 2.
module tb_oci_orth_decoder;
  localparam int unsigned N = 8, A = 8, CW = 3, SW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [A-1:0][SW-1:0] sum;
  logic [CW-1:0] slot;
  logic [N-2:0][A-1:0] data;
  logic [N-2:0] done;

  for (genvar k = 1; k < N; k++) begin : g_dec
    oci_orth_decoder #(.N(N), .A(A), .CODE_IDX(k)) dut (
      .clk, .rst_n, .sum, .slot, .data(data[k-1]), .done(done[k-1]));
  end

  int checks = 0, failures = 0;
  logic [N-1:1] o_act, t_act;
  logic [A-1:0] o_dat [N], t_dat [N];
  logic [A-1:0][SW-1:0] chan [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic logic walsh(int k, int j);
    return ($countones(k & j) % 2) == 1;
  endfunction

  task automatic build_channel();
    for (int j = 0; j < N; j++)
      for (int b = 0; b < A; b++) begin
        int s;
        s = 0;
        for (int k = 1; k < N; k++) begin
          if (o_act[k]) s += int'(o_dat[k][b] ^ walsh(k, j));
          if (t_act[k] && j == k) s += int'(t_dat[k][b]);
        end
        chan[j][b] = SW'(s);
      end
  endtask

  task automatic run_transaction(input bit show);
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      sum = chan[j]; slot = CW'(j);
      if (show) check(sum[0] == SW'(j == 0 || j == 4 ? 0 : (j == 1 || j == 2) ? 3 : 2),
                      $sformatf("example sum slot %0d = %0d", j, sum[0]));
      @(posedge clk); #1;
      check(done == ((j == N - 1) ? '1 : '0), "done at the wrong time");
    end
    @(negedge clk);
    check(done == '1, "done missing after slot N-1");
    for (int k = 1; k < N; k++)
      if (o_act[k]) check(data[k-1] == o_dat[k],
                          $sformatf("code %0d decoded %h expected %h", k, data[k-1], o_dat[k]));
  endtask

  initial begin
    sum = '0; slot = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // worked example
    o_act = 7'b0000111; t_act = 7'b0000011;
    for (int k = 1; k < N; k++) begin o_dat[k] = '0; t_dat[k] = '1; end
    build_channel();
    run_transaction(1);
    // random traffic, half the time with every orthogonal code in use
    for (int n = 0; n < 400; n++) begin
      o_act = ($urandom_range(1)) ? '1 : (N-1)'($urandom);
      t_act = (n % 10 == 0) ? '1 : (N-1)'($urandom);
      for (int k = 1; k < N; k++) begin o_dat[k] = A'($urandom); t_dat[k] = A'($urandom); end
      build_channel();
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
