// tb_toci_router: the serial T-OCI router (N = 8, M = 14, 8-bit flits, 4-deep NI FIFOs)
// seen from its processing elements. Every PE writes flits tagged {source port, sequence
// number} to random destinations and reads its receive FIFO at random moments; the bench
// keeps one queue per (source, destination) pair and checks that each flit arrives once,
// unchanged, in order and at the right port. Phases of light load, overload with slow
// readers (full transmit FIFOs, receivers without room) and a permutation at full load,
// where the router must deliver M flits every N cycles, are run in turn.
module tb_toci_router;
  localparam int unsigned N = 8, A = 8, M = 2 * (N - 1), DW = $clog2(M);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [M-1:0] pe_tx_valid, pe_tx_ready, pe_rx_valid, pe_rx_pop;
  logic [M-1:0][DW-1:0] pe_tx_dest;
  logic [M-1:0][A-1:0] pe_tx_data, pe_rx_data;

  toci_router #(.N(N), .A(A)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_txfull = 0, n_rxhold = 0, n_deliv = 0;
  logic [A-1:0] tq [M][M][$];
  logic [3:0] seq [M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  int t_load = 50, t_pop = 60;
  bit perm = 0;
  int win_start = -1, win_cnt = 0;

  always @(posedge clk) if (rst_n) begin
    int src;
    cycle++;
    for (int p = 0; p < M; p++) begin
      if (pe_tx_valid[p] && !pe_tx_ready[p]) n_txfull++;
      if (dut.u_xbar.last && dut.u_xbar.tx_req[p] && !dut.rx_ready[dut.tx_dest[p]]) n_rxhold++;
      if (pe_tx_valid[p] && pe_tx_ready[p]) begin
        tq[p][pe_tx_dest[p]].push_back(pe_tx_data[p]);
        seq[p] = seq[p] + 1'b1;
      end
      if (pe_rx_valid[p] && pe_rx_pop[p]) begin
        src = int'(pe_rx_data[p][7:4]);
        n_deliv++;
        if (win_start >= 0) win_cnt++;
        if (src >= M || tq[src][p].size() == 0)
          check(0, $sformatf("port %0d got unexpected flit %h", p, pe_rx_data[p]));
        else check(tq[src][p].pop_front() == pe_rx_data[p],
                   $sformatf("port %0d flit %h out of order", p, pe_rx_data[p]));
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < M; p++) begin
      if (!pe_tx_valid[p] || pe_tx_ready[p]) begin
        pe_tx_valid[p] = $urandom_range(99) < t_load;
        pe_tx_dest[p]  = perm ? DW'((p + 5) % M) : DW'($urandom_range(M - 1));
        pe_tx_data[p]  = {4'(p), seq[p]};
      end
      pe_rx_pop[p] = $urandom_range(99) < t_pop;
    end
  end

  initial begin
    pe_tx_valid = '0; pe_tx_dest = '0; pe_tx_data = '0; pe_rx_pop = '0;
    for (int p = 0; p < M; p++) seq[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (600) @(posedge clk);
    t_load = 100; t_pop = 15;
    repeat (600) @(posedge clk);
    t_load = 0; t_pop = 100;
    repeat (300) @(posedge clk);
    perm = 1; t_load = 100;
    repeat (100) @(posedge clk);
    win_start = cycle; win_cnt = 0;
    repeat (30 * N) @(posedge clk);
    check(win_cnt == 30 * M, $sformatf("%0d flits in %0d cycles, expected %0d", win_cnt, 30 * N, 30 * M));
    win_start = -1; perm = 0; t_load = 0;
    repeat (300) @(posedge clk);
    for (int s = 0; s < M; s++) for (int d = 0; d < M; d++)
      check(tq[s][d].size() == 0, $sformatf("flits from %0d to %0d never arrived", s, d));
    $display("mechanisms: tx_fifo_full=%0d rx_held=%0d delivered=%0d", n_txfull, n_rxhold, n_deliv);
    check(n_txfull > 0, "transmit FIFO never full");
    check(n_rxhold > 0, "no receiver ever held back");
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
