// tb_oci_noc_top: end-to-end test of oci_noc_top at its default parameters (N = 8, M = 14
// ports, 8-bit flits, pipelined adders, 4-deep NI FIFOs).
//
// Serial router: every PE writes flits tagged {source port, sequence number} to random
// destinations and reads its receive FIFO at random moments. The bench keeps one queue per
// (source, destination) pair and checks that every flit arrives once, unchanged, in order,
// at the right port. It counts transmit FIFOs found full, receivers held back for lack of
// room, destination conflicts, transactions mixing both code kinds with idle orthogonal codes,
// and the T-OCI and orthogonal traffic; a mechanism never seen is a failure.
// Parallel crossbar: flits to random destinations with random rx_ready; each granted flit
// must come out at its destination 6 cycles (adder latency + 2) after its grant.
// A final phase with every port writing to a distinct port checks the delivery rates:
// M flits every N cycles for the serial router, M flits every cycle for the parallel crossbar.
module tb_oci_noc_top;
  localparam int unsigned N = 8, A = 8, M = 2 * (N - 1), DW = $clog2(M);
  localparam int unsigned PLAT = (1 + $clog2(N)) + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [M-1:0] t_pe_tx_valid, t_pe_tx_ready, t_pe_rx_valid, t_pe_rx_pop;
  logic [M-1:0][DW-1:0] t_pe_tx_dest;
  logic [M-1:0][A-1:0] t_pe_tx_data, t_pe_rx_data;
  logic [M-1:0] p_tx_req, p_tx_start, p_rx_ready, p_rx_valid;
  logic [M-1:0][DW-1:0] p_tx_dest;
  logic [M-1:0][A-1:0] p_tx_data, p_rx_data;

  oci_noc_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_txfull = 0, n_rxhold = 0, n_conflict = 0, n_mixed = 0, n_tdma = 0, n_orth = 0;
  int n_tdeliv = 0, n_pdeliv = 0;

  logic [A-1:0] tq [M][M][$];       // serial router: expected flits per (source, destination)
  typedef struct { int due; logic [A-1:0] data; } pexp_t;
  pexp_t pq [M][$];                 // parallel crossbar: expected flits per destination
  logic [3:0] seq [M];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  int t_load = 50, t_pop = 60;
  bit perm = 0;
  int perm_shift = 3;
  int win_start = -1, win_t = 0, win_p = 0;

  always @(posedge clk) if (rst_n) begin
    pexp_t e;
    logic [M-1:0] want;
    int src;
    cycle++;
    // serial router, PE side
    for (int p = 0; p < M; p++) begin
      if (t_pe_tx_valid[p] && !t_pe_tx_ready[p]) n_txfull++;
      if (t_pe_tx_valid[p] && t_pe_tx_ready[p]) begin
        tq[p][t_pe_tx_dest[p]].push_back(t_pe_tx_data[p]);
        seq[p] = seq[p] + 1'b1;
      end
      if (t_pe_rx_valid[p] && t_pe_rx_pop[p]) begin
        src = int'(t_pe_rx_data[p][7:4]);
        n_tdeliv++;
        if (win_start >= 0) win_t++;
        if (src >= M || tq[src][p].size() == 0)
          check(0, $sformatf("port %0d got unexpected flit %h", p, t_pe_rx_data[p]));
        else check(tq[src][p].pop_front() == t_pe_rx_data[p],
                   $sformatf("port %0d flit %h out of order", p, t_pe_rx_data[p]));
      end
    end
    // serial router, inside: mechanisms at transaction boundaries
    if (dut.u_toci.u_xbar.last) begin
      want = '0;
      for (int i = 0; i < M; i++) if (dut.u_toci.u_xbar.tx_req[i]) begin
        int d;
        d = int'(dut.u_toci.u_xbar.tx_dest[i]);
        if (!dut.u_toci.rx_ready[d]) n_rxhold++;
        else if (want[d]) n_conflict++;
        want[d] = 1'b1;
      end
    end
    if (dut.u_toci.u_xbar.last && dut.u_toci.u_xbar.u_ctrl.orth_mix != '0 &&
        dut.u_toci.u_xbar.u_ctrl.rx_active[M-1:N-1] != '0) n_mixed++;
    for (int i = 0; i < M; i++) if (dut.u_toci.u_xbar.tx_start[i]) begin
      if (int'(dut.u_toci.u_xbar.tx_dest[i]) < N - 1) n_orth++; else n_tdma++;
    end
    // parallel crossbar
    for (int i = 0; i < M; i++) if (p_tx_start[i]) begin
      e.due = cycle + PLAT; e.data = p_tx_data[i];
      pq[p_tx_dest[i]].push_back(e);
    end
    for (int r = 0; r < M; r++) begin
      if (p_rx_valid[r]) begin
        n_pdeliv++;
        if (win_start >= 0) win_p++;
        if (pq[r].size() == 0) check(0, $sformatf("P-OCI port %0d unexpected flit", r));
        else begin
          e = pq[r].pop_front();
          check(p_rx_data[r] == e.data && cycle == e.due,
                $sformatf("P-OCI port %0d got %h @%0d, expected %h @%0d", r, p_rx_data[r], cycle, e.data, e.due));
        end
      end
      if (pq[r].size() != 0 && pq[r][0].due < cycle) begin
        check(0, $sformatf("P-OCI port %0d flit missing", r));
        void'(pq[r].pop_front());
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int p = 0; p < M; p++) begin
      if (!t_pe_tx_valid[p] || t_pe_tx_ready[p]) begin
        t_pe_tx_valid[p] = $urandom_range(99) < t_load;
        t_pe_tx_dest[p]  = perm ? DW'((p + perm_shift) % M) : DW'($urandom_range(M - 1));
        t_pe_tx_data[p]  = {4'(p), seq[p]};
      end
      t_pe_rx_pop[p] = $urandom_range(99) < t_pop;
      if (p_tx_start[p] || !p_tx_req[p] || perm) begin
        p_tx_req[p]  = perm || $urandom_range(99) < 50;
        p_tx_dest[p] = perm ? DW'((p + perm_shift) % M) : DW'($urandom_range(M - 1));
        p_tx_data[p] = A'($urandom);
      end
      p_rx_ready[p] = perm || $urandom_range(99) < 80;
    end
  end

  initial begin
    t_pe_tx_valid = '0; t_pe_tx_dest = '0; t_pe_tx_data = '0; t_pe_rx_pop = '0;
    p_tx_req = '0; p_tx_dest = '0; p_tx_data = '0; p_rx_ready = '0;
    for (int p = 0; p < M; p++) seq[p] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (800) @(posedge clk);
    t_load = 100; t_pop = 20;          // congestion: FIFOs fill, receivers fall behind
    repeat (800) @(posedge clk);
    t_load = 0; t_pop = 100;           // drain
    repeat (400) @(posedge clk);
    perm = 1; t_load = 100;            // full rate, every port to a distinct port
    repeat (100) @(posedge clk);
    win_start = cycle; win_t = 0; win_p = 0;
    repeat (40 * N) @(posedge clk);
    check(win_t == 40 * M, $sformatf("serial router delivered %0d flits in %0d cycles, expected %0d",
                                     win_t, 40 * N, 40 * M));
    check(win_p == 40 * N * M, $sformatf("parallel crossbar delivered %0d flits in %0d cycles, expected %0d",
                                         win_p, 40 * N, 40 * N * M));
    win_start = -1;
    perm = 0; t_load = 0;
    repeat (300) @(posedge clk);
    for (int s = 0; s < M; s++) for (int d = 0; d < M; d++)
      check(tq[s][d].size() == 0, $sformatf("flits from %0d to %0d never arrived", s, d));
    $display("mechanisms: tx_fifo_full=%0d rx_held=%0d conflict=%0d mixed_codes=%0d tdma=%0d orth=%0d delivered serial=%0d parallel=%0d",
             n_txfull, n_rxhold, n_conflict, n_mixed, n_tdma, n_orth, n_tdeliv, n_pdeliv);
    check(n_txfull > 0, "transmit FIFO never full");
    check(n_rxhold > 0, "no receiver ever held back");
    check(n_conflict > 0, "no destination conflict");
    check(n_mixed > 0, "no transaction with idle orthogonal codes and T-OCI traffic");
    check(n_tdma > 0 && n_orth > 0, "not both code kinds used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
