// tb_poci_crossbar: random-traffic test of the parallel P-OCI crossbar with 8-bit flits.
// Parameters: N (default 8, so M = 14 ports) and PIPE (1 = pipelined adder, 0 = reference);
// tb_poci_crossbar_ref and tb_poci_crossbar_n16 run it with the reference adder and with N = 16.
//
// Every transmitter offers a random flit to a random destination and keeps it until granted.
// The bench predicts the grants itself (lowest port number wins each ready destination, only
// in every cycle), checks tx_start against that prediction, and
// expects each granted flit at its destination exactly adder latency + 2 cycles later.
// Grants may come in every cycle; with every port sending to a distinct receiver the bench
// checks that all M ports deliver a flit in every cycle (N times the serial crossbar). It counts the situations the
// crossbar must handle: destination conflicts, blocked receivers, T-OCI and orthogonal
// traffic, transactions with only some orthogonal codes in use, and fully loaded transactions.
module tb_poci_crossbar #(
  parameter int unsigned N = 8,
  parameter bit PIPE = 1'b1
);
  localparam int unsigned A = 8, M = 2 * (N - 1), DW = $clog2(M), CW = $clog2(N);
  localparam int unsigned LAT = PIPE ? 1 + $clog2(N) : 2;
  localparam int unsigned XLAT = LAT + 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [M-1:0] tx_req, tx_start, rx_ready, rx_valid;
  logic [M-1:0][DW-1:0] tx_dest;
  logic [M-1:0][A-1:0] tx_data, rx_data;

  poci_crossbar #(.N(N), .A(A), .PIPELINED(PIPE)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_conflict = 0, n_blocked = 0, n_tdma = 0, n_orth = 0, n_partial = 0, n_full = 0;
  int n_fullrate = 0;
  bit perm_steady = 0;
  bit perm_enter = 0;    // withdraw all waiting flits once, so the permutation starts clean

  typedef struct { int due; logic [A-1:0] data; } exp_t;
  exp_t expq [M][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  task automatic new_flit(input int i, input int load_pct);
    tx_req[i]  = ($urandom_range(99) < load_pct);
    tx_dest[i] = perm_mode ? DW'((i + perm_shift) % M) : DW'($urandom_range(M - 1));
    tx_data[i] = A'($urandom);
  endtask

  int load_pct = 60;
  bit perm_mode = 0;     // every transmitter to a distinct receiver, all receivers ready
  int perm_shift = 0;

  // prediction and checking at every rising edge (inputs change only at falling edges)
  always @(posedge clk) if (rst_n) begin
    logic [M-1:0] exp_grant, taken;
    int n_orth_used, n_req;
    exp_t e;
    cycle++;
    exp_grant = '0; taken = '0; n_orth_used = 0; n_req = 0;
    begin
      for (int i = 0; i < M; i++) if (tx_req[i]) begin
        n_req++;
        if (!rx_ready[tx_dest[i]] && !taken[tx_dest[i]]) n_blocked++;
        if (rx_ready[tx_dest[i]] && taken[tx_dest[i]]) n_conflict++;
        if (rx_ready[tx_dest[i]] && !taken[tx_dest[i]]) begin
          exp_grant[i] = 1'b1;
          taken[tx_dest[i]] = 1'b1;
          if (tx_dest[i] < N - 1) begin n_orth++; n_orth_used++; end else n_tdma++;
        end
      end
      if (n_orth_used > 0 && n_orth_used < N - 1 && taken[M-1:N-1] != '0) n_partial++;
      if (taken == '1) n_full++;
    end
    check(tx_start == exp_grant, $sformatf("tx_start %h expected %h", tx_start, exp_grant));
    if (perm_steady) begin
      check(rx_valid == '1, $sformatf("not every port delivered in a fully loaded cycle: %h req %h start %h", rx_valid, tx_req, tx_start));
      n_fullrate++;
    end
    for (int i = 0; i < M; i++) if (tx_start[i]) begin
      e.due = cycle + XLAT; e.data = tx_data[i];
      expq[tx_dest[i]].push_back(e);
    end
    for (int r = 0; r < M; r++) if (rx_valid[r]) begin
      if (expq[r].size() == 0) check(0, $sformatf("unexpected flit at port %0d", r));
      else begin
        e = expq[r].pop_front();
        check(rx_data[r] == e.data, $sformatf("port %0d data %h expected %h", r, rx_data[r], e.data));
        check(cycle == e.due, $sformatf("port %0d arrival %0d expected %0d", r, cycle, e.due));
      end
    end
    for (int r = 0; r < M; r++)
      if (expq[r].size() != 0 && expq[r][0].due < cycle) begin
        check(0, $sformatf("port %0d flit missing", r));
        void'(expq[r].pop_front());
      end
  end

  // new stimulus at falling edges
  always @(negedge clk) if (rst_n) begin
    for (int i = 0; i < M; i++) if (tx_start[i] || !tx_req[i] || perm_enter) new_flit(i, load_pct);
    perm_enter = 0;
    for (int r = 0; r < M; r++) rx_ready[r] = perm_mode || ($urandom_range(99) < 85);
    if (!perm_mode) perm_shift = $urandom_range(M - 1);
  end

  initial begin
    tx_req = '0; tx_dest = '0; tx_data = '0; rx_ready = '1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (600) @(posedge clk);
    load_pct = 100;                 // saturate: every transmitter always has a flit
    repeat (600) @(posedge clk);
    perm_mode = 1;
    perm_enter = 1;
    repeat (2 * XLAT) @(posedge clk);
    perm_steady = 1;
    repeat (400) @(posedge clk);
    perm_steady = 0;
    perm_mode = 0;
    load_pct = 20;
    repeat (400) @(posedge clk);
    load_pct = 0;
    while (tx_req != '0) @(posedge clk);
    repeat (2 * XLAT) @(posedge clk);
    for (int r = 0; r < M; r++) check(expq[r].size() == 0, "flits left undelivered");
    $display("mechanisms: conflict=%0d blocked=%0d tdma=%0d orth=%0d partial_orth=%0d full=%0d",
             n_conflict, n_blocked, n_tdma, n_orth, n_partial, n_full);
    check(n_conflict > 0, "no destination conflict seen");
    check(n_blocked > 0, "no blocked receiver seen");
    check(n_tdma > 0 && n_orth > 0, "not both code kinds used");
    check(n_partial > 0, "no transaction with idle orthogonal codes");
    check(n_full > 0, "no fully loaded transaction");
    check(n_fullrate > 0, "full-rate phase not reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
