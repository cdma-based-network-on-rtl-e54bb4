// tb_oci_controller: random requests into the crossbar controller of an N = 8, M = 14
// crossbar. The bench predicts, per destination, the lowest-numbered requesting transmitter
// as winner when the receiver is ready, and checks tx_start (only with txn_load), the codes
// loaded for the next transaction (destination's code for winners, no code for the rest),
// rx_active and orth_mix (XOR of the orthogonal code numbers in use). It also checks that
// the assignment holds while txn_load is low.
module tb_oci_controller;
  import oci_pkg::*;
  localparam int unsigned N = 8, M = 14, DW = 4, CW = 3;

  logic clk = 0, rst_n = 0, txn_load;
  always #5 clk = ~clk;

  logic [M-1:0] tx_req, rx_ready, tx_start, rx_active;
  logic [M-1:0][DW-1:0] tx_dest;
  code_t [M-1:0] tx_code;
  logic [CW-1:0] orth_mix;

  oci_controller #(.N(N), .M(M)) dut (.*);

  int checks = 0, failures = 0, n_conflict = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    code_t [M-1:0] e_code, held_code;
    logic [M-1:0] e_grant, e_active;
    logic [CW-1:0] e_mix;
    txn_load = 0; tx_req = '0; tx_dest = '0; rx_ready = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      txn_load = $urandom_range(3) != 0;
      for (int i = 0; i < M; i++) begin
        tx_req[i] = $urandom_range(99) < 70;
        tx_dest[i] = DW'($urandom_range(M - 1));
        rx_ready[i] = $urandom_range(99) < 80;
      end
      e_grant = '0; e_active = '0; e_mix = '0; e_code = '0;
      for (int d = 0; d < M; d++) begin
        int w;
        w = -1;
        for (int i = M - 1; i >= 0; i--) if (tx_req[i] && int'(tx_dest[i]) == d) begin
          if (w >= 0) n_conflict++;
          w = i;
        end
        if (w >= 0 && rx_ready[d]) begin
          e_grant[w] = 1'b1;
          e_active[d] = 1'b1;
          if (d < N - 1) begin
            e_code[w] = '{kind: CODE_ORTH, idx: IDX_W'(d + 1)};
            e_mix ^= CW'(d + 1);
          end else e_code[w] = '{kind: CODE_TDMA, idx: IDX_W'(d - (N - 1) + 1)};
        end
      end
      held_code = tx_code;
      #1;
      check(tx_start == (txn_load ? e_grant : '0), $sformatf("tx_start %h expected %h", tx_start, e_grant));
      @(posedge clk); #1;
      if (txn_load) begin
        check(tx_code == e_code, "codes");
        check(rx_active == e_active, "rx_active");
        check(orth_mix == e_mix, "orth_mix");
      end else check(tx_code == held_code, "assignment changed without txn_load");
    end
    check(n_conflict > 0, "no conflict generated");
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
