// tb_oci_code_gen: spreading codes for N = 8 against the codes written out chip by chip
// (orthogonal Walsh codes 1..7 of the Sylvester Hadamard matrix, T-OCI codes with a single
// 1 in their slot), plus orthogonality and balance of every pair of Walsh codes.
module tb_oci_code_gen;
  import oci_pkg::*;
  localparam int unsigned N = 8;

  code_t      code;
  logic [2:0] chip_idx;
  logic       chip;

  oci_code_gen #(.N(N)) dut (.*);

  // Walsh codes 0..7, chip 0 leftmost (H8 with +1 -> 0, -1 -> 1)
  localparam logic [0:7] WALSH [8] = '{8'b00000000, 8'b01010101, 8'b00110011, 8'b01100110,
                                       8'b00001111, 8'b01011010, 8'b00111100, 8'b01101001};
  int checks = 0, failures = 0;
  logic [0:7] got [8];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int k = 1; k < N; k++) begin
      for (int j = 0; j < N; j++) begin
        code = '{kind: CODE_ORTH, idx: IDX_W'(k)}; chip_idx = 3'(j); #1;
        got[k][j] = chip;
        check(chip == WALSH[k][j], $sformatf("Walsh %0d chip %0d", k, j));
        code = '{kind: CODE_TDMA, idx: IDX_W'(k)}; #1;
        check(chip == (j == k), $sformatf("T-OCI %0d chip %0d", k, j));
        code = '{kind: CODE_NONE, idx: IDX_W'(k)}; #1;
        check(chip == 1'b0, "CODE_NONE not zero");
      end
    end
    // every pair of orthogonal codes agrees in exactly N/2 chips, each code is balanced
    for (int a = 1; a < N; a++) begin
      check($countones(got[a]) == N / 2, "unbalanced code");
      for (int b = a + 1; b < N; b++)
        check($countones(got[a] ^ got[b]) == N / 2, $sformatf("codes %0d and %0d not orthogonal", a, b));
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
