// tb_oci_hybrid_encoder: random flits, codes and slots; each output chip must be
// data XOR Walsh chip (orthogonal), data AND (slot == index) (T-OCI) or 0 (no code).
// The Walsh chip is computed here as the parity of index AND slot. N = 8, A = 8.
module tb_oci_hybrid_encoder;
  import oci_pkg::*;
  localparam int unsigned N = 8, A = 8;

  code_t        code;
  logic [2:0]   chip_idx;
  logic [A-1:0] data, chips, expect_chips;

  oci_hybrid_encoder #(.N(N), .A(A)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int k, kind;
      logic w;
      k = $urandom_range(1, N - 1);
      kind = $urandom_range(2);
      code = '{kind: code_kind_e'(kind), idx: IDX_W'(k)};
      chip_idx = 3'($urandom_range(N - 1));
      data = A'($urandom);
      #1;
      w = (($countones(k & int'(chip_idx))) % 2) == 1;
      case (kind)
        1: expect_chips = data ^ {A{w}};
        2: expect_chips = (int'(chip_idx) == k) ? data : '0;
        default: expect_chips = '0;
      endcase
      checks++;
      if (chips !== expect_chips) begin
        failures++;
        if (failures < 10) $display("FAIL: kind %0d idx %0d slot %0d data %h -> %h expected %h",
                                    kind, k, chip_idx, data, chips, expect_chips);
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
