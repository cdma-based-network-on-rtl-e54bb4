// tb_oci_chip_counter: the chip counter must count 0..N-1 and wrap, flag slot N-1, hold while
// disabled and return to 0 on reset. N = 8.
module tb_oci_chip_counter;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, en = 0, last;
  logic [2:0] chip_idx;
  always #5 clk = ~clk;

  oci_chip_counter #(.N(N)) dut (.*);

  int checks = 0, failures = 0, model = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    check(chip_idx == 0, "not 0 after reset");
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      en = ($urandom_range(3) != 0);
      @(posedge clk);
      if (en) model = (model + 1) % N;
      @(negedge clk);
      check(chip_idx == 3'(model), $sformatf("count %0d expected %0d", chip_idx, model));
      check(last == (model == N - 1), "last flag wrong");
    end
    rst_n = 0; @(negedge clk);
    check(chip_idx == 0, "reset does not clear");
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
