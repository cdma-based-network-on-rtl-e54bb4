// tb_oci_fifo: random writes and reads on a 4-deep, 12-bit FIFO against a queue model:
// read data, empty, full and free are compared every cycle; writes are only issued when not
// full (or together with a read) and reads only when not empty.
module tb_oci_fifo;
  localparam int unsigned W = 12, DEPTH = 4;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [2:0] free;
  always #5 clk = ~clk;

  oci_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int bias;
      @(negedge clk);
      bias = (n / 300) % 2 ? 75 : 35;
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == DEPTH), "full");
      check(int'(free) == DEPTH - model.size(), "free");
      if (model.size() != 0) check(rd_data == model[0], $sformatf("data %h expected %h", rd_data, model[0]));
      if (full) n_full++;
      rd_en = !empty && $urandom_range(99) >= bias;
      wr_en = (!full || rd_en) && $urandom_range(99) < bias;
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(n_full > 0, "never full");
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
