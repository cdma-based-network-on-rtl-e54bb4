// tb_toci_crossbar_n16: runs tb_toci_crossbar with code length N = 16 (M = 30 ports), pipelined adder.
module tb_toci_crossbar_n16;
  tb_toci_crossbar #(.N(16)) u_tb ();

  // backstop in case the inner bench's own watchdog never fires
  initial begin
    #5000000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
