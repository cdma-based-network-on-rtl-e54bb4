// tb_poci_crossbar_ref: runs tb_poci_crossbar with the reference (non-pipelined) crossbar adder, N = 8.
module tb_poci_crossbar_ref;
  tb_poci_crossbar #(.PIPE(1'b0)) u_tb ();

  // backstop in case the inner bench's own watchdog never fires
  initial begin
    #5000000;
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
