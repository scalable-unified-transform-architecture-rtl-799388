// tb_uta_kernel_1x4: the transform kernel in the 1x4 setup (1 PE row),
// checked by the shared harness tb_uta_kernel_run (every transform type against
// reference transforms, latency, block rate, input starvation, global enable).
// The harness prints the result line and stops; this level only adds a second
// watchdog.
module tb_uta_kernel_1x4;
  tb_uta_kernel_run #(.ROWS(1)) u_run ();

  initial begin
    #2000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", u_run.checks, u_run.failures + 1);
    $finish;
  end
endmodule
