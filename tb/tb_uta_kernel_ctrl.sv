// tb_uta_kernel_ctrl: self-checking test of the kernel control unit in the 4x4,
// 2x4 and 1x4 array setups (4, 2 and 1 PE rows), run side by side by the harness
// tb_uta_kernel_ctrl_run (see there for what is checked).
module tb_uta_kernel_ctrl;
  tb_uta_kernel_ctrl_run #(.ROWS(4)) u_r4 ();
  tb_uta_kernel_ctrl_run #(.ROWS(2)) u_r2 ();
  tb_uta_kernel_ctrl_run #(.ROWS(1)) u_r1 ();

  initial begin
    wait (u_r4.finished && u_r2.finished && u_r1.finished);
    $display("TB_RESULT checks=%0d failures=%0d", u_r4.checks + u_r2.checks + u_r1.checks,
             u_r4.failures + u_r2.failures + u_r1.failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", u_r4.checks + u_r2.checks + u_r1.checks,
             u_r4.failures + u_r2.failures + u_r1.failures + 1);
    $finish;
  end
endmodule
