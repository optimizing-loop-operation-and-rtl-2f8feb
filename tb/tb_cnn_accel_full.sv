// tb_cnn_accel_full: end-to-end test of the accelerator with every parameter at
// its default (14 x 14 x 16 MACs, full-size buffers): two convolution jobs.
// The jobs and the reference model are in tb_accel_env; this module adds a
// watchdog of 400,000 clock cycles and prints the result line.
module tb_cnn_accel_full;
  tb_accel_env #(.FULL(1'b1)) env ();

  // watchdog
  initial begin
    repeat (400000) @(posedge env.clk);
    $display("watchdog expired: ctrl state %0d dma state %0d",
             env.g_dut.dut.u_ctrl.st, env.g_dut.dut.u_dma.st);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures + 1);
    $finish;
  end

  initial begin
    wait (env.finished);
    $display("TB_RESULT checks=%0d failures=%0d", env.checks, env.failures);
    $finish;
  end
endmodule
