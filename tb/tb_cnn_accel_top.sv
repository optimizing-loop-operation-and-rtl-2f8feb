// tb_cnn_accel_top: end-to-end test of the accelerator at a reduced array size
// (4 x 4 x 8 MACs, small buffers) over four jobs covering padding, no padding,
// several input maps, ReLU, saturation, pooling and drain stalls.
// The jobs and the reference model are in tb_accel_env; this module adds a
// watchdog of 200,000 clock cycles and prints the result line.
module tb_cnn_accel_top;
  tb_accel_env #(.FULL(1'b0)) env ();

  // watchdog
  initial begin
    repeat (200000) @(posedge env.clk);
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
