// tb_vgg_conv5: workload test of the accelerator at its default parameters
// (14 x 14 x 16 MACs, full-size buffers) on jobs cut from VGG-16 layers, the
// way the host would split a layer to fit the buffers:
//  * one group of 16 output maps of a conv5 layer: 512 input maps of 14 x 14
//    with zero padding, ReLU and 2x2 max pooling; the convolution phase must
//    take exactly 512 x 9 = 4608 cycles;
//  * the top stripe of conv1_1: 3 input maps 224 pixels wide, 29 input rows
//    (one halo row below, padding on the other three sides), 64 output maps,
//    ReLU and pooling; its 64 x 28 output rows fill the output buffer;
//  * two input maps and two groups of output maps, which makes the drain
//    stall happen, so every counted mechanism shows up.
// Every output pixel is compared with the reference convolution. The layer
// shapes are VGG-16's; the split into jobs, the data values and the result
// shifts are this test's own.
// The jobs and the reference model are in tb_accel_env; this module adds a
// watchdog of 1,500,000 clock cycles and prints the result line.
module tb_vgg_conv5;
  tb_accel_env #(.FULL(1'b1), .VGG(1'b1)) env ();

  // watchdog
  initial begin
    repeat (1500000) @(posedge env.clk);
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
