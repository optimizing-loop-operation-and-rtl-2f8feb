// tb_psum_quantizer: random partial sums, shifts and ReLU settings compared
// with an integer reference (arithmetic shift, ReLU, 16-bit saturation).
module tb_psum_quantizer;
  import cnn_pkg::*;
  psum_t psum [2][2];
  logic [4:0] frac_shift;
  logic relu_en;
  pixel_t px [2][2];
  int checks = 0, failures = 0;
  int n_sat = 0, n_relu = 0;

  psum_quantizer #(.PIX(2), .PIY(2)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      frac_shift = 5'($urandom_range(t % 3 == 0 ? 20 : 4));
      relu_en = $urandom_range(1);
      for (int y = 0; y < 2; y++)
        for (int x = 0; x < 2; x++) psum[y][x] = psum_t'($urandom);
      #1;
      for (int y = 0; y < 2; y++)
        for (int x = 0; x < 2; x++) begin
          automatic int s = int'(psum[y][x]) / (1 << frac_shift);
          // integer division rounds toward zero; arithmetic shift rounds down
          if (int'(psum[y][x]) < 0 && (int'(psum[y][x]) % (1 << frac_shift)) != 0) s -= 1;
          if (relu_en && s < 0) begin s = 0; n_relu++; end
          else if (s > 32767) begin s = 32767; n_sat++; end
          else if (s < -32768) begin s = -32768; n_sat++; end
          checks++;
          if (int'(px[y][x]) != s) begin
            failures++;
            if (failures < 10) $display("psum %0d shift %0d relu %0d: got %0d expected %0d",
                                        psum[y][x], frac_shift, relu_en, px[y][x], s);
          end
        end
    end
    checks += 2;
    if (n_sat == 0) failures++;
    if (n_relu == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
