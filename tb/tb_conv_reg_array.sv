// tb_conv_reg_array: register dataflow of a 3 x 3 array with a 3 x 3 kernel.
// The first tile uses the 6 x 6 example map with pixels 11..66 and one pixel
// of zero padding, so the register contents can be compared with the
// published step table (e.g. after step 3 row 1 holds 13 14 0 11 12); then
// random maps and tile positions follow. After every step each MAC tap must
// hold padded pixel (ty0 + y + ky, tx0 + x + kx). Bank words are produced as
// the banked input buffer would deliver them.
module tb_conv_reg_array;
  import cnn_pkg::*;
  localparam int PIX = 3, PIY = 3, K = 3, W = PIX + K - 1;
  localparam int PR = 8, PC = 9;   // padded map held by the test bench

  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [1:0] kx = '0, ky = '0;
  pixel_t bank_data [PIY][PIX];
  pixel_t taps [PIY][PIX];
  int pad [PR + PIY][PC + PIX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  conv_reg_array #(.PIX(PIX), .PIY(PIY), .K(K)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank words for a step: row y of the tile for ky = 0, the next row below
  // the tile (from bank ky-1) otherwise; word wc or wc+1
  task automatic set_banks(int ty0, int tx0, int sky, int skx);
    int col0 = tx0 + ((skx != 0) ? PIX : 0);
    for (int b = 0; b < PIY; b++) begin
      int row = (sky == 0) ? ty0 + b : ((b == sky - 1) ? ty0 + PIY - 1 + sky : 0);
      for (int s = 0; s < PIX; s++) bank_data[b][s] = pixel_t'(pad[row][col0 + s]);
    end
  endtask

  task automatic run_tile(int ty0, int tx0, bit fig);
    for (int sky = 0; sky < K; sky++)
      for (int skx = 0; skx < K; skx++) begin
        @(negedge clk);
        en = 1'b1;
        kx = 2'(skx);
        ky = 2'(sky);
        set_banks(ty0, tx0, sky, skx);
        @(posedge clk);
        #1;
        for (int y = 0; y < PIY; y++)
          for (int x = 0; x < PIX; x++) begin
            checks++;
            if (int'(taps[y][x]) != pad[ty0 + y + sky][tx0 + x + skx]) begin
              failures++;
              $display("step ky=%0d kx=%0d tap(%0d,%0d): got %0d expected %0d",
                       sky, skx, y, x, taps[y][x], pad[ty0 + y + sky][tx0 + x + skx]);
            end
          end
        // published table, row 1 after step 3 (ky=1, kx=0): R11..R15 = 13 14 0 11 12
        if (fig && sky == 1 && skx == 0) begin
          int exp_r1 [W] = '{13, 14, 0, 11, 12};
          for (int i = 0; i < W; i++) begin
            checks++;
            if (int'(dut.r[0][i]) != exp_r1[i]) begin
              failures++;
              $display("row 1 register %0d: got %0d expected %0d", i, dut.r[0][i], exp_r1[i]);
            end
          end
        end
      end
    @(negedge clk);
    en = 1'b0;
  endtask

  initial begin
    for (int b = 0; b < PIY; b++)
      for (int s = 0; s < PIX; s++) bank_data[b][s] = '0;
    for (int r = 0; r < PR + PIY; r++)
      for (int c = 0; c < PC + PIX; c++)
        pad[r][c] = (r >= 1 && r <= 6 && c >= 1 && c <= 6) ? 10 * r + c : 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_tile(0, 0, 1'b1);
    for (int t = 0; t < 50; t++) begin
      for (int r = 0; r < PR + PIY; r++)
        for (int c = 0; c < PC + PIX; c++) pad[r][c] = int'($urandom_range(60000)) - 30000;
      run_tile(PIY * int'($urandom_range(1)), PIX * int'($urandom_range(1)), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
