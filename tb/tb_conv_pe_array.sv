// tb_conv_pe_array: a 3 x 3 x 2 MAC array computes whole tiles of a 3x3
// convolution over two input maps with random pixels and weights. Results of
// both output maps are compared with a direct convolution; `res_valid` must
// come exactly two cycles after the last step is presented, and a tile
// whose steps are interrupted by idle cycles must give the same sums.
module tb_conv_pe_array;
  import cnn_pkg::*;
  localparam int PIX = 3, PIY = 3, POF = 2, K = 3, NIF = 2;
  localparam int PR = 8, PC = 9;

  logic clk = 1'b0, rst = 1'b1;
  logic step_en = 1'b0, first = 1'b0, last = 1'b0;
  logic [1:0] kx = '0, ky = '0;
  pixel_t bank_data [PIY][PIX];
  weight_t wt_word [POF];
  logic sel_o = 1'b0;
  logic res_valid;
  psum_t res_sel [PIY][PIX];

  int pad [NIF][PR + PIY][PC + PIX];
  int wts [POF][NIF][K][K];
  int checks = 0, failures = 0;
  int cyc = 0, last_cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  conv_pe_array #(.PIX(PIX), .PIY(PIY), .POF(POF), .K(K)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_tile(int ty0, int tx0, bit gaps);
    for (int i = 0; i < NIF; i++)
      for (int sky = 0; sky < K; sky++)
        for (int skx = 0; skx < K; skx++) begin
          int col0 = tx0 + ((skx != 0) ? PIX : 0);
          @(negedge clk);
          while (gaps && $urandom_range(2) == 0) begin
            step_en = 1'b0;
            @(negedge clk);
          end
          step_en = 1'b1;
          kx = 2'(skx);
          ky = 2'(sky);
          first = (i == 0 && sky == 0 && skx == 0);
          last  = (i == NIF - 1 && sky == K - 1 && skx == K - 1);
          for (int b = 0; b < PIY; b++) begin
            int row = (sky == 0) ? ty0 + b : ((b == sky - 1) ? ty0 + PIY - 1 + sky : 0);
            for (int s = 0; s < PIX; s++) bank_data[b][s] = pixel_t'(pad[i][row][col0 + s]);
          end
          for (int o = 0; o < POF; o++) wt_word[o] = weight_t'(wts[o][i][sky][skx]);
          if (last) last_cyc = cyc;
        end
    @(negedge clk);
    step_en = 1'b0;
    last = 1'b0;
    while (!res_valid) @(negedge clk);
    checks++;
    if (cyc - last_cyc != 2) begin
      failures++;
      $display("res_valid %0d cycles after the last step, expected 2", cyc - last_cyc);
    end
    for (int o = 0; o < POF; o++) begin
      sel_o = 1'(o);
      #1;
      for (int y = 0; y < PIY; y++)
        for (int x = 0; x < PIX; x++) begin
          longint s = 0;
          for (int i = 0; i < NIF; i++)
            for (int a = 0; a < K; a++)
              for (int b = 0; b < K; b++)
                s += longint'(pad[i][ty0 + y + a][tx0 + x + b]) * wts[o][i][a][b];
          checks++;
          if (res_sel[y][x] != psum_t'(s)) begin
            failures++;
            $display("map %0d out(%0d,%0d): got %0d expected %0d", o, y, x, res_sel[y][x], psum_t'(s));
          end
        end
    end
  endtask

  initial begin
    for (int b = 0; b < PIY; b++)
      for (int s = 0; s < PIX; s++) bank_data[b][s] = '0;
    for (int o = 0; o < POF; o++) wt_word[o] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < NIF; i++)
        for (int r = 0; r < PR + PIY; r++)
          for (int c = 0; c < PC + PIX; c++) pad[i][r][c] = int'($urandom_range(4000)) - 2000;
      for (int o = 0; o < POF; o++)
        for (int i = 0; i < NIF; i++)
          for (int a = 0; a < K; a++)
            for (int b = 0; b < K; b++) wts[o][i][a][b] = int'($urandom_range(255)) - 128;
      run_tile(PIY * int'($urandom_range(1)), PIX * int'($urandom_range(1)), t % 2 == 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
