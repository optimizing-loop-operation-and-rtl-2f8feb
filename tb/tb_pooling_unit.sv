// tb_pooling_unit: random output maps are written into an output pixel buffer
// (4 banks, 4 pixels per word), the pooling unit runs, and every pooled pixel
// read back must equal the maximum of its 2x2 window of the original maps.
// The run must take 3 cycles per pooled word.
module tb_pooling_unit;
  import cnn_pkg::*;
  localparam int PIX = 4, PIY = 4, DEPTH = 256;
  localparam int NOF = 3, NOY = 12, NOX = 10;
  localparam int ORPB = (NOY + PIY - 1) / PIY, OWPR = (NOX + PIX - 1) / PIX;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic busy, done;
  logic [7:0] rd_addr [PIY], p_rd_addr [PIY], p_wr_addr [PIY], wr_addr [PIY];
  pixel_t rd_data [PIY][PIX];
  logic p_wr_en [PIY], wr_en [PIY];
  pixel_t p_wr_data [PIY][PIX], wr_data [PIY][PIX];
  logic [7:0] t_addr [PIY];
  logic t_wr [PIY];
  pixel_t t_data [PIY][PIX];
  int img [NOF][ORPB * PIY][OWPR * PIX];
  int checks = 0, failures = 0, cycles = 0;

  always #5 clk = ~clk;

  pooling_unit #(.PIX(PIX), .PIY(PIY), .DEPTH(DEPTH)) dut (
    .clk, .rst, .start,
    .nof(cnt_t'(NOF)), .noy(cnt_t'(NOY)), .owpr(cnt_t'(OWPR)), .orpb(cnt_t'(ORPB)),
    .busy, .done,
    .rd_addr(p_rd_addr), .rd_data, .wr_en(p_wr_en), .wr_addr(p_wr_addr), .wr_data(p_wr_data)
  );
  output_pixel_buffer #(.PIX(PIX), .PIY(PIY), .DEPTH(DEPTH)) u_buf (
    .clk, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_data
  );

  always_comb begin
    for (int b = 0; b < PIY; b++) begin
      wr_en[b]   = busy ? p_wr_en[b]   : t_wr[b];
      wr_addr[b] = busy ? p_wr_addr[b] : t_addr[b];
      wr_data[b] = busy ? p_wr_data[b] : t_data[b];
      rd_addr[b] = busy ? p_rd_addr[b] : t_addr[b];
    end
  end

  always @(posedge clk) if (busy) cycles++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < PIY; b++) begin
      t_wr[b] = 1'b0; t_addr[b] = '0;
      for (int s = 0; s < PIX; s++) t_data[b][s] = '0;
    end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int o = 0; o < NOF; o++)
      for (int r = 0; r < ORPB * PIY; r++)
        for (int w = 0; w < OWPR; w++) begin
          @(negedge clk);
          for (int b = 0; b < PIY; b++) t_wr[b] = (b == r % PIY);
          for (int b = 0; b < PIY; b++) t_addr[b] = 8'((o * ORPB + r / PIY) * OWPR + w);
          for (int s = 0; s < PIX; s++) begin
            img[o][r][w * PIX + s] = int'($urandom_range(60000)) - 30000;
            t_data[r % PIY][s] = pixel_t'(img[o][r][w * PIX + s]);
          end
        end
    @(negedge clk);
    for (int b = 0; b < PIY; b++) t_wr[b] = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    checks++;
    if (cycles != 3 * NOF * (NOY / 2) * ((OWPR + 1) / 2)) begin
      failures++;
      $display("pooling took %0d cycles, expected %0d", cycles, 3 * NOF * (NOY / 2) * ((OWPR + 1) / 2));
    end
    for (int o = 0; o < NOF; o++)
      for (int r = 0; r < NOY / 2; r++)
        for (int c = 0; c < NOX / 2; c++) begin
          automatic int m = img[o][2*r][2*c];
          if (img[o][2*r][2*c+1] > m)   m = img[o][2*r][2*c+1];
          if (img[o][2*r+1][2*c] > m)   m = img[o][2*r+1][2*c];
          if (img[o][2*r+1][2*c+1] > m) m = img[o][2*r+1][2*c+1];
          @(negedge clk);
          for (int b = 0; b < PIY; b++) t_addr[b] = 8'((o * ORPB + r / PIY) * OWPR + c / PIX);
          @(negedge clk);
          checks++;
          if (int'(rd_data[r % PIY][c % PIX]) != m) begin
            failures++;
            $display("map %0d pooled (%0d,%0d): got %0d expected %0d", o, r, c, rd_data[r % PIY][c % PIX], m);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
