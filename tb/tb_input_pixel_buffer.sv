// tb_input_pixel_buffer: fills a 2-bank buffer (4 pixels per word) with a
// random padded map at its banked positions, then reads random (row, word)
// pairs and checks every slot: stored pixel inside the real-pixel window,
// zero in the padding. Also checks that data holds while rd_en is low.
module tb_input_pixel_buffer;
  import cnn_pkg::*;
  localparam int PIX = 4, PIY = 2, DEPTH = 64;
  localparam int RPB = 4, WPR = 3;           // 8 padded rows, 12 padded columns
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en = 1'b0;
  logic [0:0] wr_bank = '0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [1:0] wr_slot = '0;
  pixel_t wr_data = '0;
  logic rd_en = 1'b0;
  cnt_t rd_ridx = '0, rd_word = '0;
  cnt_t row_lo, row_hi, col_lo, col_hi;
  pixel_t rd_data [PIY][PIX];
  int img [RPB * PIY][WPR * PIX];
  int checks = 0, failures = 0, n_pad = 0;

  always #5 clk = ~clk;
  input_pixel_buffer #(.PIX(PIX), .PIY(PIY), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row_lo = 16'd1; row_hi = 16'd7; col_lo = 16'd1; col_hi = 16'd10;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < RPB * PIY; r++)
      for (int c = 0; c < WPR * PIX; c++) begin
        @(negedge clk);
        img[r][c] = int'($urandom_range(60000)) - 30000;
        wr_en = 1'b1;
        wr_bank = 1'(r % PIY);
        wr_addr = 6'((r / PIY) * WPR + c / PIX);
        wr_slot = 2'(c % PIX);
        wr_data = pixel_t'(img[r][c]);
      end
    @(negedge clk);
    wr_en = 1'b0;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      rd_en = 1'b1;
      rd_ridx = cnt_t'($urandom_range(RPB - 1));
      rd_word = cnt_t'($urandom_range(WPR - 1));
      rd_addr = 6'(rd_ridx * WPR + rd_word);
      @(negedge clk);
      rd_en = 1'b0;
      rd_addr = 6'($urandom);   // ignored while rd_en is low
      @(negedge clk);
      for (int b = 0; b < PIY; b++)
        for (int s = 0; s < PIX; s++) begin
          automatic int r = int'(rd_ridx) * PIY + b, c = int'(rd_word) * PIX + s;
          automatic int e = (r >= 1 && r < 7 && c >= 1 && c < 10) ? img[r][c] : 0;
          if (e == 0) n_pad++;
          checks++;
          if (int'(rd_data[b][s]) != e) begin
            failures++;
            $display("row %0d col %0d: got %0d expected %0d", r, c, rd_data[b][s], e);
          end
        end
    end
    checks++;
    if (n_pad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
