// tb_output_pixel_buffer: random word writes to random banks and independent
// random reads per bank, checked against a reference copy.
module tb_output_pixel_buffer;
  import cnn_pkg::*;
  localparam int PIX = 3, PIY = 4, DEPTH = 32;
  logic clk = 1'b0;
  logic wr_en [PIY];
  logic [4:0] wr_addr [PIY];
  pixel_t wr_data [PIY][PIX];
  logic [4:0] rd_addr [PIY];
  pixel_t rd_data [PIY][PIX];
  pixel_t model [PIY][DEPTH][PIX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  output_pixel_buffer #(.PIX(PIX), .PIY(PIY), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < PIY; b++) begin
      wr_en[b] = 1'b0; wr_addr[b] = '0; rd_addr[b] = '0;
      for (int s = 0; s < PIX; s++) wr_data[b][s] = '0;
    end
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      for (int b = 0; b < PIY; b++) begin
        wr_en[b] = 1'b1; wr_addr[b] = 5'(a);
        for (int s = 0; s < PIX; s++) begin
          wr_data[b][s] = pixel_t'($urandom);
          model[b][a][s] = wr_data[b][s];
        end
      end
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      for (int b = 0; b < PIY; b++) begin
        wr_en[b] = ($urandom_range(1) == 1);
        wr_addr[b] = 5'($urandom);
        rd_addr[b] = 5'($urandom);
        if (wr_addr[b] == rd_addr[b]) wr_en[b] = 1'b0;
        for (int s = 0; s < PIX; s++) wr_data[b][s] = pixel_t'($urandom);
      end
      @(posedge clk);
      #1;
      for (int b = 0; b < PIY; b++) begin
        if (wr_en[b]) model[b][wr_addr[b]] = wr_data[b];
        for (int s = 0; s < PIX; s++) begin
          checks++;
          if (rd_data[b][s] != model[b][rd_addr[b]][s]) begin
            failures++;
            $display("bank %0d addr %0d slot %0d: got %0d expected %0d",
                     b, rd_addr[b], s, rd_data[b][s], model[b][rd_addr[b]][s]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
