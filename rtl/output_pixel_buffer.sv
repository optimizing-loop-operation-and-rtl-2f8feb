// output_pixel_buffer: banked on-chip store of the output feature maps.
//
// PIY banks. Output row r of a map lives in bank r mod PIY at row index
// r / PIY; a word holds PIX neighbouring pixels of a row. Word address =
// (map * out_rows_per_bank + row_index) * out_words_per_row + word. With this
// layout the PE array drain writes the PIY rows of a tile in one cycle per
// output map, and the pooling unit reads two vertically adjacent rows in one
// cycle. Each bank has one whole-word write port and one read port with
// its own address; reads are synchronous (data one cycle after the address).
// The banking is this design's choice; the buffer itself is the
// architecture's output pixel buffer.
module output_pixel_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned PIX   = 14,
  parameter int unsigned PIY   = 14,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en   [PIY],
  input  logic [AW-1:0] wr_addr [PIY],
  input  pixel_t        wr_data [PIY][PIX],
  input  logic [AW-1:0] rd_addr [PIY],
  output pixel_t        rd_data [PIY][PIX]
);
  for (genvar b = 0; b < PIY; b++) begin : g_bank
    pixel_t mem [DEPTH][PIX];

    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_addr[b]] <= wr_data[b];
      rd_data[b] <= mem[rd_addr[b]];
    end
  end
endmodule
