// input_pixel_buffer: banked on-chip store of the input feature maps.
//
// PIY banks, one per row of the MAC array. Padded input row r of every input
// map lives in bank r mod PIY, at row index r / PIY, and each word holds PIX
// neighbouring pixels of that row. Word address =
// (map * rows_per_bank + row_index) * words_per_row + word. Zero padding is
// never stored: a read returns zero for every slot whose padded row or column
// lies outside [row_lo,row_hi) x [col_lo,col_hi), so the padding border costs
// no memory and no DMA traffic. All banks are read with the same address in
// a cycle (the caller uses one bank's word or all of them).
// Write: one pixel per cycle into (bank, address, slot).
// Read: synchronous, data one cycle after `rd_en`; the data stays until the
// next read. The interleaved row-to-bank mapping follows the reference
// architecture; masking on read is this design's way of adding the padding.
module input_pixel_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned PIX   = 14,
  parameter int unsigned PIY   = 14,
  parameter int unsigned DEPTH = 5120,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = (PIY > 1) ? $clog2(PIY) : 1,
  localparam int unsigned SW   = (PIX > 1) ? $clog2(PIX) : 1
) (
  input  logic          clk,
  input  logic          rst,
  // write port
  input  logic          wr_en,
  input  logic [BW-1:0] wr_bank,
  input  logic [AW-1:0] wr_addr,
  input  logic [SW-1:0] wr_slot,
  input  pixel_t        wr_data,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  input  cnt_t          rd_ridx,   // row index inside the banks
  input  cnt_t          rd_word,   // word index inside the row
  input  cnt_t          row_lo,
  input  cnt_t          row_hi,
  input  cnt_t          col_lo,
  input  cnt_t          col_hi,
  output pixel_t        rd_data [PIY][PIX]
);
  pixel_t raw  [PIY][PIX];
  logic   keep [PIY][PIX];

  for (genvar b = 0; b < PIY; b++) begin : g_bank
    pixel_t mem [DEPTH][PIX];

    always_ff @(posedge clk) begin
      if (wr_en && wr_bank == BW'(b)) mem[wr_addr][wr_slot] <= wr_data;
    end

    always_ff @(posedge clk) begin
      if (rd_en) raw[b] <= mem[rd_addr];
    end

    always_ff @(posedge clk) begin
      if (rst) begin
        for (int s = 0; s < PIX; s++) keep[b][s] <= 1'b0;
      end else if (rd_en) begin
        for (int s = 0; s < PIX; s++) begin
          automatic cnt_t prow = cnt_t'(rd_ridx * PIY + b);
          automatic cnt_t pcol = cnt_t'(rd_word * PIX + s);
          keep[b][s] <= (prow >= row_lo) && (prow < row_hi) &&
                        (pcol >= col_lo) && (pcol < col_hi);
        end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < PIY; b++)
      for (int s = 0; s < PIX; s++) rd_data[b][s] = keep[b][s] ? raw[b][s] : '0;
  end
endmodule
