// conv_reg_array: pixel register arrays in front of the MAC array.
//
// PIY rows of W = PIX+K-1 registers. MAC column x of row y always reads
// register K-1+x of that row (outputs `taps`). One kernel weight is applied
// per cycle, kernel row by kernel row (ky), and inside a row kernel column by
// kernel column (kx); the register contents move so that each tap always
// holds the pixel that meets the current weight:
//   * first kernel row (ky = 0): every row is fed by its own input bank. At
//     kx = 0 a whole word of PIX pixels is loaded into registers K-1..W-1;
//     at kx > 0 the row shifts left by one and pixel kx-1 of the next word
//     enters at the right end.
//   * later kernel rows (ky > 0): row y takes over the W pixels that row y+1
//     gathered during the previous kernel row (rotated by K-1 so the taps see
//     the window's first column) and then rotates left by one per kx step.
//     Only the bottom row reads new pixels, from bank ky-1, the bank that
//     holds the next padded input row.
// Thus each input pixel leaves the buffer once per tile and is then passed
// from register to register. This is the register dataflow of the
// reference architecture (stride 1); the exact interface is this design's.
// Timing: `bank_data`, `kx`, `ky` are sampled with `en`; `taps` change on the
// same edge.
module conv_reg_array
  import cnn_pkg::*;
#(
  parameter int unsigned PIX = 14,
  parameter int unsigned PIY = 14,
  parameter int unsigned K   = 3,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [KW-1:0] kx,
  input  logic [KW-1:0] ky,
  input  pixel_t        bank_data [PIY][PIX],
  output pixel_t        taps      [PIY][PIX]
);
  localparam int unsigned W = PIX + K - 1;

  pixel_t r [PIY][W];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int y = 0; y < PIY; y++)
        for (int i = 0; i < W; i++) r[y][i] <= '0;
    end else if (en) begin
      for (int y = 0; y < PIY; y++) begin
        if (ky == '0 || y == PIY - 1) begin
          // row fed from a buffer bank
          for (int x = 0; x < int'(PIX); x++) begin
            if (kx == '0) r[y][K-1+x] <= (ky == '0) ? bank_data[y][x] : bank_data[ky-1][x];
          end
          if (kx != '0) begin
            for (int i = 0; i < int'(W) - 1; i++) r[y][i] <= r[y][i+1];
            r[y][W-1] <= (ky == '0) ? bank_data[y][kx-1] : bank_data[ky-1][kx-1];
          end
        end else begin
          // row fed from the row below
          for (int i = 0; i < int'(W); i++) begin
            if (kx == '0) r[y][i] <= r[y+1][(i + W - (K - 1)) % W];
            else          r[y][i] <= r[y][(i + 1) % W];
          end
        end
      end
    end
  end

  always_comb begin
    for (int y = 0; y < PIY; y++)
      for (int x = 0; x < PIX; x++) taps[y][x] = r[y][K-1+x];
  end
endmodule
