// psum_quantizer: partial sums back to 16-bit pixels.
//
// Combinational, PIX x PIY lanes. The accelerator uses fixed-point data whose
// decimal point is adjusted layer by layer; here each 30-bit sum is shifted
// right arithmetically by the layer's `frac_shift` (dropping the low bits),
// optionally clamped at zero (ReLU) and saturated to the signed 16-bit range.
// Truncation, saturation and the ReLU option are this design's choices.
module psum_quantizer
  import cnn_pkg::*;
#(
  parameter int unsigned PIX = 14,
  parameter int unsigned PIY = 14
) (
  input  psum_t      psum [PIY][PIX],
  input  logic [4:0] frac_shift,
  input  logic       relu_en,
  output pixel_t     px   [PIY][PIX]
);
  localparam psum_t PX_MAX = psum_t'((1 << (PX_W - 1)) - 1);
  localparam psum_t PX_MIN = -psum_t'(1 << (PX_W - 1));

  always_comb begin
    for (int y = 0; y < PIY; y++) begin
      for (int x = 0; x < PIX; x++) begin
        automatic psum_t s = psum[y][x] >>> frac_shift;
        if (relu_en && s < 0)  px[y][x] = '0;
        else if (s > PX_MAX)   px[y][x] = pixel_t'(PX_MAX);
        else if (s < PX_MIN)   px[y][x] = pixel_t'(PX_MIN);
        else                   px[y][x] = pixel_t'(s);
      end
    end
  end
endmodule
