// mac_unit: one processing element of the convolution array.
//
// Each enabled cycle it multiplies a 16-bit pixel by an 8-bit weight and adds
// the product to a 30-bit partial sum held inside the unit, so partial sums
// never travel to a buffer. `first` starts a new sum with the product alone;
// `last` marks the final product of an output pixel (all Nkx*Nky*Nif terms),
// and the finished sum is copied into `result` on the same edge, freeing the
// accumulator for the next output pixel at once. The accumulator wraps at 30
// bits. Timing: `result` is valid from the cycle after the `last` cycle and
// holds until the next `last`. Widths follow the reference implementation;
// the separate result register is this design's choice.
module mac_unit
  import cnn_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    en,
  input  logic    first,
  input  logic    last,
  input  pixel_t  px,
  input  weight_t wt,
  output psum_t   acc,
  output psum_t   result
);
  logic signed [PX_W+WT_W-1:0] prod;
  psum_t sum;

  always_comb begin
    prod = px * wt;
    sum  = first ? psum_t'(prod) : acc + psum_t'(prod);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc    <= '0;
      result <= '0;
    end else if (en) begin
      acc <= sum;
      if (last) result <= sum;
    end
  end
endmodule
