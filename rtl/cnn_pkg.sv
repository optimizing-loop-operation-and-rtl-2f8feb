// cnn_pkg: types and constants shared by the convolution accelerator.
//
// The accelerator works on fixed-point data: 16-bit input/output pixels,
// 8-bit weights and 30-bit partial sums, as in the reference implementation
// of this architecture. The layer descriptor (layer_cfg_t) is this design's
// own format: it carries the sizes of one convolution job (a layer, or a
// horizontal stripe of a layer), which sides get one pixel of zero padding,
// the decimal-point shift used to turn partial sums back into pixels, and
// whether ReLU and 2x2 max pooling follow the convolution.
// layer_geom_t holds the sizes derived from a descriptor (see layer_geometry).
package cnn_pkg;

  localparam int unsigned PX_W   = 16;  // pixel width
  localparam int unsigned WT_W   = 8;   // weight width
  localparam int unsigned PS_W   = 30;  // partial-sum width
  localparam int unsigned MAPS_W = 10;  // feature-map counts up to 1023
  localparam int unsigned DIM_W  = 9;   // feature-map sides up to 511 pixels

  typedef logic signed [PX_W-1:0] pixel_t;
  typedef logic signed [WT_W-1:0] weight_t;
  typedef logic signed [PS_W-1:0] psum_t;
  typedef logic        [15:0]     cnt_t;

  typedef struct packed {
    logic [MAPS_W-1:0] nif;        // input feature maps (Nif = Tif)
    logic [MAPS_W-1:0] nof;        // output feature maps of the job, multiple of Pof
    logic [DIM_W-1:0]  nix;        // input width, without padding
    logic [DIM_W-1:0]  niy;        // input height, without padding
    logic              pad_top;    // zero padding of (K-1)/2 on each marked side
    logic              pad_bot;
    logic              pad_left;
    logic              pad_right;
    logic [4:0]        frac_shift; // partial sum >>> frac_shift gives the pixel
    logic              relu_en;    // clamp negative results to zero
    logic              pool_en;    // 2x2 max pooling after the convolution
  } layer_cfg_t;

  typedef struct packed {
    cnt_t prows;   // padded input rows
    cnt_t pcols;   // padded input columns
    cnt_t noy;     // convolution output rows
    cnt_t nox;     // convolution output columns
    cnt_t rpb;     // input rows held per bank
    cnt_t wpr;     // input words per row
    cnt_t orpb;    // output rows held per bank
    cnt_t owpr;    // output words per row
    cnt_t fy;      // rows of the final (pooled or not) output
    cnt_t fx;      // columns of the final output
    cnt_t row_lo;  // first padded row holding real pixels
    cnt_t row_hi;  // one past the last such row
    cnt_t col_lo;  // first padded column holding real pixels
    cnt_t col_hi;  // one past the last such column
  } layer_geom_t;

endpackage
