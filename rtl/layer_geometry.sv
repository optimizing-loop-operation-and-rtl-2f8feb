// layer_geometry: sizes derived from a layer descriptor.
//
// Purely combinational. From the unpadded input size and the padding flags it
// computes the padded input size, the convolution output size (stride 1,
// K x K kernel) and how the maps are laid out in the banked buffers: padded
// input row r sits in input bank r mod PIY, output row r in output bank
// r mod PIY, and each buffer word holds PIX neighbouring pixels of a row.
// The final output size is halved in both directions when pooling is on.
// The banked layout follows the interleaved input pixel buffers of the
// architecture; the descriptor format is this design's own.
module layer_geometry
  import cnn_pkg::*;
#(
  parameter int unsigned PIX = 14,
  parameter int unsigned PIY = 14,
  parameter int unsigned K   = 3
) (
  input  layer_cfg_t  cfg,
  output layer_geom_t geom
);
  localparam int unsigned PAD = (K - 1) / 2;

  always_comb begin
    geom.row_lo = cfg.pad_top  ? cnt_t'(PAD) : '0;
    geom.col_lo = cfg.pad_left ? cnt_t'(PAD) : '0;
    geom.row_hi = geom.row_lo + cnt_t'(cfg.niy);
    geom.col_hi = geom.col_lo + cnt_t'(cfg.nix);
    geom.prows  = geom.row_hi + (cfg.pad_bot   ? cnt_t'(PAD) : '0);
    geom.pcols  = geom.col_hi + (cfg.pad_right ? cnt_t'(PAD) : '0);
    geom.noy    = geom.prows - cnt_t'(K - 1);
    geom.nox    = geom.pcols - cnt_t'(K - 1);
    geom.rpb    = cnt_t'((geom.prows + cnt_t'(PIY - 1)) / cnt_t'(PIY));
    geom.wpr    = cnt_t'((geom.pcols + cnt_t'(PIX - 1)) / cnt_t'(PIX));
    geom.orpb   = cnt_t'((geom.noy + cnt_t'(PIY - 1)) / cnt_t'(PIY));
    geom.owpr   = cnt_t'((geom.nox + cnt_t'(PIX - 1)) / cnt_t'(PIX));
    geom.fy     = cfg.pool_en ? (geom.noy >> 1) : geom.noy;
    geom.fx     = cfg.pool_en ? (geom.nox >> 1) : geom.nox;
  end
endmodule
