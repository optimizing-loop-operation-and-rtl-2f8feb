// cnn_accel_top: convolution-layer accelerator.
//
// One job = one convolution layer (or a horizontal stripe of one): the host
// writes a layer descriptor and pulses `start`; the accelerator pulls the
// weights and the input maps from two DMA streams into its on-chip buffers,
// convolves with a PIX x PIY x POF array of MAC units (default
// 14 x 14 x 16 = 3,136), optionally applies 2x2 max pooling, pushes the
// output maps into the outgoing DMA stream and pulses `done`.
// Blocks: dma_manager (stream <-> buffer addressing), weight_buffer,
// input_pixel_buffer (PIY interleaved banks, zero padding made on read),
// conv_pe_array (register arrays + MACs), psum_quantizer (30-bit sums to
// 16-bit pixels), output_pixel_buffer (PIY banks), pooling_unit, and
// conv_controller, which runs the phases and the convolution loops.
// Stream ports stand where the scatter-gather DMA engines connect; the DMA
// engines and the external DRAM are outside this design.
// Every pixel and weight of a job crosses the streams exactly once, provided
// the job fits the buffers (the host chooses the stripe size accordingly;
// nothing here checks it).
// `ev_stall`, `ev_drain` and `ev_pool` pulse on a drain stall, a drained
// output map and a pooled word, for performance counters.
module cnn_accel_top
  import cnn_pkg::*;
#(
  parameter int unsigned PIX        = 14,
  parameter int unsigned PIY        = 14,
  parameter int unsigned POF        = 16,
  parameter int unsigned K          = 3,
  parameter int unsigned IBUF_DEPTH = 5120,
  parameter int unsigned WBUF_DEPTH = 36864,
  parameter int unsigned OBUF_DEPTH = 2048
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  layer_cfg_t cfg,
  output logic       busy,
  output logic       done,
  input  logic       wt_valid,
  output logic       wt_ready,
  input  weight_t    wt_data,
  input  logic       in_valid,
  output logic       in_ready,
  input  pixel_t     in_data,
  output logic       out_valid,
  input  logic       out_ready,
  output pixel_t     out_data,
  output logic       ev_stall,
  output logic       ev_drain,
  output logic       ev_pool
);
  localparam int unsigned IAW = $clog2(IBUF_DEPTH);
  localparam int unsigned WAW = $clog2(WBUF_DEPTH);
  localparam int unsigned OAW = $clog2(OBUF_DEPTH);
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned OW  = (POF > 1) ? $clog2(POF) : 1;
  localparam int unsigned BW  = (PIY > 1) ? $clog2(PIY) : 1;
  localparam int unsigned SW  = (PIX > 1) ? $clog2(PIX) : 1;

  layer_cfg_t  cfg_q;
  layer_geom_t geom;

  // the descriptor is held for the whole job
  always_ff @(posedge clk) begin
    if (rst)              cfg_q <= '0;
    else if (start && !busy) cfg_q <= cfg;
  end

  layer_geometry #(.PIX(PIX), .PIY(PIY), .K(K)) u_geom (.cfg(cfg_q), .geom);

  // controller <-> others
  logic dma_wt, dma_in, dma_out, dma_done;
  logic ib_rd_en;
  logic [IAW-1:0] ib_rd_addr;
  cnt_t ib_rd_ridx, ib_rd_word;
  logic wb_rd_en;
  logic [WAW-1:0] wb_rd_addr;
  logic pe_step, pe_first, pe_last, pe_res_valid;
  logic [KW-1:0] pe_kx, pe_ky;
  logic [OW-1:0] pe_sel_o;
  logic drain_we;
  logic [OAW-1:0] drain_addr;
  logic pool_start, pool_done, pool_busy;

  // buffer ports
  logic wb_wr_en;
  logic [WAW-1:0] wb_wr_addr;
  logic [OW-1:0] wb_wr_slot;
  weight_t wb_wr_data;
  weight_t wt_word [POF];
  logic ib_wr_en;
  logic [BW-1:0] ib_wr_bank;
  logic [IAW-1:0] ib_wr_addr;
  logic [SW-1:0] ib_wr_slot;
  pixel_t ib_wr_data;
  pixel_t bank_data [PIY][PIX];

  psum_t  res_sel [PIY][PIX];
  pixel_t res_px  [PIY][PIX];

  logic          ob_wr_en   [PIY];
  logic [OAW-1:0] ob_wr_addr [PIY];
  pixel_t        ob_wr_data [PIY][PIX];
  logic [OAW-1:0] ob_rd_addr [PIY];
  pixel_t        ob_rd_data [PIY][PIX];
  logic          pl_wr_en   [PIY];
  logic [OAW-1:0] pl_wr_addr [PIY];
  pixel_t        pl_wr_data [PIY][PIX];
  logic [OAW-1:0] pl_rd_addr [PIY];
  logic [OAW-1:0] dm_rd_addr;

  conv_controller #(
    .POF(POF), .K(K),
    .IBUF_DEPTH(IBUF_DEPTH), .WBUF_DEPTH(WBUF_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
  ) u_ctrl (
    .clk, .rst, .start, .cfg(cfg_q), .geom, .busy, .done,
    .dma_wt, .dma_in, .dma_out, .dma_done,
    .ib_rd_en, .ib_rd_addr, .ib_rd_ridx, .ib_rd_word,
    .wb_rd_en, .wb_rd_addr,
    .pe_step, .pe_kx, .pe_ky, .pe_first, .pe_last, .pe_res_valid, .pe_sel_o,
    .drain_we, .drain_addr,
    .pool_start, .pool_done,
    .ev_stall
  );

  dma_manager #(
    .PIX(PIX), .PIY(PIY), .POF(POF), .K(K),
    .IBUF_DEPTH(IBUF_DEPTH), .WBUF_DEPTH(WBUF_DEPTH), .OBUF_DEPTH(OBUF_DEPTH)
  ) u_dma (
    .clk, .rst, .cfg(cfg_q), .geom,
    .cmd_wt(dma_wt), .cmd_in(dma_in), .cmd_out(dma_out), .done(dma_done),
    .wt_valid, .wt_ready, .wt_data,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .wb_wr_en, .wb_wr_addr, .wb_wr_slot, .wb_wr_data,
    .ib_wr_en, .ib_wr_bank, .ib_wr_addr, .ib_wr_slot, .ib_wr_data,
    .ob_rd_addr(dm_rd_addr), .ob_rd_data
  );

  weight_buffer #(.POF(POF), .DEPTH(WBUF_DEPTH)) u_wbuf (
    .clk,
    .wr_en(wb_wr_en), .wr_addr(wb_wr_addr), .wr_slot(wb_wr_slot), .wr_data(wb_wr_data),
    .rd_en(wb_rd_en), .rd_addr(wb_rd_addr), .rd_data(wt_word)
  );

  input_pixel_buffer #(.PIX(PIX), .PIY(PIY), .DEPTH(IBUF_DEPTH)) u_ibuf (
    .clk, .rst,
    .wr_en(ib_wr_en), .wr_bank(ib_wr_bank), .wr_addr(ib_wr_addr),
    .wr_slot(ib_wr_slot), .wr_data(ib_wr_data),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_ridx(ib_rd_ridx), .rd_word(ib_rd_word),
    .row_lo(geom.row_lo), .row_hi(geom.row_hi), .col_lo(geom.col_lo), .col_hi(geom.col_hi),
    .rd_data(bank_data)
  );

  conv_pe_array #(.PIX(PIX), .PIY(PIY), .POF(POF), .K(K)) u_pe (
    .clk, .rst,
    .step_en(pe_step), .kx(pe_kx), .ky(pe_ky), .first(pe_first), .last(pe_last),
    .bank_data, .wt_word, .sel_o(pe_sel_o),
    .res_valid(pe_res_valid), .res_sel
  );

  psum_quantizer #(.PIX(PIX), .PIY(PIY)) u_quant (
    .psum(res_sel), .frac_shift(cfg_q.frac_shift), .relu_en(cfg_q.relu_en), .px(res_px)
  );

  pooling_unit #(.PIX(PIX), .PIY(PIY), .DEPTH(OBUF_DEPTH)) u_pool (
    .clk, .rst, .start(pool_start),
    .nof(cnt_t'(cfg_q.nof)), .noy(geom.noy), .owpr(geom.owpr), .orpb(geom.orpb),
    .busy(pool_busy), .done(pool_done),
    .rd_addr(pl_rd_addr), .rd_data(ob_rd_data),
    .wr_en(pl_wr_en), .wr_addr(pl_wr_addr), .wr_data(pl_wr_data)
  );

  output_pixel_buffer #(.PIX(PIX), .PIY(PIY), .DEPTH(OBUF_DEPTH)) u_obuf (
    .clk,
    .wr_en(ob_wr_en), .wr_addr(ob_wr_addr), .wr_data(ob_wr_data),
    .rd_addr(ob_rd_addr), .rd_data(ob_rd_data)
  );

  // output buffer port sharing: drain or pooling write, pooling or DMA read
  always_comb begin
    for (int b = 0; b < PIY; b++) begin
      if (pool_busy) begin
        ob_wr_en[b]   = pl_wr_en[b];
        ob_wr_addr[b] = pl_wr_addr[b];
        ob_wr_data[b] = pl_wr_data[b];
        ob_rd_addr[b] = pl_rd_addr[b];
      end else begin
        ob_wr_en[b]   = drain_we;
        ob_wr_addr[b] = drain_addr;
        ob_wr_data[b] = res_px[b];
        ob_rd_addr[b] = dm_rd_addr;
      end
    end
  end

  assign ev_drain = drain_we;
  always_comb begin
    ev_pool = 1'b0;
    for (int b = 0; b < PIY; b++) ev_pool |= pl_wr_en[b];
  end
endmodule
