// conv_controller: sequences one convolution job.
//
// Phases: load weights, load input pixels (both through the DMA manager),
// convolve, optionally pool, send the result out, pulse `done`.
// Convolution loop order, outermost first:
//   tile row tr (PIY output rows) -> tile column wc (PIX output columns) ->
//   output-map group ofg (POF maps) -> input map if -> ky -> kx.
// The two innermost loops (kernel window, Loop-1) and the input-map loop
// (Loop-2) run serially, so a tile's partial sums are finished inside the
// MACs after Nif*K*K steps and never stored elsewhere; the output plane
// (Loop-3) and output maps (Loop-4) are unrolled in the PE array.
// One step is issued per cycle: an input-buffer read (row index tr, or tr+1
// for the bottom register row once ky > 0; word wc, or wc+1 once kx > 0), a
// weight-buffer read and, one cycle later with the data, the step controls
// for the PE array.
// Drain: when the PE array reports finished results, the controller writes
// them, one output map per cycle, through the quantizer into all PIY output
// banks. A tile's last step is held back (stall) while the previous tile is
// still being drained, which only happens when Nif*K*K < POF + 3.
// The loop order and the serial Loop-1/Loop-2 follow the reference
// architecture; the phase order and the stall rule are this design's.
module conv_controller
  import cnn_pkg::*;
#(
  parameter int unsigned POF        = 16,
  parameter int unsigned K          = 3,
  parameter int unsigned IBUF_DEPTH = 5120,
  parameter int unsigned WBUF_DEPTH = 36864,
  parameter int unsigned OBUF_DEPTH = 2048,
  localparam int unsigned IAW = $clog2(IBUF_DEPTH),
  localparam int unsigned WAW = $clog2(WBUF_DEPTH),
  localparam int unsigned OAW = $clog2(OBUF_DEPTH),
  localparam int unsigned KW  = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned OW  = (POF > 1) ? $clog2(POF) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  layer_cfg_t     cfg,
  input  layer_geom_t    geom,
  output logic           busy,
  output logic           done,
  // DMA manager
  output logic           dma_wt,
  output logic           dma_in,
  output logic           dma_out,
  input  logic           dma_done,
  // input pixel buffer read
  output logic           ib_rd_en,
  output logic [IAW-1:0] ib_rd_addr,
  output cnt_t           ib_rd_ridx,
  output cnt_t           ib_rd_word,
  // weight buffer read
  output logic           wb_rd_en,
  output logic [WAW-1:0] wb_rd_addr,
  // PE array step (aligned with buffer read data)
  output logic           pe_step,
  output logic [KW-1:0]  pe_kx,
  output logic [KW-1:0]  pe_ky,
  output logic           pe_first,
  output logic           pe_last,
  input  logic           pe_res_valid,
  output logic [OW-1:0]  pe_sel_o,
  // drain into output buffer (all banks, one map per cycle)
  output logic           drain_we,
  output logic [OAW-1:0] drain_addr,
  // pooling unit
  output logic           pool_start,
  input  logic           pool_done,
  // event counters for observation
  output logic           ev_stall
);
  typedef enum logic [2:0] {C_IDLE, C_LDW, C_LDI, C_CONV, C_FLUSH, C_POOL, C_OUT} cstate_e;
  cstate_e st;

  cnt_t tr, wc, ofg, ifm;
  logic [KW-1:0] kx, ky;
  cnt_t nofg;
  logic last_step, issue;

  logic drain_pending, draining;
  cnt_t dr_tr, dr_wc, dr_ofg;
  logic [OW-1:0] dr_o;

  assign nofg      = cnt_t'(cfg.nof) / cnt_t'(POF);
  assign last_step = (kx == KW'(K - 1)) && (ky == KW'(K - 1)) && (ifm + 16'd1 == cnt_t'(cfg.nif));
  assign issue     = (st == C_CONV) && !(last_step && drain_pending);
  assign ev_stall  = (st == C_CONV) && last_step && drain_pending;
  assign busy      = (st != C_IDLE);

  // buffer reads of the current step
  always_comb begin
    ib_rd_en   = issue;
    ib_rd_ridx = tr + ((ky != '0) ? 16'd1 : 16'd0);
    ib_rd_word = wc + ((kx != '0) ? 16'd1 : 16'd0);
    ib_rd_addr = IAW'((ifm * geom.rpb + ib_rd_ridx) * geom.wpr + ib_rd_word);
    wb_rd_en   = issue;
    wb_rd_addr = WAW'((ofg * cnt_t'(cfg.nif) + ifm) * cnt_t'(K * K) + cnt_t'(ky) * cnt_t'(K) + cnt_t'(kx));
  end

  // drain outputs
  assign pe_sel_o   = dr_o;
  assign drain_we   = draining;
  assign drain_addr = OAW'(((dr_ofg * cnt_t'(POF) + cnt_t'(dr_o)) * geom.orpb + dr_tr) * geom.owpr + dr_wc);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE;
      {tr, wc, ofg, ifm} <= '0;
      kx <= '0;
      ky <= '0;
      {dma_wt, dma_in, dma_out, pool_start, done} <= '0;
      {pe_step, pe_first, pe_last} <= '0;
      pe_kx <= '0;
      pe_ky <= '0;
      drain_pending <= 1'b0;
      draining <= 1'b0;
      {dr_tr, dr_wc, dr_ofg} <= '0;
      dr_o <= '0;
    end else begin
      {dma_wt, dma_in, dma_out, pool_start, done} <= '0;

      // step controls follow the buffer reads by one cycle
      pe_step  <= issue;
      pe_kx    <= kx;
      pe_ky    <= ky;
      pe_first <= (ifm == '0) && (kx == '0) && (ky == '0);
      pe_last  <= last_step;

      // drain of finished tile results
      if (pe_res_valid) begin
        draining <= 1'b1;
        dr_o     <= '0;
      end else if (draining) begin
        if (dr_o == OW'(POF - 1)) begin
          draining      <= 1'b0;
          drain_pending <= 1'b0;
        end else begin
          dr_o <= dr_o + OW'(1);
        end
      end

      unique case (st)
        C_IDLE: if (start) begin
          st     <= C_LDW;
          dma_wt <= 1'b1;
        end
        C_LDW: if (dma_done) begin
          st     <= C_LDI;
          dma_in <= 1'b1;
        end
        C_LDI: if (dma_done) begin
          st <= C_CONV;
          {tr, wc, ofg, ifm} <= '0;
          kx <= '0;
          ky <= '0;
        end
        C_CONV: if (issue) begin
          if (kx != KW'(K - 1)) begin
            kx <= kx + KW'(1);
          end else begin
            kx <= '0;
            if (ky != KW'(K - 1)) begin
              ky <= ky + KW'(1);
            end else begin
              ky <= '0;
              if (!last_step) begin
                ifm <= ifm + 16'd1;
              end else begin
                ifm <= '0;
                drain_pending <= 1'b1;
                dr_tr  <= tr;
                dr_wc  <= wc;
                dr_ofg <= ofg;
                if (ofg + 16'd1 < nofg) begin
                  ofg <= ofg + 16'd1;
                end else begin
                  ofg <= '0;
                  if (wc + 16'd1 < geom.owpr) begin
                    wc <= wc + 16'd1;
                  end else begin
                    wc <= '0;
                    if (tr + 16'd1 < geom.orpb) tr <= tr + 16'd1;
                    else                        st <= C_FLUSH;
                  end
                end
              end
            end
          end
        end
        C_FLUSH: if (!drain_pending && !pe_step) begin
          if (cfg.pool_en) begin
            st         <= C_POOL;
            pool_start <= 1'b1;
          end else begin
            st      <= C_OUT;
            dma_out <= 1'b1;
          end
        end
        C_POOL: if (pool_done) begin
          st      <= C_OUT;
          dma_out <= 1'b1;
        end
        C_OUT: if (dma_done) begin
          st   <= C_IDLE;
          done <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
