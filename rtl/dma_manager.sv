// dma_manager: bridge between the DMA data streams and the on-chip buffers.
//
// The external scatter-gather DMA engines move plain streams; this block
// gives every streamed item its buffer position. It runs one transfer per
// command pulse and pulses `done` at its end:
//   CMD_WT  weights arrive in (out map, in map, ky, kx) order and are written
//           to weight-buffer word ((of/POF)*Nif + if)*K*K + ky*K + kx, slot
//           of mod POF.
//   CMD_IN  input pixels arrive in (map, row, column) order without padding
//           and go to input bank (row+pad) mod PIY at their padded position.
//   CMD_OUT the final output maps (pooled or not) are read from the output
//           buffer and sent in (map, row, column) order.
// Streams use valid/ready; a beat moves when both are high. Input streams are
// always ready during their transfer; the output stream sends one pixel every
// two cycles at best and holds data while `out_ready` is low. The buffer
// write data are the stream data wired straight through; this block only
// supplies the write enables and addresses for them.
// Only the name of this block is given by the reference architecture; the
// stream orders and the interface are this design's choices.
module dma_manager
  import cnn_pkg::*;
#(
  parameter int unsigned PIX        = 14,
  parameter int unsigned PIY        = 14,
  parameter int unsigned POF        = 16,
  parameter int unsigned K          = 3,
  parameter int unsigned IBUF_DEPTH = 5120,
  parameter int unsigned WBUF_DEPTH = 36864,
  parameter int unsigned OBUF_DEPTH = 2048,
  localparam int unsigned IAW = $clog2(IBUF_DEPTH),
  localparam int unsigned WAW = $clog2(WBUF_DEPTH),
  localparam int unsigned OAW = $clog2(OBUF_DEPTH),
  localparam int unsigned BW  = (PIY > 1) ? $clog2(PIY) : 1,
  localparam int unsigned SW  = (PIX > 1) ? $clog2(PIX) : 1,
  localparam int unsigned OSW = (POF > 1) ? $clog2(POF) : 1
) (
  input  logic           clk,
  input  logic           rst,
  input  layer_cfg_t     cfg,
  input  layer_geom_t    geom,
  input  logic           cmd_wt,
  input  logic           cmd_in,
  input  logic           cmd_out,
  output logic           done,
  // weight stream in
  input  logic           wt_valid,
  output logic           wt_ready,
  input  weight_t        wt_data,
  // pixel stream in
  input  logic           in_valid,
  output logic           in_ready,
  input  pixel_t         in_data,
  // pixel stream out
  output logic           out_valid,
  input  logic           out_ready,
  output pixel_t         out_data,
  // weight buffer write
  output logic           wb_wr_en,
  output logic [WAW-1:0] wb_wr_addr,
  output logic [OSW-1:0] wb_wr_slot,
  output weight_t        wb_wr_data,
  // input buffer write
  output logic           ib_wr_en,
  output logic [BW-1:0]  ib_wr_bank,
  output logic [IAW-1:0] ib_wr_addr,
  output logic [SW-1:0]  ib_wr_slot,
  output pixel_t         ib_wr_data,
  // output buffer read
  output logic [OAW-1:0] ob_rd_addr,
  input  pixel_t         ob_rd_data [PIY][PIX]
);
  localparam cnt_t KK = cnt_t'(K * K);

  typedef enum logic [2:0] {D_IDLE, D_WT, D_IN, D_ORD, D_OSEND} dstate_e;
  dstate_e st;

  // shared counters: a = map (of / if), b = row or (if,k) index, c = column
  cnt_t a, b, c;
  cnt_t bank, ridx, word, slot;   // buffer position of the current item
  cnt_t grp_base, wt_addr, wslot;
  cnt_t nifkk;

  assign nifkk = cnt_t'(cfg.nif) * KK;

  // weight path
  assign wt_ready   = (st == D_WT);
  assign wb_wr_en   = (st == D_WT) && wt_valid;
  assign wb_wr_addr = WAW'(wt_addr);
  assign wb_wr_slot = OSW'(wslot);
  assign wb_wr_data = wt_data;

  // input pixel path
  assign in_ready   = (st == D_IN);
  assign ib_wr_en   = (st == D_IN) && in_valid;
  assign ib_wr_bank = BW'(bank);
  assign ib_wr_addr = IAW'((a * geom.rpb + ridx) * geom.wpr + word);
  assign ib_wr_slot = SW'(slot);
  assign ib_wr_data = in_data;

  // output path
  assign ob_rd_addr = OAW'((a * geom.orpb + ridx) * geom.owpr + word);
  assign out_valid  = (st == D_OSEND);
  assign out_data   = ob_rd_data[bank[BW-1:0]][slot[SW-1:0]];

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= D_IDLE;
      done <= 1'b0;
      {a, b, c, bank, ridx, word, slot, grp_base, wt_addr, wslot} <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        D_IDLE: begin
          {a, b, c, grp_base, wt_addr, wslot} <= '0;
          if (cmd_wt) begin
            st <= D_WT;
          end else if (cmd_in) begin
            st   <= D_IN;
            bank <= geom.row_lo;
            ridx <= '0;
            word <= '0;
            slot <= geom.col_lo;
          end else if (cmd_out) begin
            st <= D_ORD;
            {bank, ridx, word, slot} <= '0;
          end
        end

        D_WT: if (wt_valid) begin
          if (b + 16'd1 < nifkk) begin
            b       <= b + 16'd1;
            wt_addr <= wt_addr + 16'd1;
          end else begin
            b <= '0;
            if (a + 16'd1 >= cnt_t'(cfg.nof)) begin
              st   <= D_IDLE;
              done <= 1'b1;
            end
            a <= a + 16'd1;
            if (wslot == cnt_t'(POF - 1)) begin
              wslot    <= '0;
              grp_base <= grp_base + nifkk;
              wt_addr  <= grp_base + nifkk;
            end else begin
              wslot   <= wslot + 16'd1;
              wt_addr <= grp_base;
            end
          end
        end

        D_IN: if (in_valid) begin
          // next column
          if (slot == cnt_t'(PIX - 1)) begin
            slot <= '0;
            word <= word + 16'd1;
          end else begin
            slot <= slot + 16'd1;
          end
          if (c + 16'd1 < cnt_t'(cfg.nix)) begin
            c <= c + 16'd1;
          end else begin
            c    <= '0;
            word <= '0;
            slot <= geom.col_lo;
            if (b + 16'd1 < cnt_t'(cfg.niy)) begin
              b <= b + 16'd1;
              if (bank == cnt_t'(PIY - 1)) begin
                bank <= '0;
                ridx <= ridx + 16'd1;
              end else begin
                bank <= bank + 16'd1;
              end
            end else begin
              b    <= '0;
              bank <= geom.row_lo;
              ridx <= '0;
              a    <= a + 16'd1;
              if (a + 16'd1 >= cnt_t'(cfg.nif)) begin
                st   <= D_IDLE;
                done <= 1'b1;
              end
            end
          end
        end

        D_ORD: st <= D_OSEND;

        D_OSEND: if (out_ready) begin
          st <= D_ORD;
          if (slot == cnt_t'(PIX - 1)) begin
            slot <= '0;
            word <= word + 16'd1;
          end else begin
            slot <= slot + 16'd1;
          end
          if (c + 16'd1 < geom.fx) begin
            c <= c + 16'd1;
          end else begin
            c    <= '0;
            word <= '0;
            slot <= '0;
            if (b + 16'd1 < geom.fy) begin
              b <= b + 16'd1;
              if (bank == cnt_t'(PIY - 1)) begin
                bank <= '0;
                ridx <= ridx + 16'd1;
              end else begin
                bank <= bank + 16'd1;
              end
            end else begin
              b    <= '0;
              bank <= '0;
              ridx <= '0;
              a    <= a + 16'd1;
              if (a + 16'd1 >= cnt_t'(cfg.nof)) begin
                st   <= D_IDLE;
                done <= 1'b1;
              end
            end
          end
        end

        default: st <= D_IDLE;
      endcase
    end
  end
endmodule
