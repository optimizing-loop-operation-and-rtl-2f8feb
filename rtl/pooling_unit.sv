// pooling_unit: 2x2 max pooling on the output pixel buffer.
//
// After a convolution job the unit walks every output map, pooled row pr and
// pooled word w. It reads source words 2w and 2w+1 of output rows 2pr and
// 2pr+1 (two adjacent banks, PIY even, so both rows come in one read),
// keeps the first pair in registers, takes the maximum of each 2x2 group
// and writes one word of PIX pooled pixels back to row pr, word w. The
// pooled map is written in place with the same row and word strides as the
// unpooled map; every source word is read before it can be overwritten.
// Cost: 3 cycles per pooled word. `start` is a one-cycle pulse; `done` pulses
// when the last word is written. Only max pooling of 2x2 windows with stride 2
// is built, the pooling of the VGG-16 network the design targets; the
// sequencing is this design's own.
module pooling_unit
  import cnn_pkg::*;
#(
  parameter int unsigned PIX   = 14,
  parameter int unsigned PIY   = 14,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = (PIY > 1) ? $clog2(PIY) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  cnt_t          nof,     // output maps
  input  cnt_t          noy,     // unpooled output rows
  input  cnt_t          owpr,    // words per output row
  input  cnt_t          orpb,    // output rows per bank
  output logic          busy,
  output logic          done,
  // output pixel buffer
  output logic [AW-1:0] rd_addr [PIY],
  input  pixel_t        rd_data [PIY][PIX],
  output logic          wr_en   [PIY],
  output logic [AW-1:0] wr_addr [PIY],
  output pixel_t        wr_data [PIY][PIX]
);
  localparam int unsigned HALF = PIX / 2;

  typedef enum logic [1:0] {P_IDLE, P_RD0, P_RD1, P_WR} pstate_e;
  pstate_e st;

  cnt_t of, pr, w;
  cnt_t src_bank, src_idx;   // bank and row index of source row 2*pr
  cnt_t dst_bank, dst_idx;   // bank and row index of pooled row pr
  cnt_t npr, npw;
  pixel_t a_top [PIX], a_bot [PIX];
  pixel_t res [PIX];
  logic [AW-1:0] src_addr, dst_addr;
  logic [BW-1:0] sb0, sb1;            // banks of source rows 2*pr and 2*pr+1

  assign sb0 = BW'(src_bank);
  assign sb1 = BW'(src_bank + 16'd1);

  function automatic pixel_t max4(pixel_t p0, pixel_t p1, pixel_t p2, pixel_t p3);
    pixel_t m0 = (p0 > p1) ? p0 : p1;
    pixel_t m1 = (p2 > p3) ? p2 : p3;
    return (m0 > m1) ? m0 : m1;
  endfunction

  always_comb begin
    npr      = noy >> 1;
    npw      = (owpr + 16'd1) >> 1;
    src_addr = AW'((of * orpb + src_idx) * owpr + (w << 1));
    dst_addr = AW'((of * orpb + dst_idx) * owpr + w);
    for (int b = 0; b < PIY; b++) begin
      rd_addr[b] = (st == P_RD1) ? src_addr + AW'(1) : src_addr;
      wr_en[b]   = (st == P_WR) && (dst_bank == cnt_t'(b));
      wr_addr[b] = dst_addr;
    end
    for (int j = 0; j < HALF; j++) begin
      res[j]        = max4(a_top[2*j], a_top[2*j+1], a_bot[2*j], a_bot[2*j+1]);
      res[HALF + j] = max4(rd_data[sb0][2*j], rd_data[sb0][2*j+1],
                           rd_data[sb1][2*j], rd_data[sb1][2*j+1]);
    end
    if (PIX % 2 == 1) res[PIX-1] = '0;
    for (int b = 0; b < PIY; b++) wr_data[b] = res;
  end

  assign busy = (st != P_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= P_IDLE;
      done <= 1'b0;
      {of, pr, w, src_bank, src_idx, dst_bank, dst_idx} <= '0;
      for (int s = 0; s < PIX; s++) begin
        a_top[s] <= '0;
        a_bot[s] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          {of, pr, w, src_bank, src_idx, dst_bank, dst_idx} <= '0;
          st <= (noy < 16'd2 || nof == '0) ? P_IDLE : P_RD0;
          done <= (noy < 16'd2 || nof == '0);
        end
        P_RD0: st <= P_RD1;
        P_RD1: begin
          a_top <= rd_data[sb0];
          a_bot <= rd_data[sb1];
          st    <= P_WR;
        end
        P_WR: begin
          st <= P_RD0;
          if (w + 16'd1 < npw) begin
            w <= w + 16'd1;
          end else begin
            w <= '0;
            if (pr + 16'd1 < npr) begin
              pr <= pr + 16'd1;
              if (src_bank + 16'd2 >= cnt_t'(PIY)) begin
                src_bank <= src_bank + 16'd2 - cnt_t'(PIY);
                src_idx  <= src_idx + 16'd1;
              end else begin
                src_bank <= src_bank + 16'd2;
              end
              if (dst_bank + 16'd1 >= cnt_t'(PIY)) begin
                dst_bank <= '0;
                dst_idx  <= dst_idx + 16'd1;
              end else begin
                dst_bank <= dst_bank + 16'd1;
              end
            end else begin
              {pr, src_bank, src_idx, dst_bank, dst_idx} <= '0;
              if (of + 16'd1 < nof) begin
                of <= of + 16'd1;
              end else begin
                st   <= P_IDLE;
                done <= 1'b1;
              end
            end
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
