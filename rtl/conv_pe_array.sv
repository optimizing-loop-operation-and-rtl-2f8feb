// conv_pe_array: the convolution registers and PEs.
//
// PIX x PIY x POF independent MAC units. Output feature maps are unrolled by
// POF and the output map plane by PIX x PIY: all MACs of one output map get
// the same weight in a cycle, and every pixel tap of the register array is
// shared by the POF MACs at the same (x, y). Kernel window and input maps are
// walked serially, so each MAC completes one output pixel per Nkx*Nky*Nif
// steps and keeps its partial sum to itself.
// Timing: a step is presented with `step_en` together with the input-bank
// words and the POF-wide weight word read for it. The register array
// updates on that edge, the weight is registered alongside, and the MACs
// accumulate on the next edge. `res_valid` pulses in the cycle after the
// MACs took a `last` step; from then `result` of map `sel_o` (chosen by the
// drain logic) is readable until the next tile's `last` step completes.
// The unroll factors are those of the reference design (14 x 14 x 16).
module conv_pe_array
  import cnn_pkg::*;
#(
  parameter int unsigned PIX = 14,
  parameter int unsigned PIY = 14,
  parameter int unsigned POF = 16,
  parameter int unsigned K   = 3,
  localparam int unsigned KW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned OW = (POF > 1) ? $clog2(POF) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          step_en,
  input  logic [KW-1:0] kx,
  input  logic [KW-1:0] ky,
  input  logic          first,
  input  logic          last,
  input  pixel_t        bank_data [PIY][PIX],
  input  weight_t       wt_word   [POF],
  input  logic [OW-1:0] sel_o,
  output logic          res_valid,
  output psum_t         res_sel   [PIY][PIX]
);
  pixel_t  taps [PIY][PIX];
  weight_t wt_q [POF];
  logic    mac_en, mac_first, mac_last;
  psum_t   acc    [POF][PIY][PIX];
  psum_t   result [POF][PIY][PIX];

  conv_reg_array #(.PIX(PIX), .PIY(PIY), .K(K)) u_regs (
    .clk, .rst, .en(step_en), .kx, .ky, .bank_data, .taps
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      mac_en    <= 1'b0;
      mac_first <= 1'b0;
      mac_last  <= 1'b0;
      res_valid <= 1'b0;
      for (int o = 0; o < POF; o++) wt_q[o] <= '0;
    end else begin
      mac_en    <= step_en;
      mac_first <= first;
      mac_last  <= last & step_en;
      res_valid <= mac_en & mac_last;
      if (step_en) wt_q <= wt_word;
    end
  end

  for (genvar o = 0; o < POF; o++) begin : g_of
    for (genvar y = 0; y < PIY; y++) begin : g_y
      for (genvar x = 0; x < PIX; x++) begin : g_x
        mac_unit u_mac (
          .clk, .rst,
          .en    (mac_en),
          .first (mac_first),
          .last  (mac_last),
          .px    (taps[y][x]),
          .wt    (wt_q[o]),
          .acc   (acc[o][y][x]),
          .result(result[o][y][x])
        );
      end
    end
  end

  always_comb begin
    for (int y = 0; y < PIY; y++)
      for (int x = 0; x < PIX; x++) res_sel[y][x] = result[sel_o][y][x];
  end
endmodule
