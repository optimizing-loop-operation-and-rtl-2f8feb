// weight_buffer: on-chip store of the kernel weights of a job.
//
// Each word holds the POF weights that the POF output-map slices of the MAC
// array use in the same cycle (same input map, same kernel position, POF
// consecutive output maps). Word address =
// (output_group * Nif + input_map) * K*K + ky*K + kx.
// Write: one weight per cycle into (address, slot). Read: synchronous, the
// word appears one cycle after `rd_en` and holds until the next read.
// The word organisation is this design's choice, made so that a single read
// serves the weight broadcast of one cycle.
module weight_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned POF   = 16,
  parameter int unsigned DEPTH = 36864,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned SW   = (POF > 1) ? $clog2(POF) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [SW-1:0] wr_slot,
  input  weight_t       wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output weight_t       rd_data [POF]
);
  weight_t mem [DEPTH][POF];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_slot] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
