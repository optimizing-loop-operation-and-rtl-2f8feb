// tb_dma_manager: streams weights and input pixels through the DMA manager
// and checks every buffer write position against the layout formulas, then
// fills a model output buffer and checks the order and values of the output
// stream, with and without pooling, under random back-pressure. Each transfer
// must end with a `done` pulse.
module tb_dma_manager;
  import cnn_pkg::*;
  localparam int PIX = 4, PIY = 4, POF = 4, K = 3;

  logic clk = 1'b0, rst = 1'b1;
  layer_cfg_t cfg;
  layer_geom_t geom;
  logic cmd_wt = 1'b0, cmd_in = 1'b0, cmd_out = 1'b0, done;
  logic wt_valid = 1'b0, wt_ready, in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  weight_t wt_data = '0;
  pixel_t in_data = '0, out_data;
  logic wb_wr_en, ib_wr_en;
  logic [9:0] wb_wr_addr;
  logic [1:0] wb_wr_slot, ib_wr_bank, ib_wr_slot;
  weight_t wb_wr_data;
  logic [7:0] ib_wr_addr;
  pixel_t ib_wr_data;
  logic [8:0] ob_rd_addr;
  pixel_t ob_rd_data [PIY][PIX];
  pixel_t obuf [PIY][512][PIX];

  int checks = 0, failures = 0, n_done = 0;

  always #5 clk = ~clk;

  layer_geometry #(.PIX(PIX), .PIY(PIY), .K(K)) u_geom (.cfg, .geom);
  dma_manager #(.PIX(PIX), .PIY(PIY), .POF(POF), .K(K),
                .IBUF_DEPTH(256), .WBUF_DEPTH(1024), .OBUF_DEPTH(512)) dut (.*);

  // model output buffer with a one-cycle read
  always_ff @(posedge clk)
    for (int b = 0; b < PIY; b++) ob_rd_data[b] <= obuf[b][ob_rd_addr];

  always @(negedge clk) if (done) n_done++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(ref logic c);
    @(negedge clk);
    c = 1'b1;
    @(negedge clk);
    c = 1'b0;
  endtask

  task automatic run(bit pool);
    int nif = 2, nof = 8, nix = 6, niy = 5;
    int nd;
    cfg = '0;
    cfg.nif = MAPS_W'(nif); cfg.nof = MAPS_W'(nof);
    cfg.nix = DIM_W'(nix);  cfg.niy = DIM_W'(niy);
    {cfg.pad_top, cfg.pad_bot, cfg.pad_left, cfg.pad_right} = 4'b1111;
    cfg.pool_en = pool;
    nd = n_done;
    // weights
    command(cmd_wt);
    for (int o = 0; o < nof; o++)
      for (int i = 0; i < nif; i++)
        for (int k = 0; k < K * K; k++) begin
          @(negedge clk);
          while ($urandom_range(2) == 0) begin wt_valid = 1'b0; @(negedge clk); end
          wt_valid = 1'b1;
          wt_data = weight_t'($urandom);
          while (!wt_ready) @(negedge clk);
          #1;
          checks++;
          if (!wb_wr_en || wb_wr_addr != 10'(((o / POF) * nif + i) * K * K + k) ||
              wb_wr_slot != 2'(o % POF) || wb_wr_data != wt_data) begin
            failures++;
            $display("weight (%0d,%0d,%0d) written to %0d slot %0d", o, i, k, wb_wr_addr, wb_wr_slot);
          end
          @(posedge clk);
        end
    @(negedge clk);
    wt_valid = 1'b0;
    // input pixels
    command(cmd_in);
    for (int i = 0; i < nif; i++)
      for (int y = 0; y < niy; y++)
        for (int x = 0; x < nix; x++) begin
          @(negedge clk);
          in_valid = 1'b1;
          in_data = pixel_t'($urandom);
          while (!in_ready) @(negedge clk);
          #1;
          checks++;
          if (!ib_wr_en || ib_wr_bank != 2'((y + 1) % PIY) ||
              ib_wr_addr != 8'((i * int'(geom.rpb) + (y + 1) / PIY) * int'(geom.wpr) + (x + 1) / PIX) ||
              ib_wr_slot != 2'((x + 1) % PIX) || ib_wr_data != in_data) begin
            failures++;
            $display("pixel (%0d,%0d,%0d) written to bank %0d addr %0d slot %0d", i, y, x,
                     ib_wr_bank, ib_wr_addr, ib_wr_slot);
          end
          @(posedge clk);
        end
    @(negedge clk);
    in_valid = 1'b0;
    // output pixels
    for (int b = 0; b < PIY; b++)
      for (int a = 0; a < 512; a++)
        for (int s = 0; s < PIX; s++) obuf[b][a][s] = pixel_t'($urandom);
    command(cmd_out);
    for (int o = 0; o < nof; o++)
      for (int y = 0; y < int'(geom.fy); y++)
        for (int x = 0; x < int'(geom.fx); x++) begin
          automatic pixel_t e = obuf[y % PIY][(o * int'(geom.orpb) + y / PIY) * int'(geom.owpr) + x / PIX][x % PIX];
          do begin
            @(negedge clk);
            out_ready = ($urandom_range(3) != 0);
          end while (!(out_valid && out_ready));
          checks++;
          if (out_data != e) begin
            failures++;
            $display("output (%0d,%0d,%0d): got %0d expected %0d", o, y, x, out_data, e);
          end
          @(posedge clk);
        end
    @(negedge clk);
    out_ready = 1'b0;
    repeat (3) @(negedge clk);
    checks += 2;
    if (out_valid) begin failures++; $display("extra output"); end
    if (n_done - nd != 3) begin failures++; $display("%0d done pulses, expected 3", n_done - nd); end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run(1'b0);
    run(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
