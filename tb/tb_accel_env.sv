// tb_accel_env: end-to-end test bench body for cnn_accel_top.
//
// Runs a list of convolution jobs through the accelerator. For each job it
// makes random input maps and weights, streams them in (with random gaps on
// the weight stream), collects the output stream (with random back-pressure)
// and compares every pixel with a reference convolution computed here in
// plain integer arithmetic: zero padding, 3x3 stride-1 convolution, 30-bit
// wrap, arithmetic shift, optional ReLU, saturation to 16 bits and optional
// 2x2 max pooling. It also checks that the convolution phase takes exactly
// one cycle per step plus one per drain stall, and counts how often each
// mechanism happened (drain stall, zero padding, row hand-over between
// register rows, ReLU clamp, saturation, pooling); a mechanism that never
// happened counts as a failure. The module that instantiates this body
// holds the watchdog, prints the result line once `finished` is set, and
// ends the simulation.
// FULL = 1 instantiates the accelerator with its default parameters.
// VGG = 1 (with FULL = 1) runs jobs cut from VGG-16 layers instead (see
// tb_vgg_conv5). The arithmetic checked is the accelerator's: stride 1, 3x3
// kernels and the fixed-point widths are as published; the stream orders,
// truncating shift, saturation, ReLU option and job sizes are this design's.
// The reference works on flat arrays to keep memory small at VGG sizes.
module tb_accel_env #(
  parameter bit FULL = 1'b0,
  parameter bit VGG  = 1'b0
);
  import cnn_pkg::*;

  localparam int PIX = FULL ? 14 : 4;
  localparam int PIY = FULL ? 14 : 4;
  localparam int POF = FULL ? 16 : 8;
  localparam int K   = 3;
  localparam int MAXM  = VGG ? 64 : 32;              // output maps
  localparam int MAXI  = VGG ? 512 : 32;             // input maps
  localparam int IMG_N = VGG ? 512 * 14 * 14 : 32 * 20 * 20;  // input pixels
  localparam int OUT_N = VGG ? 64 * 28 * 224 : 32 * 20 * 20;  // conv results

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic start = 1'b0;
  layer_cfg_t cfg;
  logic busy, done;
  logic wt_valid = 1'b0, wt_ready;
  weight_t wt_data = '0;
  logic in_valid = 1'b0, in_ready;
  pixel_t in_data = '0;
  logic out_valid, out_ready = 1'b0;
  pixel_t out_data;
  logic ev_stall, ev_drain, ev_pool;

  always #5 clk = ~clk;

  if (FULL) begin : g_dut
    cnn_accel_top dut (.*);
  end else begin : g_dut
    cnn_accel_top #(
      .PIX(4), .PIY(4), .POF(8), .K(3),
      .IBUF_DEPTH(256), .WBUF_DEPTH(1024), .OBUF_DEPTH(512)
    ) dut (.*);
  end

  int checks = 0, failures = 0;
  bit finished = 1'b0;   // set when every job has run and been checked
  int n_stall = 0, n_drain = 0, n_pool = 0, n_pad = 0, n_rowup = 0, n_relu = 0, n_sat = 0;
  int conv_cycles = 0;

  // maps are stored flat: pixel (map m, row y, column x) of a map with
  // h rows and w columns is element (m * h + y) * w + x
  int img [IMG_N];
  int wts [MAXM][MAXI][K][K];
  int conv [OUT_N];
  int ref_out [OUT_N];


  // event counters, sampled mid-cycle
  always @(negedge clk) begin
    if (!rst) begin
      if (ev_stall) n_stall++;
      if (ev_drain) n_drain++;
      if (ev_pool)  n_pool++;
      if (g_dut.dut.u_ctrl.pe_step && g_dut.dut.u_ctrl.pe_ky != '0) n_rowup++;
      if (g_dut.dut.u_ctrl.st == 3'd3) conv_cycles++;  // controller in its convolution phase
    end
  end

  function automatic int wrap30(longint v);
    longint m = v & ((64'd1 << 30) - 1);
    if (m >= (64'd1 << 29)) m -= (64'd1 << 30);
    return int'(m);
  endfunction

  task automatic make_ref(layer_cfg_t c, output int fy, output int fx);
    int pt = int'(c.pad_top), pl = int'(c.pad_left);
    int prow = int'(c.niy) + c.pad_top + c.pad_bot;
    int pcol = int'(c.nix) + c.pad_left + c.pad_right;
    int noy = prow - K + 1, nox = pcol - K + 1;
    for (int o = 0; o < int'(c.nof); o++)
      for (int y = 0; y < noy; y++)
        for (int x = 0; x < nox; x++) begin
          longint s = 0;
          int q;
          for (int i = 0; i < int'(c.nif); i++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++) begin
                int iy = y + ky - pt, ix = x + kx - pl;
                if (iy >= 0 && iy < int'(c.niy) && ix >= 0 && ix < int'(c.nix))
                  s += longint'(img[(i * int'(c.niy) + iy) * int'(c.nix) + ix]) * wts[o][i][ky][kx];
                else if (o == 0) n_pad++;
              end
          q = wrap30(s) >>> c.frac_shift;
          if (c.relu_en && q < 0) begin q = 0; n_relu++; end
          else if (q > 32767)  begin q = 32767; n_sat++; end
          else if (q < -32768) begin q = -32768; n_sat++; end
          conv[(o * noy + y) * nox + x] = q;
        end
    if (c.pool_en) begin
      fy = noy / 2; fx = nox / 2;
      for (int o = 0; o < int'(c.nof); o++)
        for (int y = 0; y < fy; y++)
          for (int x = 0; x < fx; x++) begin
            int b = (o * noy + 2 * y) * nox + 2 * x;
            int m = conv[b];
            if (conv[b + 1] > m)       m = conv[b + 1];
            if (conv[b + nox] > m)     m = conv[b + nox];
            if (conv[b + nox + 1] > m) m = conv[b + nox + 1];
            ref_out[(o * fy + y) * fx + x] = m;
          end
    end else begin
      fy = noy; fx = nox;
      for (int o = 0; o < int'(c.nof); o++)
        for (int y = 0; y < noy; y++)
          for (int x = 0; x < nox; x++) ref_out[(o * noy + y) * nox + x] = conv[(o * noy + y) * nox + x];
    end
  endtask

  task automatic run_job(layer_cfg_t c, int pmax, int wmax);
    int fy, fx, nout, got, steps, stall0, cyc0, tiles;
    for (int i = 0; i < int'(c.nif); i++)
      for (int y = 0; y < int'(c.niy); y++)
        for (int x = 0; x < int'(c.nix); x++)
          img[(i * int'(c.niy) + y) * int'(c.nix) + x] = int'($urandom_range(2 * pmax)) - pmax;
    for (int o = 0; o < int'(c.nof); o++)
      for (int i = 0; i < int'(c.nif); i++)
        for (int ky = 0; ky < K; ky++)
          for (int kx = 0; kx < K; kx++)
            wts[o][i][ky][kx] = int'($urandom_range(2 * wmax)) - wmax;
    make_ref(c, fy, fx);
    nout = int'(c.nof) * fy * fx;
    tiles = ((fy * (c.pool_en ? 2 : 1) + PIY - 1) / PIY) *
            ((fx * (c.pool_en ? 2 : 1) + PIX - 1) / PIX);
    steps = tiles * (int'(c.nof) / POF) * int'(c.nif) * K * K;
    stall0 = n_stall;
    cyc0 = conv_cycles;

    @(posedge clk);
    cfg <= c;
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;

    fork
      begin : drive_wt
        for (int o = 0; o < int'(c.nof); o++)
          for (int i = 0; i < int'(c.nif); i++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++) begin
                @(negedge clk);
                while ($urandom_range(3) == 0) begin
                  wt_valid = 1'b0;
                  @(negedge clk);
                end
                wt_valid = 1'b1;
                wt_data  = weight_t'(wts[o][i][ky][kx]);
                while (!wt_ready) @(negedge clk);
                @(posedge clk);
              end
        @(negedge clk);
        wt_valid = 1'b0;
      end
      begin : drive_in
        for (int i = 0; i < int'(c.nif); i++)
          for (int y = 0; y < int'(c.niy); y++)
            for (int x = 0; x < int'(c.nix); x++) begin
              @(negedge clk);
              in_valid = 1'b1;
              in_data  = pixel_t'(img[(i * int'(c.niy) + y) * int'(c.nix) + x]);
              while (!in_ready) @(negedge clk);
              @(posedge clk);
            end
        @(negedge clk);
        in_valid = 1'b0;
      end
      begin : collect
        got = 0;
        while (got < nout) begin
          @(negedge clk);
          out_ready = ($urandom_range(4) != 0);
          if (out_valid && out_ready) begin
            int o = got / (fy * fx);
            int y = (got / fx) % fy;
            int x = got % fx;
            checks++;
            if (int'(out_data) != ref_out[got]) begin
              failures++;
              if (failures < 10)
                $display("mismatch map %0d (%0d,%0d): got %0d expected %0d",
                         o, y, x, out_data, ref_out[got]);
            end
            got++;
          end
          @(posedge clk);
        end
        @(negedge clk);
        out_ready = 1'b0;
      end
    join
    do @(negedge clk); while (!done);
    checks++;
    if (conv_cycles - cyc0 != steps + (n_stall - stall0)) begin
      failures++;
      $display("conv phase took %0d cycles, expected %0d steps + %0d stalls",
               conv_cycles - cyc0, steps, n_stall - stall0);
    end
    $display("job nif=%0d nof=%0d %0dx%0d pool=%0d: %0d pixels, %0d conv cycles",
             c.nif, c.nof, c.nix, c.niy, c.pool_en, nout, conv_cycles - cyc0);
  endtask

  function automatic layer_cfg_t mk(int nif, int nof, int nix, int niy, bit pad,
                                    int sh, bit relu, bit pool);
    layer_cfg_t c;
    c = '0;
    c.nif = MAPS_W'(nif);
    c.nof = MAPS_W'(nof);
    c.nix = DIM_W'(nix);
    c.niy = DIM_W'(niy);
    {c.pad_top, c.pad_bot, c.pad_left, c.pad_right} = {4{pad}};
    c.frac_shift = 5'(sh);
    c.relu_en = relu;
    c.pool_en = pool;
    return c;
  endfunction

  initial begin
    layer_cfg_t c1;
    cfg = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    if (VGG) begin
      // 16 output maps of a conv5 layer: 512 input maps, 14 x 14, padding,
      // ReLU and 2x2 pooling, 4608 conv steps for one tile
      run_job(mk(512, 16, 14, 14, 1'b1, 6, 1'b1, 1'b1), 100, 20);
      // top stripe of conv1_1: 3 input maps of 224 columns, 28 output rows
      // (29 input rows, padding on the top, left and right only), 64 output
      // maps, ReLU and pooling; fills the output buffer exactly
      c1 = mk(3, 64, 224, 29, 1'b1, 4, 1'b1, 1'b1);
      c1.pad_bot = 1'b0;
      run_job(c1, 200, 60);
      // two input maps, two groups of output maps: the second tile stalls
      // on the first one's drain; no pooling, saturation
      run_job(mk(2, 32, 14, 14, 1'b1, 0, 1'b0, 1'b0), 3000, 127);
    end else if (FULL) begin
      // a VGG-like 3x3 layer with padding and pooling over a 2 x 2 tile grid
      run_job(mk(2, 32, 16, 16, 1'b1, 2, 1'b1, 1'b1), 300, 60);
      // one input map: drain stalls, no pooling, saturation
      run_job(mk(1, 16, 14, 14, 1'b1, 0, 1'b0, 1'b0), 3000, 127);
    end else begin
      run_job(mk(1, 8, 6, 6, 1'b1, 0, 1'b1, 1'b0), 1000, 100);
      run_job(mk(3, 16, 8, 8, 1'b1, 1, 1'b0, 1'b1), 2000, 127);
      run_job(mk(2, 8, 9, 7, 1'b0, 0, 1'b1, 1'b0), 500, 50);
      run_job(mk(2, 8, 10, 10, 1'b1, 3, 1'b0, 1'b1), 400, 40);
    end
    $display("events: stall=%0d drain=%0d pool=%0d pad=%0d rowup=%0d relu=%0d sat=%0d",
             n_stall, n_drain, n_pool, n_pad, n_rowup, n_relu, n_sat);
    checks += 7;
    if (n_stall == 0) failures++;
    if (n_drain == 0) failures++;
    if (n_pool  == 0) failures++;
    if (n_pad   == 0) failures++;
    if (n_rowup == 0) failures++;
    if (n_relu  == 0) failures++;
    if (n_sat   == 0) failures++;
    finished = 1'b1;
  end
endmodule
