// tb_conv_controller: runs the controller through whole jobs with simple
// stand-ins for its neighbours (DMA transfers finish a few cycles after each
// command, the PE array reports results two cycles after its last step, the
// pooling unit finishes after a while). Checks the phase order, every
// buffer read address issued, the step controls one cycle later, every drain
// address, that the convolution phase takes one cycle per step plus one per
// stall, and that a one-input-map job stalls on the drain.
module tb_conv_controller;
  import cnn_pkg::*;
  localparam int PIX = 4, PIY = 4, POF = 16, K = 3;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  layer_cfg_t cfg;
  layer_geom_t geom;
  logic busy, done, dma_wt, dma_in, dma_out;
  logic dma_done = 1'b0;
  logic ib_rd_en, wb_rd_en;
  logic [7:0] ib_rd_addr;
  cnt_t ib_rd_ridx, ib_rd_word;
  logic [9:0] wb_rd_addr;
  logic pe_step, pe_first, pe_last;
  logic [1:0] pe_kx, pe_ky;
  logic pe_res_valid;
  logic [3:0] pe_sel_o;
  logic drain_we;
  logic [8:0] drain_addr;
  logic pool_start, pool_done = 1'b0;
  logic ev_stall;

  int checks = 0, failures = 0;
  int exp_ib [$], exp_wb [$], exp_dr [$], exp_ctl [$];
  int n_steps, n_stall_job, conv_cycles, phase;
  logic [1:0] rv_pipe;

  always #5 clk = ~clk;

  layer_geometry #(.PIX(PIX), .PIY(PIY), .K(K)) u_geom (.cfg, .geom);
  conv_controller #(.POF(POF), .K(K), .IBUF_DEPTH(256), .WBUF_DEPTH(1024), .OBUF_DEPTH(512)) dut (.*);

  // stand-in for the PE array: results two cycles after the last step
  always_ff @(posedge clk) begin
    if (rst) rv_pipe <= '0;
    else     rv_pipe <= {rv_pipe[0], pe_step & pe_last};
  end
  assign pe_res_valid = rv_pipe[1];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker, sampled mid-cycle
  always @(negedge clk) begin
    if (!rst) begin
      if (dut.st == 3'd3) conv_cycles++;
      if (ev_stall) n_stall_job++;
      if (ib_rd_en) begin
        checks++;
        if (exp_ib.size() == 0 || ib_rd_addr != 8'(exp_ib[0]) || wb_rd_addr != 10'(exp_wb[0])) begin
          failures++;
          $display("step read ib=%0d wb=%0d, expected ib=%0d wb=%0d", ib_rd_addr, wb_rd_addr,
                   exp_ib.size() ? exp_ib[0] : -1, exp_wb.size() ? exp_wb[0] : -1);
        end
        if (exp_ib.size()) begin void'(exp_ib.pop_front()); void'(exp_wb.pop_front()); end
        if (phase != 2) begin failures++; $display("step outside the convolution phase"); end
      end
      if (pe_step) begin
        checks++;
        if (exp_ctl.size() == 0 || {pe_ky, pe_kx, pe_first, pe_last} != 6'(exp_ctl[0])) begin
          failures++;
          $display("step controls %b, expected %b", {pe_ky, pe_kx, pe_first, pe_last},
                   exp_ctl.size() ? 6'(exp_ctl[0]) : 6'h3f);
        end
        if (exp_ctl.size()) void'(exp_ctl.pop_front());
      end
      if (drain_we) begin
        checks++;
        if (exp_dr.size() == 0 || drain_addr != 9'(exp_dr[0]) || pe_sel_o != 4'(exp_dr[0] >> 16)) begin
          failures++;
          $display("drain addr %0d map %0d, expected %0d map %0d", drain_addr, pe_sel_o,
                   exp_dr.size() ? exp_dr[0] & 16'hffff : -1, exp_dr.size() ? exp_dr[0] >> 16 : -1);
        end
        if (exp_dr.size()) void'(exp_dr.pop_front());
      end
    end
  end

  task automatic pulse_after(int n, ref logic sig);
    repeat (n) @(negedge clk);
    sig = 1'b1;
    @(negedge clk);
    sig = 1'b0;
  endtask

  task automatic expect_pulse(ref logic sig, input string what);
    int waitc = 0;
    while (!sig && waitc < 5000) begin @(negedge clk); waitc++; end
    checks++;
    if (!sig) begin failures++; $display("no %s", what); end
  endtask

  task automatic run_job(int nif, int nof, int nix, int niy, bit pool, bit expect_stall);
    int nofg = nof / POF;
    cfg = '0;
    cfg.nif = MAPS_W'(nif); cfg.nof = MAPS_W'(nof);
    cfg.nix = DIM_W'(nix);  cfg.niy = DIM_W'(niy);
    {cfg.pad_top, cfg.pad_bot, cfg.pad_left, cfg.pad_right} = 4'b1111;
    cfg.pool_en = pool;
    #1;
    n_steps = 0;
    for (int tr = 0; tr < int'(geom.orpb); tr++)
      for (int wc = 0; wc < int'(geom.owpr); wc++)
        for (int g = 0; g < nofg; g++) begin
          for (int i = 0; i < nif; i++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++) begin
                exp_ib.push_back((i * int'(geom.rpb) + tr + (ky != 0)) * int'(geom.wpr) + wc + (kx != 0));
                exp_wb.push_back((g * nif + i) * K * K + ky * K + kx);
                exp_ctl.push_back({ky[1:0], kx[1:0], (i == 0 && ky == 0 && kx == 0),
                                   (i == nif - 1 && ky == K - 1 && kx == K - 1)});
                n_steps++;
              end
          for (int o = 0; o < POF; o++)
            exp_dr.push_back((o << 16) | (((g * POF + o) * int'(geom.orpb) + tr) * int'(geom.owpr) + wc));
        end
    conv_cycles = 0;
    n_stall_job = 0;
    phase = 0;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    expect_pulse(dma_wt, "weight load command");
    pulse_after(7, dma_done);
    expect_pulse(dma_in, "input load command");
    phase = 2;
    pulse_after(5, dma_done);
    if (pool) begin
      expect_pulse(pool_start, "pooling start");
      phase = 3;
      pulse_after(20, pool_done);
    end
    expect_pulse(dma_out, "output store command");
    phase = 4;
    checks += 4;
    if (exp_ib.size() != 0) begin failures++; $display("%0d steps missing", exp_ib.size()); end
    if (exp_dr.size() != 0) begin failures++; $display("%0d drains missing", exp_dr.size()); end
    if (conv_cycles != n_steps + n_stall_job) begin
      failures++;
      $display("convolution phase %0d cycles for %0d steps and %0d stalls", conv_cycles, n_steps, n_stall_job);
    end
    if (expect_stall != (n_stall_job > 0)) begin
      failures++;
      $display("stall cycles %0d", n_stall_job);
    end
    pulse_after(3, dma_done);
    expect_pulse(done, "done");
    exp_ib.delete(); exp_wb.delete(); exp_dr.delete(); exp_ctl.delete();
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    run_job(1, 32, 6, 6, 1'b0, 1'b1);
    run_job(3, 16, 7, 9, 1'b1, 1'b0);
    run_job(2, 32, 4, 4, 1'b1, 1'b1);
    run_job(3, 32, 5, 4, 1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
