// tb_weight_buffer: random single-weight writes, then word reads checked
// against a reference copy, including the one-cycle read latency.
module tb_weight_buffer;
  import cnn_pkg::*;
  localparam int POF = 4, DEPTH = 64;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0] wr_addr = '0, rd_addr = '0;
  logic [1:0] wr_slot = '0;
  weight_t wr_data = '0;
  weight_t rd_data [POF];
  weight_t model [DEPTH][POF];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  weight_buffer #(.POF(POF), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++)
      for (int s = 0; s < POF; s++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = 6'(a); wr_slot = 2'(s);
        wr_data = weight_t'($urandom);
        model[a][s] = wr_data;
      end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr_en = ($urandom_range(1) == 1);
      wr_addr = 6'($urandom); wr_slot = 2'($urandom); wr_data = weight_t'($urandom);
      rd_en = 1'b1; rd_addr = 6'($urandom);
      @(posedge clk);
      #1;
      if (wr_en) model[wr_addr][wr_slot] = wr_data;
      for (int s = 0; s < POF; s++) begin
        checks++;
        // a read of the address being written returns either value; skip it
        if (!(wr_en && wr_addr == rd_addr && wr_slot == 2'(s)) && rd_data[s] != model[rd_addr][s]) begin
          failures++;
          $display("addr %0d slot %0d: got %0d expected %0d", rd_addr, s, rd_data[s], model[rd_addr][s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
