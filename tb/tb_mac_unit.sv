// tb_mac_unit: random accumulations of 1 to 20 products, checked against a
// 30-bit wrapping reference after every step and at every `last`.
module tb_mac_unit;
  import cnn_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, first = 1'b0, last = 1'b0;
  pixel_t px = '0;
  weight_t wt = '0;
  psum_t acc, result;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mac_unit dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic psum_t wrap(longint v);
    return psum_t'(v);
  endfunction

  initial begin
    longint model;
    psum_t res_model;
    @(negedge clk) rst = 1'b0;
    for (int t = 0; t < 200; t++) begin
      automatic int n = int'($urandom_range(20, 1));
      model = 0;
      for (int i = 0; i < n; i++) begin
        @(negedge clk);
        en = ($urandom_range(3) != 0);
        while (!en) begin
          // idle cycles must not change the sum
          @(negedge clk);
          en = ($urandom_range(3) != 0);
        end
        first = (i == 0);
        last  = (i == n - 1);
        px = pixel_t'($urandom);
        if (t < 5) px = (t % 2) ? 16'sh7fff : -16'sh8000;  // extreme values wrap the sum
        wt = weight_t'($urandom);
        model += longint'(px) * longint'(wt);
        @(posedge clk);
        #1;
        checks++;
        if (acc != wrap(model)) begin
          failures++;
          $display("acc %0d expected %0d", acc, wrap(model));
        end
      end
      @(negedge clk);
      en = 1'b0;
      res_model = wrap(model);
      checks++;
      if (result != res_model) begin
        failures++;
        $display("result %0d expected %0d", result, res_model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
