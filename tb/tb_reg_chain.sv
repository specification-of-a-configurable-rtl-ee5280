// tb_reg_chain: random beats into a 12-stage chain; every tap must show the
// input of k+1 cycles earlier.
module tb_reg_chain;
  import gppp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  beat_t beat_i = '0;
  beat_t taps_o [NFP];
  beat_t hist [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  reg_chain #(.DEPTH(NFP)) dut (.clk, .rst_n, .beat_i, .taps_o);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      if (hist.size() > NFP) begin
        for (int k = 0; k < NFP; k++) begin
          checks++;
          if (taps_o[k] != hist[hist.size() - 1 - k]) begin
            failures++;
            $display("FAIL: cycle %0d tap %0d", c, k);
          end
        end
      end
      beat_i = beat_t'({$urandom, $urandom});
      hist.push_back(beat_i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
