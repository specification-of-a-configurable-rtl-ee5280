// Common part of the functional-page testbenches: clock, reset, check
// counting, a beat driver and a watchdog. The including module instantiates
// its FP with clk, rst_n, en, start and beat.

  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  en = 1'b1, start = 1'b0;
  beat_t beat = '0;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // Drive a frame's beats, gap idle cycles between beats; start goes with the
  // first beat. Returns after the last beat plus two cycles.
  task automatic drive(input bytes_t f, input int gap = 0);
    beats_t q = to_beats(f);
    foreach (q[i]) begin
      @(negedge clk);
      beat  = q[i];
      start = q[i].sof;
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        beat  = '0;
        start = 1'b0;
      end
    end
    @(negedge clk);
    beat  = '0;
    start = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic finish();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish();
  end
