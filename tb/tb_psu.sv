// tb_psu: frames of every length modulo 4 over GMII and MII, with and
// without a receive error, a frame with no SFD, and back-to-back frames.
// The beats are collected and compared byte by byte with the frame sent;
// sof/eof/nbytes and the error flag are checked, and the eof beat must leave
// two cycles after rx_dv falls.
module tb_psu;
  import gppp_pkg::*;
  import gppp_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mii_mode = 0, rx_dv = 0, rx_er = 0;
  logic [7:0] rxd = '0;
  beat_t beat_o;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  psu dut (.clk, .rst_n, .mii_mode, .rx_dv, .rx_er, .rxd, .beat_o);

  bytes_t got;
  int     n_sof = 0, n_eof = 0, n_err = 0, bad_nb = 0;
  longint t_fall = 0, t_eof = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && beat_o.valid) begin
      if (beat_o.sof) begin
        n_sof++;
        got.delete();
      end
      if (beat_o.eof) begin
        n_eof++;
        t_eof = cyc;
      end
      if (beat_o.err) n_err++;
      if (!beat_o.eof && beat_o.nbytes != 4) bad_nb++;
      for (int i = 0; i < beat_o.nbytes; i++) got.push_back(beat_o.data[31-8*i -: 8]);
    end
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endfunction

  task automatic send(input bytes_t f, input bit mii, input int er_at = -1, input bit sfd = 1);
    bytes_t w;
    for (int i = 0; i < 7; i++) w.push_back(8'h55);
    w.push_back(sfd ? 8'hD5 : 8'h55);
    w = cat(w, f);
    mii_mode = mii;
    foreach (w[i])
      for (int n = 0; n < (mii ? 2 : 1); n++) begin
        @(negedge clk);
        rx_dv = 1; rx_er = (er_at >= 0 && i - 8 == er_at);
        rxd = mii ? {4'h0, n == 0 ? w[i][3:0] : w[i][7:4]} : w[i];
      end
    @(negedge clk); rx_dv = 0; rx_er = 0; t_fall = cyc;
    repeat (12) @(negedge clk);
  endtask

  initial begin
    bytes_t f;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 2; m++)
      for (int n = 60; n < 68; n++) begin
        f = rand_bytes(n);
        n_sof = 0; n_eof = 0; n_err = 0; bad_nb = 0;
        send(f, m[0]);
        check(n_sof == 1 && n_eof == 1 && bad_nb == 0, $sformatf("framing, mii=%0d len=%0d", m, n));
        check(got == f, $sformatf("bytes, mii=%0d len=%0d", m, n));
        check(n_err == 0, "no error flag");
        check(t_eof - t_fall == 2, $sformatf("eof seen %0d cycles after rx_dv fell", t_eof - t_fall));
      end
    n_err = 0;
    send(rand_bytes(64), 0, 30);
    check(n_err > 0, "receive error flagged");
    n_sof = 0;
    f = rand_bytes(64);
    foreach (f[i]) if (f[i] == 8'hD5) f[i] = 8'h00;
    send(f, 0, -1, 0);
    check(n_sof == 0, "no SFD, no frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
