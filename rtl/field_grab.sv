// field_grab: captures a header field of up to MAXLEN bytes from the beat
// stream, wherever its bytes fall in the 32-bit beats.
//
// The field starts at byte position off and is len bytes long (both may
// change per frame, e.g. with the IP version). start clears the capture for a
// new frame; done rises in the cycle after the field's last byte was seen and
// stays high until the next start. val holds the field right-aligned, first
// byte most significant. This helper is this design's common way of doing
// the "extract" part of the extraction FPs.
module field_grab
  import gppp_pkg::*;
#(
  parameter int unsigned MAXLEN = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  start,
  input  beat_t                 beat,
  input  logic [POS_W-1:0]      off,
  input  logic [4:0]            len,
  output logic [8*MAXLEN-1:0]   val,
  output logic                  done
);

  logic [8*MAXLEN-1:0] val_d;
  logic                done_d;

  always_comb begin
    logic [POS_W:0] p;
    logic [POS_W:0] rel;
    p      = '0;
    rel    = '0;
    val_d  = start ? '0 : val;
    done_d = start ? 1'b0 : done;
    if (beat.valid) begin
      for (int unsigned i = 0; i < NBYTE; i++) begin
        p   = {1'b0, beat.pos} + (POS_W+1)'(i);
        rel = p - {1'b0, off};
        if (i < beat.nbytes && p >= {1'b0, off} && rel < (POS_W+1)'(len)) begin
          val_d[8*(int'(len) - 1 - int'(rel)) +: 8] = lane_byte(beat.data, i);
          if (rel == (POS_W+1)'(len) - 1) done_d = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      val  <= '0;
      done <= 1'b0;
    end else if (en || start) begin
      val  <= val_d;
      done <= done_d;
    end
  end

endmodule
