// ihcfp: IP header checksum calculation FP.
//
// Active for IPv4 only. Adds the header as 16-bit words (two per beat; the
// IP header starts at byte 14, so its words are always beat-aligned halves)
// in one's complement arithmetic, from byte 14 to 14 + header length, and
// checks that the folded sum is 0xFFFF, i.e. that its complement is 0. A
// wrong sum raises discard. The first 20 header bytes are summed before the
// header length is known; from byte 34 on the length from the header length
// FP decides. The document gives the one's complement check; the two-word
// per beat adder with a wide accumulator folded at the end is this design's.
//
// Interface: general FP interface plus v4 and the header length. done and
// discard are valid from the cycle after the header's last beat.
module ihcfp
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       start,
  input  beat_t      beat,
  input  logic       v4,
  input  logic [7:0] hdr_len,
  input  logic       len_valid,
  output logic       done,
  output logic       discard
);

  logic [31:0] sum_q, sum_d;
  logic        done_d;

  always_comb begin
    logic [POS_W:0] p;
    logic [POS_W:0] hend;
    p      = '0;
    hend   = (POS_W+1)'(14) + (POS_W+1)'(hdr_len);
    sum_d  = start ? '0 : sum_q;
    done_d = start ? 1'b0 : done;
    if (beat.valid && !done_d) begin
      for (int unsigned h = 0; h < 2; h++) begin
        p = {1'b0, beat.pos} + (POS_W+1)'(2*h);
        if (p >= 14 && (p < 34 || (len_valid && p < hend)) && 2*h < beat.nbytes)
          sum_d = sum_d + {16'd0, beat.data[31-16*h -: 16]};
      end
      if (len_valid && v4 && ({1'b0, beat.pos} + (POS_W+1)'(beat.nbytes)) >= hend)
        done_d = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_q <= '0;
      done  <= 1'b0;
    end else if (en) begin
      sum_q <= sum_d;
      done  <= done_d;
    end
  end

  assign discard = done && (oc_fold(sum_q) != 16'hFFFF);

endmodule
