// eccfp: Ethernet checksum calculation functional page.
//
// Runs the Ethernet CRC-32 over every byte of the frame, 32 bits per clock,
// from start to the frame end, FCS included. A correct frame leaves the
// fixed residue 0xDEBB20E3 in the (uncomplemented, reflected) CRC register,
// which is the same test as comparing the computed CRC with the received
// FCS. A mismatch raises discard. The document gives the 32-bit parallel
// CRC with a fixed polynomial; here the parallel update is written as four
// unrolled byte steps so that a last beat of 1..3 bytes is handled by the
// same logic. The register duplication and retiming the document uses for
// speed are left to synthesis.
//
// Interface (general FP interface): start marks the first beat of a frame at
// this FP's stage, en gates all state. done and discard are registered and
// valid from the cycle after the eof beat until the next start.
module eccfp
  import gppp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  start,
  input  beat_t beat,
  output logic  discard,
  output logic  done
);

  logic [31:0] crc_q, crc_d;

  always_comb begin
    crc_d = start ? 32'hFFFF_FFFF : crc_q;
    for (int unsigned i = 0; i < NBYTE; i++)
      if (i < beat.nbytes) crc_d = crc32_byte(crc_d, lane_byte(beat.data, i));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_q   <= 32'hFFFF_FFFF;
      discard <= 1'b0;
      done    <= 1'b0;
    end else if (en) begin
      if (start) begin
        discard <= 1'b0;
        done    <= 1'b0;
      end
      if (beat.valid) begin
        crc_q <= crc_d;
        if (beat.eof) begin
          done    <= 1'b1;
          discard <= (crc_d != CRC_RESIDUE);
        end
      end
    end
  end

endmodule
