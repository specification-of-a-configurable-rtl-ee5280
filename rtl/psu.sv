// psu: parallelisation/synchronisation unit.
//
// Takes the receive side of an MII (4-bit) or GMII (8-bit) interface,
// synchronises on the start-of-frame delimiter after the preamble and packs
// the frame bytes into 32-bit beats for the register chain. The document
// names the unit, its MII/GMII input and its 32-bit output; the packing
// order, the end-of-frame handling and the MII nibble mode are this design's.
//
// Interface: rx_dv/rx_er/rxd are sampled on every clk edge (one byte per
// cycle in GMII mode, one nibble per cycle, low nibble first, in MII mode).
// The preamble and SFD (0xD5) are removed. Bytes are placed in network order
// (first byte in bits 31:24). A full word is held back until the next byte
// or the end of rx_dv shows whether it is the last one, so eof is always
// marked on the frame's final beat; that beat leaves two cycles after rx_dv
// falls. beat_o.pos is left zero: the controller's counter stamps it.
// err is set on every beat from the first rx_er of the frame onwards.
module psu
  import gppp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mii_mode, // 1: MII nibbles on rxd[3:0]; 0: GMII bytes
  input  logic       rx_dv,
  input  logic       rx_er,
  input  logic [7:0] rxd,
  output beat_t      beat_o
);

  typedef enum logic [1:0] {S_IDLE, S_HUNT, S_DATA} state_e;

  state_e      state_q;
  logic        half_q;     // MII: low nibble of the current byte received
  logic [3:0]  nib_q;      // MII: that low nibble
  logic [31:0] acc_q;
  logic [2:0]  cnt_q;      // bytes held in acc_q, 0..4
  logic        first_q;    // next emitted beat is the first of the frame
  logic        err_q;

  // Byte assembly: one byte strobe per GMII cycle, every second MII cycle.
  logic       byte_stb;
  logic [7:0] byte_v;
  always_comb begin
    byte_stb = 1'b0;
    byte_v   = rxd;
    if (mii_mode) begin
      byte_v   = {rxd[3:0], nib_q};
      byte_stb = rx_dv && half_q;
    end else begin
      byte_stb = rx_dv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      half_q  <= 1'b0;
      nib_q   <= '0;
      acc_q   <= '0;
      cnt_q   <= '0;
      first_q <= 1'b0;
      err_q   <= 1'b0;
      beat_o  <= '0;
    end else begin
      beat_o.valid <= 1'b0;
      beat_o.sof   <= 1'b0;
      beat_o.eof   <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          half_q <= 1'b0;
          if (rx_dv) begin
            state_q <= S_HUNT;
            err_q   <= rx_er;
            // MII: the SFD is the nibble pair 5,D; the D nibble ends the hunt
            // and the next nibble is the low half of the first byte.
            if (!mii_mode && rxd == 8'hD5) begin
              state_q <= S_DATA;
            end else if (mii_mode && rxd[3:0] == 4'hD) begin
              state_q <= S_DATA;
            end
            cnt_q   <= '0;
            first_q <= 1'b1;
          end
        end
        S_HUNT: begin
          if (!rx_dv) state_q <= S_IDLE;
          else begin
            if (rx_er) err_q <= 1'b1;
            if ((!mii_mode && rxd == 8'hD5) || (mii_mode && rxd[3:0] == 4'hD))
              state_q <= S_DATA;
            half_q <= 1'b0;
          end
        end
        S_DATA: begin
          if (!rx_dv) begin
            state_q <= S_IDLE;
            if (cnt_q != 0) begin
              beat_o.valid  <= 1'b1;
              beat_o.sof    <= first_q;
              beat_o.eof    <= 1'b1;
              beat_o.err    <= err_q;
              beat_o.nbytes <= cnt_q;
              beat_o.pos    <= '0;
              beat_o.data   <= acc_q;
            end
            cnt_q <= '0;
          end else begin
            if (rx_er) err_q <= 1'b1;
            if (mii_mode) begin
              half_q <= ~half_q;
              if (!half_q) nib_q <= rxd[3:0];
            end
            if (byte_stb) begin
              if (cnt_q == 3'd4) begin
                beat_o.valid  <= 1'b1;
                beat_o.sof    <= first_q;
                beat_o.eof    <= 1'b0;
                beat_o.err    <= err_q | rx_er;
                beat_o.nbytes <= 3'd4;
                beat_o.pos    <= '0;
                beat_o.data   <= acc_q;
                first_q       <= 1'b0;
                acc_q         <= {byte_v, 24'd0};
                cnt_q         <= 3'd1;
              end else begin
                acc_q[31-8*cnt_q -: 8] <= byte_v;
                cnt_q <= cnt_q + 3'd1;
              end
            end
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
