// onu_mii_rx: ONU upstream MII receiver, 4-bit nibbles in, 16-bit words out.
//
// Runs on the MII receive clock (25 MHz for 100 Mbit/s). While RX_DV is
// high one nibble is taken per clock, the low nibble of each byte first as
// MII sends it. Two nibbles make a byte and two bytes a big-endian word
// (first byte in bits 15:8). A finished word is held back one step so that
// the word ending the packet can be marked last when RX_DV falls; an odd
// final byte leaves as a one_byte word, a trailing half byte is discarded.
// A packet is taken only if room_ok is high at its first nibble (the buffer
// behind can hold the longest packet); otherwise it is ignored and dropped
// pulses. At most one word is written every fourth clock.
// The 4-to-16-bit conversion follows the document; the nibble order is the
// MII standard's; the admission rule is this design's choice.
module onu_mii_rx
  import olt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] rxd,
  input  logic       rx_dv,
  input  logic       room_ok,

  output logic       out_push,
  output pkt_word_t  out_word,
  output logic       dropped
);
  logic        in_pkt, accept, low_valid, have_hi, pend_valid;
  logic [3:0]  low;
  logic [7:0]  hi;
  logic [15:0] pend;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_pkt     <= 1'b0;
      accept     <= 1'b0;
      low_valid  <= 1'b0;
      have_hi    <= 1'b0;
      pend_valid <= 1'b0;
      low        <= '0;
      hi         <= '0;
      pend       <= '0;
      out_push   <= 1'b0;
      out_word   <= '0;
      dropped    <= 1'b0;
    end else begin
      out_push <= 1'b0;
      dropped  <= 1'b0;
      if (rx_dv && !in_pkt) begin
        in_pkt     <= 1'b1;
        accept     <= room_ok;
        dropped    <= !room_ok;
        low        <= rxd;
        low_valid  <= 1'b1;
        have_hi    <= 1'b0;
        pend_valid <= 1'b0;
      end else if (rx_dv && accept) begin
        if (!low_valid) begin
          low       <= rxd;
          low_valid <= 1'b1;
        end else begin
          // a whole byte {rxd, low}
          low_valid <= 1'b0;
          if (!have_hi) begin
            if (pend_valid) begin
              out_push <= 1'b1;
              out_word <= '{data: pend, last: 1'b0, one_byte: 1'b0};
            end
            pend_valid <= 1'b0;
            hi         <= {rxd, low};
            have_hi    <= 1'b1;
          end else begin
            pend       <= {hi, rxd, low};
            pend_valid <= 1'b1;
            have_hi    <= 1'b0;
          end
        end
      end else if (!rx_dv && in_pkt) begin
        in_pkt <= 1'b0;
        if (accept && (have_hi || pend_valid)) begin
          out_push <= 1'b1;
          out_word <= have_hi ? '{data: {hi, 8'h00}, last: 1'b1, one_byte: 1'b1}
                              : '{data: pend, last: 1'b1, one_byte: 1'b0};
        end
        accept     <= 1'b0;
        low_valid  <= 1'b0;
        have_hi    <= 1'b0;
        pend_valid <= 1'b0;
      end
    end
endmodule
