// gmii_rx: downstream GMII receiver, GMII bytes in, 16-bit words out.
//
// Runs on RXCLK (125 MHz). While RXDV is high each RXD byte is taken; two
// bytes make one big-endian word (first byte in bits 15:8). A finished word
// is held back one step so that, when RXDV falls, the word that ends the
// packet can be marked last, or an odd final byte sent as a one_byte word.
// The bytes of each packet are counted and, as the last word is written,
// the count is written to the length store: the downstream format carries
// no length of its own, so the framer takes it from there.
//
// A packet is admitted only if, at its first byte, the data buffer can take
// the longest accepted packet and the length store is not full; otherwise
// all its bytes are ignored and dropped pulses once. Bytes beyond
// MAX_BYTES are ignored (oversize pulses) and the stored length counts only
// the kept bytes. RXER is reported through rx_error and otherwise ignored.
// Interface: dw_* writes the data buffer, len_* the length store, both in
// the RXCLK domain. One word is written at most every second clock.
// The 8-to-16-bit conversion, RXDV meaning and length counting follow the
// document; the admission and oversize rules are this design's choices.
module gmii_rx
  import olt_pkg::*;
#(
  parameter int unsigned BUF_AW    = 11,
  parameter int unsigned MAX_BYTES = MAX_PKT_BYTES
) (
  input  logic            rx_clk,
  input  logic            rst_n,
  input  logic [7:0]      rxd,
  input  logic            rx_dv,
  input  logic            rx_er,

  output logic            dw_push,
  output pkt_word_t       dw_word,
  input  logic [BUF_AW:0] dw_free,

  output logic            len_push,
  output logic [15:0]     len_value,
  input  logic            len_full,

  output logic            pkt_done,  // pulse: packet stored
  output logic            dropped,   // pulse: packet refused, no room
  output logic            oversize,  // pulse: packet truncated
  output logic            rx_error   // pulse: RXER seen inside a packet
);
  localparam int unsigned MAX_WORDS = (MAX_BYTES + 1) / 2;

  logic        in_pkt, accept, have_hi, pend_valid;
  logic [7:0]  hi;
  logic [15:0] pend;
  logic [15:0] count;
  logic        trunc_seen;

  logic take;
  assign take = rx_dv && in_pkt && accept && (count < 16'(MAX_BYTES));

  always_ff @(posedge rx_clk or negedge rst_n)
    if (!rst_n) begin
      in_pkt     <= 1'b0;
      accept     <= 1'b0;
      have_hi    <= 1'b0;
      pend_valid <= 1'b0;
      hi         <= '0;
      pend       <= '0;
      count      <= '0;
      trunc_seen <= 1'b0;
      dw_push    <= 1'b0;
      dw_word    <= '0;
      len_push   <= 1'b0;
      len_value  <= '0;
      pkt_done   <= 1'b0;
      dropped    <= 1'b0;
      oversize   <= 1'b0;
      rx_error   <= 1'b0;
    end else begin
      dw_push  <= 1'b0;
      len_push <= 1'b0;
      pkt_done <= 1'b0;
      dropped  <= 1'b0;
      oversize <= 1'b0;
      rx_error <= rx_dv && rx_er;

      if (rx_dv && !in_pkt) begin
        // first byte of a packet
        in_pkt     <= 1'b1;
        trunc_seen <= 1'b0;
        pend_valid <= 1'b0;
        if (dw_free > (BUF_AW+1)'(MAX_WORDS) && !len_full) begin
          accept  <= 1'b1;
          hi      <= rxd;
          have_hi <= 1'b1;
          count   <= 16'd1;
        end else begin
          accept  <= 1'b0;
          dropped <= 1'b1;
        end
      end else if (take) begin
        count <= count + 16'd1;
        if (have_hi) begin
          pend       <= {hi, rxd};
          pend_valid <= 1'b1;
          have_hi    <= 1'b0;
        end else begin
          if (pend_valid) begin
            dw_push <= 1'b1;
            dw_word <= '{data: pend, last: 1'b0, one_byte: 1'b0};
          end
          pend_valid <= 1'b0;
          hi         <= rxd;
          have_hi    <= 1'b1;
        end
      end else if (rx_dv && in_pkt && accept) begin
        if (!trunc_seen) oversize <= 1'b1;
        trunc_seen <= 1'b1;
      end else if (!rx_dv && in_pkt) begin
        // end of packet
        in_pkt <= 1'b0;
        if (accept) begin
          dw_push   <= 1'b1;
          dw_word   <= have_hi ? '{data: {hi, 8'h00}, last: 1'b1, one_byte: 1'b1}
                               : '{data: pend, last: 1'b1, one_byte: 1'b0};
          len_push  <= 1'b1;
          len_value <= count;
          pkt_done  <= 1'b1;
        end
        have_hi    <= 1'b0;
        pend_valid <= 1'b0;
        accept     <= 1'b0;
      end
    end
endmodule
