// onu_pon_mac: ONU downstream receiver and destination-address filter.
//
// Watches the broadcast downstream word stream from the OLT. It finds a
// frame by one or more PSYNC words AAAA followed by the word AAE2 (odd
// PSYNC length, so the delimiter ends a word), reads the 16-bit packet
// length, and then follows the packet's words. The destination MAC address
// is the six bytes starting at word DA_WORD of the packet (word 4 when the
// GMII preamble and start delimiter are carried in the packet). Words pass
// through a delay line of DA_WORD+3 words; when the whole address has been
// seen the packet is either passed on (address equals MY_MAC, or the
// broadcast address) or thrown away, so a packet leaves whole or not at
// all, DA_WORD+3 clocks after it came in. Output words carry the
// last and one_byte tags. A length too short to hold the address, or above
// MAX_PKT_BYTES, sends the receiver back to searching.
// Reading the MAC address to decide where the data go follows the
// document; the address position, broadcast rule and header search are
// this design's choices.
module onu_pon_mac
  import olt_pkg::*;
#(
  parameter logic [47:0] MY_MAC  = 48'h02_00_00_00_00_01,
  parameter int unsigned DA_WORD = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] din,

  output logic        out_push,
  output pkt_word_t   out_word,
  output logic        accepted,   // pulses when a packet is passed on
  output logic        filtered    // pulses when a packet is thrown away
);
  localparam int unsigned DEPTH = DA_WORD + 3;

  typedef enum logic [1:0] {HUNT, SYNC, LEN, BODY} state_t;
  state_t      state;
  logic        odd_len;
  logic [10:0] words, widx;
  logic        pass;

  pkt_word_t   dl_word  [DEPTH];
  logic        dl_valid [DEPTH];

  logic        in_body;
  pkt_word_t   cur;
  assign in_body       = (state == BODY);
  assign cur.data      = din;
  assign cur.last      = (widx == words - 1'b1);
  assign cur.one_byte  = (widx == words - 1'b1) && odd_len;

  // Address complete when word DA_WORD+2 is on din.
  logic [47:0] da;
  logic        da_done;
  assign da      = {dl_word[1].data, dl_word[0].data, din};
  assign da_done = in_body && widx == 11'(DA_WORD + 2);

  assign out_push = dl_valid[DEPTH-1] && pass;
  assign out_word = dl_word[DEPTH-1];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state    <= HUNT;
      odd_len  <= 1'b0;
      words    <= '0;
      widx     <= '0;
      pass     <= 1'b0;
      accepted <= 1'b0;
      filtered <= 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        dl_word[i]  <= '0;
        dl_valid[i] <= 1'b0;
      end
    end else begin
      accepted <= 1'b0;
      filtered <= 1'b0;
      dl_word[0]  <= cur;
      dl_valid[0] <= in_body;
      for (int i = 1; i < DEPTH; i++) begin
        dl_word[i]  <= dl_word[i-1];
        dl_valid[i] <= dl_valid[i-1];
      end
      if (da_done) begin
        pass     <= (da == MY_MAC) || (da == '1);
        accepted <= (da == MY_MAC) || (da == '1);
        filtered <= !((da == MY_MAC) || (da == '1));
      end
      case (state)
        HUNT: if (din == {PREAMBLE_BYTE, PREAMBLE_BYTE}) state <= SYNC;
        SYNC:
          if (din == {PREAMBLE_BYTE, DELIMITER})            state <= LEN;
          else if (din != {PREAMBLE_BYTE, PREAMBLE_BYTE})   state <= HUNT;
        LEN: begin
          odd_len <= din[0];
          words  <= 11'((din + 16'd1) >> 1);
          widx   <= '0;
          if (din < 16'(2 * DEPTH) || din > 16'(MAX_PKT_BYTES)) state <= HUNT;
          else                                                  state <= BODY;
        end
        BODY: begin
          widx <= widx + 1'b1;
          if (widx == words - 1'b1) state <= HUNT;
        end
      endcase
    end
endmodule
