// onu_framer: ONU upstream framer, cuts packets into fixed 280-byte frames.
//
// Takes a packet length from the length store, then the packet's words
// from the data store, and writes complete upstream frames into the ONU's
// frame buffer: four preamble words AAAA, the delimiter byte E2 with the
// ONU-ID, the 16-bit payload length (bits 14:0 bytes, bit 15 set on the
// fragment that ends the Ethernet packet), up to 134 payload words, and
// idle words 0000 up to 140 words. A packet longer than 268 bytes is cut
// into 268-byte fragments, each in a frame of its own; since 268 is even,
// every fragment starts on a word boundary.
// A frame is only begun when space_ok says the frame buffer can take all
// 140 words. At most one word is written per clock; if the data store runs
// empty inside a packet the framer waits.
// The header fields, the 280-byte frame and the packet-end bit follow the
// document; the preamble and delimiter values, the ONU-ID encoding and the
// handshakes are this design's choices, matching the OLT receiver.
module onu_framer
  import olt_pkg::*;
#(
  parameter logic [7:0] ONU_ID = 8'd1
) (
  input  logic        clk,
  input  logic        rst_n,

  input  logic [15:0] len_value,
  input  logic        len_empty,
  output logic        len_pop,
  input  pkt_word_t   in_word,
  input  logic        in_empty,
  output logic        in_pop,

  input  logic        space_ok,
  output logic        out_push,
  output logic [15:0] out_data,
  output logic        out_frame_end,
  output logic        frag_sent       // pulses once per frame written
);
  typedef enum logic [1:0] {IDLE, HDR, DATA, PAD} state_t;
  state_t      state;
  logic [15:0] remaining;   // bytes of the packet not yet framed
  logic [8:0]  frag_bytes;
  logic        frag_last;
  logic [7:0]  widx;        // word index inside the frame
  logic [7:0]  data_end;    // index one past the last payload word




  logic start;
  assign start = (state == IDLE) && space_ok && (remaining != 0 || !len_empty);

  assign len_pop = start && remaining == 0;
  assign in_pop  = (state == DATA) && !in_empty;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state         <= IDLE;
      remaining     <= '0;
      frag_bytes    <= '0;
      frag_last     <= 1'b0;
      widx          <= '0;
      data_end      <= '0;
      out_push      <= 1'b0;
      out_data      <= '0;
      out_frame_end <= 1'b0;
      frag_sent     <= 1'b0;
    end else begin
      out_push      <= 1'b0;
      out_frame_end <= 1'b0;
      frag_sent     <= 1'b0;
      case (state)
        IDLE:
          if (start) begin
            automatic logic [15:0] total = (remaining == 0) ? len_value : remaining;
            automatic logic [15:0] frag  =
              (total > 16'(MAX_FRAG_BYTES)) ? 16'(MAX_FRAG_BYTES) : total;
            frag_bytes <= frag[8:0];
            frag_last  <= (total == frag);
            remaining  <= total - frag;
            data_end   <= 8'(16'd6 + ((frag + 16'd1) >> 1));
            widx       <= '0;
            state      <= HDR;
          end
        HDR: begin
          out_push <= 1'b1;
          widx     <= widx + 1'b1;
          if (widx < 4)       out_data <= {PREAMBLE_BYTE, PREAMBLE_BYTE};
          else if (widx == 4) out_data <= {DELIMITER, ONU_ID};
          else begin
            out_data <= {frag_last, 6'd0, frag_bytes};
            state    <= DATA;
          end
        end
        DATA:
          if (!in_empty) begin
            out_push <= 1'b1;
            out_data <= in_word.data;
            widx     <= widx + 1'b1;
            if (widx + 1'b1 == data_end) begin
              if (data_end == 8'(FRAME_WORDS)) begin   // full fragment, no fill
                out_frame_end <= 1'b1;
                frag_sent     <= 1'b1;
                state         <= IDLE;
              end else begin
                state <= PAD;
              end
            end
          end
        PAD: begin
          out_push <= 1'b1;
          out_data <= IDLE_WORD;
          widx     <= widx + 1'b1;
          if (widx == 8'(FRAME_WORDS - 1)) begin
            out_frame_end <= 1'b1;
            frag_sent     <= 1'b1;
            state         <= IDLE;
          end
        end
      endcase
    end

  logic unused_ok;
  assign unused_ok = ^{in_word.last, in_word.one_byte};

  // A packet's last word must be the last payload word of its last fragment.
  a_last_word: assert property (@(posedge clk) disable iff (!rst_n)
    in_pop && in_word.last |-> frag_last && widx + 1'b1 == data_end);
endmodule
