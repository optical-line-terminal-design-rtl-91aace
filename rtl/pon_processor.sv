// pon_processor: upstream frame receiver, the first stage of the OLT upstream.
//
// The SerDes delivers one 16-bit word per 77.76 MHz clock with no valid
// signal. Because the receiver may lose part of the preamble, a frame can
// start on either byte of a word. Two registers hold the previous two input
// words; from them the block forms the stream as it would be at both byte
// offsets and looks, in each, for a preamble word 0xAAAA followed by the
// delimiter 0xE2. The offset where the header is found is kept for the rest
// of the frame, so the payload leaves word-aligned. The ONU-ID byte that
// follows the delimiter and the payload-length word (bits 14:0 byte count,
// bit 15 = last fragment of the Ethernet packet, "packet_over") are latched
// and presented with every payload word. Payload words are forwarded with a
// one_byte flag on an odd final byte; the idle fill up to 280 bytes is
// dropped by returning to the header search.
//
// Interface: din every clock; out_valid marks a payload word on out_word.
// out_frag_last marks the last word of a fragment; out_packet_over is the
// latched bit 15 of its length. ONU-ID byte values 1..NUM_ONU select
// out_onu = 0..NUM_ONU-1; any other ID, a zero length or a length above 268
// bytes discards the frame and pulses bad_frame.
// Timing: the first payload word leaves two clocks after it enters.
// The header layout and field meanings follow the document; the byte
// search window, the ID numbering and the rejection of bad headers are
// this design's choices.
module pon_processor
  import olt_pkg::*;
#(
  parameter int unsigned NUM_ONU_P = NUM_ONU
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [15:0]                  din,

  output logic                         out_valid,
  output pkt_word_t                    out_word,       // .last = end of packet
  output logic                         out_frag_last,
  output logic [$clog2(NUM_ONU_P)-1:0] out_onu,
  output logic [14:0]                  out_length,
  output logic                         out_packet_over,

  output logic                         frame_ok,       // one pulse per accepted header
  output logic                         bad_frame,
  output logic                         realigned       // accepted header was byte-shifted
);
  typedef enum logic [1:0] {HUNT, LENGTH, PAYLOAD} state_t;

  state_t      state;
  logic [15:0] w1, w2;          // the two calibration registers
  logic        off;             // 1: frame starts on the low byte of a word
  logic [7:0]  onu_id;
  logic [14:0] remaining;
  logic        pkt_over;

  // candidate aligned words at both offsets
  logic [15:0] c0, c0p, c1, c1p, al;
  assign c0  = w1;
  assign c0p = w2;
  assign c1  = {w1[7:0], din[15:8]};
  assign c1p = {w2[7:0], w1[15:8]};
  assign al  = off ? c1 : c0;

  logic hit0, hit1;
  assign hit0 = (c0p == {2{PREAMBLE_BYTE}}) && (c0[15:8] == DELIMITER);
  assign hit1 = (c1p == {2{PREAMBLE_BYTE}}) && (c1[15:8] == DELIMITER);

  function automatic logic id_ok(logic [7:0] id);
    return (id >= 8'd1) && (id <= 8'(NUM_ONU_P));
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      w1 <= '0;
      w2 <= '0;
    end else begin
      w1 <= din;
      w2 <= w1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state           <= HUNT;
      off             <= 1'b0;
      onu_id          <= '0;
      remaining       <= '0;
      pkt_over        <= 1'b0;
      out_valid       <= 1'b0;
      out_word        <= '0;
      out_frag_last   <= 1'b0;
      out_onu         <= '0;
      out_length      <= '0;
      out_packet_over <= 1'b0;
      frame_ok        <= 1'b0;
      bad_frame       <= 1'b0;
      realigned       <= 1'b0;
    end else begin
      out_valid     <= 1'b0;
      out_frag_last <= 1'b0;
      frame_ok      <= 1'b0;
      bad_frame     <= 1'b0;
      realigned     <= 1'b0;
      unique case (state)
        HUNT: begin
          if (hit0) begin
            off    <= 1'b0;
            onu_id <= c0[7:0];
            state  <= LENGTH;
          end else if (hit1) begin
            off    <= 1'b1;
            onu_id <= c1[7:0];
            state  <= LENGTH;
          end
        end
        LENGTH: begin
          if (!id_ok(onu_id) || al[14:0] == '0 || al[14:0] > 15'(MAX_FRAG_BYTES)) begin
            bad_frame <= 1'b1;
            state     <= HUNT;
          end else begin
            remaining       <= al[14:0];
            pkt_over        <= al[15];
            out_length      <= al[14:0];
            out_packet_over <= al[15];
            out_onu         <= ($clog2(NUM_ONU_P))'(onu_id - 8'd1);
            frame_ok        <= 1'b1;
            realigned       <= off;
            state           <= PAYLOAD;
          end
        end
        PAYLOAD: begin
          out_valid              <= 1'b1;
          out_word.data          <= (remaining == 15'd1) ? {al[15:8], 8'h00} : al;
          out_word.one_byte      <= (remaining == 15'd1);
          out_word.last          <= (remaining <= 15'd2) && pkt_over;
          out_frag_last          <= (remaining <= 15'd2);
          if (remaining <= 15'd2) begin
            remaining <= '0;
            state     <= HUNT;
          end else begin
            remaining <= remaining - 15'd2;
          end
        end
        default: state <= HUNT;
      endcase
    end
endmodule
