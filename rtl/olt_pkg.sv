// olt_pkg: constants and types shared by the OLT datapath.
//
// Upstream PON frame (one per 280-byte slot, big-endian 16-bit words):
//   8 preamble bytes 0xAA | delimiter 0xE2 | ONU-ID | payload length (2 B,
//   bit 15 = last fragment of the Ethernet packet) | payload | idle fill.
// The 12-byte header leaves at most 268 payload bytes per frame, so an
// Ethernet packet of up to 1500 bytes needs one to six frames.
// Downstream PON frame: PSYNC bytes 0xAA | delimiter 0xE2 | length | packet.
// The frame sizes, the preamble pattern and the delimiter value follow the
// document; the idle word, the ONU-ID numbering and the word/byte order are
// this design's choices.
package olt_pkg;

  localparam int unsigned NUM_ONU         = 4;
  localparam int unsigned FRAME_BYTES     = 280;
  localparam int unsigned US_HDR_BYTES    = 12;
  localparam int unsigned MAX_FRAG_BYTES  = FRAME_BYTES - US_HDR_BYTES;  // 268
  localparam int unsigned FRAME_WORDS     = FRAME_BYTES / 2;             // 140
  localparam int unsigned MAX_FRAG_WORDS  = MAX_FRAG_BYTES / 2;          // 134

  localparam logic [7:0]  PREAMBLE_BYTE   = 8'hAA;   // "10101010"
  localparam logic [7:0]  DELIMITER       = 8'hE2;   // "11100010"
  localparam logic [15:0] IDLE_WORD       = 16'h0000;

  // Longest packet accepted from the GMII side, in bytes: a 1518-byte
  // Ethernet frame plus the preamble and start delimiter bytes that the
  // PHY may pass through.
  localparam int unsigned MAX_PKT_BYTES   = 1526;

  // One 16-bit word of an Ethernet packet inside the OLT.
  //   last     : final word of the Ethernet packet
  //   one_byte : only data[15:8] is valid (odd packet length)
  typedef struct packed {
    logic [15:0] data;
    logic        last;
    logic        one_byte;
  } pkt_word_t;

  // Counters brought out of the top for monitoring.
  typedef struct packed {
    logic [15:0] us_frames;        // upstream frames accepted
    logic [15:0] us_bad_frames;    // headers with an illegal length or ONU-ID
    logic [15:0] us_realigned;     // frames found one byte off word alignment
    logic [15:0] us_dropped_frags; // fragments dropped, ONU buffer full
    logic [15:0] us_tie_breaks;    // multiplexer choices settled by the tie order
    logic [15:0] us_packets_out;   // packets sent on GMII TX
    logic [15:0] us_underruns;     // GMII TX underruns (TXER raised)
    logic [15:0] ds_packets_in;    // packets received on GMII RX
    logic [15:0] ds_dropped;       // packets dropped, downstream buffer full
    logic [15:0] ds_frames_out;    // downstream frames sent
  } olt_status_t;

endpackage
