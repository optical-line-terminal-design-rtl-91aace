// onu_upstream_buffer: the ONU's store of received packets and their
// lengths, between the MII receive clock and the PON clock.
//
// Packet words go into a dual-clock data store and each packet's byte
// count into a dual-clock length store, written on the MII clock and read
// by the ONU framer on the PON clock (first-word-fall-through). room_ok
// tells the MII receiver whether the longest packet still fits, so packets
// are refused whole rather than cut.
// Storing data and lengths follows the document; the depths and the
// admission signal are this design's choices.
module onu_upstream_buffer
  import olt_pkg::*;
#(
  parameter int unsigned AW = 11
) (
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        wr_push,
  input  pkt_word_t   wr_word,
  input  logic        len_push,
  input  logic [15:0] len_value,
  output logic        room_ok,

  input  logic        rd_clk,
  input  logic        rd_rst_n,
  input  logic        rd_pop,
  output pkt_word_t   rd_word,
  output logic        rd_empty,
  input  logic        len_pop,
  output logic [15:0] rd_len,
  output logic        len_empty
);
  logic [AW:0] free;
  logic        len_full;

  assign room_ok = (free > (AW+1)'((MAX_PKT_BYTES + 1) / 2)) && !len_full;

  data_buffer #(.AW(AW)) u_data (
    .wr_clk, .wr_rst_n, .wr_push, .wr_word, .wr_free(free),
    .rd_clk, .rd_rst_n, .rd_pop, .rd_word, .rd_empty);

  length_buffer u_len (
    .wr_clk, .wr_rst_n, .wr_push(len_push), .wr_length(len_value), .wr_full(len_full),
    .rd_clk, .rd_rst_n, .rd_pop(len_pop), .rd_length(rd_len), .rd_empty(len_empty));
endmodule
