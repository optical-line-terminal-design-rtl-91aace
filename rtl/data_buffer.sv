// data_buffer: downstream packet data store between the GMII receive clock
// and the PON clock.
//
// Words written by the GMII receiver on RXCLK are kept until the framer
// reads them on the 77.76 MHz PON clock. The store is a dual-clock FIFO
// (gray-coded pointers, two-flop synchronisers) holding 2**AW packet words
// with their last/one_byte marks, so packet boundaries travel with the
// data. wr_free tells the receiver how many words it may still write; the
// read side is first-word-fall-through.
// Holding the data for the framer follows the document; the depth (2048
// words, room for more than two of the longest packets) is this design's
// choice.
module data_buffer
  import olt_pkg::*;
#(
  parameter int unsigned AW = 11
) (
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        wr_push,
  input  pkt_word_t   wr_word,
  output logic [AW:0] wr_free,

  input  logic        rd_clk,
  input  logic        rd_rst_n,
  input  logic        rd_pop,
  output pkt_word_t   rd_word,
  output logic        rd_empty
);
  logic        unused_full;
  logic [AW:0] unused_count;

  cdc_fifo #(.W($bits(pkt_word_t)), .AW(AW)) u_mem (
    .wr_clk  (wr_clk),
    .wr_rst_n(wr_rst_n),
    .wr_push (wr_push),
    .wr_data (wr_word),
    .wr_full (unused_full),
    .wr_free (wr_free),
    .rd_clk  (rd_clk),
    .rd_rst_n(rd_rst_n),
    .rd_pop  (rd_pop),
    .rd_data (rd_word),
    .rd_empty(rd_empty),
    .rd_count(unused_count)
  );
endmodule
