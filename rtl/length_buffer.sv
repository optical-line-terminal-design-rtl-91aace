// length_buffer: the downstream length store.
//
// The downstream format has no length field until the framer adds one, so
// the GMII receiver counts the bytes of each packet and writes the count
// here when the packet ends; the framer reads one count per packet before
// it reads the packet's words. It is a dual-clock FIFO of 16-bit counts,
// 2**AW entries deep, written on RXCLK and read on the PON clock, first
// word fall-through on the read side.
// Its role follows the document; the depth is this design's choice.
module length_buffer #(
  parameter int unsigned AW = 4
) (
  input  logic        wr_clk,
  input  logic        wr_rst_n,
  input  logic        wr_push,
  input  logic [15:0] wr_length,
  output logic        wr_full,

  input  logic        rd_clk,
  input  logic        rd_rst_n,
  input  logic        rd_pop,
  output logic [15:0] rd_length,
  output logic        rd_empty
);
  logic [AW:0] unused_free, unused_count;

  cdc_fifo #(.W(16), .AW(AW)) u_mem (
    .wr_clk  (wr_clk),
    .wr_rst_n(wr_rst_n),
    .wr_push (wr_push),
    .wr_data (wr_length),
    .wr_full (wr_full),
    .wr_free (unused_free),
    .rd_clk  (rd_clk),
    .rd_rst_n(rd_rst_n),
    .rd_pop  (rd_pop),
    .rd_data (rd_length),
    .rd_empty(rd_empty),
    .rd_count(unused_count)
  );
endmodule
