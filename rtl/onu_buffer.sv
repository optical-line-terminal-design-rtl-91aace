// onu_buffer: the packet buffer of one ONU in the OLT upstream.
//
// Payload words of the fragments that came from one ONU are written in
// arrival order. A register counts the whole Ethernet packets held: it
// rises when the word that ends a packet (word.last, written on the last
// fragment, whose length field has bit 15 set) is stored and falls when
// that word is read out. Fragments of a packet still arriving therefore
// wait in the buffer without being counted, so the multiplexer only ever
// starts on a complete packet.
//
// Overflow: when a word arrives and the memory is full, the packet being
// written is abandoned: the write pointer returns to the end of the last
// complete packet and the remaining fragments of that packet are discarded
// up to its final fragment. frag_dropped pulses at the end of each fragment
// that was lost in whole or in part.
//
// Read side is first-word-fall-through: rd_word shows the oldest word while
// rd_avail is high; rd_pop removes it. One clock domain. Depth 2**AW words.
// Counting whole packets follows the document; the depth and the overflow
// rule are this design's choices.
module onu_buffer
  import olt_pkg::*;
#(
  parameter int unsigned AW = 11,
  parameter int unsigned CW = 8      // packet counter width
) (
  input  logic          clk,
  input  logic          rst_n,

  input  logic          wr_en,
  input  pkt_word_t     wr_word,
  input  logic          wr_frag_last,

  input  logic          rd_pop,
  output pkt_word_t     rd_word,
  output logic          rd_avail,

  output logic [CW-1:0] pkt_count,
  output logic          frag_dropped
);
  localparam int unsigned DEPTH = 1 << AW;

  pkt_word_t   mem [DEPTH];
  logic [AW:0] wr_ptr, commit_ptr, rd_ptr;
  logic        discarding;
  logic        full;

  assign full     = (wr_ptr - rd_ptr) == (AW+1)'(DEPTH);
  assign rd_avail = (commit_ptr != rd_ptr);
  assign rd_word  = mem[rd_ptr[AW-1:0]];

  logic store, inc, dec;
  assign store = wr_en && !discarding && !full;
  assign inc   = store && wr_word.last;
  assign dec   = rd_pop && rd_avail && rd_word.last;

  always_ff @(posedge clk)
    if (store) mem[wr_ptr[AW-1:0]] <= wr_word;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_ptr       <= '0;
      commit_ptr   <= '0;
      rd_ptr       <= '0;
      discarding   <= 1'b0;
      pkt_count    <= '0;
      frag_dropped <= 1'b0;
    end else begin
      frag_dropped <= 1'b0;
      if (store) begin
        wr_ptr <= wr_ptr + 1'b1;
        if (wr_word.last) commit_ptr <= wr_ptr + 1'b1;
      end else if (wr_en && !discarding && full) begin
        // abandon the partly written packet
        wr_ptr <= commit_ptr;
        if (!wr_word.last) discarding <= 1'b1;
        if (wr_frag_last) frag_dropped <= 1'b1;
      end else if (wr_en && discarding && wr_frag_last) begin
        if (wr_word.last) discarding <= 1'b0;
        frag_dropped <= 1'b1;
      end
      if (rd_pop && rd_avail) rd_ptr <= rd_ptr + 1'b1;
      pkt_count <= pkt_count + CW'(inc) - CW'(dec);
    end

  a_pop_avail: assert property (@(posedge clk) disable iff (!rst_n) rd_pop |-> rd_avail)
    else $error("onu_buffer: pop with nothing committed");
endmodule
