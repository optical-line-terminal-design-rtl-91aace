// onu_ethernet_mac: ONU upstream length counter.
//
// Sits in the word stream from the MII receiver and counts the bytes of
// each Ethernet packet (two per word, one for a one_byte word). The words
// are passed on unchanged one clock later; with the last word of a packet
// the byte count is given out on len_push/len_value, so the buffer behind
// stores each packet together with its length. Packets longer than 4095
// bytes saturate the count.
// Counting the length follows the document; the rest of a MAC (address
// filtering, FCS checking) is not described for this block and not built.
module onu_ethernet_mac
  import olt_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_push,
  input  pkt_word_t   in_word,

  output logic        out_push,
  output pkt_word_t   out_word,
  output logic        len_push,
  output logic [15:0] len_value
);
  logic [15:0] count;
  logic [15:0] next_count;

  always_comb begin
    next_count = count + (in_word.one_byte ? 16'd1 : 16'd2);
    if (next_count > 16'd4095) next_count = 16'd4095;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count     <= '0;
      out_push  <= 1'b0;
      out_word  <= '0;
      len_push  <= 1'b0;
      len_value <= '0;
    end else begin
      out_push <= in_push;
      out_word <= in_word;
      len_push <= in_push && in_word.last;
      if (in_push) begin
        if (in_word.last) begin
          len_value <= next_count;
          count     <= '0;
        end else begin
          count <= next_count;
        end
      end
    end
endmodule
