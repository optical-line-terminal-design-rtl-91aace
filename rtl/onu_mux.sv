// onu_mux: the upstream multiplexer that empties the ONU buffers.
//
// When idle, it compares the whole-packet counters of the ONU buffers and
// picks the buffer holding the most complete Ethernet packets; on a tie the
// lower-numbered buffer wins (ONU1, then ONU2, ONU3, ONU4). It then streams
// exactly one packet from that buffer, word by word, until the word marked
// last, and decides again. A packet is never interleaved with another.
//
// Interface: pkt_count/rd_word/rd_avail come from the buffers, rd_pop goes
// back to them. The output is a valid/ready stream: a word moves when
// out_valid and out_ready are both high, so a full downstream FIFO stalls
// the buffer. sel_onu and grant pulse report each decision.
// Timing: one clock to decide, then one word per clock while out_ready.
// The selection rule and its tie order follow the document; the handshake
// is this design's choice.
module onu_mux
  import olt_pkg::*;
#(
  parameter int unsigned N  = NUM_ONU,
  parameter int unsigned CW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,

  input  logic [CW-1:0]        pkt_count [N],
  input  pkt_word_t            rd_word   [N],
  input  logic                 rd_avail  [N],
  output logic [N-1:0]         rd_pop,

  output logic                 out_valid,
  output pkt_word_t            out_word,
  input  logic                 out_ready,

  output logic                 grant,      // pulses when a packet is chosen
  output logic [$clog2(N)-1:0] sel_onu,
  output logic                 tie_break   // the choice was decided by the tie order
);
  localparam int unsigned SW = $clog2(N);

  logic          busy;
  logic [SW-1:0] cur;

  // largest counter, first index wins ties
  logic [SW-1:0] best;
  logic [CW-1:0] best_cnt;
  logic          tie;
  always_comb begin
    best     = '0;
    best_cnt = pkt_count[0];
    tie      = 1'b0;
    for (int i = 1; i < int'(N); i++) begin
      if (pkt_count[i] > best_cnt) begin
        best     = SW'(i);
        best_cnt = pkt_count[i];
        tie      = 1'b0;
      end else if (pkt_count[i] == best_cnt) begin
        tie = 1'b1;
      end
    end
  end

  assign out_valid = busy && rd_avail[cur];
  assign out_word  = rd_word[cur];

  always_comb begin
    rd_pop = '0;
    if (out_valid && out_ready) rd_pop[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy      <= 1'b0;
      cur       <= '0;
      grant     <= 1'b0;
      sel_onu   <= '0;
      tie_break <= 1'b0;
    end else begin
      grant     <= 1'b0;
      tie_break <= 1'b0;
      if (!busy) begin
        if (best_cnt != '0) begin
          busy      <= 1'b1;
          cur       <= best;
          grant     <= 1'b1;
          sel_onu   <= best;
          tie_break <= tie;
        end
      end else if (out_valid && out_ready && out_word.last) begin
        busy <= 1'b0;
      end
    end

  a_whole_packet: assert property (@(posedge clk) disable iff (!rst_n) busy |-> rd_avail[cur])
    else $error("onu_mux: selected buffer ran dry inside a packet");
endmodule
