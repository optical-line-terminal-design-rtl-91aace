// gmii_tx: upstream GMII transmitter, 16-bit words in, GMII bytes out.
//
// Packet words arrive on the 77.76 MHz PON clock as a valid/ready stream
// and cross into the 125 MHz GTXCLK domain through a small dual-clock FIFO.
// The transmitter sends the high byte of each word, then the low byte
// (skipped when one_byte marks an odd packet end), with TXEN high for the
// whole packet and low between packets, so the 1 Gbit/s side carries
// 8 bits per 125 MHz clock. The word side supplies up to 155.5 Mbyte/s,
// more than the 125 Mbyte/s the byte side drains, so a packet that has
// started never runs dry while its words are already buffered; should the
// FIFO nevertheless empty inside a packet, TXER is raised for the rest of
// it and underrun pulses. Between packets TXEN stays low for IPG clocks.
//
// Interface: in_valid/in_ready/in_word on clk_pon; txd, tx_en, tx_er on
// gtx_clk, registered. Latency from the first word written to TXEN is
// about four GTXCLK cycles (synchroniser plus output register).
// The 16-to-8-bit conversion, TXEN meaning and the 125 MHz byte clock
// follow the document; the FIFO depth, the gap and TXER on underrun are
// this design's choices.
module gmii_tx
  import olt_pkg::*;
#(
  parameter int unsigned FIFO_AW = 4,
  parameter int unsigned IPG     = 12   // Ethernet inter-packet gap, bytes
) (
  input  logic       clk_pon,
  input  logic       rst_pon_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pkt_word_t  in_word,

  input  logic       gtx_clk,
  input  logic       rst_gtx_n,
  output logic [7:0] txd,
  output logic       tx_en,
  output logic       tx_er,

  output logic       pkt_sent,   // pulse (gtx_clk) after the last byte of a packet
  output logic       underrun    // pulse (gtx_clk) when the FIFO ran dry mid-packet
);
  logic      full, empty, pop;
  pkt_word_t head;
  logic [FIFO_AW:0] unused_free, unused_count;

  assign in_ready = !full;

  cdc_fifo #(.W($bits(pkt_word_t)), .AW(FIFO_AW)) u_fifo (
    .wr_clk  (clk_pon),
    .wr_rst_n(rst_pon_n),
    .wr_push (in_valid && in_ready),
    .wr_data (in_word),
    .wr_full (full),
    .wr_free (unused_free),
    .rd_clk  (gtx_clk),
    .rd_rst_n(rst_gtx_n),
    .rd_pop  (pop),
    .rd_data (head),
    .rd_empty(empty),
    .rd_count(unused_count)
  );

  typedef enum logic [1:0] {IDLE, HI, LO, DRAIN} state_t;
  state_t    state;
  pkt_word_t cur;
  logic [$clog2(IPG+1)-1:0] gap;

  always_comb begin
    pop = 1'b0;
    unique case (state)
      IDLE:    pop = (gap == '0) && !empty;
      LO:      pop = !cur.last && !empty;
      DRAIN:   pop = !empty;
      default: pop = 1'b0;
    endcase
  end

  always_ff @(posedge gtx_clk or negedge rst_gtx_n)
    if (!rst_gtx_n) begin
      state    <= IDLE;
      cur      <= '0;
      gap      <= '0;
      txd      <= '0;
      tx_en    <= 1'b0;
      tx_er    <= 1'b0;
      pkt_sent <= 1'b0;
      underrun <= 1'b0;
    end else begin
      pkt_sent <= 1'b0;
      underrun <= 1'b0;
      unique case (state)
        IDLE: begin
          tx_en <= 1'b0;
          tx_er <= 1'b0;
          txd   <= '0;
          if (gap != '0) gap <= gap - 1'b1;
          else if (!empty) begin
            cur   <= head;
            state <= HI;
          end
        end
        HI: begin
          tx_en <= 1'b1;
          txd   <= cur.data[15:8];
          if (cur.one_byte) begin
            state    <= IDLE;
            gap      <= ($clog2(IPG+1))'(IPG);
            pkt_sent <= 1'b1;
          end else begin
            state <= LO;
          end
        end
        LO: begin
          tx_en <= 1'b1;
          txd   <= cur.data[7:0];
          if (cur.last) begin
            state    <= IDLE;
            gap      <= ($clog2(IPG+1))'(IPG);
            pkt_sent <= 1'b1;
          end else if (!empty) begin
            cur   <= head;
            state <= HI;
          end else begin
            state    <= DRAIN;
            underrun <= 1'b1;
          end
        end
        DRAIN: begin
          // keep the packet open but marked bad until its last word is gone
          tx_en <= 1'b1;
          tx_er <= 1'b1;
          txd   <= '0;
          if (!empty && head.last) begin
            state <= IDLE;
            gap   <= ($clog2(IPG+1))'(IPG);
          end
        end
        default: state <= IDLE;
      endcase
    end

  a_one_byte_ends: assert property (@(posedge gtx_clk) disable iff (!rst_gtx_n)
    (state == HI && cur.one_byte) |-> cur.last)
    else $error("gmii_tx: odd byte inside a packet");
endmodule
