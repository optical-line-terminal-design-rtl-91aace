// onu_mii_tx: ONU downstream MII transmitter, 16-bit words in, nibbles out.
//
// Packet words from the PON MAC (PON clock) cross to the MII transmit
// clock (25 MHz for 100 Mbit/s) through a dual-clock FIFO of 2**AW words.
// On the MII side each word leaves as four nibbles, high byte first and
// the low nibble of each byte first, with TX_EN high for the whole packet;
// a one_byte word gives two nibbles. Packets are at least IPG byte times
// (2*IPG clocks) apart. Sending starts as soon as a word is there: the
// PON side delivers a packet at one word per PON clock, far faster than
// the 6.25 Mwords/s drained, so the FIFO cannot run dry inside a packet;
// if it ever did, TX_ER is raised while waiting. A packet is only taken
// into the FIFO if, at its first word, the longest packet still fits;
// otherwise it is dropped whole.
// The 16-to-4-bit conversion follows the document; the FIFO, admission,
// nibble order (MII standard) and gap are this design's choices.
module onu_mii_tx
  import olt_pkg::*;
#(
  parameter int unsigned AW  = 11,
  parameter int unsigned IPG = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_push,
  input  pkt_word_t  in_word,
  output logic       dropped,

  input  logic       tx_clk,
  input  logic       tx_rst_n,
  output logic [3:0] txd,
  output logic       tx_en,
  output logic       tx_er,
  output logic       pkt_sent
);
  localparam int unsigned MAX_WORDS = (MAX_PKT_BYTES + 1) / 2;

  // ---- PON side: admission -------------------------------------------
  logic        in_pkt, keep;
  logic [AW:0] wr_free;
  logic        wr_full, push, first_ok;

  assign first_ok = wr_free >= (AW+1)'(MAX_WORDS);
  assign push     = in_push && (in_pkt ? keep : first_ok);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      in_pkt  <= 1'b0;
      keep    <= 1'b0;
      dropped <= 1'b0;
    end else begin
      dropped <= 1'b0;
      if (in_push) begin
        if (!in_pkt) begin
          keep    <= first_ok;
          dropped <= !first_ok;
        end
        in_pkt <= !in_word.last;
      end
    end

  // ---- MII side ------------------------------------------------------
  pkt_word_t   rd_word;
  logic        rd_empty, rd_pop;
  logic [AW:0] rd_count;

  cdc_fifo #(.W($bits(pkt_word_t)), .AW(AW)) u_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_push(push), .wr_data(in_word),
    .wr_full, .wr_free,
    .rd_clk(tx_clk), .rd_rst_n(tx_rst_n), .rd_pop, .rd_data(rd_word),
    .rd_empty, .rd_count);

  typedef enum logic [1:0] {IDLE, SEND, GAP} state_t;
  state_t     state;
  logic [1:0] nib;
  logic [7:0] gap;

  logic [3:0] nibble;
  always_comb
    case (nib)
      2'd0:    nibble = rd_word.data[11:8];
      2'd1:    nibble = rd_word.data[15:12];
      2'd2:    nibble = rd_word.data[3:0];
      default: nibble = rd_word.data[7:4];
    endcase

  logic word_end;
  assign word_end = (nib == 2'd3) || (nib == 2'd1 && rd_word.one_byte);
  assign rd_pop   = (state == SEND) && !rd_empty && word_end;

  always_ff @(posedge tx_clk or negedge tx_rst_n)
    if (!tx_rst_n) begin
      state    <= IDLE;
      nib      <= '0;
      gap      <= '0;
      txd      <= '0;
      tx_en    <= 1'b0;
      tx_er    <= 1'b0;
      pkt_sent <= 1'b0;
    end else begin
      pkt_sent <= 1'b0;
      case (state)
        IDLE: begin
          tx_en <= 1'b0;
          tx_er <= 1'b0;
          txd   <= '0;
          nib   <= '0;
          if (!rd_empty) state <= SEND;
        end
        SEND:
          if (rd_empty) begin
            tx_er <= 1'b1;          // underrun: keep TX_EN, flag the error
          end else begin
            txd   <= nibble;
            tx_en <= 1'b1;
            nib   <= word_end ? 2'd0 : nib + 1'b1;
            if (word_end && rd_word.last) begin
              state    <= GAP;
              gap      <= '0;
              pkt_sent <= 1'b1;
            end
          end
        GAP: begin
          tx_en <= 1'b0;
          tx_er <= 1'b0;
          txd   <= '0;
          gap   <= gap + 1'b1;
          if (gap == 8'(2 * IPG - 2)) state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end

  logic unused_ok;
  assign unused_ok = ^{wr_full, rd_count};
endmodule
