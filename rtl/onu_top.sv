// onu_top: one optical network unit (ONU) of the hybrid PON.
//
// Upstream: MII nibbles from the subscriber's PHY (onu_mii_rx) are packed
// into words and counted (onu_ethernet_mac), stored with their lengths
// (onu_upstream_buffer), cut into 280-byte frames (onu_framer) and queued
// (onu_data_buffer) until the DBA processor grants this ONU a slot; the
// granted frame leaves on us_dout. queue_frames is the queue size reported
// to the DBA processor.
// Downstream: the broadcast word stream from the OLT is searched for
// frames, filtered by destination MAC address (onu_pon_mac) and sent to
// the subscriber as MII nibbles (onu_mii_tx).
// Three clocks: clk_pon (77.76 MHz) and the MII receive and transmit
// clocks (25 MHz); rst_n is released separately in each domain.
// The split into these parts follows the document's ONU data flow; ONU_ID
// and MY_MAC are per-unit settings chosen here.
module onu_top
  import olt_pkg::*;
#(
  parameter logic [7:0]  ONU_ID  = 8'd1,
  parameter logic [47:0] MY_MAC  = 48'h02_00_00_00_00_01,
  parameter int unsigned BUF_AW  = 11,
  parameter int unsigned FRM_AW  = 11,
  parameter int unsigned CW      = 8
) (
  input  logic          clk_pon,
  input  logic          rst_n,

  input  logic          mii_rx_clk,
  input  logic [3:0]    mii_rxd,
  input  logic          mii_rx_dv,

  input  logic          grant,
  output logic [CW-1:0] queue_frames,
  output logic [15:0]   us_dout,
  output logic          us_active,

  input  logic [15:0]   ds_din,
  input  logic          mii_tx_clk,
  output logic [3:0]    mii_txd,
  output logic          mii_tx_en,
  output logic          mii_tx_er,

  output logic          ev_us_dropped,    // upstream packet refused, buffer full
  output logic          ev_frag_sent,     // upstream frame built
  output logic          ev_ds_accepted,   // downstream packet for this ONU
  output logic          ev_ds_filtered,   // downstream packet for another ONU
  output logic          ev_ds_dropped     // downstream packet refused, FIFO full
);
  logic rst_pon_n, rst_rx_n, rst_tx_n;
  rst_sync u_rs_pon (.clk(clk_pon),    .rst_n, .rst_sync_n(rst_pon_n));
  rst_sync u_rs_rx  (.clk(mii_rx_clk), .rst_n, .rst_sync_n(rst_rx_n));
  rst_sync u_rs_tx  (.clk(mii_tx_clk), .rst_n, .rst_sync_n(rst_tx_n));

  // ---- upstream ------------------------------------------------------
  logic        rx_push, mac_push, len_push, room_ok;
  pkt_word_t   rx_word, mac_word;
  logic [15:0] len_value;

  onu_mii_rx u_mii_rx (
    .clk(mii_rx_clk), .rst_n(rst_rx_n), .rxd(mii_rxd), .rx_dv(mii_rx_dv),
    .room_ok, .out_push(rx_push), .out_word(rx_word), .dropped(ev_us_dropped));

  onu_ethernet_mac u_mac (
    .clk(mii_rx_clk), .rst_n(rst_rx_n), .in_push(rx_push), .in_word(rx_word),
    .out_push(mac_push), .out_word(mac_word), .len_push, .len_value);

  pkt_word_t   ub_word;
  logic        ub_empty, ub_pop, ub_len_pop, ub_len_empty;
  logic [15:0] ub_len;

  onu_upstream_buffer #(.AW(BUF_AW)) u_ubuf (
    .wr_clk(mii_rx_clk), .wr_rst_n(rst_rx_n), .wr_push(mac_push), .wr_word(mac_word),
    .len_push, .len_value, .room_ok,
    .rd_clk(clk_pon), .rd_rst_n(rst_pon_n), .rd_pop(ub_pop), .rd_word(ub_word),
    .rd_empty(ub_empty), .len_pop(ub_len_pop), .rd_len(ub_len), .len_empty(ub_len_empty));

  logic        fr_push, fr_end, space_ok;
  logic [15:0] fr_data;

  onu_framer #(.ONU_ID(ONU_ID)) u_framer (
    .clk(clk_pon), .rst_n(rst_pon_n),
    .len_value(ub_len), .len_empty(ub_len_empty), .len_pop(ub_len_pop),
    .in_word(ub_word), .in_empty(ub_empty), .in_pop(ub_pop),
    .space_ok, .out_push(fr_push), .out_data(fr_data), .out_frame_end(fr_end),
    .frag_sent(ev_frag_sent));

  logic frame_sent;
  onu_data_buffer #(.AW(FRM_AW), .CW(CW)) u_dbuf (
    .clk(clk_pon), .rst_n(rst_pon_n), .in_push(fr_push), .in_data(fr_data),
    .in_frame_end(fr_end), .space_ok, .queue_frames, .grant,
    .us_dout, .us_active, .frame_sent);

  // ---- downstream ----------------------------------------------------
  logic      pm_push;
  pkt_word_t pm_word;
  logic      pkt_sent;

  onu_pon_mac #(.MY_MAC(MY_MAC)) u_pon_mac (
    .clk(clk_pon), .rst_n(rst_pon_n), .din(ds_din),
    .out_push(pm_push), .out_word(pm_word),
    .accepted(ev_ds_accepted), .filtered(ev_ds_filtered));

  onu_mii_tx u_mii_tx (
    .clk(clk_pon), .rst_n(rst_pon_n), .in_push(pm_push), .in_word(pm_word),
    .dropped(ev_ds_dropped),
    .tx_clk(mii_tx_clk), .tx_rst_n(rst_tx_n),
    .txd(mii_txd), .tx_en(mii_tx_en), .tx_er(mii_tx_er), .pkt_sent);

  logic unused_ok;
  assign unused_ok = ^{frame_sent, pkt_sent};
endmodule
