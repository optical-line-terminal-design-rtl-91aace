// dhpon_system: a distributed-control hybrid PON, one OLT and four ONUs.
//
// The ONUs report their queue sizes to the DBA processor at the splitter,
// which grants one upstream slot of 160 PON clocks (one 280-byte frame)
// at a time to the ONU with the most frames queued. The granted ONU's
// frame and the idle 0000 words of the others are ORed into the single
// upstream word stream the OLT receives. Downstream, the OLT's frames are
// broadcast to every ONU, and each ONU keeps only the packets addressed
// to its own MAC address (02:00:00:00:00:0n for ONU n) or to broadcast.
// The OLT's GMII side and every ONU's MII side are brought out as ports.
// The fibre, splitter, AWG and optics are not modelled: the upstream and
// downstream streams are wires in the PON clock domain, and all units
// share clk_pon. The arrangement follows the document's architecture; the
// shared clock, the OR combining and the MAC addresses are this design's
// choices.
module dhpon_system
  import olt_pkg::*;
#(
  parameter int unsigned ONU_BUF_AW = 11,
  parameter int unsigned SLOT_CLKS  = 160
) (
  input  logic                    clk_pon,
  input  logic                    rst_n,

  // OLT GMII
  input  logic                    gtx_clk,
  output logic [7:0]              gmii_txd,
  output logic                    gmii_tx_en,
  output logic                    gmii_tx_er,
  input  logic                    rx_clk,
  input  logic [7:0]              gmii_rxd,
  input  logic                    gmii_rx_dv,
  input  logic                    gmii_rx_er,
  output olt_status_t             olt_status,

  // ONU MII, one per ONU
  input  logic [NUM_ONU-1:0]      mii_rx_clk,
  input  logic [NUM_ONU-1:0][3:0] mii_rxd,
  input  logic [NUM_ONU-1:0]      mii_rx_dv,
  input  logic [NUM_ONU-1:0]      mii_tx_clk,
  output logic [NUM_ONU-1:0][3:0] mii_txd,
  output logic [NUM_ONU-1:0]      mii_tx_en,
  output logic [NUM_ONU-1:0]      mii_tx_er,

  // events (one-clock pulses; ev_us_dropped on that ONU's MII receive
  // clock, the others on clk_pon)
  output logic [NUM_ONU-1:0]      dba_grant,
  output logic                    dba_tie_break,
  output logic [NUM_ONU-1:0]      ev_us_dropped,
  output logic [NUM_ONU-1:0]      ev_frag_sent,
  output logic [NUM_ONU-1:0]      ev_ds_accepted,
  output logic [NUM_ONU-1:0]      ev_ds_filtered,
  output logic [NUM_ONU-1:0]      ev_ds_dropped
);
  logic [NUM_ONU-1:0][7:0]  queue_frames;
  logic [NUM_ONU-1:0][15:0] onu_us;
  logic [NUM_ONU-1:0]       onu_active;
  logic [15:0]              us_line, ds_line;
  logic                     ds_in_frame, slot_start;

  logic rst_pon_n;
  rst_sync u_rs (.clk(clk_pon), .rst_n, .rst_sync_n(rst_pon_n));

  always_comb begin
    us_line = '0;
    for (int i = 0; i < NUM_ONU; i++) us_line |= onu_us[i];
  end

  olt_top u_olt (
    .clk_pon, .rst_n, .us_din(us_line), .ds_dout(ds_line), .ds_in_frame,
    .gtx_clk, .gmii_txd, .gmii_tx_en, .gmii_tx_er,
    .rx_clk, .gmii_rxd, .gmii_rx_dv, .gmii_rx_er, .status(olt_status));

  dba_processor #(.N(NUM_ONU), .CW(8), .SLOT_CLKS(SLOT_CLKS)) u_dba (
    .clk(clk_pon), .rst_n(rst_pon_n), .queue_size(queue_frames),
    .grant(dba_grant), .tie_break(dba_tie_break), .slot_start);

  for (genvar i = 0; i < NUM_ONU; i++) begin : g_onu
    onu_top #(
      .ONU_ID(8'(i + 1)),
      .MY_MAC(48'h02_00_00_00_00_00 | 48'(i + 1)),
      .BUF_AW(ONU_BUF_AW)
    ) u_onu (
      .clk_pon, .rst_n,
      .mii_rx_clk(mii_rx_clk[i]), .mii_rxd(mii_rxd[i]), .mii_rx_dv(mii_rx_dv[i]),
      .grant(dba_grant[i]), .queue_frames(queue_frames[i]),
      .us_dout(onu_us[i]), .us_active(onu_active[i]),
      .ds_din(ds_line), .mii_tx_clk(mii_tx_clk[i]),
      .mii_txd(mii_txd[i]), .mii_tx_en(mii_tx_en[i]), .mii_tx_er(mii_tx_er[i]),
      .ev_us_dropped(ev_us_dropped[i]), .ev_frag_sent(ev_frag_sent[i]),
      .ev_ds_accepted(ev_ds_accepted[i]), .ev_ds_filtered(ev_ds_filtered[i]),
      .ev_ds_dropped(ev_ds_dropped[i]));
  end

  logic unused_ok;
  assign unused_ok = ^{onu_active, ds_in_frame, slot_start};

  // Only one ONU may drive the upstream at a time.
  a_one_talker: assert property (@(posedge clk_pon) disable iff (!rst_pon_n)
    $onehot0(onu_active));
endmodule
