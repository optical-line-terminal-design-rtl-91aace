// tb_dhpon_system: end-to-end test of the hybrid PON, one OLT and four
// ONUs, every parameter at its default.
//
// Upstream: each ONU's subscriber sends Ethernet packets on MII (25 MHz,
// nibbles). Byte 0 of a packet names its ONU and byte 1 is a sequence
// number. It starts with the four-packet board example (ONU1 and ONU2
// under 280 bytes, ONU3 and ONU4 over it, all at once), then random
// traffic of 46 to 1500 bytes. Every packet must leave the OLT's GMII
// transmitter whole, and each ONU's packets in order.
// Downstream: packets on the OLT's GMII receiver carry an 8-byte preamble
// and a destination address of one ONU, of broadcast, or of no ONU. Each
// ONU's MII transmitter must send exactly the packets for it and the
// broadcast ones, in order.
// Counted mechanisms, each required at least once: fragmented packets,
// DBA grants, DBA decisions settled by the tie order, OLT multiplexer tie
// decisions, odd lengths both ways, broadcast packets, packets filtered
// out by an ONU.
module tb_dhpon_system;
  import olt_pkg::*;

  localparam int N = NUM_ONU;
  typedef byte unsigned bytes_t[$];

  logic clk_pon = 1'b0, gtx_clk = 1'b0, rx_clk = 1'b0, rst_n = 1'b0;
  always #6.43  clk_pon = ~clk_pon;
  always #4.0   gtx_clk = ~gtx_clk;
  always #3.998 rx_clk  = ~rx_clk;

  logic [N-1:0] mii_rx_clk = '0, mii_tx_clk = '0;
  always #20.0   mii_rx_clk[0] = ~mii_rx_clk[0];
  always #20.002 mii_rx_clk[1] = ~mii_rx_clk[1];
  always #19.998 mii_rx_clk[2] = ~mii_rx_clk[2];
  always #20.001 mii_rx_clk[3] = ~mii_rx_clk[3];
  always #19.999 mii_tx_clk[0] = ~mii_tx_clk[0];
  always #20.0   mii_tx_clk[1] = ~mii_tx_clk[1];
  always #20.003 mii_tx_clk[2] = ~mii_tx_clk[2];
  always #19.997 mii_tx_clk[3] = ~mii_tx_clk[3];

  logic [7:0]         gmii_txd, gmii_rxd = '0;
  logic               gmii_tx_en, gmii_tx_er, gmii_rx_dv = 1'b0, gmii_rx_er = 1'b0;
  olt_status_t        olt_status;
  logic [N-1:0][3:0]  mii_rxd = '0, mii_txd;
  logic [N-1:0]       mii_rx_dv = '0, mii_tx_en, mii_tx_er;
  logic [N-1:0]       dba_grant, ev_us_dropped, ev_frag_sent, ev_ds_accepted, ev_ds_filtered,
                      ev_ds_dropped;
  logic               dba_tie_break;

  dhpon_system dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- counters of mechanisms ------------------------------------------
  int n_frag_pkts = 0, n_grants = 0, n_dba_ties = 0, n_odd_us = 0, n_odd_ds = 0;
  int n_bcast = 0, n_filtered = 0, n_frames = 0;

  always @(posedge clk_pon) if (rst_n) begin
    n_grants   += $countones(dba_grant);
    n_dba_ties += dba_tie_break;
    n_frames   += $countones(ev_frag_sent);
    n_filtered += $countones(ev_ds_filtered);
    check(ev_ds_dropped == '0, "no downstream packet dropped in an ONU");
  end

  // ---- upstream stimulus (ONU MII receive) ------------------------------
  bytes_t us_exp[N][$];
  int     us_seq[N] = '{default: 0};

  task automatic us_send(input int onu, input int len);
    bytes_t p;
    p.push_back(8'(onu));
    p.push_back(8'(us_seq[onu]++));
    while (p.size() < len) p.push_back(8'($urandom));
    us_exp[onu].push_back(p);
    if (len > MAX_FRAG_BYTES) n_frag_pkts++;
    if (len % 2) n_odd_us++;
    for (int i = 0; i < 2 * len; i++) begin
      @(negedge mii_rx_clk[onu]);
      mii_rx_dv[onu] = 1'b1;
      mii_rxd[onu]   = i[0] ? p[i/2][7:4] : p[i/2][3:0];
    end
    @(negedge mii_rx_clk[onu]);
    mii_rx_dv[onu] = 1'b0;
    mii_rxd[onu]   = '0;
    repeat (24) @(negedge mii_rx_clk[onu]);
  endtask

  task automatic us_random(input int onu);
    for (int j = 0; j < 10; j++) begin
      us_send(onu, $urandom_range(46, 1500));
      repeat ($urandom_range(0, 400)) @(negedge mii_rx_clk[onu]);
    end
  endtask

  // ---- upstream monitor (OLT GMII transmit) -----------------------------
  bytes_t tx_pkt;
  int     us_rx = 0;
  logic   prev_tx_en = 1'b0;

  always @(posedge gtx_clk) if (rst_n) begin
    check(!gmii_tx_er, "no TXER");
    if (gmii_tx_en) tx_pkt.push_back(gmii_txd);
    else if (prev_tx_en) begin
      automatic int onu = tx_pkt[0];
      us_rx++;
      if (onu >= N || us_exp[onu].size() == 0) begin
        checks++; failures++; $display("FAIL unexpected upstream packet");
      end else begin
        automatic bytes_t e = us_exp[onu].pop_front();
        check(tx_pkt == e, $sformatf("ONU%0d upstream packet %0d (%0d bytes, got %0d)",
              onu + 1, e[1], e.size(), tx_pkt.size()));
      end
      tx_pkt.delete();
    end
    prev_tx_en <= gmii_tx_en;
  end

  // ---- downstream stimulus (OLT GMII receive) ---------------------------
  bytes_t ds_exp[N][$];
  int     ds_seq = 0;

  task automatic ds_send(input int dest, input int len);   // dest: 0..3, 4 bcast, 5 none
    bytes_t p;
    logic [47:0] da = (dest < N) ? 48'h02_00_00_00_00_00 | 48'(dest + 1) :
                      (dest == N) ? '1 : 48'h02_00_00_00_00_09;
    repeat (7) p.push_back(8'h55);
    p.push_back(8'hD5);
    for (int i = 0; i < 6; i++) p.push_back(da[47 - 8*i -: 8]);
    p.push_back(8'(ds_seq++));
    while (p.size() < len) p.push_back(8'($urandom));
    for (int k = 0; k < N; k++) if (dest == k || dest == N) ds_exp[k].push_back(p);
    if (dest == N) n_bcast++;
    if (len % 2) n_odd_ds++;
    for (int i = 0; i < len; i++) begin
      @(negedge rx_clk);
      gmii_rx_dv = 1'b1;
      gmii_rxd   = p[i];
    end
    @(negedge rx_clk);
    gmii_rx_dv = 1'b0;
    // pace the traffic to what one 100 Mbit/s ONU port can drain
    repeat (12 * len + 300) @(negedge rx_clk);
  endtask

  // ---- downstream monitors (ONU MII transmit) ---------------------------
  int ds_rx[N] = '{default: 0};
  for (genvar k = 0; k < N; k++) begin : g_mon
    bytes_t pkt;
    logic [3:0] lo;
    bit   half = 1'b0, prev_en = 1'b0;
    always @(posedge mii_tx_clk[k]) if (rst_n) begin
      check(!mii_tx_er[k], "no TX_ER");
      if (mii_tx_en[k]) begin
        if (half) pkt.push_back({mii_txd[k], lo});
        else lo = mii_txd[k];
        half = !half;
      end else if (prev_en) begin
        ds_rx[k]++;
        if (ds_exp[k].size() == 0) begin
          checks++; failures++; $display("FAIL ONU%0d unexpected downstream packet", k + 1);
        end else begin
          automatic bytes_t e = ds_exp[k].pop_front();
          check(pkt == e && !half, $sformatf("ONU%0d downstream packet (%0d bytes, got %0d)",
                k + 1, e.size(), pkt.size()));
        end
        pkt.delete();
        half = 1'b0;
      end
      prev_en = mii_tx_en[k];
    end
  end

  // ---- sequence ---------------------------------------------------------
  bit ds_done = 1'b0;
  int us_total = 0;

  initial begin
    repeat (5) @(posedge clk_pon);
    #2 rst_n = 1'b1;
    repeat (20) @(posedge clk_pon);
    fork
      begin
        // board example: two short packets, two that need two frames
        fork
          us_send(0, 187);
          us_send(1, 250);
          us_send(2, 400);
          us_send(3, 301);
        join
        fork
          us_random(0);
          us_random(1);
          us_random(2);
          us_random(3);
        join
      end
      begin
        ds_send(0, 187);
        ds_send(N, 64);
        ds_send(N + 1, 65);
        for (int j = 0; j < 24; j++) ds_send($urandom_range(0, N + 1), $urandom_range(64, 800));
        ds_done = 1'b1;
      end
    join
    us_total = 4 + 4 * 10;
    wait (us_rx == us_total);
    repeat (20000) @(posedge clk_pon);
    for (int k = 0; k < N; k++) begin
      check(us_exp[k].size() == 0, $sformatf("all ONU%0d upstream packets out", k + 1));
      check(ds_exp[k].size() == 0, $sformatf("all ONU%0d downstream packets out", k + 1));
    end
    check(ev_us_dropped == '0, "no upstream drop");
    $display("mechanisms: frames=%0d fragmented=%0d grants=%0d dba_ties=%0d olt_ties=%0d odd_us=%0d odd_ds=%0d bcast=%0d filtered=%0d",
             n_frames, n_frag_pkts, n_grants, n_dba_ties, olt_status.us_tie_breaks, n_odd_us,
             n_odd_ds, n_bcast, n_filtered);
    $display("upstream packets=%0d downstream per ONU=%0d/%0d/%0d/%0d", us_rx, ds_rx[0], ds_rx[1],
             ds_rx[2], ds_rx[3]);
    check(n_frag_pkts > 0, "fragmented packets");
    check(n_grants == n_frames, "one grant per frame");
    check(n_dba_ties > 0, "DBA tie decisions");
    check(olt_status.us_tie_breaks > 0, "OLT multiplexer tie decisions");
    check(n_odd_us > 0 && n_odd_ds > 0, "odd lengths");
    check(n_bcast > 0 && n_filtered > 0, "broadcast and filtered packets");
    check(olt_status.us_bad_frames == 0 && olt_status.us_dropped_frags == 0, "no bad or dropped frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
