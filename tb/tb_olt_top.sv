// tb_olt_top: end-to-end test of the OLT datapath, both directions at once.
//
// Upstream: a generator builds a continuous stream of 280-byte PON frames
// on the 77.76 MHz clock. It starts with the board test: four Ethernet
// packets from ONU1..ONU4, the first two shorter than one frame, the last
// two split in two frames each and sent interleaved (A, C, B, D). Then come
// frames shifted by one byte (lost preamble), a frame with an unknown
// ONU-ID, bursts of short packets from all ONUs that pile up in the buffers
// (so the most-packets-first choice and its tie order are used), and, when
// OVERFLOW_TEST is set, a 1500-byte packet that cannot fit in a reduced
// ONU buffer and must be dropped whole. The first payload bytes of every
// packet carry its ONU number and a sequence number, so the monitor on the
// GMII side can tell whose packet it sees; per ONU, packets must arrive
// complete and in order, and the four board-test packets must come first,
// in ONU order.
// Downstream: packets, the 187-byte board-test packet first, are sent on
// GMII RX at 125 MHz; every frame on the PON side must carry the header
// AAAA AAE2 + length and the packet's bytes.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_olt_top;
  import olt_pkg::*;

  localparam bit OVERFLOW_TEST = 1'b1;
  localparam int N_BURST       = 40;    // short upstream packets per ONU
  localparam int N_DS          = 40;    // downstream packets
  localparam int LONG_MAX      = 450;   // longest of the final packets, bytes
  localparam int LONG_GAP      = 1200;  // idle bytes after each of them

  logic clk_pon = 1'b0, gtx_clk = 1'b0, rx_clk = 1'b0, rst_n = 1'b0;
  always #6.43  clk_pon = ~clk_pon;   // 77.76 MHz
  always #4.0   gtx_clk = ~gtx_clk;   // 125 MHz
  always #3.998 rx_clk  = ~rx_clk;    // 125 MHz, not coherent with GTXCLK

  logic [15:0] us_din = '0, ds_dout;
  logic        ds_in_frame;
  logic [7:0]  gmii_txd, gmii_rxd = '0;
  logic        gmii_tx_en, gmii_tx_er, gmii_rx_dv = 1'b0, gmii_rx_er = 1'b0;
  olt_status_t status;

  olt_top #(.ONU_BUF_AW(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------------
  // upstream stimulus
  // ------------------------------------------------------------------
  typedef byte unsigned bytes_t[$];
  byte unsigned us_stream[$];
  bytes_t       us_exp [4][$];      // expected packets per ONU
  int           seq [4] = '{0, 0, 0, 0};
  int           n_frames_sent = 0, n_multi = 0, n_odd_us = 0, n_fill = 0;
  int           exp_dropped_pkts = 0, exp_bad = 0;

  function automatic bytes_t make_packet(input int onu, input int len);
    bytes_t p;
    p.push_back(8'(onu));
    p.push_back(8'(seq[onu]));
    seq[onu]++;
    for (int i = 2; i < len; i++) p.push_back(8'($urandom));
    return p;
  endfunction

  task automatic add_frame(input int onu_id_byte, input bytes_t p, input int from, input int n,
                           input bit last);
    for (int i = 0; i < 8; i++) us_stream.push_back(8'hAA);
    us_stream.push_back(8'hE2);
    us_stream.push_back(8'(onu_id_byte));
    us_stream.push_back({last, 7'(n >> 8)});
    us_stream.push_back(8'(n));
    for (int i = 0; i < n; i++) us_stream.push_back(p[from + i]);
    for (int i = 12 + n; i < 280; i++) us_stream.push_back(8'h00);
    n_frames_sent++;
    if (n < 268) n_fill++;
  endtask

  // whole packet, fragments back to back
  task automatic add_packet(input int onu, input int len, input bit keep = 1'b1);
    bytes_t p = make_packet(onu, len);
    int off = 0;
    if (keep) us_exp[onu].push_back(p);
    if (len > 268) n_multi++;
    if (len % 2) n_odd_us++;
    while (off < len) begin
      int n = (len - off > 268) ? 268 : len - off;
      add_frame(onu + 1, p, off, n, off + n == len);
      off += n;
    end
  endtask

  // ------------------------------------------------------------------
  // upstream monitor (GMII TX)
  // ------------------------------------------------------------------
  byte unsigned rx_pkt[$];
  int us_pkts_rx = 0, first_onus[$];
  logic prev_tx_en = 1'b0;

  always @(posedge gtx_clk) if (rst_n) begin
    if (gmii_tx_en) begin
      check(!gmii_tx_er, "no TXER");
      rx_pkt.push_back(gmii_txd);
    end else if (prev_tx_en) begin
      automatic int onu = rx_pkt[0];
      us_pkts_rx++;
      if (onu > 3 || us_exp[onu].size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected upstream packet for ONU%0d", onu + 1);
      end else begin
        automatic bytes_t e = us_exp[onu].pop_front();
        check(rx_pkt == e, $sformatf("ONU%0d packet seq %0d (%0d bytes, got %0d, seq %0d)",
              onu + 1, e[1], e.size(), rx_pkt.size(), rx_pkt[1]));
      end
      if (first_onus.size() < 4) first_onus.push_back(onu);
      rx_pkt.delete();
    end
    prev_tx_en <= gmii_tx_en;
  end

  // ------------------------------------------------------------------
  // downstream stimulus (GMII RX) and monitor (PON side)
  // ------------------------------------------------------------------
  bytes_t ds_exp[$];
  int ds_frames_rx = 0, n_odd_ds = 0;

  task automatic ds_send(input int len);
    bytes_t p;
    for (int i = 0; i < len; i++) p.push_back(8'($urandom));
    ds_exp.push_back(p);
    if (len % 2) n_odd_ds++;
    for (int i = 0; i < len; i++) begin
      @(negedge rx_clk);
      gmii_rx_dv = 1'b1;
      gmii_rxd = p[i];
    end
    @(negedge rx_clk);
    gmii_rx_dv = 1'b0;
    repeat (12) @(negedge rx_clk);
  endtask

  logic [15:0] ds_words[$];
  logic prev_in_frame = 1'b0;
  always @(posedge clk_pon) if (rst_n) begin
    if (ds_in_frame) ds_words.push_back(ds_dout);
    else if (prev_in_frame) begin
      automatic bytes_t e;
      automatic int len = ds_words[2];
      ds_frames_rx++;
      check(ds_words[0] == 16'hAAAA && ds_words[1] == 16'hAAE2, "downstream PSYNC and delimiter");
      if (ds_exp.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected downstream frame");
      end else begin
        e = ds_exp.pop_front();
        check(len == e.size(), $sformatf("downstream length %0d expected %0d", len, e.size()));
        check(ds_words.size() == 3 + (e.size() + 1) / 2, "downstream frame size");
        for (int i = 0; i < e.size(); i++) begin
          automatic logic [15:0] w = ds_words[3 + i / 2];
          if ((i % 2 ? w[7:0] : w[15:8]) != e[i]) begin
            checks++; failures++;
            $display("FAIL downstream byte %0d of frame %0d", i, ds_frames_rx);
            break;
          end
        end
        checks++;
      end
      ds_words.delete();
    end
    prev_in_frame <= ds_in_frame;
  end


  // ------------------------------------------------------------------
  // drive the upstream word stream
  // ------------------------------------------------------------------
  int us_idx = 0;
  always @(negedge clk_pon) begin
    if (rst_n && us_idx + 1 < us_stream.size()) begin
      us_din = {us_stream[us_idx], us_stream[us_idx + 1]};
      us_idx += 2;
    end else begin
      us_din = 16'h0000;
    end
  end

  initial begin
    bytes_t pa, pb;
    // board test: P1 (ONU1) and P2 (ONU2) in one frame each; P3 (ONU3) and
    // P4 (ONU4) in two frames each, sent A, C, B, D
    repeat (20) us_stream.push_back(8'h00);
    add_packet(0, 200);
    add_packet(1, 150);
    pa = make_packet(2, 400);
    pb = make_packet(3, 500);
    us_exp[2].push_back(pa);
    us_exp[3].push_back(pb);
    n_multi += 2;
    add_frame(3, pa, 0, 268, 1'b0);     // A
    add_frame(4, pb, 0, 268, 1'b0);     // C
    add_frame(3, pa, 268, 132, 1'b1);   // B
    add_frame(4, pb, 268, 232, 1'b1);   // D
    // frames shifted by one byte, then back
    us_stream.push_back(8'h00);
    add_packet(1, 99);
    add_packet(0, 301);
    us_stream.push_back(8'h00);
    // unknown ONU-ID: discarded
    begin
      bytes_t junk = make_packet(0, 60);
      seq[0]--;
      add_frame(9, junk, 0, 60, 1'b1);
      exp_bad++;
    end
    // a packet too large for the reduced buffer: dropped whole
    if (OVERFLOW_TEST) begin
      add_packet(2, 1500, 1'b0);
      seq[2]--;
      exp_dropped_pkts++;
    end
    // bursts of short packets: buffers fill faster than GMII drains them
    for (int k = 0; k < N_BURST; k++)
      for (int o = 0; o < 4; o++) add_packet(o, $urandom_range(46, 268));
    // longer packets, spaced so that each fits in the buffers
    for (int k = 0; k < 10; k++) begin
      add_packet($urandom_range(0, 3), $urandom_range(269, LONG_MAX));
      repeat (LONG_GAP) us_stream.push_back(8'h00);
    end
    repeat (200) us_stream.push_back(8'h00);

    repeat (4) @(posedge clk_pon);
    rst_n = 1'b1;
    fork
      begin
        repeat (4) @(negedge rx_clk);
        ds_send(187);
        for (int k = 0; k < N_DS; k++) ds_send($urandom_range(46, 1526));
        ds_send(1);
        ds_send(2);
      end
      wait (us_idx + 1 >= us_stream.size());
    join
    repeat (30000) begin
      @(posedge gtx_clk);
      if (us_exp[0].size() + us_exp[1].size() + us_exp[2].size() + us_exp[3].size() == 0 &&
          ds_exp.size() == 0) break;
    end
    repeat (50) @(posedge gtx_clk);

    for (int o = 0; o < 4; o++)
      check(us_exp[o].size() == 0, $sformatf("ONU%0d: %0d packets not delivered", o + 1, us_exp[o].size()));
    check(ds_exp.size() == 0, $sformatf("%0d downstream packets not delivered", ds_exp.size()));
    check(first_onus.size() == 4 && first_onus[0] == 0 && first_onus[1] == 1 &&
          first_onus[2] == 2 && first_onus[3] == 3, "board-test packets first, in ONU order");
    check(status.us_bad_frames == 16'(exp_bad), "unknown ONU-ID frame discarded");
    check(status.us_packets_out == 16'(us_pkts_rx), "packet counter");
    check(status.ds_frames_out == 16'(ds_frames_rx), "frame counter");
    check(status.us_underruns == 0 && status.ds_dropped == 0, "no underrun, no downstream drop");

    $display("mechanisms: realigned=%0d bad_id=%0d multi_frag=%0d idle_fill=%0d odd_us=%0d ties=%0d overflow_drops=%0d ds_frames=%0d odd_ds=%0d",
             status.us_realigned, status.us_bad_frames, n_multi, n_fill, n_odd_us, status.us_tie_breaks,
             status.us_dropped_frags, ds_frames_rx, n_odd_ds);
    check(status.us_realigned > 0, "byte realignment happened");
    check(status.us_bad_frames > 0, "bad frame happened");
    check(n_multi > 0 && n_fill > 0 && n_odd_us > 0, "fragmentation, idle fill, odd length upstream");
    check(status.us_tie_breaks > 0, "tie order used");
    if (OVERFLOW_TEST) check(status.us_dropped_frags > 0, "ONU buffer overflow happened");
    else check(status.us_dropped_frags == 0, "no ONU buffer overflow");
    check(ds_frames_rx > 0 && n_odd_ds > 0, "downstream frames, odd length");
    $display("upstream packets %0d, downstream frames %0d", us_pkts_rx, ds_frames_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_pon);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
