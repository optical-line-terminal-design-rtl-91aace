// tb_gmii_tx: self-checking test of the upstream GMII transmitter.
//
// Writes packets of random odd and even byte lengths as 16-bit words on the
// 77.76 MHz clock, stalling at random and also at full rate, and watches
// the 125 MHz GMII side. Every byte on TXD while TXEN is high must match
// the packet bytes in order (high byte of each word first), TXEN must stay
// high without a gap for a whole packet (one byte per GTXCLK, i.e.
// 1 Gbit/s), TXER must never rise, and at least IPG idle clocks must
// separate packets.
module tb_gmii_tx;
  import olt_pkg::*;

  logic clk_pon = 1'b0, gtx_clk = 1'b0, rst_n = 1'b0;
  always #6.43 clk_pon = ~clk_pon;
  always #4.0  gtx_clk = ~gtx_clk;

  logic      in_valid = 1'b0, in_ready;
  pkt_word_t in_word = '0;
  logic [7:0] txd;
  logic      tx_en, tx_er, pkt_sent, underrun;

  gmii_tx dut (
    .clk_pon, .rst_pon_n(rst_n), .in_valid, .in_ready, .in_word,
    .gtx_clk, .rst_gtx_n(rst_n), .txd, .tx_en, .tx_er, .pkt_sent, .underrun);

  int checks = 0, failures = 0;
  byte unsigned exp_bytes[$];
  int pkt_lens[$];
  int pkts_rx = 0, cur_len = 0, gap = 100, sent = 0;
  logic prev_en = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_packet(input int nbytes, input bit stall, input bit starve = 1'b0);
    byte unsigned b[$];
    for (int i = 0; i < nbytes; i++) begin
      b.push_back(8'($urandom));
      exp_bytes.push_back(b[i]);
    end
    pkt_lens.push_back(nbytes);
    for (int i = 0; i < nbytes; i += 2) begin
      @(negedge clk_pon);
      // a stall of one clock in eight keeps the word side above 125 Mbyte/s
      if (stall && (i % 16 == 14)) begin
        in_valid = 1'b0;
        @(negedge clk_pon);
      end
      // a long stall inside the packet starves the transmitter
      if (starve && i == 40) begin
        in_valid = 1'b0;
        repeat (60) @(negedge clk_pon);
      end
      in_valid = 1'b1;
      in_word.one_byte = (i + 1 == nbytes);
      in_word.data = in_word.one_byte ? {b[i], 8'h00} : {b[i], b[i+1]};
      in_word.last = (i + 2 >= nbytes);
      @(posedge clk_pon);
      while (!in_ready) @(posedge clk_pon);
    end
    @(negedge clk_pon);
    in_valid = 1'b0;
  endtask

  bit underrun_phase = 1'b0;
  int n_underrun = 0, n_txer = 0;
  always @(posedge gtx_clk) if (rst_n && underrun_phase) begin
    if (underrun) n_underrun++;
    if (tx_en && tx_er) n_txer++;
  end

  always @(posedge gtx_clk) if (rst_n && !underrun_phase) begin
    if (tx_en) begin
      byte unsigned e;
      if (!prev_en) begin
        check(gap >= 12, $sformatf("inter-packet gap %0d", gap));
        cur_len = 0;
      end
      cur_len++;
      check(!tx_er, "TXER low");
      if (exp_bytes.size() == 0) begin
        checks++; failures++; $display("FAIL extra byte");
      end else begin
        e = exp_bytes.pop_front();
        check(txd == e, $sformatf("byte %h expected %h", txd, e));
      end
      gap = 0;
    end else begin
      if (prev_en) begin
        automatic int l = pkt_lens.pop_front();
        // TXEN fell: the packet must be complete, i.e. no gap inside it
        check(cur_len == l, $sformatf("packet of %0d bytes sent in one burst (%0d)", l, cur_len));
        pkts_rx++;
      end
      gap++;
    end
    prev_en <= tx_en;
    if (pkt_sent) sent++;
  end

  initial begin
    repeat (3) @(posedge clk_pon);
    rst_n = 1'b1;
    repeat (3) @(posedge clk_pon);
    for (int k = 0; k < 12; k++) send_packet($urandom_range(46, 300), k % 2 == 1);
    send_packet(1, 1'b0);
    send_packet(2, 1'b0);
    send_packet(1500, 1'b0);
    wait (pkts_rx == 15);
    repeat (20) @(posedge gtx_clk);
    check(exp_bytes.size() == 0, "all bytes sent");
    check(sent == 15, "pkt_sent count");
    // an underrun: TXER must mark the starved packet
    underrun_phase = 1'b1;
    send_packet(200, 1'b0, 1'b1);
    repeat (100) @(posedge gtx_clk);
    check(n_underrun == 1 && n_txer > 0, $sformatf("underrun flagged (%0d, %0d)", n_underrun, n_txer));
    check(!tx_en, "TXEN low after the starved packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge gtx_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
