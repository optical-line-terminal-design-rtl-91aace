// tb_onu_mii_tx: self-checking test of the ONU MII transmitter.
//
// Pushes packets of random length at one word per 77.76 MHz clock, as the
// PON MAC delivers them, into a 1024-word FIFO, and watches TXD/TX_EN on
// an unrelated 25 MHz clock. Checks every nibble (high byte first, low
// nibble of each byte first, odd final byte), that TX_EN stays high for a
// whole packet, that packets are at least 24 clocks apart, that TX_ER
// never rises, and that a packet arriving while fewer than 763 words are
// free is dropped whole.
module tb_onu_mii_tx;
  import olt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, tx_clk = 1'b0, tx_rst_n = 1'b0;
  always #6.43 clk = ~clk;
  always #20.0 tx_clk = ~tx_clk;

  logic       in_push = 1'b0, dropped;
  pkt_word_t  in_word = '0;
  logic [3:0] txd;
  logic       tx_en, tx_er, pkt_sent;

  onu_mii_tx #(.AW(10), .IPG(12)) dut (.*);

  int checks = 0, failures = 0, n_drop = 0, gap = 100, pkts = 0, exp_pkts = 0;
  logic [3:0] exp_n[$];
  int         exp_len[$];
  int         cur_len = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int n, input bit kept);
    for (int i = 0; i < n; i += 2) begin
      pkt_word_t w;
      w.one_byte = (i + 1 == n);
      w.data = w.one_byte ? {8'($urandom), 8'h00} : 16'($urandom);
      w.last = (i + 2 >= n);
      if (kept) begin
        exp_n.push_back(w.data[11:8]);
        exp_n.push_back(w.data[15:12]);
        if (!w.one_byte) begin
          exp_n.push_back(w.data[3:0]);
          exp_n.push_back(w.data[7:4]);
        end
      end
      @(negedge clk);
      in_push = 1'b1;
      in_word = w;
    end
    @(negedge clk);
    in_push = 1'b0;
    if (kept) begin
      exp_len.push_back(2 * n);
      exp_pkts++;
    end
  endtask

  always @(posedge clk) if (rst_n && dropped) n_drop++;

  always @(negedge tx_clk) if (tx_rst_n) begin
    check(!tx_er, "no TX_ER");
    if (tx_en) begin
      if (cur_len == 0) check(gap >= 24, $sformatf("gap %0d clocks", gap));
      if (exp_n.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected nibble");
      end else begin
        automatic logic [3:0] e = exp_n.pop_front();
        check(txd == e, $sformatf("nibble %h expected %h", txd, e));
      end
      cur_len++;
      gap = 0;
    end else begin
      if (cur_len != 0) begin
        automatic int e = exp_len.pop_front();
        check(cur_len == e, $sformatf("TX_EN for %0d nibbles expected %0d", cur_len, e));
        pkts++;
      end
      cur_len = 0;
      gap++;
    end
  end

  initial begin
    repeat (3) @(posedge tx_clk);
    #2 rst_n = 1'b1;
    tx_rst_n = 1'b1;
    repeat (4) @(posedge tx_clk);
    send(1, 1'b1);
    send(187, 1'b1);
    // two long packets back to back: the second finds too little room
    send(1500, 1'b1);
    send(1500, 1'b0);
    wait (exp_n.size() == 0);
    for (int k = 0; k < 25; k++) begin
      // keep the FIFO below 100 words so that every packet is admitted
      wait (exp_n.size() < 400);
      @(negedge clk);
      send($urandom_range(14, 400), 1'b1);
      repeat ($urandom_range(0, 200)) @(negedge clk);
    end
    wait (exp_n.size() == 0);
    repeat (40) @(posedge tx_clk);
    check(pkts == exp_pkts, $sformatf("%0d packets expected %0d", pkts, exp_pkts));
    check(n_drop == 1, $sformatf("one packet dropped (%0d)", n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge tx_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
