// tb_onu_mii_rx: self-checking test of the ONU MII receiver.
//
// Drives packets of random odd and even lengths on RXD with RX_DV, one
// nibble per 25 MHz clock, low nibble of each byte first, with random
// gaps. Checks every 16-bit word (first byte in the high half, last and
// one_byte marks), that words are at least four clocks apart, and that a
// packet starting while room_ok is low is refused whole.
module tb_onu_mii_rx;
  import olt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20.0 clk = ~clk;

  logic [3:0] rxd = '0;
  logic       rx_dv = 1'b0, room_ok = 1'b1;
  logic       out_push, dropped;
  pkt_word_t  out_word;

  onu_mii_rx dut (.*);

  int checks = 0, failures = 0, n_drop = 0, last_push = -10, cyc = 0;
  pkt_word_t exp_w[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int n, input bit kept);
    byte unsigned b[$];
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    if (kept)
      for (int i = 0; i < n; i += 2) begin
        pkt_word_t w;
        w.one_byte = (i + 1 == n);
        w.data = w.one_byte ? {b[i], 8'h00} : {b[i], b[i+1]};
        w.last = (i + 2 >= n);
        exp_w.push_back(w);
      end
    for (int i = 0; i < 2 * n; i++) begin
      @(negedge clk);
      rx_dv = 1'b1;
      rxd = i[0] ? b[i/2][7:4] : b[i/2][3:0];
    end
    @(negedge clk);
    rx_dv = 1'b0;
    rxd = '0;
    repeat ($urandom_range(1, 12)) @(negedge clk);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_push) begin
      check(cyc - last_push >= 4 || out_word.last, "words at most one per four clocks");
      last_push = cyc;
      if (exp_w.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected word");
      end else begin
        automatic pkt_word_t e = exp_w.pop_front();
        check(out_word == e, $sformatf("word %h/%0d/%0d expected %h/%0d/%0d", out_word.data,
              out_word.last, out_word.one_byte, e.data, e.last, e.one_byte));
      end
    end
    if (dropped) n_drop++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    send(1, 1'b1);
    send(2, 1'b1);
    send(3, 1'b1);
    for (int k = 0; k < 25; k++) send($urandom_range(1, 200), 1'b1);
    room_ok = 1'b0;
    send(70, 1'b0);
    room_ok = 1'b1;
    send(64, 1'b1);
    send(1526, 1'b1);
    repeat (5) @(posedge clk);
    check(exp_w.size() == 0, "all words written");
    check(n_drop == 1, $sformatf("one packet refused (%0d)", n_drop));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
