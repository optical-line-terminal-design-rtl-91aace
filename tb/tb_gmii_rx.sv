// tb_gmii_rx: self-checking test of the downstream GMII receiver.
//
// Drives packets of random odd and even lengths on RXD with RXDV, one byte
// per 125 MHz clock, with random gaps. Checks every 16-bit word written to
// the data buffer (first byte in the high half, last/one_byte marks) and
// every length written, including the 187-byte packet of the board test.
// It then reports a nearly full data buffer and checks that the next
// packet is refused whole, and that a packet longer than the limit is cut
// to the limit with a matching length.
module tb_gmii_rx;
  import olt_pkg::*;

  localparam int AW = 11;

  logic rx_clk = 1'b0, rst_n = 1'b0;
  always #4.0 rx_clk = ~rx_clk;

  logic [7:0] rxd = '0;
  logic       rx_dv = 1'b0, rx_er = 1'b0;
  logic       dw_push, len_push, len_full = 1'b0;
  pkt_word_t  dw_word;
  logic [AW:0] dw_free = 12'd2048;
  logic [15:0] len_value;
  logic       pkt_done, dropped, oversize, rx_error;

  gmii_rx #(.BUF_AW(AW), .MAX_BYTES(400)) dut (.*);

  int checks = 0, failures = 0, n_drop = 0, n_over = 0;
  pkt_word_t exp_w[$];
  int        exp_l[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int n, input bit expect_kept);
    byte unsigned b[$];
    int kept;
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    kept = (n > 400) ? 400 : n;
    if (expect_kept) begin
      for (int i = 0; i < kept; i += 2) begin
        pkt_word_t w;
        w.one_byte = (i + 1 == kept);
        w.data = w.one_byte ? {b[i], 8'h00} : {b[i], b[i+1]};
        w.last = (i + 2 >= kept);
        exp_w.push_back(w);
      end
      exp_l.push_back(kept);
    end
    for (int i = 0; i < n; i++) begin
      @(negedge rx_clk);
      rx_dv = 1'b1;
      rxd = b[i];
    end
    @(negedge rx_clk);
    rx_dv = 1'b0;
    rxd = '0;
    repeat ($urandom_range(1, 14)) @(negedge rx_clk);
  endtask

  always @(posedge rx_clk) if (rst_n) begin
    if (dw_push) begin
      if (exp_w.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected word");
      end else begin
        automatic pkt_word_t e = exp_w.pop_front();
        check(dw_word == e, $sformatf("word %h/%0d/%0d expected %h/%0d/%0d", dw_word.data,
              dw_word.last, dw_word.one_byte, e.data, e.last, e.one_byte));
      end
    end
    if (len_push) begin
      if (exp_l.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected length");
      end else begin
        automatic int e = exp_l.pop_front();
        check(len_value == 16'(e), $sformatf("length %0d expected %0d", len_value, e));
      end
    end
    if (dropped) n_drop++;
    if (oversize) n_over++;
  end

  initial begin
    repeat (3) @(posedge rx_clk);
    rst_n = 1'b1;
    repeat (2) @(negedge rx_clk);
    send(187, 1'b1);
    for (int k = 0; k < 20; k++) send($urandom_range(1, 300), 1'b1);
    // data buffer almost full: the next packet is refused
    dw_free = 12'd100;
    send(64, 1'b0);
    dw_free = 12'd2048;
    // length store full: refused as well
    len_full = 1'b1;
    send(80, 1'b0);
    len_full = 1'b0;
    send(61, 1'b1);
    send(450, 1'b1);   // longer than MAX_BYTES
    repeat (5) @(posedge rx_clk);
    check(exp_w.size() == 0 && exp_l.size() == 0, "all words and lengths written");
    check(n_drop == 2, $sformatf("two packets refused (%0d)", n_drop));
    check(n_over == 1, "one packet truncated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge rx_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
