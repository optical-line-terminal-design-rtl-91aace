// tb_onu_ethernet_mac: self-checking test of the ONU packet length counter.
//
// Feeds packets of random length (one_byte on an odd final byte) as word
// pushes with random gaps and checks that the words come out unchanged
// one clock later and that each packet's byte count is given with its
// last word, including a 1-byte, a 2-byte and a 1518-byte packet.
module tb_onu_ethernet_mac;
  import olt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #20.0 clk = ~clk;

  logic        in_push = 1'b0;
  pkt_word_t   in_word = '0;
  logic        out_push, len_push;
  pkt_word_t   out_word;
  logic [15:0] len_value;

  onu_ethernet_mac dut (.*);

  int checks = 0, failures = 0;
  pkt_word_t exp_w[$];
  int        exp_l[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int n);
    exp_l.push_back(n);
    for (int i = 0; i < n; i += 2) begin
      pkt_word_t w;
      w.one_byte = (i + 1 == n);
      w.data = 16'($urandom);
      w.last = (i + 2 >= n);
      exp_w.push_back(w);
      @(negedge clk);
      in_push = 1'b1;
      in_word = w;
      if ($urandom_range(0, 2) == 0) begin
        @(negedge clk);
        in_push = 1'b0;
      end
    end
    @(negedge clk);
    in_push = 1'b0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (out_push) begin
      if (exp_w.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected word");
      end else begin
        automatic pkt_word_t e = exp_w.pop_front();
        check(out_word == e, $sformatf("word %h expected %h", out_word, e));
        check(len_push == e.last, "length with the last word");
      end
    end else check(!len_push, "no length without a word");
    if (len_push && exp_l.size() != 0) begin
      automatic int e = exp_l.pop_front();
      check(len_value == 16'(e), $sformatf("length %0d expected %0d", len_value, e));
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(1);
    send(2);
    send(1518);
    for (int k = 0; k < 30; k++) send($urandom_range(1, 300));
    repeat (5) @(posedge clk);
    check(exp_w.size() == 0 && exp_l.size() == 0, "all words and lengths seen");
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
