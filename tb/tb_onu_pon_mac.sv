// tb_onu_pon_mac: self-checking test of the ONU downstream receiver and
// MAC address filter.
//
// Builds a downstream word stream as the OLT framer sends it: PSYNC words
// AAAA AAAA (five PSYNC bytes here), then AAE2, the packet length, the
// packet and one or more idle words. Each packet holds an 8-byte GMII
// preamble followed by a destination address that is this ONU's, another
// ONU's or broadcast. Checks that exactly this ONU's and the broadcast
// packets come out, whole, with last and one_byte marks, each word exactly
// seven clocks after it was taken in, and that a header with too short a length
// is skipped.
module tb_onu_pon_mac;
  import olt_pkg::*;

  localparam logic [47:0] ME = 48'h02_00_00_00_00_02;

  logic clk = 1'b0, rst_n = 1'b0;
  always #6.43 clk = ~clk;

  logic [15:0] din = '0;
  logic        out_push, accepted, filtered;
  pkt_word_t   out_word;

  onu_pon_mac #(.MY_MAC(ME), .DA_WORD(4)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_acc = 0, n_filt = 0, exp_acc = 0, exp_filt = 0;
  pkt_word_t exp_w[$];
  int        exp_t[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(input logic [15:0] w);
    @(negedge clk);
    din = w;
  endtask

  task automatic frame(input int n, input logic [47:0] da, input bit want);
    byte unsigned b[$];
    repeat (7) b.push_back(8'h55);
    b.push_back(8'hD5);
    for (int i = 0; i < 6; i++) b.push_back(da[47 - 8*i -: 8]);
    while (b.size() < n) b.push_back(8'($urandom));
    put(16'hAAAA);
    put(16'hAAAA);
    put(16'hAAE2);
    put(16'(n));
    for (int i = 0; i < n; i += 2) begin
      pkt_word_t w;
      w.one_byte = (i + 1 == n);
      w.data = w.one_byte ? {b[i], 8'h00} : {b[i], b[i+1]};
      w.last = (i + 2 >= n);
      if (want) begin
        exp_w.push_back(w);
        exp_t.push_back(cyc + 2 + 7);  // sampled next edge, out 7 edges later
      end
      put(w.data);
    end
    if (want) exp_acc++; else exp_filt++;
    repeat ($urandom_range(1, 4)) put(16'h0000);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_push) begin
      if (exp_w.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected word");
      end else begin
        automatic pkt_word_t e = exp_w.pop_front();
        automatic int t = exp_t.pop_front();
        check(out_word == e, $sformatf("word %h/%0d/%0d expected %h/%0d/%0d", out_word.data,
              out_word.last, out_word.one_byte, e.data, e.last, e.one_byte));
        check(cyc == t, $sformatf("word at clock %0d expected %0d", cyc, t));
      end
    end
    if (accepted) n_acc++;
    if (filtered) n_filt++;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (3) put(16'h0000);
    frame(187, ME, 1'b1);
    frame(64, 48'h02_00_00_00_00_03, 1'b0);
    frame(65, '1, 1'b1);
    // a header whose length cannot hold the address is skipped
    put(16'hAAAA); put(16'hAAE2); put(16'd5); put(16'h1234); put(16'h0000);
    for (int k = 0; k < 40; k++) begin
      automatic int r = $urandom_range(0, 2);
      automatic logic [47:0] da = (r == 0) ? ME : (r == 1) ? '1 : 48'h02_00_00_00_00_01;
      frame($urandom_range(14, 1526), da, r != 2);
    end
    repeat (20) put(16'h0000);
    check(exp_w.size() == 0, "all wanted words out");
    check(n_acc == exp_acc, $sformatf("accepted %0d expected %0d", n_acc, exp_acc));
    check(n_filt == exp_filt, $sformatf("filtered %0d expected %0d", n_filt, exp_filt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
