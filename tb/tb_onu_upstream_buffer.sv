// tb_onu_upstream_buffer: self-checking test of the ONU packet and length
// store.
//
// Writes packets (words with last/one_byte marks) and their lengths on a
// 25 MHz clock and reads them on an unrelated 77.76 MHz clock, first
// without reading so that the store fills, then with random reading.
// Checks order and content of words and lengths, that room_ok drops once
// fewer than 764 words are free and rises again once the store is read
// empty.
module tb_onu_upstream_buffer;
  import olt_pkg::*;

  localparam int AW = 10;

  logic wr_clk = 1'b0, rd_clk = 1'b0, wr_rst_n = 1'b0, rd_rst_n = 1'b0;
  always #20.0 wr_clk = ~wr_clk;
  always #6.43 rd_clk = ~rd_clk;

  logic        wr_push = 1'b0, len_push = 1'b0, room_ok;
  pkt_word_t   wr_word = '0;
  logic [15:0] len_value = '0;
  logic        rd_pop = 1'b0, len_pop = 1'b0, rd_empty, len_empty;
  pkt_word_t   rd_word;
  logic [15:0] rd_len;

  onu_upstream_buffer #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0, written = 0;
  pkt_word_t exp_w[$];
  int        exp_l[$];
  bit        reading = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send(input int n);
    for (int i = 0; i < n; i += 2) begin
      pkt_word_t w;
      w.one_byte = (i + 1 == n);
      w.data = 16'($urandom);
      w.last = (i + 2 >= n);
      exp_w.push_back(w);
      @(negedge wr_clk);
      wr_push = 1'b1;
      wr_word = w;
      written++;
    end
    @(negedge wr_clk);
    wr_push = 1'b0;
    len_push = 1'b1;
    len_value = 16'(n);
    exp_l.push_back(n);
    @(negedge wr_clk);
    len_push = 1'b0;
  endtask

  // reader: pops at negedge of rd_clk what it checked
  always @(negedge rd_clk) begin
    rd_pop = 1'b0;
    len_pop = 1'b0;
    if (rd_rst_n && reading) begin
      if (!rd_empty && $urandom_range(0, 3) != 0) begin
        automatic pkt_word_t e = exp_w.pop_front();
        check(rd_word == e, $sformatf("word %h expected %h", rd_word, e));
        rd_pop = 1'b1;
      end
      if (!len_empty && $urandom_range(0, 3) == 0) begin
        automatic int e = exp_l.pop_front();
        check(rd_len == 16'(e), $sformatf("length %0d expected %0d", rd_len, e));
        len_pop = 1'b1;
      end
    end
  end

  initial begin
    repeat (3) @(posedge wr_clk);
    wr_rst_n = 1'b1;
    rd_rst_n = 1'b1;
    repeat (3) @(negedge wr_clk);
    check(room_ok, "room when empty");
    // fill without reading: room_ok needs more than 763 of 1024 words free
    send(200);
    repeat (4) @(negedge wr_clk);
    check(room_ok, "room after 100 words");
    send(400);
    repeat (4) @(negedge wr_clk);
    check(!room_ok, "no room after 300 words");
    reading = 1'b1;
    for (int k = 0; k < 40; k++) send($urandom_range(1, 250));
    wait (exp_w.size() == 0 && exp_l.size() == 0);
    repeat (8) @(negedge wr_clk);
    check(room_ok, "room again after reading everything");
    check(rd_empty && len_empty, "empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge wr_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
