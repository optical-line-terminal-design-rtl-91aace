// tb_onu_buffer: self-checking test of one ONU packet buffer.
//
// Uses a 64-word buffer. Writes packets made of one or more fragments,
// checks that the whole-packet counter rises only when a packet's last word
// is stored, that a reader sees only complete packets, and that words come
// back in order. It then fills the buffer until a packet cannot fit and
// checks that the partly written packet and its later fragments are thrown
// away while the packets already complete survive, and that the buffer
// works normally afterwards.
module tb_onu_buffer;
  import olt_pkg::*;

  localparam int AW = 6;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      wr_en = 1'b0, wr_frag_last = 1'b0, rd_pop = 1'b0;
  pkt_word_t wr_word = '0, rd_word;
  logic      rd_avail, frag_dropped;
  logic [7:0] pkt_count;

  onu_buffer #(.AW(AW)) dut (.*);

  always #6.43 clk = ~clk;

  int checks = 0, failures = 0, drops = 0;
  pkt_word_t model[$];

  always @(posedge clk) if (frag_dropped) drops++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // write one fragment of n words; last_frag ends the packet
  task automatic write_frag(input int n, input bit last_frag, input bit keep);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en         = 1'b1;
      wr_word.data  = 16'($urandom);
      wr_word.one_byte = 1'b0;
      wr_word.last  = last_frag && (i == n - 1);
      wr_frag_last  = (i == n - 1);
      if (keep) model.push_back(wr_word);
    end
    @(negedge clk);
    wr_en = 1'b0; wr_frag_last = 1'b0;
  endtask

  task automatic read_packet();
    pkt_word_t e;
    bit done = 0;
    while (!done) begin
      @(negedge clk);
      check(rd_avail, "data available inside packet");
      e = model.pop_front();
      check(rd_word == e, $sformatf("read %h exp %h", rd_word.data, e.data));
      done = rd_word.last;
      rd_pop = 1'b1;
      @(negedge clk);
      rd_pop = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check(pkt_count == 0 && !rd_avail, "empty after reset");
    write_frag(10, 1'b0, 1'b1);
    check(pkt_count == 0, "first fragment not yet a packet");
    check(!rd_avail, "incomplete packet hidden from reader");
    write_frag(5, 1'b1, 1'b1);
    check(pkt_count == 1, "packet counted after last fragment");
    write_frag(3, 1'b1, 1'b1);
    check(pkt_count == 2, "two packets");
    read_packet();
    check(pkt_count == 1, "one left");
    read_packet();
    check(pkt_count == 0 && !rd_avail, "empty again");
    // overflow: 40 committed words, then a packet of 20 + 20 words
    write_frag(40, 1'b1, 1'b1);
    write_frag(20, 1'b0, 1'b0);   // does not fit completely
    write_frag(20, 1'b1, 1'b0);
    check(drops == 1, $sformatf("one drop reported (%0d)", drops));
    check(pkt_count == 1, "only the complete packet is counted");
    write_frag(8, 1'b1, 1'b1);    // fits again once the rest is discarded
    check(pkt_count == 2, "buffer usable after a drop");
    read_packet();
    read_packet();
    check(pkt_count == 0 && !rd_avail && model.size() == 0, "all read back");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
