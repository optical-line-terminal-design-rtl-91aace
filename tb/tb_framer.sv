// tb_framer: self-checking test of the downstream framer.
//
// The length store and data buffer are modelled by queues with
// first-word-fall-through outputs. Packets of random lengths, among them
// the 187-byte packet of the board test, are queued; the test collects the
// framer's output words while in_frame is high and compares each frame with
// the expected header (AAAA AAE2 then the length) and payload, the odd last
// byte in the high half. It checks that a frame is sent at one word per
// clock, that only one idle word separates back-to-back frames, that idle
// words are sent when nothing is queued, and that the data running dry
// inside a frame is reported.
module tb_framer;
  import olt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #6.43 clk = ~clk;

  logic        len_empty, len_pop, dw_empty, dw_pop, in_frame, frame_sent, starved;
  logic [15:0] len_value, dout;
  pkt_word_t   dw_word;

  framer dut (.*);

  logic [15:0] lq[$];
  pkt_word_t   dq[$];
  logic [15:0] expq[$];
  bit          hold_data = 1'b0;

  task automatic refresh();
    len_empty = (lq.size() == 0);
    len_value = (lq.size() == 0) ? 16'h0 : lq[0];
    dw_empty  = (dq.size() == 0) || hold_data;
    dw_word   = (dq.size() == 0) ? '0 : dq[0];
  endtask

  always @(negedge clk) refresh();

  always @(posedge clk) begin
    if (len_pop) void'(lq.pop_front());
    if (dw_pop)  void'(dq.pop_front());
  end

  int checks = 0, failures = 0, frames = 0, idle_between = 0, n_starved = 0;
  int run = 0, last_run = 0, gap_check_from = 1000;
  bit idle_gap_ok = 1'b1;
  bit starved_seen = 1'b0;
  logic prev_in = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic queue_packet(input int n);
    byte unsigned b[$];
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
    lq.push_back(16'(n));
    expq.push_back(16'hAAAA);
    expq.push_back(16'hAAE2);
    expq.push_back(16'(n));
    for (int i = 0; i < n; i += 2) begin
      pkt_word_t w;
      w.one_byte = (i + 1 == n);
      w.data = w.one_byte ? {b[i], 8'h5A} : {b[i], b[i+1]};  // padding must not leak
      w.last = (i + 2 >= n);
      dq.push_back(w);
      expq.push_back(w.one_byte ? {b[i], 8'h00} : w.data);
    end
    refresh();
  endtask

  always @(posedge clk) if (rst_n) begin
    if (in_frame) begin
      if (expq.size() == 0) begin
        checks++; failures++; $display("FAIL extra word %h", dout);
      end else if (!starved_seen) begin
        automatic logic [15:0] e = expq.pop_front();
        check(dout == e, $sformatf("word %h expected %h", dout, e));
      end
      run++;
      if (!prev_in && frames >= gap_check_from) check(idle_between == 1 || idle_gap_ok,
          $sformatf("%0d idle words between back-to-back frames", idle_between));
      idle_between = 0;
    end else begin
      check(dout == IDLE_WORD, "idle word outside a frame");
      if (prev_in) last_run = run;
      run = 0;
      idle_between++;
    end
    if (frame_sent) frames++;
    if (starved) n_starved++;
    prev_in <= in_frame;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // one packet after idle, as captured on the board
    queue_packet(187);
    wait (frames == 1);
    repeat (5) @(posedge clk);
    // back-to-back packets: exactly one idle word between frames
    @(negedge clk);
    idle_gap_ok = 1'b0;
    gap_check_from = frames + 1;
    for (int k = 0; k < 10; k++) queue_packet($urandom_range(1, 1526));
    queue_packet(1);
    queue_packet(2);
    wait (frames == 13);
    repeat (3) @(posedge clk);
    check(expq.size() == 0, "all words sent");
    idle_gap_ok = 1'b1;
    // rate: a 400-byte packet occupies 3 + 200 consecutive clocks
    @(negedge clk);
    queue_packet(400);
    wait (frames == 14);
    repeat (3) @(posedge clk);
    check(last_run == 203, $sformatf("frame of 203 words took %0d clocks", last_run));
    // data buffer empty inside a frame
    @(negedge clk);
    hold_data = 1'b1;
    refresh();
    starved_seen = 1'b1;
    queue_packet(10);
    repeat (10) @(posedge clk);
    check(n_starved > 0, "starvation reported");
    @(negedge clk);
    hold_data = 1'b0;
    refresh();
    repeat (20) @(posedge clk);
    check(frames == 15, $sformatf("frames sent %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
