// tb_onu_framer: self-checking test of the ONU upstream framer.
//
// A model of the packet and length store (first word fall-through, with
// random empty clocks) feeds packets of 1 to 1526 bytes; space_ok is
// lowered at random. Every word written is compared with frames built
// independently: AAAA x4, E2 and the ONU-ID, the length with bit 15 on
// the last fragment, the payload and 0000 fill to 140 words, fragments
// of at most 268 bytes. Also checks frame_end on every 140th word, that
// no frame starts while space_ok is low, and the number of frames.
module tb_onu_framer;
  import olt_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #6.43 clk = ~clk;

  logic [15:0] len_value = '0;
  logic        len_empty = 1'b1, len_pop;
  pkt_word_t   in_word = '0;
  logic        in_empty = 1'b1, in_pop;
  logic        space_ok = 1'b0;
  logic        out_push, out_frame_end, frag_sent;
  logic [15:0] out_data;

  onu_framer #(.ONU_ID(8'd3)) dut (.*);

  int checks = 0, failures = 0, frames = 0, exp_frames = 0, widx = 0;
  pkt_word_t q_w[$];
  int        q_l[$];
  logic [15:0] exp_o[$];
  bit pop_w = 1'b0, pop_l = 1'b0, prev_space = 1'b0, prev_idle = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic add_packet(input int n);
    logic [15:0] d[$];
    int off = 0;
    q_l.push_back(n);
    for (int i = 0; i < n; i += 2) begin
      pkt_word_t w;
      w.one_byte = (i + 1 == n);
      w.data = w.one_byte ? {8'($urandom), 8'h00} : 16'($urandom);
      w.last = (i + 2 >= n);
      q_w.push_back(w);
      d.push_back(w.data);
    end
    while (off < n) begin
      int f = (n - off > 268) ? 268 : n - off;
      repeat (4) exp_o.push_back(16'hAAAA);
      exp_o.push_back(16'hE203);
      exp_o.push_back({(off + f == n), 15'(f)});
      for (int i = 0; i < (f + 1) / 2; i++) exp_o.push_back(d[off / 2 + i]);
      for (int i = 6 + (f + 1) / 2; i < 140; i++) exp_o.push_back(16'h0000);
      off += f;
      exp_frames++;
    end
  endtask

  always @(negedge clk) begin
    if (pop_w) void'(q_w.pop_front());
    if (pop_l) void'(q_l.pop_front());
    in_empty  = q_w.size() == 0 || $urandom_range(0, 5) == 0;
    in_word   = q_w.size() != 0 ? q_w[0] : '0;
    len_empty = q_l.size() == 0;
    len_value = q_l.size() != 0 ? 16'(q_l[0]) : '0;
    space_ok  = $urandom_range(0, 3) != 0;
    #1;
    pop_w = in_pop && rst_n;
    pop_l = len_pop && rst_n;
    prev_space = space_ok;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_push) begin
      if (widx == 0) check(prev_idle, "frame starts after the previous one ended");
      if (exp_o.size() == 0) begin
        checks++; failures++; $display("FAIL unexpected word");
      end else begin
        automatic logic [15:0] e = exp_o.pop_front();
        check(out_data == e, $sformatf("word %0d: %h expected %h", widx, out_data, e));
      end
      check(out_frame_end == (widx == 139), "frame_end on word 139 only");
      widx = (widx == 139) ? 0 : widx + 1;
    end else check(!out_frame_end, "no frame_end without a word");
    if (frag_sent) frames++;
  end

  // a frame may only begin (len_pop or leaving idle) while space_ok is high
  always @(posedge clk) if (rst_n && len_pop) check(prev_space, "len_pop only with space_ok");

  initial begin
    add_packet(187);
    add_packet(268);
    add_packet(269);
    add_packet(1);
    add_packet(1526);
    for (int k = 0; k < 30; k++) add_packet($urandom_range(1, 1526));
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (exp_o.size() == 0);
    repeat (10) @(posedge clk);
    check(frames == exp_frames, $sformatf("%0d frames expected %0d", frames, exp_frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
