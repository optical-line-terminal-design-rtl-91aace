// tb_pon_processor: self-checking test of the upstream frame receiver.
//
// Builds a byte stream of upstream PON frames (8 x 0xAA, 0xE2, ONU-ID,
// length with the last-fragment bit, payload, zero fill to 280 bytes),
// packs it into 16-bit words and feeds one word per clock. Some frames lose
// a byte of preamble so that they start on the low half of a word, one
// frame carries an illegal ONU-ID and one an illegal length. The expected
// payload words, ONU index, fragment end and packet end are queued when the
// stream is built and compared with every output word. It also checks that
// payload words leave on consecutive clocks (one word per clock).
module tb_pon_processor;
  import olt_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic [15:0] din;
  logic        out_valid, out_frag_last, out_packet_over, frame_ok, bad_frame, realigned;
  pkt_word_t   out_word;
  logic [1:0]  out_onu;
  logic [14:0] out_length;

  pon_processor dut (.*);

  always #6.43 clk = ~clk;

  typedef struct {
    logic [15:0] data;
    logic        one_byte;
    logic        last;
    logic        frag_last;
    logic [1:0]  onu;
  } exp_t;

  byte unsigned stream[$];
  exp_t         expq[$];
  int checks = 0, failures = 0;
  int n_realigned = 0, n_bad = 0, n_ok = 0;
  int exp_realigned = 0, exp_bad = 0, exp_ok = 0;

  task automatic add_frame(input byte unsigned id, input int len, input bit last_frag,
                           input int lost_preamble, input bit good);
    byte unsigned pl[$];
    for (int i = 0; i < 8 - lost_preamble; i++) stream.push_back(8'hAA);
    if (good && (stream.size() % 2 == 1)) exp_realigned++;
    stream.push_back(8'hE2);
    stream.push_back(id);
    stream.push_back({last_frag, 7'(len >> 8)});
    stream.push_back(8'(len));
    for (int i = 0; i < len; i++) begin
      pl.push_back(8'($urandom));
      stream.push_back(pl[i]);
    end
    for (int i = 12 + len; i < 280; i++) stream.push_back(8'h00);
    if (good) begin
      exp_ok++;
      for (int i = 0; i < len; i += 2) begin
        exp_t e;
        e.one_byte  = (i + 1 == len);
        e.data      = e.one_byte ? {pl[i], 8'h00} : {pl[i], pl[i+1]};
        e.frag_last = (i + 2 >= len);
        e.last      = e.frag_last && last_frag;
        e.onu       = 2'(id - 1);
        expq.push_back(e);
      end
    end else begin
      exp_bad++;
    end
  endtask

  int word_idx = 0;
  always @(negedge clk) begin
    if (word_idx + 1 < stream.size()) begin
      din = {stream[word_idx], stream[word_idx+1]};
      word_idx += 2;
    end else begin
      din = 16'h0000;
    end
  end

  logic prev_valid = 1'b0, prev_frag_last = 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h", out_word.data);
      end else begin
        e = expq.pop_front();
        if (out_word.data !== e.data || out_word.one_byte !== e.one_byte ||
            out_word.last !== e.last || out_frag_last !== e.frag_last || out_onu !== e.onu) begin
          failures++;
          $display("FAIL got %h ob%0d l%0d fl%0d onu%0d exp %h ob%0d l%0d fl%0d onu%0d",
                   out_word.data, out_word.one_byte, out_word.last, out_frag_last, out_onu,
                   e.data, e.one_byte, e.last, e.frag_last, e.onu);
        end
      end
      // one word per clock inside a fragment
      checks++;
      if (!prev_frag_last && !prev_valid) begin
        failures++;
        $display("FAIL gap inside fragment");
      end
    end
    if (prev_valid && !prev_frag_last && !out_valid) begin
      checks++; failures++;
      $display("FAIL fragment interrupted");
    end
    prev_valid     <= out_valid;
    prev_frag_last <= out_valid ? out_frag_last : prev_frag_last;
    if (frame_ok) n_ok++;
    if (bad_frame) n_bad++;
    if (realigned) n_realigned++;
  end

  initial begin
    din = 16'h0000;
    // idle lead-in, odd number of bytes shifts the next frame by one byte
    repeat (6) stream.push_back(8'h00);
    add_frame(8'd1, 100, 1'b1, 0, 1'b1);          // ONU1, one-frame packet
    add_frame(8'd2, 268, 1'b0, 0, 1'b1);          // ONU2, first of two
    stream.push_back(8'h00);                      // shift following frames by one byte
    add_frame(8'd3, 47, 1'b1, 0, 1'b1);
    add_frame(8'd2, 33, 1'b1, 3, 1'b1);  // lost 3 preamble bytes
    add_frame(8'd9, 20, 1'b1, 0, 1'b0);  // bad ONU-ID
    add_frame(8'd4, 300, 1'b1, 0, 1'b0);                   // bad length
    add_frame(8'd4, 1, 1'b1, 2, 1'b1);
    stream.push_back(8'h00);
    add_frame(8'd4, 268, 1'b1, 0, 1'b1);
    for (int k = 0; k < 6; k++)
      add_frame(8'(1 + $urandom_range(0, 3)), $urandom_range(1, 268), 1'($urandom_range(0, 1)),
                0, 1'b1);
    repeat (40) stream.push_back(8'h00);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    word_idx = 0;
    wait (word_idx + 1 >= stream.size());
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d words missing", expq.size()); end
    checks++;
    if (n_ok != exp_ok || n_bad != exp_bad) begin
      failures++; $display("FAIL frames ok %0d/%0d bad %0d/%0d", n_ok, exp_ok, n_bad, exp_bad);
    end
    checks++;
    if (n_realigned != exp_realigned) begin
      failures++; $display("FAIL realigned %0d exp %0d", n_realigned, exp_realigned);
    end
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
