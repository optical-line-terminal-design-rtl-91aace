// tb_data_buffer: self-checking test of the dual-clock downstream data
// buffer, written on a 125 MHz clock and read on a 77.76 MHz clock.
//
// A writer pushes random packet words whenever wr_free allows, a reader
// pops at random; every word must come out once, in order. The test also
// fills the buffer with the reader stopped and checks that wr_free reaches
// zero after exactly 2**AW words, then drains it and checks wr_free
// returns to 2**AW.
module tb_data_buffer;
  import olt_pkg::*;

  localparam int AW = 5;

  logic wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b0;
  always #4.0  wr_clk = ~wr_clk;
  always #6.43 rd_clk = ~rd_clk;

  logic        wr_push = 1'b0, rd_pop = 1'b0, rd_empty;
  pkt_word_t   wr_word = '0, rd_word;
  logic [AW:0] wr_free;

  data_buffer #(.AW(AW)) dut (
    .wr_clk, .wr_rst_n(rst_n), .wr_push, .wr_word, .wr_free,
    .rd_clk, .rd_rst_n(rst_n), .rd_pop, .rd_word, .rd_empty);

  int checks = 0, failures = 0, n_written = 0, n_read = 0;
  pkt_word_t model[$];
  bit reading = 1'b1, writing = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge wr_clk) begin
    wr_push = 1'b0;
    if (rst_n && writing && n_written < 600 && wr_free != 0 && $urandom_range(0, 3) != 0) begin
      wr_push = 1'b1;
      wr_word = pkt_word_t'($urandom);
      model.push_back(wr_word);
      n_written++;
    end
  end

  always @(negedge rd_clk) begin
    rd_pop = 1'b0;
    if (rst_n && reading && !rd_empty && $urandom_range(0, 2) != 0) begin
      automatic pkt_word_t e = model.pop_front();
      check(rd_word == e, $sformatf("read %h expected %h", rd_word, e));
      rd_pop = 1'b1;
      n_read++;
    end
  end

  initial begin
    repeat (3) @(posedge rd_clk);
    rst_n = 1'b1;
    wait (n_read == 600);
    repeat (10) @(posedge rd_clk);
    check(rd_empty, "empty after all read");
    // fill with the reader stopped
    reading = 1'b0;
    n_written = 0;
    repeat (300) @(posedge wr_clk);
    check(wr_free == 0, "full");
    check(model.size() == (1 << AW), $sformatf("holds %0d words", model.size()));
    writing = 1'b0;
    reading = 1'b1;
    wait (model.size() == 0);
    repeat (10) @(posedge wr_clk);
    check(wr_free == (1 << AW), "free space restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge rd_clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
