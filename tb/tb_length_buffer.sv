// tb_length_buffer: self-checking test of the dual-clock length store,
// written on a 125 MHz clock and read on a 77.76 MHz clock.
//
// A writer pushes random 16-bit lengths whenever the store is not full, a
// reader pops at random; every length must come out once, in order. The
// store is then filled with the reader stopped: it must report full after
// exactly 2**AW entries, and not full again once drained.
module tb_length_buffer;
  import olt_pkg::*;

  localparam int AW = 4;

  logic wr_clk = 1'b0, rd_clk = 1'b0, rst_n = 1'b0;
  always #4.0  wr_clk = ~wr_clk;
  always #6.43 rd_clk = ~rd_clk;

  logic        wr_push = 1'b0, rd_pop = 1'b0, rd_empty;
  logic [15:0] wr_word = '0, rd_word;
  logic        wr_full;

  length_buffer #(.AW(AW)) dut (
    .wr_clk, .wr_rst_n(rst_n), .wr_push, .wr_length(wr_word), .wr_full,
    .rd_clk, .rd_rst_n(rst_n), .rd_pop, .rd_length(rd_word), .rd_empty);

  int checks = 0, failures = 0, n_written = 0, n_read = 0;
  logic [15:0] model[$];
  bit reading = 1'b1, writing = 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(negedge wr_clk) begin
    wr_push = 1'b0;
    if (rst_n && writing && n_written < 600 && !wr_full && $urandom_range(0, 3) != 0) begin
      wr_push = 1'b1;
      wr_word = 16'($urandom);
      model.push_back(wr_word);
      n_written++;
    end
  end

  always @(negedge rd_clk) begin
    rd_pop = 1'b0;
    if (rst_n && reading && !rd_empty && $urandom_range(0, 2) != 0) begin
      automatic logic [15:0] e = model.pop_front();
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
    check(wr_full, "full");
    check(model.size() == (1 << AW), $sformatf("holds %0d words", model.size()));
    writing = 1'b0;
    reading = 1'b1;
    wait (model.size() == 0);
    repeat (10) @(posedge wr_clk);
    check(!wr_full, "not full after draining");
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
