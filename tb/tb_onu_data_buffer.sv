// tb_onu_data_buffer: self-checking test of the ONU frame queue.
//
// Writes 140-word frames (with random gaps, only while space_ok) into a
// 512-word buffer and gives grant pulses at random times. Checks that the
// queue size counts finished frames only, that a grant with an empty
// queue sends nothing, that a granted frame leaves whole, in order, one
// word per clock for 140 clocks starting two clocks after the grant, that
// the output is 0000 outside a frame, and that space_ok is low whenever a
// further frame would not fit.
module tb_onu_data_buffer;
  import olt_pkg::*;

  localparam int AW = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #6.43 clk = ~clk;

  logic        in_push = 1'b0, in_frame_end = 1'b0, space_ok, grant = 1'b0;
  logic [15:0] in_data = '0;
  logic [7:0]  queue_frames;
  logic [15:0] us_dout;
  logic        us_active, frame_sent;

  onu_data_buffer #(.AW(AW)) dut (.*);

  int checks = 0, failures = 0, stored = 0, queued = 0, out_left = 0, wait_start = -1;
  int grants_taken = 0, empty_grants = 0, sent_frames = 0, frames_in = 0;
  logic [15:0] exp_o[$];
  bit busy = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // writer
  initial begin
    @(posedge rst_n);
    for (int f = 0; f < 40; f++) begin
      @(negedge clk);
      while (!space_ok) @(negedge clk);
      check(exp_o.size() + 140 <= 512, "space_ok only when a frame fits");
      for (int i = 0; i < 140; i++) begin
        automatic logic [15:0] d = 16'($urandom);
        in_push = 1'b1;
        in_data = d;
        in_frame_end = (i == 139);
        exp_o.push_back(d);
        @(negedge clk);
        in_push = 1'b0;
        in_frame_end = 1'b0;
        if ($urandom_range(0, 7) == 0) @(negedge clk);
      end
      frames_in++;
      repeat ($urandom_range(0, 300)) @(negedge clk);
    end
  end

  bit ended = 1'b0;
  always @(posedge clk) ended = in_push && in_frame_end;

  // grants and checks, all at the negative edge
  always @(negedge clk) if (rst_n) begin
    // one clock after a grant the queue and the sender have moved
    if (ended) queued++;
    check(queue_frames == 8'(queued), $sformatf("queue %0d expected %0d", queue_frames, queued));
    if (wait_start == 0) begin
      out_left = 140;
      wait_start = -1;
    end else if (wait_start > 0) wait_start--;
    if (out_left > 0) begin
      automatic logic [15:0] e = exp_o.pop_front();
      check(us_active && us_dout == e, $sformatf("frame word %h expected %h", us_dout, e));
      out_left--;
      if (out_left == 0) sent_frames++;
    end else begin
      check(!us_active && us_dout == 16'h0000, "idle 0000 outside a frame");
    end
    grant = 1'b0;
    if (!busy && $urandom_range(0, 60) == 0) begin
      grant = 1'b1;
      if (queued > 0) begin
        queued--;
        busy = 1'b1;
        wait_start = 1;
        grants_taken++;
      end else empty_grants++;
    end
    if (busy && out_left == 1) busy = 1'b0;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    wait (frames_in == 40);
    wait (sent_frames == 40);
    repeat (5) @(negedge clk);
    check(empty_grants > 0, "a grant with an empty queue was given");
    $display("frames=%0d grants_taken=%0d empty_grants=%0d", sent_frames, grants_taken, empty_grants);
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
