// tb_dba_processor: self-checking test of the DBA processor.
//
// Drives random queue sizes for four ONUs, often equal and often zero,
// with a 12-clock slot. Checks that slot_start comes exactly every 12
// clocks, that a grant is given only then, to the ONU with the largest
// queue and on equal sizes to the lowest-numbered one, that no grant is
// given when all queues are empty, and that tie_break marks the decisions
// that the order settled. Also runs the board example of four ONUs with
// packets 1, 1, 2 and 2 frames long.
module tb_dba_processor;
  localparam int N = 4, SLOT = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #6.43 clk = ~clk;

  logic [N-1:0][7:0] queue_size = '0;
  logic [N-1:0]      grant;
  logic              tie_break, slot_start;

  dba_processor #(.N(N), .CW(8), .SLOT_CLKS(SLOT)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, last_slot = -1, n_tie = 0, n_none = 0, n_grant = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference: largest queue, lowest index first
  function automatic void ref_pick(input logic [N-1:0][7:0] q, output int who, output bit tie);
    int best = -1;
    tie = 1'b0;
    for (int i = 0; i < N; i++)
      if (q[i] != 0 && (best < 0 || q[i] > q[best])) best = i;
    if (best >= 0)
      for (int i = 0; i < N; i++) if (i != best && q[i] == q[best]) tie = 1'b1;
    who = best;
  endfunction

  bit random_mode = 1'b1;

  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (slot_start) begin
      automatic int who;
      automatic bit tie;
      if (last_slot >= 0) check(cyc - last_slot == SLOT, "slot length");
      last_slot = cyc;
      ref_pick(queue_size, who, tie);
      if (!random_mode) begin
        // board example: checked by its own sequence
      end else if (who < 0) begin
        check(grant == '0 && !tie_break, "no grant with empty queues");
        n_none++;
      end else begin
        check(grant == N'(1 << who), $sformatf("grant %b expected ONU%0d", grant, who + 1));
        check(tie_break == tie, "tie_break flag");
        n_grant++;
        if (tie) n_tie++;
      end
    end else begin
      check(grant == '0, "grant only at slot start");
    end
    if (random_mode) begin
      for (int i = 0; i < N; i++) queue_size[i] = 8'($urandom_range(0, 3));
      if ($urandom_range(0, 5) == 0) queue_size = '0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    // board example: ONU1 and ONU2 one frame, ONU3 and ONU4 two frames;
    // each grant takes one frame from the granted queue
    random_mode = 1'b0;
    @(negedge clk);
    queue_size = {8'd2, 8'd2, 8'd1, 8'd1};
    begin
      automatic int order[$];
      for (int s = 0; s < 6; s++) begin
        @(negedge clk);
        while (grant == '0) @(negedge clk);
        for (int i = 0; i < N; i++) if (grant[i]) begin
          order.push_back(i + 1);
          queue_size[i] = queue_size[i] - 8'd1;
        end
      end
      begin
        automatic int want[6] = '{3, 4, 1, 2, 3, 4};
        for (int s = 0; s < 6; s++)
          check(order[s] == want[s], $sformatf("board slot %0d: ONU%0d expected ONU%0d",
                s, order[s], want[s]));
      end
    end
    check(n_tie > 0 && n_none > 0 && n_grant > 0, "ties, empty slots and grants seen");
    $display("grants=%0d ties=%0d empty=%0d", n_grant, n_tie, n_none);
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
