// tb_onu_mux: self-checking test of the upstream multiplexer.
//
// Four real ONU buffers feed the multiplexer. With the multiplexer held in
// reset, the buffers are loaded with 1, 3, 3 and 2 whole packets. After
// release, the order of the packets sent must match a reference that
// repeatedly takes the buffer with the most packets, the lowest number on a
// tie (ONU2, ONU3, ONU2, ONU3, ONU4, ONU1, ONU2, ONU3, ONU4), every packet
// must leave whole and in order, and with the output always ready the
// packets must leave at one word per clock with one clock between packets.
// A second phase writes and reads at the same time with a randomly stalling
// output and checks data and packet integrity.
module tb_onu_mux;
  import olt_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0, rst_n = 1'b0, mux_rst_n = 1'b0;
  always #6.43 clk = ~clk;

  logic      wr_en [N];
  pkt_word_t wr_word [N];
  logic      wr_frag_last [N];
  logic [7:0] pkt_count [N];
  pkt_word_t rd_word [N];
  logic      rd_avail [N];
  logic [N-1:0] rd_pop;
  logic      frag_dropped [N];

  for (genvar i = 0; i < N; i++) begin : g_buf
    onu_buffer #(.AW(8)) u_buf (
      .clk, .rst_n, .wr_en(wr_en[i]), .wr_word(wr_word[i]), .wr_frag_last(wr_frag_last[i]),
      .rd_pop(rd_pop[i]), .rd_word(rd_word[i]), .rd_avail(rd_avail[i]),
      .pkt_count(pkt_count[i]), .frag_dropped(frag_dropped[i]));
  end

  logic      out_valid, out_ready = 1'b1, grant, tie_break;
  pkt_word_t out_word;
  logic [1:0] sel_onu;

  onu_mux dut (
    .clk, .rst_n(mux_rst_n), .pkt_count, .rd_word, .rd_avail, .rd_pop,
    .out_valid, .out_word, .out_ready, .grant, .sel_onu, .tie_break);

  int checks = 0, failures = 0, ties = 0;
  pkt_word_t model [N][$];       // words written, per ONU
  int        exp_order[$];
  int        cur_onu = -1;
  int        words_out = 0, pkts_out = 0;
  int        first_cycle = -1, last_cycle = 0, cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write_packet(input int onu, input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      wr_en[onu]          = 1'b1;
      wr_word[onu].data   = 16'({onu[3:0], 12'($urandom)});
      wr_word[onu].one_byte = 1'b0;
      wr_word[onu].last   = (i == n - 1);
      wr_frag_last[onu]   = (i == n - 1);
      model[onu].push_back(wr_word[onu]);
    end
    @(negedge clk);
    wr_en[onu] = 1'b0;
    wr_frag_last[onu] = 1'b0;
  endtask

  always @(posedge clk) if (mux_rst_n) begin
    cycle++;
    if (grant) begin
      cur_onu = sel_onu;
      if (tie_break) ties++;
      if (exp_order.size() != 0) begin
        automatic int e = exp_order.pop_front();
        check(sel_onu == e, $sformatf("chose ONU%0d expected ONU%0d", sel_onu + 1, e + 1));
      end
    end
    if (out_valid && out_ready) begin
      pkt_word_t e;
      if (first_cycle < 0) first_cycle = cycle;
      last_cycle = cycle;
      words_out++;
      if (cur_onu < 0 || model[cur_onu].size() == 0) begin
        checks++; failures++; $display("FAIL word with no packet cyc %0d cur %0d data %h", cycle, cur_onu, out_word.data);
      end else begin
        e = model[cur_onu].pop_front();
        check(out_word == e, $sformatf("ONU%0d word %h expected %h", cur_onu + 1, out_word.data, e.data));
      end
      if (out_word.last) pkts_out++;
    end
  end

  int counts[N] = '{1, 3, 3, 2};
  int lens[N]   = '{5, 7, 4, 9};

  initial begin
    automatic int total_words = 0, total_pkts = 0;
    for (int i = 0; i < N; i++) begin
      wr_en[i] = 1'b0; wr_word[i] = '0; wr_frag_last[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < counts[i]; k++) begin
        write_packet(i, lens[i]);
        total_words += lens[i];
        total_pkts++;
      end
    // reference order: most packets first, lowest number on ties
    begin
      automatic int c[N] = counts;
      forever begin
        automatic int b = -1;
        for (int i = 0; i < N; i++) if (c[i] > 0 && (b < 0 || c[i] > c[b])) b = i;
        if (b < 0) break;
        exp_order.push_back(b);
        c[b]--;
      end
    end
    @(negedge clk);
    mux_rst_n = 1'b1;
    wait (pkts_out == total_pkts);
    check(exp_order.size() == 0, "all decisions made");
    check(last_cycle - first_cycle + 1 == total_words + total_pkts - 1,
          $sformatf("rate: %0d cycles for %0d words in %0d packets",
                    last_cycle - first_cycle + 1, total_words, total_pkts));
    check(ties > 0, "tie order exercised");

    // phase 2: concurrent traffic with a stalling output
    fork
      begin
        for (int k = 0; k < 30; k++) write_packet($urandom_range(0, N - 1), $urandom_range(1, 20));
      end
      begin
        repeat (1500) begin
          @(negedge clk);
          out_ready = 1'($urandom_range(0, 3) != 0);
        end
        out_ready = 1'b1;
      end
    join
    repeat (400) @(posedge clk);
    for (int i = 0; i < N; i++) check(model[i].size() == 0 && pkt_count[i] == 0, "all drained");
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
