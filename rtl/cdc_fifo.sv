// cdc_fifo: dual-clock first-in first-out memory.
//
// Gray-coded read and write pointers cross between the clocks through
// two-flop synchronisers, the usual way to pass data between unrelated
// clocks. The read side is first-word-fall-through: rd_data shows the
// oldest entry whenever rd_empty is low, and rd_pop removes it. wr_free
// is the space the writer can count on (conservative, because the read
// pointer it sees is a few cycles old); rd_count is likewise conservative.
// Writes when full and pops when empty are ignored and flagged by
// assertions. Depth is 2**AW entries.
module cdc_fifo #(
  parameter int unsigned W  = 18,
  parameter int unsigned AW = 4
) (
  input  logic          wr_clk,
  input  logic          wr_rst_n,
  input  logic          wr_push,
  input  logic [W-1:0]  wr_data,
  output logic          wr_full,
  output logic [AW:0]   wr_free,

  input  logic          rd_clk,
  input  logic          rd_rst_n,
  input  logic          rd_pop,
  output logic [W-1:0]  rd_data,
  output logic          rd_empty,
  output logic [AW:0]   rd_count
);
  localparam int unsigned DEPTH = 1 << AW;

  logic [W-1:0] mem [DEPTH];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the read domain

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW:0] rbin_w, wused;
  assign rbin_w  = gray2bin(rgray_w2);
  assign wused   = wbin - rbin_w;
  assign wr_full = wused[AW];
  assign wr_free = (AW+1)'(DEPTH) - wused;

  always_ff @(posedge wr_clk or negedge wr_rst_n)
    if (!wr_rst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_push && !wr_full) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end

  always_ff @(posedge wr_clk)
    if (wr_push && !wr_full) mem[wbin[AW-1:0]] <= wr_data;

  // read side
  logic [AW:0] wbin_r;
  assign wbin_r   = gray2bin(wgray_r2);
  assign rd_count = wbin_r - rbin;
  assign rd_empty = (rd_count == '0);
  assign rd_data  = mem[rbin[AW-1:0]];

  always_ff @(posedge rd_clk or negedge rd_rst_n)
    if (!rd_rst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd_pop && !rd_empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end

  a_no_overflow: assert property (@(posedge wr_clk) disable iff (!wr_rst_n) wr_push |-> !wr_full)
    else $error("cdc_fifo: push while full");
  a_no_underflow: assert property (@(posedge rd_clk) disable iff (!rd_rst_n) rd_pop |-> !rd_empty)
    else $error("cdc_fifo: pop while empty");
endmodule
