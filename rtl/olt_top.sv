// olt_top: optical line terminal datapath of a distributed-control hybrid
// TDM/WDM passive optical network.
//
// Upstream (PON -> Ethernet): 16-bit words from the SerDes receiver enter
// the PON processor on the 77.76 MHz PON clock. It finds each 280-byte
// frame, reads its ONU-ID, length and last-fragment bit and writes the
// payload into the buffer of that ONU. Each of the NUM_ONU buffers counts
// the whole Ethernet packets it holds; the multiplexer always empties one
// whole packet from the buffer holding the most, ties going to the
// lower-numbered ONU. The GMII transmitter moves the packet into the
// 125 MHz GTXCLK domain and sends it as bytes with TXEN.
//
// Downstream (Ethernet -> PON): the GMII receiver (RXCLK) packs RXD bytes
// into words, writes them into the data buffer and the byte count of each
// packet into the length store. The framer, on the PON clock, sends PSYNC,
// delimiter and length followed by the packet, and idle words otherwise.
//
// Clocks: clk_pon, gtx_clk and rx_clk are unrelated; only dual-clock FIFOs
// cross between them. rst_n is asynchronous and released per domain
// through a synchroniser. The status counters run in the domain of the
// event they count and are meant to be sampled when idle.
// The block structure and data formats follow the document; buffer depths,
// the idle word and the counters are this design's choices.
module olt_top
  import olt_pkg::*;
#(
  parameter int unsigned ONU_BUF_AW  = 11,
  parameter int unsigned DS_BUF_AW   = 11,
  parameter int unsigned PSYNC_BYTES = 3
) (
  input  logic        clk_pon,
  input  logic        rst_n,

  // PON side
  input  logic [15:0] us_din,
  output logic [15:0] ds_dout,
  output logic        ds_in_frame,

  // GMII transmit
  input  logic        gtx_clk,
  output logic [7:0]  gmii_txd,
  output logic        gmii_tx_en,
  output logic        gmii_tx_er,

  // GMII receive
  input  logic        rx_clk,
  input  logic [7:0]  gmii_rxd,
  input  logic        gmii_rx_dv,
  input  logic        gmii_rx_er,

  output olt_status_t status
);
  localparam int unsigned N  = NUM_ONU;
  localparam int unsigned CW = 8;

  logic rst_pon_n, rst_gtx_n, rst_rx_n;
  rst_sync u_rs_pon (.clk(clk_pon), .rst_n, .rst_sync_n(rst_pon_n));
  rst_sync u_rs_gtx (.clk(gtx_clk), .rst_n, .rst_sync_n(rst_gtx_n));
  rst_sync u_rs_rx  (.clk(rx_clk),  .rst_n, .rst_sync_n(rst_rx_n));

  // ---------------- upstream ----------------
  logic                 pp_valid, pp_frag_last, pp_pkt_over;
  pkt_word_t            pp_word;
  logic [$clog2(N)-1:0] pp_onu;
  logic [14:0]          pp_len;
  logic                 pp_frame_ok, pp_bad, pp_realigned;

  pon_processor #(.NUM_ONU_P(N)) u_pon_proc (
    .clk            (clk_pon),
    .rst_n          (rst_pon_n),
    .din            (us_din),
    .out_valid      (pp_valid),
    .out_word       (pp_word),
    .out_frag_last  (pp_frag_last),
    .out_onu        (pp_onu),
    .out_length     (pp_len),
    .out_packet_over(pp_pkt_over),
    .frame_ok       (pp_frame_ok),
    .bad_frame      (pp_bad),
    .realigned      (pp_realigned)
  );

  logic [CW-1:0] pkt_count [N];
  pkt_word_t     rd_word   [N];
  logic          rd_avail  [N];
  logic [N-1:0]  rd_pop;
  logic [N-1:0]  frag_dropped;

  for (genvar i = 0; i < N; i++) begin : g_onu
    onu_buffer #(.AW(ONU_BUF_AW), .CW(CW)) u_buf (
      .clk         (clk_pon),
      .rst_n       (rst_pon_n),
      .wr_en       (pp_valid && pp_onu == ($clog2(N))'(i)),
      .wr_word     (pp_word),
      .wr_frag_last(pp_frag_last),
      .rd_pop      (rd_pop[i]),
      .rd_word     (rd_word[i]),
      .rd_avail    (rd_avail[i]),
      .pkt_count   (pkt_count[i]),
      .frag_dropped(frag_dropped[i])
    );
  end

  logic                 mx_valid, mx_ready, mx_grant, mx_tie;
  pkt_word_t            mx_word;
  logic [$clog2(N)-1:0] mx_sel;

  onu_mux #(.N(N), .CW(CW)) u_mux (
    .clk      (clk_pon),
    .rst_n    (rst_pon_n),
    .pkt_count(pkt_count),
    .rd_word  (rd_word),
    .rd_avail (rd_avail),
    .rd_pop   (rd_pop),
    .out_valid(mx_valid),
    .out_word (mx_word),
    .out_ready(mx_ready),
    .grant    (mx_grant),
    .sel_onu  (mx_sel),
    .tie_break(mx_tie)
  );

  logic tx_pkt_sent, tx_underrun;

  gmii_tx u_gmii_tx (
    .clk_pon  (clk_pon),
    .rst_pon_n(rst_pon_n),
    .in_valid (mx_valid),
    .in_ready (mx_ready),
    .in_word  (mx_word),
    .gtx_clk  (gtx_clk),
    .rst_gtx_n(rst_gtx_n),
    .txd      (gmii_txd),
    .tx_en    (gmii_tx_en),
    .tx_er    (gmii_tx_er),
    .pkt_sent (tx_pkt_sent),
    .underrun (tx_underrun)
  );

  // ---------------- downstream ----------------
  logic               dw_push, len_push, len_full;
  pkt_word_t          dw_word;
  logic [DS_BUF_AW:0] dw_free;
  logic [15:0]        len_value;
  logic               rx_done, rx_dropped, rx_oversize, rx_error;

  gmii_rx #(.BUF_AW(DS_BUF_AW)) u_gmii_rx (
    .rx_clk   (rx_clk),
    .rst_n    (rst_rx_n),
    .rxd      (gmii_rxd),
    .rx_dv    (gmii_rx_dv),
    .rx_er    (gmii_rx_er),
    .dw_push  (dw_push),
    .dw_word  (dw_word),
    .dw_free  (dw_free),
    .len_push (len_push),
    .len_value(len_value),
    .len_full (len_full),
    .pkt_done (rx_done),
    .dropped  (rx_dropped),
    .oversize (rx_oversize),
    .rx_error (rx_error)
  );

  logic        fr_len_pop, fr_len_empty, fr_dw_pop, fr_dw_empty;
  logic [15:0] fr_len;
  pkt_word_t   fr_word;

  length_buffer u_length (
    .wr_clk   (rx_clk),
    .wr_rst_n (rst_rx_n),
    .wr_push  (len_push),
    .wr_length(len_value),
    .wr_full  (len_full),
    .rd_clk   (clk_pon),
    .rd_rst_n (rst_pon_n),
    .rd_pop   (fr_len_pop),
    .rd_length(fr_len),
    .rd_empty (fr_len_empty)
  );

  data_buffer #(.AW(DS_BUF_AW)) u_data_buf (
    .wr_clk  (rx_clk),
    .wr_rst_n(rst_rx_n),
    .wr_push (dw_push),
    .wr_word (dw_word),
    .wr_free (dw_free),
    .rd_clk  (clk_pon),
    .rd_rst_n(rst_pon_n),
    .rd_pop  (fr_dw_pop),
    .rd_word (fr_word),
    .rd_empty(fr_dw_empty)
  );

  logic fr_sent, fr_starved;

  framer #(.PSYNC_BYTES(PSYNC_BYTES)) u_framer (
    .clk       (clk_pon),
    .rst_n     (rst_pon_n),
    .len_empty (fr_len_empty),
    .len_value (fr_len),
    .len_pop   (fr_len_pop),
    .dw_empty  (fr_dw_empty),
    .dw_word   (fr_word),
    .dw_pop    (fr_dw_pop),
    .dout      (ds_dout),
    .in_frame  (ds_in_frame),
    .frame_sent(fr_sent),
    .starved   (fr_starved)
  );

  // ---------------- status counters ----------------
  logic [15:0] c_us_frames, c_us_bad, c_us_realigned, c_us_drops, c_us_ties, c_ds_out;
  logic [15:0] c_us_pkts, c_us_under, c_ds_in, c_ds_drop;

  always_ff @(posedge clk_pon or negedge rst_pon_n)
    if (!rst_pon_n) begin
      c_us_frames    <= '0;
      c_us_bad       <= '0;
      c_us_realigned <= '0;
      c_us_drops     <= '0;
      c_us_ties      <= '0;
      c_ds_out       <= '0;
    end else begin
      c_us_frames    <= c_us_frames + 16'(pp_frame_ok);
      c_us_bad       <= c_us_bad + 16'(pp_bad);
      c_us_realigned <= c_us_realigned + 16'(pp_realigned);
      c_us_drops     <= c_us_drops + 16'($countones(frag_dropped));
      c_us_ties      <= c_us_ties + 16'(mx_grant && mx_tie);
      c_ds_out       <= c_ds_out + 16'(fr_sent);
    end

  always_ff @(posedge gtx_clk or negedge rst_gtx_n)
    if (!rst_gtx_n) begin
      c_us_pkts  <= '0;
      c_us_under <= '0;
    end else begin
      c_us_pkts  <= c_us_pkts + 16'(tx_pkt_sent);
      c_us_under <= c_us_under + 16'(tx_underrun);
    end

  always_ff @(posedge rx_clk or negedge rst_rx_n)
    if (!rst_rx_n) begin
      c_ds_in   <= '0;
      c_ds_drop <= '0;
    end else begin
      c_ds_in   <= c_ds_in + 16'(rx_done);
      c_ds_drop <= c_ds_drop + 16'(rx_dropped);
    end

  assign status = '{us_frames:        c_us_frames,
                    us_bad_frames:    c_us_bad,
                    us_realigned:     c_us_realigned,
                    us_dropped_frags: c_us_drops,
                    us_tie_breaks:    c_us_ties,
                    us_packets_out:   c_us_pkts,
                    us_underruns:     c_us_under,
                    ds_packets_in:    c_ds_in,
                    ds_dropped:       c_ds_drop,
                    ds_frames_out:    c_ds_out};

  // Signals kept for probing in simulation; not used by the datapath.
  logic unused_ok;
  assign unused_ok = ^{pp_len, pp_pkt_over, mx_sel,
                       rx_oversize, rx_error, fr_starved};
endmodule
