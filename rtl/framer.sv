// framer: builds the downstream PON frames.
//
// On the 77.76 MHz PON clock it sends one 16-bit word every cycle. With no
// packet waiting it sends idle words. When the length store holds a count,
// it takes it and sends the header: PSYNC_BYTES bytes of 0xAA
// ("10101010"), the delimiter 0xE2 ("11100010") and the two-byte payload
// length, then the packet's words from the data buffer, then returns to
// idle. With the default three PSYNC bytes a header is the three words
// AAAA AAE2 LLLL. An odd packet ends with its last byte in the high half of
// the final word and the low half zero.
//
// Interface: length and data come from first-word-fall-through stores;
// dout and in_frame are registered. Because a count is written only after
// all of its packet's words, the data never runs dry inside a frame; if it
// did, an idle word would be sent and starved would pulse.
// The header fields and values follow the document. The PSYNC length is
// given as six bytes in the framer description and as three bytes in the
// captured downstream frame; three is the default here because it keeps the
// header a whole number of 16-bit words. The idle value is this design's
// choice.
module framer
  import olt_pkg::*;
#(
  parameter int unsigned PSYNC_BYTES = 3
) (
  input  logic        clk,
  input  logic        rst_n,

  input  logic        len_empty,
  input  logic [15:0] len_value,
  output logic        len_pop,

  input  logic        dw_empty,
  input  pkt_word_t   dw_word,
  output logic        dw_pop,

  output logic [15:0] dout,
  output logic        in_frame,
  output logic        frame_sent,   // pulse after the last word of a frame
  output logic        starved       // pulse when data ran out inside a frame
);
  localparam int unsigned HDR_BYTES = PSYNC_BYTES + 3;
  localparam int unsigned HDR_WORDS = HDR_BYTES / 2;

  if (HDR_BYTES % 2 != 0) begin : g_bad_psync
    $error("framer: PSYNC_BYTES + 3 must be even");
  end

  function automatic logic [7:0] hdr_byte(int unsigned i, logic [15:0] len);
    if (i < PSYNC_BYTES)           return PREAMBLE_BYTE;
    else if (i == PSYNC_BYTES)     return DELIMITER;
    else if (i == PSYNC_BYTES + 1) return len[15:8];
    else                           return len[7:0];
  endfunction

  typedef enum logic [1:0] {IDLE, HDR, DATA} state_t;
  state_t      state;
  logic [15:0] len;
  logic [$clog2(HDR_WORDS+1)-1:0] hidx;
  logic [15:0] hdr_word;

  always_comb begin
    hdr_word = '0;
    for (int unsigned k = 0; k < HDR_WORDS; k++)
      if (hidx == ($clog2(HDR_WORDS+1))'(k))
        hdr_word = {hdr_byte(2*k, len), hdr_byte(2*k+1, len)};
  end

  assign len_pop = (state == IDLE) && !len_empty;
  assign dw_pop  = (state == DATA) && !dw_empty;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= IDLE;
      len        <= '0;
      hidx       <= '0;
      dout       <= IDLE_WORD;
      in_frame   <= 1'b0;
      frame_sent <= 1'b0;
      starved    <= 1'b0;
    end else begin
      frame_sent <= 1'b0;
      starved    <= 1'b0;
      unique case (state)
        IDLE: begin
          dout     <= IDLE_WORD;
          in_frame <= 1'b0;
          if (!len_empty) begin
            len   <= len_value;
            hidx  <= '0;
            state <= HDR;
          end
        end
        HDR: begin
          dout     <= hdr_word;
          in_frame <= 1'b1;
          hidx     <= hidx + 1'b1;
          if (hidx == ($clog2(HDR_WORDS+1))'(HDR_WORDS - 1)) state <= DATA;
        end
        DATA: begin
          in_frame <= 1'b1;
          if (!dw_empty) begin
            dout <= dw_word.one_byte ? {dw_word.data[15:8], 8'h00} : dw_word.data;
            if (dw_word.last) begin
              state      <= IDLE;
              frame_sent <= 1'b1;
            end
          end else begin
            dout    <= IDLE_WORD;
            starved <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
endmodule
