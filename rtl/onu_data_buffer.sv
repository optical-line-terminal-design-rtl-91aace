// onu_data_buffer: the ONU's queue of finished upstream frames.
//
// Frames from the ONU framer are stored word by word in a memory of
// 2**AW words. A frame counts as queued once its last (140th) word is in,
// and queue_frames, the queue size reported to the DBA processor, is the
// number of queued frames. Nothing leaves until the DBA processor grants
// this ONU: on a grant pulse, with at least one frame queued, exactly one
// frame is sent on us_dout, one word per clock for 140 clocks, with
// us_active high. Outside a frame us_dout is 0000, so the outputs of all
// ONUs can be ORed onto the shared upstream. space_ok tells the framer
// that a whole further frame fits.
// Holding frames until the DBA grant follows the document; the depth, the
// one-frame-per-grant rule and the idle value are this design's choices.
module onu_data_buffer
  import olt_pkg::*;
#(
  parameter int unsigned AW = 11,
  parameter int unsigned CW = 8
) (
  input  logic          clk,
  input  logic          rst_n,

  input  logic          in_push,
  input  logic [15:0]   in_data,
  input  logic          in_frame_end,
  output logic          space_ok,

  output logic [CW-1:0] queue_frames,
  input  logic          grant,

  output logic [15:0]   us_dout,
  output logic          us_active,
  output logic          frame_sent
);
  localparam int unsigned DEPTH = 2 ** AW;

  logic [15:0] mem [DEPTH];
  logic [AW:0] wr_ptr, rd_ptr;
  logic [7:0]  sent;
  logic        sending;
  logic [AW:0] used;

  assign used     = wr_ptr - rd_ptr;
  assign space_ok = ((AW+1)'(DEPTH) - used) >= (AW+1)'(FRAME_WORDS + 1);

  logic take;
  assign take = grant && !sending && queue_frames != 0;

  always_ff @(posedge clk)
    if (in_push) mem[wr_ptr[AW-1:0]] <= in_data;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      queue_frames <= '0;
      sending      <= 1'b0;
      sent         <= '0;
      us_dout      <= IDLE_WORD;
      us_active    <= 1'b0;
      frame_sent   <= 1'b0;
    end else begin
      frame_sent <= 1'b0;
      if (in_push) wr_ptr <= wr_ptr + 1'b1;
      queue_frames <= queue_frames + CW'(in_push && in_frame_end) - CW'(take);
      if (take) begin
        sending <= 1'b1;
        sent    <= '0;
      end
      if (sending) begin
        us_dout   <= mem[rd_ptr[AW-1:0]];
        us_active <= 1'b1;
        rd_ptr    <= rd_ptr + 1'b1;
        sent      <= sent + 1'b1;
        if (sent == 8'(FRAME_WORDS - 1)) begin
          sending    <= 1'b0;
          frame_sent <= 1'b1;
        end
      end else begin
        us_dout   <= IDLE_WORD;
        us_active <= 1'b0;
      end
    end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    in_push |-> used < (AW+1)'(DEPTH));
endmodule
