// dba_processor: distributed dynamic bandwidth allocation at the splitter.
//
// Every ONU reports its queue size (frames waiting in its frame buffer).
// The upstream is cut into slots of SLOT_CLKS clocks, one 280-byte frame
// per slot. At the first clock of each slot the processor compares the
// queue sizes and sends a one-clock grant to the ONU with the largest
// queue; on equal sizes the lower-numbered ONU wins. No grant is given
// when every queue is empty. tie_break pulses when the choice was settled
// by that order.
// Granting the ONU with the largest queue follows the document; the slot
// length (2.048 us, 159.25 clocks of 77.76 MHz, rounded up to 160), the
// tie order (taken from the OLT multiplexer) and granting one frame per
// slot are this design's choices. The queue_size sizes are plain inputs here;
// how they travel over the control wavelength is not modelled.
module dba_processor #(
  parameter int unsigned N         = 4,
  parameter int unsigned CW        = 8,
  parameter int unsigned SLOT_CLKS = 160
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0][CW-1:0] queue_size,
  output logic [N-1:0]         grant,
  output logic                 tie_break,
  output logic                 slot_start
);
  localparam int unsigned SW = $clog2(SLOT_CLKS);

  logic [SW-1:0]        slot_cnt;
  logic [$clog2(N)-1:0] best;
  logic                 any, tie;

  always_comb begin
    best = '0;
    any  = queue_size[0] != 0;
    tie  = 1'b0;
    for (int i = 1; i < N; i++) begin
      if (queue_size[i] != 0) any = 1'b1;
      if (queue_size[i] > queue_size[best]) begin
        best = i[$clog2(N)-1:0];
        tie  = 1'b0;
      end else if (queue_size[i] == queue_size[best] && queue_size[i] != 0) begin
        tie = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      slot_cnt   <= '0;
      grant      <= '0;
      tie_break  <= 1'b0;
      slot_start <= 1'b0;
    end else begin
      grant      <= '0;
      tie_break  <= 1'b0;
      slot_start <= 1'b0;
      slot_cnt   <= (slot_cnt == SW'(SLOT_CLKS - 1)) ? '0 : slot_cnt + 1'b1;
      if (slot_cnt == '0) begin
        slot_start <= 1'b1;
        if (any) begin
          grant[best] <= 1'b1;
          tie_break   <= tie;
        end
      end
    end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
