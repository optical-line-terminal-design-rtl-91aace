// rst_sync: reset synchroniser for one clock domain.
//
// The reset is applied asynchronously and released two clock edges after
// rst_n rises, in step with clk, so every flop of the domain leaves reset
// on the same edge. A common design practice, not taken from the document.
module rst_sync (
  input  logic clk,
  input  logic rst_n,
  output logic rst_sync_n
);
  logic s1;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1         <= 1'b0;
      rst_sync_n <= 1'b0;
    end else begin
      s1         <= 1'b1;
      rst_sync_n <= s1;
    end
endmodule
