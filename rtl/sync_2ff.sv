// sync_2ff - two-flop synchronizer for a multi-bit gray-coded value.
//
// Brings a WIDTH-bit bus into the destination clock domain through two
// register stages. It is only safe for values of which at most one bit
// changes per source clock (gray-coded FIFO pointers). The flops run on the
// free-running clock and are never clock-enabled, so a synchronized value
// keeps tracking even while the logic around it is idle. Latency: two
// destination clock edges. Reset clears both stages (active low, async).
module sync_2ff #(
  parameter int unsigned WIDTH = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
