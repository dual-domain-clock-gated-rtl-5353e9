// noc_controller - per-router clock-enable generator for the NoC domain.
//
// A router is enabled only while there is work for it. wake[n] is the raw
// demand of router n: a flit in one of its buffers, a flit waiting to be
// injected at its local port (the dual-clock FIFO is not empty), or a
// neighbour holding a flit routed towards it. All of these come from
// registers, so clk_en[n] can follow wake[n] in the same cycle without a
// combinational loop: a router is already enabled on the edge at which a flit
// is handed to it, and gating costs no cycles per hop. After demand ends,
// clk_en[n] stays high for HOLD more cycles (a registered hang-over, so a
// router does not toggle its enable between flits of a burst).
//
// active_cycles[n] counts the cycles router n was enabled; the remaining
// cycles are the ones in which its registers did not switch.
//
// Generating clk_en from FIFO status and pending data follows the NoC
// controller description; per-router enables and the hang-over are this
// design's choices.
module noc_controller #(
  parameter int unsigned NUM_NODES = 4,
  parameter int unsigned HOLD      = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_NODES-1:0] wake,
  output logic [NUM_NODES-1:0] clk_en,
  output logic [31:0]          active_cycles [NUM_NODES]
);
  localparam int unsigned HW = $clog2(HOLD + 2);

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    logic [HW-1:0] hold_cnt;

    assign clk_en[n] = wake[n] || (hold_cnt != '0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        hold_cnt         <= '0;
        active_cycles[n] <= '0;
      end else begin
        if (wake[n])              hold_cnt <= HW'(HOLD);
        else if (hold_cnt != '0)  hold_cnt <= hold_cnt - 1'b1;
        if (clk_en[n]) active_cycles[n] <= active_cycles[n] + 32'd1;
      end
    end
  end
endmodule
