// clock_gate_ctrl - activity-monitoring clock-enable controller for the
// sensor-side (clk1) blocks, plus the slow-mode sampling tick.
//
// The gated block (the sensor memory) gets a clock enable instead of a gated
// clock, which is safe on an FPGA. The decision combines two rules:
//  * threshold: ce stays high while the block was active within the last
//    IDLE_THRESHOLD cycles, and drops after that many idle cycles;
//  * prediction: activity is counted over windows of WINDOW cycles; when
//    the last complete window held at least LOAD_THRESHOLD activity cycles,
//    the load is predicted to stay high and ce is held on for the whole next
//    window (predicted_busy).
// ce also follows the activity input in the same cycle, so the access that
// wakes the block is never lost. After reset ce is low.
//
// tick is the sampling strobe for the event detector: high every cycle when
// slow_mode = 0, high one cycle in SLOW_DIV when slow_mode = 1.
// gated_cycles counts the cycles with ce = 0 (a measure of saved clocking).
//
// Combining thresholding with workload prediction follows the description of
// the intelligent clock-gating technique; the concrete rules and the four
// numbers are this design's choices.
module clock_gate_ctrl #(
  parameter int unsigned IDLE_THRESHOLD = 8,
  parameter int unsigned WINDOW         = 32,
  parameter int unsigned LOAD_THRESHOLD = 4,
  parameter int unsigned SLOW_DIV       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        activity,
  input  logic        slow_mode,
  output logic        ce,
  output logic        tick,
  output logic        predicted_busy,
  output logic [31:0] gated_cycles
);
  localparam int unsigned IW = $clog2(IDLE_THRESHOLD + 1);
  localparam int unsigned WW = $clog2(WINDOW + 1);
  localparam int unsigned DW = (SLOW_DIV > 1) ? $clog2(SLOW_DIV) : 1;

  logic [IW-1:0] idle_cnt;
  logic [WW-1:0] win_cnt;
  logic [WW-1:0] act_cnt;
  logic [DW-1:0] div_cnt;
  logic [WW-1:0] act_total;

  assign act_total = act_cnt + WW'(activity);
  assign ce   = activity || (idle_cnt < IW'(IDLE_THRESHOLD)) || predicted_busy;
  assign tick = !slow_mode || (div_cnt == DW'(SLOW_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idle_cnt       <= IW'(IDLE_THRESHOLD);
      win_cnt        <= '0;
      act_cnt        <= '0;
      predicted_busy <= 1'b0;
      div_cnt        <= '0;
      gated_cycles   <= '0;
    end else begin
      if (activity)                           idle_cnt <= '0;
      else if (idle_cnt < IW'(IDLE_THRESHOLD)) idle_cnt <= idle_cnt + 1'b1;

      if (win_cnt == WW'(WINDOW - 1)) begin
        win_cnt        <= '0;
        act_cnt        <= '0;
        predicted_busy <= (act_total >= WW'(LOAD_THRESHOLD));
      end else begin
        win_cnt <= win_cnt + 1'b1;
        act_cnt <= act_total;
      end

      if (!slow_mode || div_cnt == DW'(SLOW_DIV - 1)) div_cnt <= '0;
      else                                             div_cnt <= div_cnt + 1'b1;

      if (!ce) gated_cycles <= gated_cycles + 32'd1;
    end
  end
endmodule
