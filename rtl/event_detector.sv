// event_detector - event-driven flit injection on the sensor side (clk1).
//
// The NoC is only used when the sensor produces something new. This block
// watches sensor_data / sensor_valid and turns each new sample into one
// single-flit packet written into the dual-clock FIFO.
//
// How it works:
//  * A sample is "new" when sensor_valid is high and either sensor_valid was
//    low in the previous cycle or the data differ from the previous cycle.
//    A sensor that holds sensor_valid high with unchanged data therefore
//    injects once, not once per clock.
//  * A new sample is stored in a one-entry pending register. It is written
//    to the FIFO on a cycle where tick = 1 and the FIFO is not full.
//    tick comes from clock_gate_ctrl: every cycle in normal mode, every
//    SLOW_DIV cycles in slow mode.
//  * A new sample that arrives while an older one is still pending replaces
//    it (only the freshest reading is sent) and coalesced_count counts it.
//
// Timing: a new sample seen at clock edge k is written at edge k+1 when tick
// and space allow. fifo_wr and event_o are the same pulse.
//
// The block's purpose follows the event-detector description; the
// new-sample rule, the coalescing on back-pressure and the slow-mode tick are
// this design's choices.
module event_detector
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] SRC_X = '0,
  parameter logic [COORD_W-1:0] SRC_Y = '0,
  parameter logic [COORD_W-1:0] DST_X = 2'd1,
  parameter logic [COORD_W-1:0] DST_Y = 2'd1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tick,
  input  logic [DATA_W-1:0] sensor_data,
  input  logic              sensor_valid,
  input  logic              fifo_full,
  output logic              fifo_wr,
  output flit_t             fifo_flit,
  output logic              event_o,
  output logic [15:0]       event_count,
  output logic [15:0]       coalesced_count
);
  logic              prev_valid;
  logic [DATA_W-1:0] prev_data;
  logic              pend_q;
  logic [DATA_W-1:0] pend_data;
  logic              new_sample;
  logic              fire;

  assign new_sample = sensor_valid && (!prev_valid || (sensor_data != prev_data));
  assign fire       = pend_q && tick && !fifo_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_valid      <= 1'b0;
      prev_data       <= '0;
      pend_q          <= 1'b0;
      pend_data       <= '0;
      event_count     <= '0;
      coalesced_count <= '0;
    end else begin
      prev_valid <= sensor_valid;
      prev_data  <= sensor_data;
      if (new_sample) begin
        pend_q    <= 1'b1;
        pend_data <= sensor_data;
        if (pend_q && !fire) coalesced_count <= coalesced_count + 16'd1;
      end else if (fire) begin
        pend_q <= 1'b0;
      end
      if (fire) event_count <= event_count + 16'd1;
    end
  end

  assign fifo_wr = fire;
  assign event_o = fire;
  always_comb begin
    fifo_flit         = '0;
    fifo_flit.src_x   = SRC_X;
    fifo_flit.src_y   = SRC_Y;
    fifo_flit.dst_x   = DST_X;
    fifo_flit.dst_y   = DST_Y;
    fifo_flit.payload = pend_data;
  end
endmodule
