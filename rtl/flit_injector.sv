// flit_injector - moves flits from the dual-clock FIFO into the local input
// port of the source router, on the NoC side (clk2).
//
// A one-entry holding register sits between the FIFO head and the router.
// On an enabled edge the injector pops the FIFO whenever the register is
// free or its flit is being taken in the same edge, so back-to-back flits
// flow at one per cycle. out_valid is forced low while en = 0, and all state
// changes only when en = 1 (it is clocked like the router it belongs to).
// pending is raw: the FIFO is not empty or the register holds a flit; it is
// the injector's wake-up request to the NoC controller.
//
// Timing: a flit seen at the FIFO head on an enabled edge is offered to the
// router from the next cycle. Its place inside the clock-gated router and its
// role follow the block diagram; the holding register is this design's
// choice.
module flit_injector
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  fifo_empty,
  input  flit_t fifo_data,
  output logic  fifo_rd,
  output logic  out_valid,
  output flit_t out_flit,
  input  logic  out_ready,
  output logic  pending
);
  logic valid_q;

  assign out_valid = en && valid_q;
  assign fifo_rd   = en && !fifo_empty && (!valid_q || out_ready);
  assign pending   = valid_q || !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= 1'b0;
      out_flit <= '0;
    end else if (en) begin
      if (fifo_rd) begin
        valid_q  <= 1'b1;
        out_flit <= fifo_data;
      end else if (out_ready) begin
        valid_q  <= 1'b0;
      end
    end
  end
endmodule
