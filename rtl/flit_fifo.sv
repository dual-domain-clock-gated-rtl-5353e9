// flit_fifo - single-clock, clock-enabled flit buffer (router input buffer).
//
// DEPTH entries (a power of two), first-word fall-through: head shows the
// oldest flit while empty = 0. push and pop act only on edges where en = 1,
// so the buffer does not switch while its router is disabled. A push while
// full or a pop while empty is ignored; push and pop together are allowed.
// The entry array is not reset; count and pointers are.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t head,
  output logic  empty,
  output logic  full
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t         mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic [AW:0]   count;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = en && push && !full;
  assign do_pop  = en && pop && !empty;
  assign head    = mem[rptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule
