// router - clock-enabled five-port mesh router.
//
// Ports are numbered by noc_pkg::port_e: local, north, east, south, west.
// Each input has a BUF_DEPTH-flit buffer. The flit at the head of a buffer
// is routed with deterministic XY routing (noc_pkg::xy_route); each output
// has a round-robin arbiter over the inputs whose head flit wants it. A flit
// leaves on an edge where its output is valid and the receiver is ready
// (valid/ready, i.e. on/off flow control; a full buffer holds in_ready low).
// Packets are single flits, so every flit is routed on its own.
//
// Clock enable: every register (buffers, arbiter pointers) changes only on
// edges where clk_en = 1. While clk_en = 0 the router also drives in_ready
// and out_valid low, so it neither accepts nor sends and no flit can be
// duplicated or lost. occupied and req_out are raw (not gated by clk_en):
// they tell the NoC controller that this router, or the neighbour on the
// far side of an output, has work and must be enabled.
//
// Timing: a flit written into an input buffer at edge k can leave at edge
// k+1 (one cycle per hop) when both routers are enabled.
//
// The lint note that rst_n is used both asynchronously and synchronously
// comes from the assertion's "disable iff"; the flops themselves all use an
// asynchronous reset.
//
// The clock-enable behaviour follows the clock-enabled router description;
// XY routing, the buffer depth and round-robin arbitration are this design's
// choices for the deterministic routing and flow control it calls for.
module router
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X         = '0,
  parameter logic [COORD_W-1:0] Y         = '0,
  parameter int unsigned        BUF_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clk_en,
  input  logic [NPORTS-1:0] in_valid,
  input  flit_t             in_flit  [NPORTS],
  output logic [NPORTS-1:0] in_ready,
  output logic [NPORTS-1:0] out_valid,
  output flit_t             out_flit [NPORTS],
  input  logic [NPORTS-1:0] out_ready,
  output logic              occupied,
  output logic [NPORTS-1:0] req_out
);
  flit_t             head  [NPORTS];
  logic [NPORTS-1:0] empty, full, pop;
  port_e             route [NPORTS];
  logic [NPORTS-1:0] req   [NPORTS];   // req[o][i]: input i wants output o
  logic [NPORTS-1:0] grant [NPORTS];   // grant[o][i]
  logic [NPORTS-1:0] xfer;             // output o transfers this edge

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk(clk), .rst_n(rst_n), .en(clk_en),
      .push(in_valid[i]), .din(in_flit[i]), .pop(pop[i]),
      .head(head[i]), .empty(empty[i]), .full(full[i]));
    assign in_ready[i] = clk_en && !full[i];
    assign route[i]    = xy_route(X, Y, head[i].dst_x, head[i].dst_y);
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req[o][i] = !empty[i] && (route[i] == port_e'(o));
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk(clk), .rst_n(rst_n), .en(clk_en),
      .req(req[o]), .advance(xfer[o]), .grant(grant[o]));
    assign req_out[o]   = |req[o];
    assign out_valid[o] = clk_en && req_out[o];
    assign xfer[o]      = out_valid[o] && out_ready[o];
  end

  always_comb begin
    pop = '0;
    for (int o = 0; o < NPORTS; o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < NPORTS; i++)
        if (grant[o][i]) begin
          out_flit[o] = head[i];
          if (xfer[o]) pop[i] = 1'b1;
        end
    end
  end

  assign occupied = !(&empty);

  // valid/ready rule on every output: once offered, a flit stays offered,
  // unchanged, until it is taken (checked across enabled edges only).
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    a_hold: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid[o] && !out_ready[o]) |=> (!clk_en || (out_valid[o] && $stable(out_flit[o]))));
  end
endmodule
