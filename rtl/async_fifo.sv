// async_fifo - dual-clock FIFO that carries flits from the sensor clock
// domain (clk1) into the NoC clock domain (clk2).
//
// It is the bridge between the two domains: the write side lives on wclk,
// the read side on rclk, and nothing else crosses. Pointers are ADDR_WIDTH+1
// bits wide, kept in binary for addressing and in gray code for crossing;
// each gray pointer reaches the other domain through a two-flop synchronizer.
// Full is computed on the write side (gray pointers equal except for the two
// MSBs), empty on the read side (gray pointers equal), each from registers of
// its own domain. Both flags are pessimistic by the synchronizer delay,
// never optimistic.
//
// Interface: winc writes wdata when wfull = 0 (a write while full is
// ignored). rdata always shows the oldest entry (first-word fall-through);
// rinc pops it when rempty = 0. A word written at a wclk edge makes rempty
// fall after the second following rclk edge (two synchronizer stages); a
// pop frees its slot for the writer two wclk edges later.
//
// Depth 2**ADDR_WIDTH = 16 follows the ADDR_WIDTH = 4 of the reference
// simulation; the gray-pointer structure is the standard one and is this
// design's choice. The storage array is not reset.
module async_fifo #(
  parameter int unsigned WIDTH      = noc_pkg::FLIT_W,
  parameter int unsigned ADDR_WIDTH = 4
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic             winc,
  input  logic [WIDTH-1:0] wdata,
  output logic             wfull,

  input  logic             rclk,
  input  logic             rrst_n,
  input  logic             rinc,
  output logic [WIDTH-1:0] rdata,
  output logic             rempty
);
  localparam int unsigned DEPTH = 1 << ADDR_WIDTH;

  logic [WIDTH-1:0] mem [DEPTH];

  logic [ADDR_WIDTH:0] wbin, wgray, rbin, rgray;
  logic [ADDR_WIDTH:0] wgray_rsync, rgray_wsync;
  logic [ADDR_WIDTH:0] wbin_next, wgray_next, rbin_next, rgray_next;

  function automatic logic [ADDR_WIDTH:0] bin2gray(input logic [ADDR_WIDTH:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  logic wpush;
  assign wpush      = winc && !wfull;
  assign wbin_next  = wbin + (ADDR_WIDTH+1)'(wpush);
  assign wgray_next = bin2gray(wbin_next);

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin  <= '0;
      wgray <= '0;
    end else begin
      wbin  <= wbin_next;
      wgray <= wgray_next;
    end
  end

  // Flags compare registered pointers of the same domain only, so they are
  // glitch-free.
  assign wfull = (wgray == {~rgray_wsync[ADDR_WIDTH:ADDR_WIDTH-1],
                            rgray_wsync[ADDR_WIDTH-2:0]});

  always_ff @(posedge wclk) begin
    if (wpush) mem[wbin[ADDR_WIDTH-1:0]] <= wdata;
  end

  sync_2ff #(.WIDTH(ADDR_WIDTH+1)) u_sync_r2w (
    .clk(wclk), .rst_n(wrst_n), .d(rgray), .q(rgray_wsync));

  // ---------------- read domain ----------------
  logic rpop;
  assign rpop       = rinc && !rempty;
  assign rbin_next  = rbin + (ADDR_WIDTH+1)'(rpop);
  assign rgray_next = bin2gray(rbin_next);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin  <= '0;
      rgray <= '0;
    end else begin
      rbin  <= rbin_next;
      rgray <= rgray_next;
    end
  end

  assign rempty = (rgray == wgray_rsync);
  assign rdata  = mem[rbin[ADDR_WIDTH-1:0]];

  sync_2ff #(.WIDTH(ADDR_WIDTH+1)) u_sync_w2r (
    .clk(rclk), .rst_n(rrst_n), .d(wgray), .q(wgray_rsync));
endmodule
