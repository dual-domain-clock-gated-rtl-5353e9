// ddcg_noc_top - dual-domain clock-gated NoC with event-driven flit injection.
//
// Two clock domains, joined only by a dual-clock FIFO:
//  * clk1, the sensor domain, always running (at a low rate): event_detector
//    turns each new sensor sample into one flit and writes it into the FIFO;
//    clock_gate_ctrl watches that activity (and reads of the log) and gives
//    sensor_mem, a circular log of the injected samples, a clock enable that
//    is off while the sensor is idle; in slow_mode it also lowers the rate at
//    which samples are injected.
//  * clk2, the NoC domain: flit_injector takes flits out of the FIFO into
//    the local port of router SRC_NODE; a MESH_X x MESH_Y mesh of routers
//    carries them with XY routing to node DEST_NODE, where mac_unit (the
//    actuator / MAC sink) accumulates them and drives actuator_out.
//    noc_controller gives every router its own clk_en, high only while that
//    router has or is about to receive a flit; with no sensor events every
//    router's registers stand still.
// The local ports of the other nodes (processing elements not specified
// here) are brought out as pe_inj_* / pe_ej_*; at SRC_NODE the injection
// port and at DEST_NODE the ejection port are taken by the blocks above
// (pe_inj_ready / pe_ej_valid read 0 there).
//
// Timing: a sample is written into the FIFO one clk1 edge after it is seen
// (normal mode). The FIFO makes it visible to the NoC side after two clk2
// edges (synchronizers); the injector takes it at the next edge, then it
// spends one clk2 edge entering the source router, one per hop and one into
// mac_unit. Router wake-up adds no cycle; the synchronizers are the price of
// the second clock domain. rstn resets both domains asynchronously (active low); it must be
// released away from the clock edges or synchronized outside.
//
// The structure (event controller, clock gate control and sensor memory on
// clock domain 1; flit injector, CDC buffer and clock-enabled routers on
// domain 2; 2 x 2 mesh; 16-bit data; FIFO ADDR_WIDTH 4) follows the
// reference design. Which domain is called "core" is ambiguous there; here
// clk1 is the sensor side and clk2 the router side. Node placement, flit
// format and the status ports are this design's choices.
module ddcg_noc_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X          = 2,
  parameter int unsigned MESH_Y          = 2,
  parameter int unsigned SRC_NODE        = 0,
  parameter int unsigned DEST_NODE       = 3,
  parameter int unsigned ADDR_WIDTH      = 4,
  parameter int unsigned BUF_DEPTH       = 4,
  parameter int unsigned IDLE_THRESHOLD  = 8,
  parameter int unsigned WINDOW          = 32,
  parameter int unsigned LOAD_THRESHOLD  = 4,
  parameter int unsigned SLOW_DIV        = 8,
  parameter int unsigned HOLD            = 1,
  localparam int unsigned N              = MESH_X * MESH_Y
) (
  input  logic                  clk1,
  input  logic                  clk2,
  input  logic                  rstn,
  // sensor side (clk1)
  input  logic [DATA_W-1:0]     sensor_data,
  input  logic                  sensor_valid,
  input  logic                  slow_mode,
  input  logic                  mem_rd_en,
  input  logic [ADDR_WIDTH-1:0] mem_rd_addr,
  output logic [DATA_W-1:0]     mem_rd_data,
  output logic                  mem_ce,
  output logic                  mem_predicted_busy,
  output logic [ADDR_WIDTH-1:0] mem_wr_ptr,
  output logic [31:0]           mem_gated_cycles,
  output logic                  sensor_event,
  output logic [15:0]           event_count,
  output logic [15:0]           coalesced_count,
  output logic                  cdc_fifo_full,
  // actuator / MAC (clk2)
  input  logic [DATA_W-1:0]     mac_coef,
  input  logic                  mac_clear,
  output logic [DATA_W-1:0]     actuator_out,
  output logic [31:0]           mac_acc,
  output logic [15:0]           mac_rx_count,
  output logic [2*COORD_W-1:0]  mac_last_src,
  // NoC status and other nodes' local ports (clk2)
  output logic [N-1:0]          router_en,
  output logic [N-1:0]          router_occupied,
  output logic [31:0]           router_active_cycles [N],
  input  logic [N-1:0]          pe_inj_valid,
  input  flit_t                 pe_inj_flit  [N],
  output logic [N-1:0]          pe_inj_ready,
  output logic [N-1:0]          pe_ej_valid,
  output flit_t                 pe_ej_flit   [N],
  input  logic [N-1:0]          pe_ej_ready
);
  localparam logic [COORD_W-1:0] SRC_X = COORD_W'(SRC_NODE % MESH_X);
  localparam logic [COORD_W-1:0] SRC_Y = COORD_W'(SRC_NODE / MESH_X);
  localparam logic [COORD_W-1:0] DST_X = COORD_W'(DEST_NODE % MESH_X);
  localparam logic [COORD_W-1:0] DST_Y = COORD_W'(DEST_NODE / MESH_X);

  // ---------------- clock domain 1: sensor side ----------------
  logic  tick, ev_wr;
  flit_t ev_flit;

  clock_gate_ctrl #(
    .IDLE_THRESHOLD(IDLE_THRESHOLD), .WINDOW(WINDOW),
    .LOAD_THRESHOLD(LOAD_THRESHOLD), .SLOW_DIV(SLOW_DIV)
  ) u_cg (
    .clk(clk1), .rst_n(rstn), .activity(ev_wr || mem_rd_en), .slow_mode(slow_mode),
    .ce(mem_ce), .tick(tick), .predicted_busy(mem_predicted_busy),
    .gated_cycles(mem_gated_cycles));

  event_detector #(
    .SRC_X(SRC_X), .SRC_Y(SRC_Y), .DST_X(DST_X), .DST_Y(DST_Y)
  ) u_evt (
    .clk(clk1), .rst_n(rstn), .tick(tick),
    .sensor_data(sensor_data), .sensor_valid(sensor_valid),
    .fifo_full(cdc_fifo_full), .fifo_wr(ev_wr), .fifo_flit(ev_flit),
    .event_o(sensor_event), .event_count(event_count), .coalesced_count(coalesced_count));

  sensor_mem #(.DATA_WIDTH(DATA_W), .ADDR_WIDTH(ADDR_WIDTH)) u_mem (
    .clk(clk1), .rst_n(rstn), .ce(mem_ce), .wr(ev_wr), .wdata(ev_flit.payload),
    .rd_addr(mem_rd_addr), .rd_data(mem_rd_data), .wr_ptr(mem_wr_ptr));

  // ---------------- clock domain crossing ----------------
  logic  fifo_empty, fifo_rd;
  flit_t fifo_head;

  async_fifo #(.WIDTH(FLIT_W), .ADDR_WIDTH(ADDR_WIDTH)) u_cdc (
    .wclk(clk1), .wrst_n(rstn), .winc(ev_wr), .wdata(ev_flit), .wfull(cdc_fifo_full),
    .rclk(clk2), .rrst_n(rstn), .rinc(fifo_rd), .rdata(fifo_head), .rempty(fifo_empty));

  // ---------------- clock domain 2: NoC side ----------------
  logic [N-1:0] inj_valid, inj_req, inj_ready, ej_valid, ej_ready, wake;
  flit_t        inj_flit [N];
  flit_t        ej_flit  [N];
  logic         fi_valid, fi_pending;
  flit_t        fi_flit;
  logic         mac_ready;

  flit_injector u_inj (
    .clk(clk2), .rst_n(rstn), .en(router_en[SRC_NODE]),
    .fifo_empty(fifo_empty), .fifo_data(fifo_head), .fifo_rd(fifo_rd),
    .out_valid(fi_valid), .out_flit(fi_flit), .out_ready(inj_ready[SRC_NODE]),
    .pending(fi_pending));

  always_comb begin
    for (int n = 0; n < N; n++) begin
      inj_valid[n]    = pe_inj_valid[n];
      inj_flit[n]     = pe_inj_flit[n];
      pe_inj_ready[n] = inj_ready[n];
      pe_ej_valid[n]  = ej_valid[n];
      pe_ej_flit[n]   = ej_flit[n];
      ej_ready[n]     = pe_ej_ready[n];
      inj_req[n]      = pe_inj_valid[n];
    end
    inj_valid[SRC_NODE]     = fi_valid;
    inj_flit[SRC_NODE]      = fi_flit;
    pe_inj_ready[SRC_NODE]  = 1'b0;
    pe_ej_valid[DEST_NODE]  = 1'b0;
    ej_ready[DEST_NODE]     = mac_ready;
    inj_req[SRC_NODE]       = fi_pending;
  end

  noc_controller #(.NUM_NODES(N), .HOLD(HOLD)) u_ctrl (
    .clk(clk2), .rst_n(rstn), .wake(wake), .clk_en(router_en),
    .active_cycles(router_active_cycles));

  mesh_noc #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .BUF_DEPTH(BUF_DEPTH)) u_mesh (
    .clk(clk2), .rst_n(rstn), .clk_en(router_en),
    .inj_valid(inj_valid), .inj_req(inj_req), .inj_flit(inj_flit), .inj_ready(inj_ready),
    .ej_valid(ej_valid), .ej_flit(ej_flit), .ej_ready(ej_ready),
    .occupied(router_occupied), .wake(wake));

  mac_unit #(.ACC_WIDTH(32)) u_mac (
    .clk(clk2), .rst_n(rstn), .in_valid(ej_valid[DEST_NODE]), .in_flit(ej_flit[DEST_NODE]),
    .in_ready(mac_ready), .coef(mac_coef), .clear(mac_clear),
    .actuator_out(actuator_out), .acc(mac_acc), .rx_count(mac_rx_count),
    .last_src(mac_last_src));
endmodule
