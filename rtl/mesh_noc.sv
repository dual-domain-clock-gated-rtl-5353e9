// mesh_noc - MESH_X x MESH_Y mesh of clock-enabled routers.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X. Each router's east port is
// joined to the west port of the router at x+1, its south port to the north
// port of the router at y+1, and so on; ports on the mesh edge are tied off
// (never valid, never ready). Each node's local port is brought out as an
// injection (inj_*) and an ejection (ej_*) valid/ready link.
//
// wake[n] is the raw demand for router n given to the NoC controller: a flit
// buffered in router n, a request at its local input (inj_req[n], which must
// not depend on clk_en, unlike inj_valid), or a neighbour whose head flit is
// routed towards router n. Every router has its own
// clk_en[n]. A flit crosses one hop per enabled cycle.
//
// The 2 x 2 default follows the 2 x 2 NoC of the reference architecture;
// the mesh size is a parameter (the coordinates allow up to 4 x 4).
module mesh_noc
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X    = 2,
  parameter int unsigned MESH_Y    = 2,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] clk_en,
  input  logic [N-1:0] inj_valid,
  input  logic [N-1:0] inj_req,
  input  flit_t        inj_flit  [N],
  output logic [N-1:0] inj_ready,
  output logic [N-1:0] ej_valid,
  output flit_t        ej_flit   [N],
  input  logic [N-1:0] ej_ready,
  output logic [N-1:0] occupied,
  output logic [N-1:0] wake
);
  logic [NPORTS-1:0] r_in_valid  [N];
  flit_t             r_in_flit   [N][NPORTS];
  logic [NPORTS-1:0] r_in_ready  [N];
  logic [NPORTS-1:0] r_out_valid [N];
  flit_t             r_out_flit  [N][NPORTS];
  logic [NPORTS-1:0] r_out_ready [N];
  logic [NPORTS-1:0] r_req_out   [N];
  logic [N-1:0]      nbr_req;

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int unsigned XI = n % MESH_X;
    localparam int unsigned YI = n / MESH_X;

    router #(
      .X(COORD_W'(XI)), .Y(COORD_W'(YI)), .BUF_DEPTH(BUF_DEPTH)
    ) u_router (
      .clk(clk), .rst_n(rst_n), .clk_en(clk_en[n]),
      .in_valid(r_in_valid[n]), .in_flit(r_in_flit[n]), .in_ready(r_in_ready[n]),
      .out_valid(r_out_valid[n]), .out_flit(r_out_flit[n]), .out_ready(r_out_ready[n]),
      .occupied(occupied[n]), .req_out(r_req_out[n]));

    // local port
    assign r_in_valid[n][PORT_L]  = inj_valid[n];
    assign r_in_flit[n][PORT_L]   = inj_flit[n];
    assign inj_ready[n]           = r_in_ready[n][PORT_L];
    assign ej_valid[n]            = r_out_valid[n][PORT_L];
    assign ej_flit[n]             = r_out_flit[n][PORT_L];
    assign r_out_ready[n][PORT_L] = ej_ready[n];

    // north side: neighbour n - MESH_X, its south port
    if (YI > 0) begin : g_n
      assign r_in_valid[n][PORT_N]  = r_out_valid[n-MESH_X][PORT_S];
      assign r_in_flit[n][PORT_N]   = r_out_flit[n-MESH_X][PORT_S];
      assign r_out_ready[n][PORT_N] = r_in_ready[n-MESH_X][PORT_S];
    end else begin : g_n_edge
      assign r_in_valid[n][PORT_N]  = 1'b0;
      assign r_in_flit[n][PORT_N]   = '0;
      assign r_out_ready[n][PORT_N] = 1'b0;
    end
    // south side: neighbour n + MESH_X, its north port
    if (YI < MESH_Y - 1) begin : g_s
      assign r_in_valid[n][PORT_S]  = r_out_valid[n+MESH_X][PORT_N];
      assign r_in_flit[n][PORT_S]   = r_out_flit[n+MESH_X][PORT_N];
      assign r_out_ready[n][PORT_S] = r_in_ready[n+MESH_X][PORT_N];
    end else begin : g_s_edge
      assign r_in_valid[n][PORT_S]  = 1'b0;
      assign r_in_flit[n][PORT_S]   = '0;
      assign r_out_ready[n][PORT_S] = 1'b0;
    end
    // east side: neighbour n + 1, its west port
    if (XI < MESH_X - 1) begin : g_e
      assign r_in_valid[n][PORT_E]  = r_out_valid[n+1][PORT_W];
      assign r_in_flit[n][PORT_E]   = r_out_flit[n+1][PORT_W];
      assign r_out_ready[n][PORT_E] = r_in_ready[n+1][PORT_W];
    end else begin : g_e_edge
      assign r_in_valid[n][PORT_E]  = 1'b0;
      assign r_in_flit[n][PORT_E]   = '0;
      assign r_out_ready[n][PORT_E] = 1'b0;
    end
    // west side: neighbour n - 1, its east port
    if (XI > 0) begin : g_w
      assign r_in_valid[n][PORT_W]  = r_out_valid[n-1][PORT_E];
      assign r_in_flit[n][PORT_W]   = r_out_flit[n-1][PORT_E];
      assign r_out_ready[n][PORT_W] = r_in_ready[n-1][PORT_E];
    end else begin : g_w_edge
      assign r_in_valid[n][PORT_W]  = 1'b0;
      assign r_in_flit[n][PORT_W]   = '0;
      assign r_out_ready[n][PORT_W] = 1'b0;
    end

    // demand from neighbours whose head flit is routed towards this node
    assign nbr_req[n] = ((YI > 0)          && r_req_out[(YI > 0) ? n-MESH_X : n][PORT_S])
                      | ((YI < MESH_Y - 1) && r_req_out[(YI < MESH_Y - 1) ? n+MESH_X : n][PORT_N])
                      | ((XI < MESH_X - 1) && r_req_out[(XI < MESH_X - 1) ? n+1 : n][PORT_W])
                      | ((XI > 0)          && r_req_out[(XI > 0) ? n-1 : n][PORT_E]);
    assign wake[n] = occupied[n] | inj_req[n] | nbr_req[n];
  end
endmodule
