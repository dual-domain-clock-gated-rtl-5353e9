// noc_pkg - types and constants shared by the dual-domain clock-gated NoC.
//
// A packet is one flit: a header with the source and destination mesh
// coordinates and a DATA_W-bit payload (the sensor sample). The 16-bit
// payload width follows the DATA_WIDTH = 16 of the reference simulation;
// the header layout, the 2-bit coordinates (meshes up to 4 x 4) and the
// port numbering are this design's own choices.
package noc_pkg;

  localparam int unsigned DATA_W  = 16;  // payload bits (sensor sample)
  localparam int unsigned COORD_W = 2;   // bits per mesh coordinate
  localparam int unsigned NPORTS  = 5;   // router ports: local + 4 neighbours

  // Router port numbers. North is y-1, south is y+1, east is x+1, west is x-1.
  typedef enum logic [2:0] {
    PORT_L = 3'd0,
    PORT_N = 3'd1,
    PORT_E = 3'd2,
    PORT_S = 3'd3,
    PORT_W = 3'd4
  } port_e;

  typedef struct packed {
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [DATA_W-1:0]  payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);  // 24

  // Deterministic XY (dimension-order) routing: correct X first, then Y.
  function automatic port_e xy_route(input logic [COORD_W-1:0] here_x,
                                     input logic [COORD_W-1:0] here_y,
                                     input logic [COORD_W-1:0] dst_x,
                                     input logic [COORD_W-1:0] dst_y);
    if (dst_x > here_x)      return PORT_E;
    else if (dst_x < here_x) return PORT_W;
    else if (dst_y > here_y) return PORT_S;
    else if (dst_y < here_y) return PORT_N;
    else                     return PORT_L;
  endfunction

endpackage
