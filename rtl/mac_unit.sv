// mac_unit - actuator / multiply-accumulate sink in the NoC domain (clk2).
//
// Receives the sensor flits delivered by its router's local output port and
// accumulates payload * coef: acc <= acc + payload * coef on every accepted
// flit. actuator_out is the low DATA_WIDTH bits of the accumulator; clear
// zeroes the accumulator (clear has priority over a flit in the same cycle,
// that flit is still counted). in_ready is always 1: one flit per cycle.
// rx_count counts accepted flits and last_src records the source
// coordinates {x, y} of the last one. All outputs are registered. The
// destination fields of the flit are not used: the flit has arrived.
//
// The unit is only named (actuator / MAC) in the block diagram; the
// accumulate rule and the widths beyond the 16-bit actuator output are this
// design's choices.
module mac_unit
  import noc_pkg::*;
#(
  parameter int unsigned ACC_WIDTH = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  flit_t                in_flit,
  output logic                 in_ready,
  input  logic [DATA_W-1:0]    coef,
  input  logic                 clear,
  output logic [DATA_W-1:0]    actuator_out,
  output logic [ACC_WIDTH-1:0] acc,
  output logic [15:0]          rx_count,
  output logic [2*COORD_W-1:0] last_src
);
  logic [2*DATA_W-1:0] product;

  assign in_ready     = 1'b1;
  assign product      = in_flit.payload * coef;
  assign actuator_out = acc[DATA_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      rx_count <= '0;
      last_src <= '0;
    end else begin
      if (clear)         acc <= '0;
      else if (in_valid) acc <= acc + ACC_WIDTH'(product);
      if (in_valid) begin
        rx_count <= rx_count + 16'd1;
        last_src <= {in_flit.src_x, in_flit.src_y};
      end
    end
  end
endmodule
