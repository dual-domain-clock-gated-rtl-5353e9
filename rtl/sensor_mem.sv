// sensor_mem - clock-enabled circular sample log on the sensor side (clk1).
//
// Keeps the last 2**ADDR_WIDTH sensor samples that were injected into the
// network. Every register, the array included, changes only when ce = 1, so
// the clock-gate controller can stop all of its switching while the sensor
// is idle.
//
// Interface: with ce = 1, wr stores wdata at wr_ptr and advances wr_ptr
// (wrapping); rd_data is loaded from rd_addr on every enabled edge (one
// cycle read latency, block-RAM style). The array is not reset.
//
// The block itself is only named in the block diagram next to the clock-gate
// control; its function as a sample log is this design's choice, and the
// depth reuses ADDR_WIDTH = 4 of the reference simulation.
module sensor_mem #(
  parameter int unsigned DATA_WIDTH = 16,
  parameter int unsigned ADDR_WIDTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  ce,
  input  logic                  wr,
  input  logic [DATA_WIDTH-1:0] wdata,
  input  logic [ADDR_WIDTH-1:0] rd_addr,
  output logic [DATA_WIDTH-1:0] rd_data,
  output logic [ADDR_WIDTH-1:0] wr_ptr
);
  logic [DATA_WIDTH-1:0] mem [1 << ADDR_WIDTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (wr) mem[wr_ptr] <= wdata;
      rd_data <= mem[rd_addr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         wr_ptr <= '0;
    else if (ce && wr)  wr_ptr <= wr_ptr + 1'b1;
  end
endmodule
