// wmem: weight memory of one dot product lane.
//
// DEPTH rows of VEC int8 weights, one row per dot product step. One write port, used
// while weights stream in from the flash, and one synchronous read port (data the
// cycle after rd_en, held until the next read). The per-lane weight memories follow
// the chip's description; depth and ports are this design's choices.
module wmem #(
  parameter int VEC   = 8,
  parameter int DEPTH = 256,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                clk,
  input  logic                wr_en,
  input  logic [AW-1:0]       wr_addr,
  input  logic [VEC-1:0][7:0] wr_data,
  input  logic                rd_en,
  input  logic [AW-1:0]       rd_addr,
  output logic [VEC-1:0][7:0] rd_data
);

  logic [VEC-1:0][7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
