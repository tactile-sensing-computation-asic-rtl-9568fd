// instr_buf: instruction buffer of the control path.
//
// A single-write, single-read memory of DEPTH 40-bit instructions. The control chip
// writes the program into it over the ring; the control FSM fetches from it with a
// synchronous read (instruction the cycle after rd_en, held until the next read).
// The default depth of 256 holds the 207-instruction program the chip is run with.
module instr_buf #(
  parameter int DEPTH = 256,
  parameter int W     = 40,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [W-1:0]  rd_data
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
