// acc_mem: accumulation memory of one dot product lane, also the result buffer.
//
// DEPTH signed 32-bit entries. The lane's SFU writes its output here in the cycle it
// is produced; the entry is read back either to accumulate the next piece of a long
// dot product, to copy an activation into input memory B, or to return a result
// over the ring. Final results are int8 values sign-extended to 32 bits. One write
// port and one synchronous read port (data the cycle after rd_en, held until the
// next read). Entries are 32 bits wide so partial sums fit; width and depth are this
// design's choices.
module acc_mem #(
  parameter int W     = 32,
  parameter int DEPTH = 256,
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
