// in_mem: input vector memory (used for input memory A and input memory B).
//
// Holds DEPTH words of VEC int8 elements; one word is what a dot product lane takes
// per step. It has one write port with a byte mask and one synchronous read port
// (data appears the cycle after rd_en and is held until the next read). With
// BANKS = 2 the memory is a ping-pong buffer: writes go to one bank while reads come
// from the other, and a pulse on `swap` exchanges the two, so a new frame can be
// written while the current one is processed. Input memory A is built with two
// banks and receives the sensor (ADC) bytes from the ring; input memory B has one
// bank and receives values copied back from the accumulation memories. The two
// memories and the ping-pong use follow the chip's description; sizes, ports and
// the bank scheme are this design's choices.
module in_mem #(
  parameter int VEC   = 8,
  parameter int DEPTH = 64,
  parameter int BANKS = 2,
  localparam int AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 swap,
  input  logic                 wr_en,
  input  logic [AW-1:0]        wr_addr,
  input  logic [VEC-1:0]       wr_be,
  input  logic [VEC-1:0][7:0]  wr_data,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [VEC-1:0][7:0]  rd_data,
  output logic                 rd_bank    // bank currently read (0 when BANKS = 1)
);

  localparam int BW = (BANKS > 1) ? 1 : 0;

  // Both banks in one array, indexed by {bank, address}.
  logic [VEC-1:0][7:0] mem [BANKS * DEPTH];
  logic                wr_bank;
  logic [AW+BW-1:0]    wr_idx, rd_idx;

  initial begin
    assert (BANKS == 1 || BANKS == 2) else $error("in_mem: BANKS must be 1 or 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     rd_bank <= 1'b0;
    else if (swap && BANKS == 2)    rd_bank <= ~rd_bank;
  end

  assign wr_bank = (BANKS == 2) ? ~rd_bank : 1'b0;
  assign wr_idx  = (AW+BW)'({wr_bank, wr_addr});
  assign rd_idx  = (AW+BW)'({rd_bank, rd_addr});

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < VEC; b++) begin
        if (wr_be[b]) mem[wr_idx][b] <= wr_data[b];
      end
    end
    if (rd_en) rd_data <= mem[rd_idx];
  end

endmodule
