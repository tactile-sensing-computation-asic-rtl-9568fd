// dp: one dot product lane.
//
// Multiplies VEC int8 activations by VEC int8 weights element by element, sums the
// 16-bit products in a pipelined adder tree (at) and adds the lane's previous
// accumulator value when acc_en is set, so a long dot product is built up from
// VEC-wide pieces. The result is a signed 32-bit sum that goes to the lane's SFU.
// Latency from in_valid to out_valid is STAGES cycles; acc_in and acc_en are read in
// the cycle out_valid is high and must be held until then. The chip describes the
// lane and the adder tree by name; the int8 x int8 multiply, the 32-bit accumulator
// and the place of the accumulate add are this design's choices.
module dp #(
  parameter int VEC    = 8,
  parameter int STAGES = 2,
  parameter int ACC_W  = 32
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic [VEC-1:0][7:0]        act,     // signed int8 activations
  input  logic [VEC-1:0][7:0]        wgt,     // signed int8 weights
  input  logic                       acc_en,
  input  logic signed [ACC_W-1:0]    acc_in,
  output logic                       out_valid,
  output logic signed [ACC_W-1:0]    out_sum
);

  localparam int LEVELS = (VEC > 1) ? $clog2(VEC) : 1;
  localparam int OW     = 16 + LEVELS;

  logic [VEC-1:0][15:0]  prod;
  logic signed [OW-1:0]  tree_sum;

  always_comb begin
    for (int i = 0; i < VEC; i++) begin
      prod[i] = 16'($signed(act[i]) * $signed(wgt[i]));
    end
  end

  at #(.N(VEC), .W(16), .STAGES(STAGES)) u_at (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .in_data  (prod),
    .out_valid(out_valid),
    .out_sum  (tree_sum)
  );

  assign out_sum = ACC_W'(tree_sum) + (acc_en ? acc_in : '0);

endmodule
