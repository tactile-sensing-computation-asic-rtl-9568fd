// at: pipelined adder tree.
//
// Sums N signed W-bit inputs in a binary tree of ceil(log2 N) adder levels. The
// parameter STAGES sets how many of those levels end in a pipeline register, so the
// latency from in_valid to out_valid is STAGES cycles (0 gives a purely
// combinational tree). Registers are placed after the last STAGES levels, which keeps
// the first levels, the widest ones, free of flip-flops. Inputs beyond N in the
// power-of-two tree are zero. That the tree is pipelined by a stage-count parameter
// follows the chip's description; where the registers sit is this design's choice.
// Reset is asynchronous and active low and clears the valid pipeline.
module at #(
  parameter int N      = 8,
  parameter int W      = 16,
  parameter int STAGES = 2,
  localparam int LEVELS = (N > 1) ? $clog2(N) : 1,
  localparam int OW     = W + LEVELS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [N-1:0][W-1:0] in_data,   // each element is signed
  output logic                out_valid,
  output logic signed [OW-1:0] out_sum
);

  localparam int NP = 1 << LEVELS;

  initial begin
    assert (STAGES >= 0 && STAGES <= LEVELS)
      else $error("at: STAGES must lie between 0 and %0d", LEVELS);
  end

  // g_level[l] holds the NP >> l partial sums after adder level l; level 0 is the
  // sign-extended, zero-padded input.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_level
    localparam int CNT = NP >> l;
    logic signed [OW-1:0] node [CNT];
    logic                 vld;
    if (l == 0) begin : g_in
      always_comb begin
        for (int i = 0; i < CNT; i++) node[i] = (i < N) ? OW'(signed'(in_data[i])) : '0;
      end
      assign vld = in_valid;
    end else begin : g_add
      logic signed [OW-1:0] sum [CNT];
      always_comb begin
        for (int i = 0; i < CNT; i++) sum[i] = g_level[l-1].node[2*i] + g_level[l-1].node[2*i+1];
      end
      if (l > LEVELS - STAGES) begin : g_reg
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            vld <= 1'b0;
            for (int i = 0; i < CNT; i++) node[i] <= '0;
          end else begin
            vld <= g_level[l-1].vld;
            for (int i = 0; i < CNT; i++) node[i] <= sum[i];
          end
        end
      end else begin : g_comb
        assign vld  = g_level[l-1].vld;
        assign node = sum;
      end
    end
  end

  assign out_valid = g_level[LEVELS].vld;
  assign out_sum   = g_level[LEVELS].node[0];

endmodule
