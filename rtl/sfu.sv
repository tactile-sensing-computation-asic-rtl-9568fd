// sfu: special function unit, one per dot product lane.
//
// Purely combinational (zero cycles): the lane's 32-bit sum goes in and the value
// written to the accumulation memory in the same cycle comes out. The unit first
// requantizes: an arithmetic right shift by `shift` with round-half-up. It then
// applies the function `fn` (dla_pkg::sfu_fn_e):
//   PASS  the unshifted 32-bit sum, for partial sums that are accumulated further
//   REQ   the requantized value saturated to int8
//   RELU  max(requantized, 0) saturated to int8
//   SIGM  hard sigmoid clamp(r/4 + Q_ONE/2, 0, Q_ONE) on the requantized value r
//   TANH  hard tanh clamp(r, -Q_ONE, Q_ONE)
// int8 results are sign-extended to 32 bits. That the SFU is combinational and does
// the requantization follows the chip's description; the function set (the gate
// activations of a GRU), the piecewise-linear forms and Q_ONE = 64 are this
// design's choices. Codes 5 to 7 behave as REQ.
module sfu
  import dla_pkg::*;
(
  input  logic signed [ACC_W-1:0] x,
  input  sfu_fn_e                 fn,
  input  logic [4:0]              shift,
  output logic signed [ACC_W-1:0] y
);

  logic signed [ACC_W:0]   rnd;   // one extra bit so the rounding add cannot overflow
  logic signed [ACC_W:0]   r;
  logic signed [ACC_W:0]   t;

  function automatic logic signed [ACC_W-1:0] sat8(logic signed [ACC_W:0] v);
    if (v > 127)       return 32'sd127;
    else if (v < -128) return -32'sd128;
    else               return ACC_W'(v);
  endfunction

  function automatic logic signed [ACC_W-1:0] clamp(logic signed [ACC_W:0] v, logic signed [ACC_W:0] lo,
                                                    logic signed [ACC_W:0] hi);
    if (v > hi)      return ACC_W'(hi);
    else if (v < lo) return ACC_W'(lo);
    else             return ACC_W'(v);
  endfunction

  always_comb begin
    rnd = (shift == 5'd0) ? '0 : ((ACC_W+1)'(1) << (shift - 5'd1));
    r   = ((ACC_W+1)'(x) + rnd) >>> shift;
    t   = (r >>> 2) + (ACC_W+1)'(Q_ONE / 2);
    unique case (fn)
      SFU_PASS: y = x;
      SFU_RELU: y = (r < 0) ? '0 : sat8(r);
      SFU_SIGM: y = clamp(t, 0, (ACC_W+1)'(Q_ONE));
      SFU_TANH: y = clamp(r, -(ACC_W+1)'(Q_ONE), (ACC_W+1)'(Q_ONE));
      default:  y = sat8(r);
    endcase
  end

endmodule
