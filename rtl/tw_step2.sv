// tw_step2: step-two functional block (T'&W') of the three-step signed-digit
// adder.
//
// At position i it adds the transfer digit T(i) arriving from position i-1
// to the weight digit W(i) left by step one and splits the result again:
// T(i) + W(i) = 2*T'(i+1) + W'(i). T' is the tri-state AND of its inputs:
// it is non-zero only when both are +1 or both are -1. W' is +1 when the
// sum is 1, -1 when it is -1 and 0 otherwise.
//
// W' is built from the tri-state gate library, sharing the AND gate of T'
// (this network is this design's own; it reproduces the published W' truth
// table):
//   p  = XOR(t, w)    t+w folded into {-1,0,1} modulo 3
//   W' = XOR(p, T')   t+w when |t+w| <= 1, else 0
//
// Interface: t is T(i) from the step-one block of position i-1, w is W(i);
// tp is T'(i+1) for position i+1, wp is W'(i).
// Timing: combinational, two gate levels.
module tw_step2
  import bsd_pkg::*;
(
  input  digit_t t,
  input  digit_t w,
  output digit_t tp,
  output digit_t wp
);

  digit_t p;

  tri_gate #(.OP(G_AND)) u_tp_and (.a(t), .b(w),  .y(tp));
  tri_gate #(.OP(G_XOR)) u_p_xor  (.a(t), .b(w),  .y(p));
  tri_gate #(.OP(G_XOR)) u_wp_xor (.a(p), .b(tp), .y(wp));

endmodule
