// tw_step1: step-one functional block (T&W) of the three-step signed-digit
// adder.
//
// For one digit position it splits the digit sum x+y (range -2..2) into a
// transfer digit T for the next higher position and a weight digit W that
// stays, so that x + y = 2*T + W. T is the sign of x+y, which is exactly the
// tri-state OR gate. W is -1 when x+y = 1, +1 when x+y = -1 and 0
// otherwise, so W never has the same sign as T.
//
// W is built from the tri-state gate library as follows (this network is
// this design's own; it reproduces the published W truth table):
//   p = XOR(x, y)     x+y folded into {-1,0,1} modulo 3
//   q = AND(x, y)     non-zero only for 1+1 and -1-1
//   r = XOR(p, q)     x+y when |x+y| <= 1, else 0
//   W = XOR(r, r)     2r modulo 3, which is -r
//
// Interface: x, y operand digits of position i; t is T(i+1), which goes to
// position i+1; w is W(i), which stays at position i.
// Timing: combinational, three gate levels for W, one for T.
module tw_step1
  import bsd_pkg::*;
(
  input  digit_t x,
  input  digit_t y,
  output digit_t t,
  output digit_t w
);

  digit_t p, q, r;

  tri_gate #(.OP(G_OR))  u_t_or  (.a(x), .b(y), .y(t));
  tri_gate #(.OP(G_XOR)) u_p_xor (.a(x), .b(y), .y(p));
  tri_gate #(.OP(G_AND)) u_q_and (.a(x), .b(y), .y(q));
  tri_gate #(.OP(G_XOR)) u_r_xor (.a(p), .b(q), .y(r));
  tri_gate #(.OP(G_XOR)) u_w_neg (.a(r), .b(r), .y(w));

endmodule
