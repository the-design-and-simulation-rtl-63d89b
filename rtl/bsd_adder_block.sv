// bsd_adder_block: one adder block, a row of BAUs adding two N-digit binary
// signed-digit numbers in parallel.
//
// Digit i of each operand goes to BAU i. Each BAU passes its step-one
// transfer digit T and its step-two transfer digit T' to its left
// neighbour only, so every sum digit is ready after the same three steps,
// whatever N is. The row holds N+1 BAUs: BAU N receives operand digits 0
// and turns the transfers leaving digit N-1 into the extra top sum digit,
// so the N+1 digit sum is exact for all inputs (two N-digit operands can
// sum to beyond N digits). The transfers leaving BAU N are always 0 and
// are not used.
//
// Interface (all digit vectors are little-endian: index 0 is weight 2^0):
//   x, y     operand digits
//   sum      N+1 sum digits
//   step1_t  T digits after step one (step1_t[0] is always 0)
//   step1_w  W digits after step one
//   step2_t  T' digits after step two (step2_t[0] is always 0)
//   step2_w  W' digits after step two
// The step vectors expose the intermediate results of the algorithm;
// step1_t[0], step2_t[0] and step1_w[N] are always 0.
// Timing: combinational, three functional blocks deep for every N.
// N = 15 is the operand length of the published example; the extra top
// BAU follows that example, which shows 16 result digits for 15-digit
// operands.
module bsd_adder_block
  import bsd_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  digit_t [N-1:0] x,
  input  digit_t [N-1:0] y,
  output digit_t [N:0]   sum,
  output digit_t [N:0]   step1_t,
  output digit_t [N:0]   step1_w,
  output digit_t [N:0]   step2_t,
  output digit_t [N:0]   step2_w
);

  // t[i] / tp[i]: transfer digits arriving at position i.
  digit_t [N+1:0] t;
  digit_t [N+1:0] tp;

  assign t[0]  = LNI;
  assign tp[0] = LNI;

  for (genvar i = 0; i <= N; i++) begin : g_bau
    digit_t xi, yi;
    if (i < N) begin : g_op
      assign xi = x[i];
      assign yi = y[i];
    end else begin : g_top
      assign xi = LNI;
      assign yi = LNI;
    end

    bau u_bau (
      .x     (xi),
      .y     (yi),
      .t_in  (t[i]),
      .tp_in (tp[i]),
      .t_out (t[i+1]),
      .tp_out(tp[i+1]),
      .w     (step1_w[i]),
      .wp    (step2_w[i]),
      .s     (sum[i])
    );
  end

  assign step1_t = t[N:0];
  assign step2_t = tp[N:0];

endmodule
