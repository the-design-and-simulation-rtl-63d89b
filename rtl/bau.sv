// bau: Basic Arithmetic Unit, one digit position of the signed-digit adder.
//
// A BAU chains the three functional blocks of the three-step algorithm:
// step one (tw_step1) splits x+y into T and W, step two (tw_step2) adds the
// neighbour's T to W and splits again into T' and W', step three
// (sum_step3) adds the neighbour's T' to W' to give the sum digit. The
// carries T and T' each move exactly one position to the left and never
// further, so a sum digit depends only on the operand digits at positions
// i, i-1 and i-2, whatever the word length.
//
// Interface:
//   x, y    operand digits of position i
//   t_in    T(i) from the BAU at position i-1 (0 at position 0)
//   tp_in   T'(i) from the BAU at position i-1 (0 at position 0)
//   t_out   T(i+1) to the BAU at position i+1
//   tp_out  T'(i+1) to the BAU at position i+1
//   w, wp   W(i) and W'(i), brought out for observation
//   s       sum digit of position i
// Timing: combinational, three functional blocks (six gate levels) deep.
module bau
  import bsd_pkg::*;
(
  input  digit_t x,
  input  digit_t y,
  input  digit_t t_in,
  input  digit_t tp_in,
  output digit_t t_out,
  output digit_t tp_out,
  output digit_t w,
  output digit_t wp,
  output digit_t s
);

  tw_step1 u_step1 (
    .x(x),
    .y(y),
    .t(t_out),
    .w(w)
  );

  tw_step2 u_step2 (
    .t (t_in),
    .w (w),
    .tp(tp_out),
    .wp(wp)
  );

  sum_step3 u_step3 (
    .wp(wp),
    .tp(tp_in),
    .s (s)
  );

endmodule
