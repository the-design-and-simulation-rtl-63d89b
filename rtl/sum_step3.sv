// sum_step3: step-three functional block (T) of the three-step signed-digit
// adder.
//
// It forms the final sum digit of position i, Sum(i) = W'(i) + T'(i), with a
// single tri-state OR gate. Steps one and two guarantee that W'(i) and
// T'(i) are never both +1 or both -1, so the OR (the sign of the sum) equals
// the sum itself and no carry leaves this step.
//
// Interface: wp is W'(i) of the same position, tp is T'(i) from the
// step-two block of position i-1; s is the sum digit.
// Timing: combinational.
module sum_step3
  import bsd_pkg::*;
(
  input  digit_t wp,
  input  digit_t tp,
  output digit_t s
);

  tri_gate #(.OP(G_OR)) u_s_or (
    .a(wp),
    .b(tp),
    .y(s)
  );

endmodule
