// tri_gate: one tri-state optical logic gate acting on signed digits.
//
// The gate works on digits in {-1, 0, +1}, carried by horizontally
// polarised light, no light and vertically polarised light. The parameter
// OP picks the gate: the two-input gates OR, AND and XOR, or the one-input
// gates inverter, true detector and false detector. The truth tables follow
// the published gate definitions and live in bsd_pkg; this module only
// selects one of them.
//
// Interface: a, b are the input digits, y the output digit. One-input gates
// read only a; b is then left unconnected on purpose (it is kept so that all
// gates share one port list).
// Timing: purely combinational, one gate delay.
module tri_gate
  import bsd_pkg::*;
#(
  parameter gate_e OP = G_OR
) (
  input  digit_t a,
  input  digit_t b,
  output digit_t y
);

  always_comb begin
    unique case (OP)
      G_OR:    y = tri_or(a, b);
      G_AND:   y = tri_and(a, b);
      G_XOR:   y = tri_xor(a, b);
      G_INV:   y = tri_inv(a);
      G_TD:    y = tri_td(a);
      G_FD:    y = tri_fd(a);
      default: y = LNI;
    endcase
  end

endmodule
