// bsd_pkg: shared types and functions for the tri-state binary signed-digit
// (BSD) adder.
//
// A BSD digit takes one of three values, -1, 0 and +1. In the optical
// machine these are three states of a light beam: horizontally polarised
// light (LHP) is -1, no light (LNI) is 0 and vertically polarised light
// (LVP) is +1. In this RTL a digit is a 2-bit two's-complement code, so a
// digit's code read as a signed number is its value; the code 2'b10 (-2) is
// never produced by any block and is read as 0 wherever it reaches a gate.
//
// The package also holds the truth tables of the tri-state gates (OR, AND,
// XOR, inverter, true detector, false detector). The gate tables are taken
// entry by entry from the published gate definitions; the encoding of a
// digit as two bits is this design's own choice.
package bsd_pkg;

  // One signed digit, named after the light state that carries it.
  typedef enum logic [1:0] {
    LNI = 2'b00,  //  0: light of no intensity
    LVP = 2'b01,  // +1: vertically polarised light
    LHP = 2'b11   // -1: horizontally polarised light
  } digit_t;

  // Gate selector for tri_gate.
  typedef enum logic [2:0] {
    G_OR  = 3'd0,
    G_AND = 3'd1,
    G_XOR = 3'd2,
    G_INV = 3'd3,  // one-input gates use only input a
    G_TD  = 3'd4,
    G_FD  = 3'd5
  } gate_e;

  // Value of a digit as a small signed integer (-1, 0 or +1). Used by
  // testbenches and for reading; the gate functions below are written as
  // small tables on the 2-bit codes so that they map onto a few gates.
  function automatic int signed digit_value(digit_t d);
    case (d)
      LVP:     return 1;
      LHP:     return -1;
      default: return 0;
    endcase
  endfunction

  // Digit for a value in {-1, 0, +1}; anything else maps to 0.
  function automatic digit_t digit_of(int signed v);
    case (v)
      1:       return LVP;
      -1:      return LHP;
      default: return LNI;
    endcase
  endfunction

  // Map the unused code 2'b10 to 0 so the tables below only see -1, 0, +1.
  function automatic digit_t legal(digit_t d);
    return (d == LVP || d == LHP) ? d : LNI;
  endfunction

  // Tri-state OR: sign of a+b.
  // (-1,-1)->-1 (-1,0)->-1 (-1,1)->0 (0,0)->0 (0,1)->1 (1,1)->1
  function automatic digit_t tri_or(digit_t a, digit_t b);
    digit_t la, lb;
    la = legal(a);
    lb = legal(b);
    if (la == LNI) return lb;
    if (lb == LNI) return la;
    return (la == lb) ? la : LNI;
  endfunction

  // Tri-state AND: the common value when both inputs agree and are not 0,
  // otherwise 0.
  function automatic digit_t tri_and(digit_t a, digit_t b);
    digit_t la, lb;
    la = legal(a);
    lb = legal(b);
    return (la == lb) ? la : LNI;
  endfunction

  // Tri-state XOR: a+b folded back into {-1,0,1} modulo 3.
  // (-1,-1)->1 (-1,0)->-1 (-1,1)->0 (0,0)->0 (0,1)->1 (1,1)->-1
  function automatic digit_t tri_xor(digit_t a, digit_t b);
    digit_t la, lb;
    la = legal(a);
    lb = legal(b);
    if (la == LNI) return lb;
    if (lb == LNI) return la;
    if (la != lb) return LNI;
    return (la == LVP) ? LHP : LVP;
  endfunction

  // Tri-state inverter: -1->1, 0->-1, 1->0.
  function automatic digit_t tri_inv(digit_t a);
    case (a)
      LHP:     return LVP;
      LVP:     return LNI;
      default: return LHP;
    endcase
  endfunction

  // True detector: -1->0, 0->1, 1->1.
  function automatic digit_t tri_td(digit_t a);
    return (a == LHP) ? LNI : LVP;
  endfunction

  // False detector: -1->-1, 0->0, 1->-1.
  function automatic digit_t tri_fd(digit_t a);
    return (a == LVP || a == LHP) ? LHP : LNI;
  endfunction

endpackage
