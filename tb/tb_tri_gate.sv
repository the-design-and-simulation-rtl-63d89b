// tb_tri_gate: exhaustive check of every tri-state gate against the gate
// truth tables (two-input OR, AND, XOR over all nine input pairs; inverter,
// true detector and false detector over all three inputs). The expected
// values are written out here as plain integers, independently of the
// functions in bsd_pkg.
module tb_tri_gate;
  import bsd_pkg::*;

  int checks = 0;
  int failures = 0;

  digit_t a, b;
  digit_t y_or, y_and, y_xor, y_inv, y_td, y_fd;

  tri_gate #(.OP(G_OR))  u_or  (.a(a), .b(b), .y(y_or));
  tri_gate #(.OP(G_AND)) u_and (.a(a), .b(b), .y(y_and));
  tri_gate #(.OP(G_XOR)) u_xor (.a(a), .b(b), .y(y_xor));
  tri_gate #(.OP(G_INV)) u_inv (.a(a), .b(b), .y(y_inv));
  tri_gate #(.OP(G_TD))  u_td  (.a(a), .b(b), .y(y_td));
  tri_gate #(.OP(G_FD))  u_fd  (.a(a), .b(b), .y(y_fd));

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

  task automatic check(string what, digit_t got, int exp);
    checks++;
    if (dec(got) != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d got=%0d exp=%0d", what, dec(a), dec(b), dec(got), exp);
    end
  endtask

  // Rows: {B, A, OR, AND, XOR}
  int two_in[9][5] = '{
    '{-1, -1, -1, -1,  1},
    '{-1,  0, -1,  0, -1},
    '{-1,  1,  0,  0,  0},
    '{ 0, -1, -1,  0, -1},
    '{ 0,  0,  0,  0,  0},
    '{ 0,  1,  1,  0,  1},
    '{ 1, -1,  0,  0,  0},
    '{ 1,  0,  1,  0,  1},
    '{ 1,  1,  1,  1, -1}
  };
  // Rows: {A, INV, TD, FD}
  int one_in[3][4] = '{
    '{-1,  1, 0, -1},
    '{ 0, -1, 1,  0},
    '{ 1,  0, 1, -1}
  };

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 9; r++) begin
      b = enc(two_in[r][0]);
      a = enc(two_in[r][1]);
      #1;
      check("OR",  y_or,  two_in[r][2]);
      check("AND", y_and, two_in[r][3]);
      check("XOR", y_xor, two_in[r][4]);
    end
    b = LNI;
    for (int r = 0; r < 3; r++) begin
      a = enc(one_in[r][0]);
      #1;
      check("INV", y_inv, one_in[r][1]);
      check("TD",  y_td,  one_in[r][2]);
      check("FD",  y_fd,  one_in[r][3]);
    end
    // One-input gates must not depend on b.
    for (int r = 0; r < 3; r++) begin
      a = enc(one_in[r][0]);
      b = LVP;
      #1;
      check("INV b", y_inv, one_in[r][1]);
      check("TD b",  y_td,  one_in[r][2]);
      check("FD b",  y_fd,  one_in[r][3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
