// tb_bsd_adder_block: checks one 15-digit adder row.
//
// 1. The six example additions of the published simulation. For each one
//    the sum value is compared with the decimal sum of the operands, and
//    where the operand digit strings are known the sum digits are compared
//    digit by digit with the published result row. For the first example
//    the intermediate T, W, T' and W' digits are compared too.
// 2. Random operands: the sum value, the identities of steps one and two
//    at every position, and the carry-free property: changing one operand
//    digit at position j changes no sum digit above position j+2.
module tb_bsd_adder_block;
  import bsd_pkg::*;

  localparam int N = 15;

  int checks = 0;
  int failures = 0;

  digit_t [N-1:0] x, y;
  digit_t [N:0]   sum, s1t, s1w, s2t, s2w;

  bsd_adder_block #(.N(N)) dut (
    .x(x), .y(y), .sum(sum),
    .step1_t(s1t), .step1_w(s1w), .step2_t(s2t), .step2_w(s2w)
  );

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

  // Parse a digit string written most significant digit first, e.g.
  // "10-1" = 1,0,-1, into a vector of W digits (index 0 = weight 1).
  function automatic digit_t [N:0] parse(string s);
    digit_t [N:0] v = '{default: LNI};
    int q[$];
    for (int i = 0; i < s.len(); i++) begin
      if (s[i] == "-") begin
        q.push_back(-1);
        i++;
      end else begin
        q.push_back(s[i] == "1" ? 1 : 0);
      end
    end
    for (int i = 0; i < q.size(); i++) v[i] = enc(q[q.size() - 1 - i]);
    return v;
  endfunction

  function automatic longint value_of(digit_t [N:0] v);
    longint r = 0;
    for (int i = N; i >= 0; i--) r = 2 * r + dec(v[i]);
    return r;
  endfunction

  // Plain conversion of an integer to signed digits: the binary digits of
  // |v|, negated when v < 0.
  function automatic digit_t [N-1:0] from_int(int v);
    digit_t [N-1:0] r;
    int m = (v < 0) ? -v : v;
    for (int i = 0; i < N; i++) r[i] = enc(((m >> i) & 1) * ((v < 0) ? -1 : 1));
    return r;
  endfunction

  task automatic expect_vec(string what, digit_t [N:0] got, digit_t [N:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $write("FAIL %s got ", what);
      for (int i = N; i >= 0; i--) $write("%0d ", dec(got[i]));
      $write(" exp ");
      for (int i = N; i >= 0; i--) $write("%0d ", dec(exp[i]));
      $display("");
    end
  endtask

  task automatic expect_val(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // Steps one and two, position by position.
  task automatic check_steps();
    for (int i = 0; i <= N; i++) begin
      int xi = (i < N) ? dec(x[i]) : 0;
      int yi = (i < N) ? dec(y[i]) : 0;
      int tn = (i < N) ? dec(s1t[i+1]) : 0;
      int tpn = (i < N) ? dec(s2t[i+1]) : 0;
      checks++;
      if (xi + yi != 2 * tn + dec(s1w[i])) begin
        failures++;
        $display("FAIL step one at position %0d", i);
      end
      checks++;
      if (dec(s1t[i]) + dec(s1w[i]) != 2 * tpn + dec(s2w[i])) begin
        failures++;
        $display("FAIL step two at position %0d", i);
      end
    end
    expect_val("T(0)", dec(s1t[0]), 0);
    expect_val("T'(0)", dec(s2t[0]), 0);
  endtask

  string ex_a[6], ex_b[6], ex_c[6];
  int ex_av[6], ex_bv[6];

  digit_t [N:0] ref_sum;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Published examples. Operand strings are MSD first; the result strings
    // are the six rows of the result figure (vertical polarisation = +1,
    // horizontal = -1, dark = 0), positions 15 down to 0.
    ex_av = '{-27803, 32767, -4136, -7789, 30224, 27656};
    ex_bv = '{ 28188,     0, 32644,  3780, 30291, -24846};
    ex_a = '{"-1-1-10011100-1-1-101", "111111111111111", "",
             "00-1-1-1-100-1-1-10011", "111100-1-1-1-1-10000",
             "11100-1-1-1-1-1-1-1000"};
    ex_b = '{"111000-1-1-1-1-11100", "000000000000000", "111111111-1-1-1-100",
             "000111100-1-1-1-100", "111100-1-1-110-1-10-1",
             "-1-1-111110000-1-1-10"};
    ex_c = '{"000001-10-1000001-1", "100000000000000-1", "",
             "00-11001-1-10-1-1100-1", "111100-1-1-10-1001-11",
             "00010-10-10000-1010"};

    for (int k = 0; k < 6; k++) begin
      digit_t [N:0] pa, pb;
      if (ex_a[k] != "") begin
        pa = parse(ex_a[k]);
        x = pa[N-1:0];
        expect_val($sformatf("example %0d operand a", k + 1), value_of(pa), ex_av[k]);
      end else begin
        x = from_int(ex_av[k]);
      end
      pb = parse(ex_b[k]);
      y = pb[N-1:0];
      expect_val($sformatf("example %0d operand b", k + 1), value_of(pb), ex_bv[k]);
      #1;
      expect_val($sformatf("example %0d sum", k + 1), value_of(sum),
                 longint'(ex_av[k]) + ex_bv[k]);
      if (ex_c[k] != "") expect_vec($sformatf("example %0d row", k + 1), sum, parse(ex_c[k]));
      check_steps();
      if (k == 0) begin
        expect_vec("example 1 W", s1w, parse("000000-100110000-1"));
        expect_vec("example 1 T", s1t, parse("00000100-1-1-100010"));
        expect_vec("example 1 W'", s2w, parse("000001-10-1000001-1"));
        expect_vec("example 1 T'", s2t, parse("0"));
      end
    end

    // Random operands.
    for (int r = 0; r < 2000; r++) begin
      int j;
      digit_t [N:0] xe, ye;
      for (int i = 0; i < N; i++) begin
        x[i] = enc(int'($urandom_range(2)) - 1);
        y[i] = enc(int'($urandom_range(2)) - 1);
      end
      xe = {LNI, x};
      ye = {LNI, y};
      #1;
      expect_val("random sum", value_of(sum), value_of(xe) + value_of(ye));
      check_steps();
      // carry-free: a change at position j reaches at most position j+2
      ref_sum = sum;
      j = $urandom_range(N - 1);
      x[j] = enc((dec(x[j]) + 2) % 3 - 1);
      #1;
      checks++;
      for (int i = j + 3; i <= N; i++) begin
        if (sum[i] != ref_sum[i]) begin
          failures++;
          $display("FAIL change at %0d reached sum digit %0d", j, i);
          break;
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
