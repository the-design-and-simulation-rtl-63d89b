// tb_optical_adder: end-to-end test of the parallel adder at its default
// size (6 blocks of 15 digits), with no parameter overridden.
//
// First the six published example additions are applied to the six blocks
// at the same time and every sum is compared with the decimal sum of its
// operands. Then random batches are applied. For each batch every block's
// sum value is checked, and one block's operands are then changed alone to
// check that the other blocks' sums do not move.
//
// The mechanisms of the algorithm are counted over the whole run, and each
// must occur at least once: a positive and a negative step-one transfer, a
// positive and a negative step-two transfer, a non-zero extra top sum digit
// (a sum that needs N+1 digits) and a negative sum.
module tb_optical_adder;
  import bsd_pkg::*;

  localparam int M = 6;
  localparam int N = 15;

  int checks = 0;
  int failures = 0;

  digit_t [M-1:0][N-1:0] a, b;
  digit_t [M-1:0][N:0]   sum, s1t, s1w, s2t, s2w;

  optical_adder dut (
    .a(a), .b(b), .sum(sum),
    .step1_t(s1t), .step1_w(s1w), .step2_t(s2t), .step2_w(s2w)
  );

  int n_t_pos = 0, n_t_neg = 0, n_tp_pos = 0, n_tp_neg = 0;
  int n_top_digit = 0, n_neg_sum = 0;

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

  function automatic longint value_n(digit_t [N-1:0] v);
    longint r = 0;
    for (int i = N - 1; i >= 0; i--) r = 2 * r + dec(v[i]);
    return r;
  endfunction

  function automatic longint value_n1(digit_t [N:0] v);
    longint r = 0;
    for (int i = N; i >= 0; i--) r = 2 * r + dec(v[i]);
    return r;
  endfunction

  function automatic digit_t [N-1:0] from_int(int v);
    digit_t [N-1:0] r;
    int m = (v < 0) ? -v : v;
    for (int i = 0; i < N; i++) r[i] = enc(((m >> i) & 1) * ((v < 0) ? -1 : 1));
    return r;
  endfunction

  task automatic check_all(string what);
    for (int k = 0; k < M; k++) begin
      longint e = value_n(a[k]) + value_n(b[k]);
      checks++;
      if (value_n1(sum[k]) != e) begin
        failures++;
        $display("FAIL %s block %0d: sum %0d exp %0d", what, k, value_n1(sum[k]), e);
      end
      for (int i = 0; i <= N; i++) begin
        if (s1t[k][i] == LVP) n_t_pos++;
        if (s1t[k][i] == LHP) n_t_neg++;
        if (s2t[k][i] == LVP) n_tp_pos++;
        if (s2t[k][i] == LHP) n_tp_neg++;
      end
      if (sum[k][N] != LNI) n_top_digit++;
      if (e < 0) n_neg_sum++;
    end
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end else begin
      $display("seen %0d times: %s", n, what);
    end
  endtask

  int ex_a[6] = '{-27803, 32767, -4136, -7789, 30224, 27656};
  int ex_b[6] = '{ 28188,     0, 32644,  3780, 30291, -24846};

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < M; k++) begin
      a[k] = from_int(ex_a[k % 6]);
      b[k] = from_int(ex_b[k % 6]);
    end
    #1;
    check_all("examples");

    for (int r = 0; r < 3000; r++) begin
      digit_t [M-1:0][N:0] prev_sum;
      int k;
      for (int kk = 0; kk < M; kk++)
        for (int i = 0; i < N; i++) begin
          a[kk][i] = enc(int'($urandom_range(2)) - 1);
          b[kk][i] = enc(int'($urandom_range(2)) - 1);
        end
      // Every few batches, bias one block towards large operands of one
      // sign so that sums beyond N digits turn up.
      if (r % 4 == 0) begin
        k = $urandom_range(M - 1);
        for (int i = N - 4; i < N; i++) begin
          a[k][i] = (r % 8 == 0) ? LVP : LHP;
          b[k][i] = a[k][i];
        end
      end
      #1;
      check_all("random");
      prev_sum = sum;
      k = $urandom_range(M - 1);
      for (int i = 0; i < N; i++) a[k][i] = enc(int'($urandom_range(2)) - 1);
      #1;
      check_all("one block changed");
      for (int kk = 0; kk < M; kk++) begin
        if (kk == k) continue;
        checks++;
        if (sum[kk] != prev_sum[kk]) begin
          failures++;
          $display("FAIL block %0d moved when block %0d changed", kk, k);
        end
      end
    end

    expect_seen("positive step-one transfer", n_t_pos);
    expect_seen("negative step-one transfer", n_t_neg);
    expect_seen("positive step-two transfer", n_tp_pos);
    expect_seen("negative step-two transfer", n_tp_neg);
    expect_seen("sum using the extra top digit", n_top_digit);
    expect_seen("negative sum", n_neg_sum);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
