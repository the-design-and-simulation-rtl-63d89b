// tb_bau: exhaustive check of one Basic Arithmetic Unit over all 81
// combinations of x, y, t_in and tp_in. Checked per combination:
//   x + y     = 2*t_out  + w
//   t_in + w  = 2*tp_out + wp
//   s         = wp + tp_in, when that sum is in {-1,0,1}
// and the carry digits against the step-one and step-two carry rules.
module tb_bau;
  import bsd_pkg::*;

  int checks = 0;
  int failures = 0;

  digit_t x, y, t_in, tp_in, t_out, tp_out, w, wp, s;

  bau dut (
    .x(x), .y(y), .t_in(t_in), .tp_in(tp_in),
    .t_out(t_out), .tp_out(tp_out), .w(w), .wp(wp), .s(s)
  );

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s x=%0d y=%0d t_in=%0d tp_in=%0d: got %0d exp %0d",
               what, dec(x), dec(y), dec(t_in), dec(tp_in), got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1; i <= 1; i++)
      for (int j = -1; j <= 1; j++)
        for (int k = -1; k <= 1; k++)
          for (int l = -1; l <= 1; l++) begin
            int et, ew, etp, ewp;
            x = enc(i);
            y = enc(j);
            t_in = enc(k);
            tp_in = enc(l);
            #1;
            // step one: transfer is the sign of x+y
            et  = (i + j > 0) ? 1 : (i + j < 0) ? -1 : 0;
            ew  = i + j - 2 * et;
            // step two: transfer only when t_in and w agree and are non-zero
            etp = (k == ew && k != 0) ? k : 0;
            ewp = k + ew - 2 * etp;
            expect_eq("t_out", dec(t_out), et);
            expect_eq("w", dec(w), ew);
            expect_eq("tp_out", dec(tp_out), etp);
            expect_eq("wp", dec(wp), ewp);
            if (ewp + l >= -1 && ewp + l <= 1) expect_eq("s", dec(s), ewp + l);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
