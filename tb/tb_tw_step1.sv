// tb_tw_step1: exhaustive check of the step-one T&W block over all nine
// digit pairs. T and W are compared with the step-one truth tables written
// out here, and the arithmetic identity x + y = 2T + W is checked as well.
module tb_tw_step1;
  import bsd_pkg::*;

  int checks = 0;
  int failures = 0;

  digit_t x, y, t, w;

  tw_step1 dut (.x(x), .y(y), .t(t), .w(w));

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

  // Index [x+1][y+1]; row/column order -1, 0, 1.
  int t_tab[3][3] = '{'{-1, -1, 0}, '{-1, 0, 1}, '{0, 1, 1}};
  int w_tab[3][3] = '{'{ 0,  1, 0}, '{ 1, 0, -1}, '{0, -1, 0}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1; i <= 1; i++) begin
      for (int j = -1; j <= 1; j++) begin
        x = enc(i);
        y = enc(j);
        #1;
        checks += 3;
        if (dec(t) != t_tab[i+1][j+1]) begin
          failures++;
          $display("FAIL T x=%0d y=%0d got %0d", i, j, dec(t));
        end
        if (dec(w) != w_tab[i+1][j+1]) begin
          failures++;
          $display("FAIL W x=%0d y=%0d got %0d", i, j, dec(w));
        end
        if (i + j != 2 * dec(t) + dec(w)) begin
          failures++;
          $display("FAIL x+y != 2T+W for x=%0d y=%0d", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
