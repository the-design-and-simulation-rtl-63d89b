// tb_tw_step2: exhaustive check of the step-two T'&W' block over all nine
// digit pairs against the step-two truth tables written out here, plus the
// identity t + w = 2T' + W'.
module tb_tw_step2;
  import bsd_pkg::*;

  int checks = 0;
  int failures = 0;

  digit_t t, w, tp, wp;

  tw_step2 dut (.t(t), .w(w), .tp(tp), .wp(wp));

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

  // Index [t+1][w+1]; row/column order -1, 0, 1.
  int tp_tab[3][3] = '{'{-1,  0, 0}, '{ 0, 0, 0}, '{0, 0, 1}};
  int wp_tab[3][3] = '{'{ 0, -1, 0}, '{-1, 0, 1}, '{0, 1, 0}};

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
        t = enc(i);
        w = enc(j);
        #1;
        checks += 3;
        if (dec(tp) != tp_tab[i+1][j+1]) begin
          failures++;
          $display("FAIL T' t=%0d w=%0d got %0d", i, j, dec(tp));
        end
        if (dec(wp) != wp_tab[i+1][j+1]) begin
          failures++;
          $display("FAIL W' t=%0d w=%0d got %0d", i, j, dec(wp));
        end
        if (i + j != 2 * dec(tp) + dec(wp)) begin
          failures++;
          $display("FAIL t+w != 2T'+W' for t=%0d w=%0d", i, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
