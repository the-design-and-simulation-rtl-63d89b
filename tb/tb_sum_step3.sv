// tb_sum_step3: exhaustive check of the step-three block. For every pair
// whose sum lies in {-1,0,1} (the only pairs steps one and two can produce)
// the output must equal W' + T'; for the two remaining pairs it must give
// the tri-state OR value (+1 for 1+1, -1 for -1-1).
module tb_sum_step3;
  import bsd_pkg::*;

  int checks = 0;
  int failures = 0;

  digit_t wp, tp, s;

  sum_step3 dut (.wp(wp), .tp(tp), .s(s));

  function automatic digit_t enc(int v);
    return (v == 1) ? LVP : (v == -1) ? LHP : LNI;
  endfunction

  function automatic int dec(digit_t d);
    return (d == LVP) ? 1 : (d == LHP) ? -1 : (d == LNI) ? 0 : 99;
  endfunction

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
        int exp;
        wp = enc(i);
        tp = enc(j);
        #1;
        exp = (i + j > 1) ? 1 : (i + j < -1) ? -1 : i + j;
        checks++;
        if (dec(s) != exp) begin
          failures++;
          $display("FAIL S w'=%0d t'=%0d got %0d exp %0d", i, j, dec(s), exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
