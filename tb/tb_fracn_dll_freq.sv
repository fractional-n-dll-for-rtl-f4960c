`timescale 1ns/1ps
// Workload test: the DLL at three further operating points of the
// design's bias and charge-pump tables, each with its own analog settings:
//   100 MHz: I_SS 74.4 uA, S = 2, R 29.2 kOhm, delay gain 6.67 ns/V
//    50 MHz: I_SS 32.6 uA, S = 1, R 56.8 kOhm, delay gain 14.25 ns/V
//    10 MHz: I_SS 5.09 uA, S = 1, R 308 kOhm,  delay gain 222 ns/V
// The delay gains are the slopes between the N = 10 and N = 8 rows of the
// control-voltage table. A fourth run stays at 200 MHz but doubles the
// fine resolution to N = 20 (n_half = 10): delay_step then spans -10..+10
// and each step is T/200, the resolution being programmable through N. The resistances are the values the MOS resistor
// actually reaches in the filter table, not the designed ones: with the
// designed (smaller) values the second pole sits too close to the loop
// bandwidth and the ripple from tap hopping is filtered much less. Each point runs four initial delay errors; the
// coarse tap and the final alignment are checked by dll_freq_run.
module tb_fracn_dll_freq;
  int c1, f1, c2, f2, c3, f3, c4, f4;
  bit d1, d2, d3, d4;

  dll_freq_run #(.T_NS(10.0),  .ISS(74.4), .R_K(29.2), .KDL(6.67),  .S(3'd2), .LABEL("100 MHz"))
    u100 (.checks(c1), .failures(f1), .done(d1));
  dll_freq_run #(.T_NS(20.0),  .ISS(32.6), .R_K(56.8), .KDL(14.25), .S(3'd1), .LABEL("50 MHz"))
    u50  (.checks(c2), .failures(f2), .done(d2));
  dll_freq_run #(.T_NS(100.0), .ISS(5.09), .R_K(308.0), .KDL(222.0), .S(3'd1), .LABEL("10 MHz"))
    u10  (.checks(c3), .failures(f3), .done(d3));
  dll_freq_run #(.T_NS(5.0),   .ISS(198.0), .R_K(11.4), .KDL(1.0),  .S(3'd3), .NH(4'd10), .LABEL("200 MHz"))
    u200 (.checks(c4), .failures(f4), .done(d4));

  initial begin
    wait (d1 && d2 && d3 && d4);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4, f1 + f2 + f3 + f4);
    $finish;
  end

  initial begin
    #2000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4, f1 + f2 + f3 + f4 + 1);
    $finish;
  end
endmodule
