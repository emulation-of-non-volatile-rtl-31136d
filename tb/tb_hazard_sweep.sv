// tb_hazard_sweep: the threshold/RC experiment. Four emulation systems with
// trace RC = 1, 3, 4 and 5 each run the hazard-threshold sweep of
// sweep_unit (2.70 V to 1.90 V, 10 mV steps). For every RC it prints the
// error count per threshold and the lowest threshold down to which all runs
// are error-free. Checks: every run makes progress; with the highest
// hazard threshold every RC computes without error; with RC = 1 the lowest
// thresholds leave too little time to checkpoint and produce errors; the
// error-free range never shrinks as RC grows; RC = 5 is error-free at every
// threshold.
module tb_hazard_sweep;
  logic clk = 0;
  always #5 clk = ~clk;
  logic d1, d3, d4, d5;
  int e1 [81], e3 [81], e4 [81], e5 [81];
  int o1 [81], o3 [81], o4 [81], o5 [81];
  int checks = 0, failures = 0;

  sweep_unit #(.RC(1)) u1 (.clk, .done(d1), .errors(e1), .outputs(o1));
  sweep_unit #(.RC(3)) u3 (.clk, .done(d3), .errors(e3), .outputs(o3));
  sweep_unit #(.RC(4)) u4 (.clk, .done(d4), .errors(e4), .outputs(o4));
  sweep_unit #(.RC(5)) u5 (.clk, .done(d5), .errors(e5), .outputs(o5));

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic int lowest_ok(input int e [81]);
    int i;
    i = 0;
    while (i < 81 && e[i] == 0) i++;
    return 2700 - 10 * (i - 1);        // mV; 2710 means none
  endfunction

  initial begin
    int l1, l3, l4, l5;
    wait (d1 && d3 && d4 && d5);
    for (int i = 0; i < 81; i++)
      $display("hazard %0d mV: errors RC1 %0d RC3 %0d RC4 %0d RC5 %0d (outputs %0d %0d %0d %0d)",
               2700 - 10 * i, e1[i], e3[i], e4[i], e5[i], o1[i], o3[i], o4[i], o5[i]);
    l1 = lowest_ok(e1); l3 = lowest_ok(e3); l4 = lowest_ok(e4); l5 = lowest_ok(e5);
    $display("error-free down to: RC1 %0d mV, RC3 %0d mV, RC4 %0d mV, RC5 %0d mV", l1, l3, l4, l5);
    for (int i = 0; i < 81; i++) chk(o1[i] > 0 && o3[i] > 0 && o4[i] > 0 && o5[i] > 0, "progress in every run");
    chk(e1[0] == 0 && e3[0] == 0 && e4[0] == 0 && e5[0] == 0, "2.7 V hazard threshold is safe");
    chk(e1[80] > 0, "RC 1 fails at 1.9 V");
    chk(l1 >= l3 && l3 >= l4 && l4 >= l5, "error-free range grows with RC");
    chk(l5 == 1900, "RC 5 error-free everywhere");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (81 * 256 * 256 + 10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
