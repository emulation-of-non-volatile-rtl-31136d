// tb_trace_rom: checks the three zones of the voltage trace: flat at 3.3 V,
// a discharge that falls strictly and reaches below 1.5 V, then a recharge
// that rises monotonically back above 3.2 V. The discharge is compared with
// the continuous exponential V_NOM * (1 - 1/8)^n (tolerance 2 % of V_NOM to
// allow for integer truncation) and the read latency of one cycle is checked.
module tb_trace_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] addr;
  logic [11:0] data;
  int v [256];
  int checks = 0, failures = 0;

  trace_rom #(.AW(8), .DW(12)) dut (.clk, .addr, .data);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    int vmin;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i);
      @(negedge clk);
      v[i] = int'(data);
    end
    for (int i = 0; i < 32; i++) chk(v[i] == 3300, $sformatf("flat %0d = %0d", i, v[i]));
    vmin = 9999;
    for (int i = 32; i < 64; i++) begin
      real e;
      e = 3300.0 * ((7.0 / 8.0) ** (i - 31));
      chk(v[i] < v[i-1] || v[i] == 0, $sformatf("discharge falls at %0d", i));
      chk((real'(v[i]) - e) < 66.0 && (e - real'(v[i])) < 66.0, $sformatf("discharge %0d: %0d vs %f", i, v[i], e));
      if (v[i] < vmin) vmin = v[i];
    end
    chk(vmin < 1500, "drops below 1.5 V");
    for (int i = 64; i < 256; i++) chk(v[i] >= v[i-1], $sformatf("recharge rises at %0d", i));
    chk(v[255] > 3200, "recharged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
