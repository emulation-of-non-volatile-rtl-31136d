// tb_int_emu: drives the intermittency emulator from a testbench ROM holding
// a sawtooth, and checks: the ROM address advances once every presc+1
// cycles and wraps; each comparator output equals (sample < threshold) three
// cycles after the address change; the reset multiplexer follows rst_sel;
// random mode produces failures of exactly rnd_len ticks.
module tb_int_emu;
  import nvl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic mode;
  logic [15:0] presc;
  logic [1:0][VOLT_W-1:0] thr;
  logic rst_sel;
  logic [7:0] rnd_rate, rnd_len;
  logic [7:0] rom_addr;
  logic [VOLT_W-1:0] rom_data, voltage;
  logic [1:0] below;
  logic reset_emu;
  int checks = 0, failures = 0;

  function automatic int saw(input int a);
    return 1000 + ((a * 37) % 256) * 10;      // 1.0 V .. 3.55 V
  endfunction
  always_ff @(posedge clk) rom_data <= VOLT_W'(saw(int'(rom_addr)));

  int_emu #(.NUM_THR(2), .ROM_AW(8)) dut (.clk, .rst, .mode, .presc, .thr, .rst_sel,
    .rnd_rate, .rnd_len, .rom_addr, .rom_data, .voltage, .below, .reset_emu);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  // address-history for the latency check
  logic [7:0] ah [4];
  always @(posedge clk) begin
    ah[3] <= ah[2]; ah[2] <= ah[1]; ah[1] <= ah[0]; ah[0] <= rom_addr;
  end

  initial begin
    int last_change, cyc, nfail, flen, lens_ok;
    logic [7:0] prev;
    mode = 0; presc = 16'd3; thr[0] = 12'd1500; thr[1] = 12'd2500; rst_sel = 0;
    rnd_rate = 0; rnd_len = 0;
    repeat (3) @(negedge clk); rst = 0;
    repeat (8) @(negedge clk);
    prev = rom_addr; last_change = 0; cyc = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk); cyc++;
      if (rom_addr != prev) begin
        chk(rom_addr == prev + 8'd1, "address steps by one (wraps)");
        if (last_change != 0) chk(cyc - last_change == 4, $sformatf("tick spacing %0d", cyc - last_change));
        last_change = cyc; prev = rom_addr;
      end
      if (t == 1500) rst_sel = 1;
      if (t > 4) begin
        int s;
        s = saw(int'(ah[2]));
        chk(below[0] == (s < 1500) && below[1] == (s < 2500), "comparators");
        if (t != 1500) chk(reset_emu == (s < int'(thr[rst_sel])), "reset mux");
      end
    end
    // random mode: rate 64/256, length 5 ticks of 4 cycles
    mode = 1; rnd_rate = 8'd64; rnd_len = 8'd5; presc = 16'd3;
    nfail = 0; flen = 0; lens_ok = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (reset_emu) flen++;
      else if (flen != 0) begin
        nfail++;
        if (flen != 20) begin lens_ok = 0; $display("random failure length %0d", flen); end
        flen = 0;
      end
    end
    chk(nfail > 5, $sformatf("random failures %0d", nfail));
    chk(lens_ok == 1, "random failure length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
