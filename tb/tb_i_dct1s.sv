// tb_i_dct1s: streams test blocks into the row stage with a testbench model
// of the double-buffer controller, captures the RAM writes and compares every
// stored value with 4 * (1D DCT of the row) (tolerance 1 LSB). Also checks:
// block_cmplt every 64 cycles at full rate; no new block while the next
// buffer is full; halt drops din_ready, lets the row in flight finish within
// 8 cycles and reports idle; after a reset, loading the saved state lets the
// block continue correctly.
module tb_i_dct1s;
  import nvl_pkg::*;
  import tb_dct_ref_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic run, halt, load;
  logic [7:0] din;
  logic din_valid, din_ready;
  logic wsel;
  logic [1:0] full;
  logic block_cmplt, ram_we, idle;
  logic [5:0] ram_waddr;
  logic [11:0] ram_wdata;
  dct1s_state_t state_o, state_i;
  logic [11:0] mem [2][64];
  int checks = 0, failures = 0;
  int unsigned npix = 0, nblk = 0;
  longint cyc = 0, last_cmplt = -1;
  bit hold_full = 0, in_on = 1;
  int n_spacing = 0;

  i_dct1s dut (.clk, .rst, .run, .halt, .din, .din_valid, .din_ready, .wsel, .full,
               .block_cmplt, .ram_we, .ram_waddr, .ram_wdata, .idle, .state_o, .state_i, .load);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  assign din = pix(npix / 64, npix % 64);
  assign din_valid = in_on && !rst;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (din_valid && din_ready) npix <= npix + 1;
    if (ram_we) mem[wsel][ram_waddr] <= ram_wdata;
    if (!rst && run && block_cmplt) begin
      if (last_cmplt >= 0 && nblk < 3) begin
        chk(cyc - last_cmplt == 64, $sformatf("block spacing %0d", cyc - last_cmplt));
        n_spacing++;
      end
      last_cmplt <= cyc;
      full[wsel] <= 1'b1;
      wsel <= ~wsel;
    end
  end

  // check a completed buffer one cycle after block_cmplt
  always @(posedge clk) begin
    if (!rst && run && block_cmplt) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++)
        for (int r = 0; r < 8; r++) begin
          real e; int g;
          e = 4.0 * ref_row(nblk, r, k);
          g = int'(signed'(mem[~wsel][k*8 + r]));
          chk((real'(g) - e) < 1.01 && (e - real'(g)) < 1.01,
              $sformatf("blk %0d r %0d k %0d got %0d exp %f", nblk, r, k, g, e));
        end
      nblk++;
      // release the buffer unless the test holds it
      if (!hold_full) full[~wsel] = 1'b0;
    end
  end

  initial begin
    dct1s_state_t saved;
    int nw;
    run = 1; halt = 0; load = 0; state_i = '0; wsel = 0; full = 0;
    repeat (3) @(negedge clk); rst = 0;
    wait (nblk == 3);
    chk(n_spacing == 2, "spacing measured");
    // buffer-full stall: hold both buffers full
    hold_full = 1;
    wait (nblk == 5);
    @(negedge clk);
    chk(full == 2'b11, "both full");
    nw = 0;
    repeat (40) begin @(negedge clk); if (ram_we) nw++; end
    chk(nw == 0, "no writes while next buffer full");
    chk(!din_ready, "back-pressure while stalled");
    hold_full = 0; full = 2'b00;
    // halt in the middle of block 6
    wait (npix == 6 * 64 + 21);
    @(negedge clk);
    halt = 1;
    #1 chk(!din_ready, "halt drops ready");
    nw = 0;
    repeat (12) begin @(negedge clk); if (ram_we) nw++; end
    chk(nw <= 8, "row in flight finishes");
    chk(idle, "idle after halt");
    saved = state_o;
    chk(saved.col == 4'(21 - 16) || saved.col == 4'(21 - 8 - 8), "saved fill count");
    // power loss: reset, restore
    rst = 1; @(negedge clk); rst = 0; halt = 0; run = 0;
    state_i = saved; load = 1; @(negedge clk); load = 0;
    chk(state_o == saved, "state restored");
    run = 1;
    wait (nblk == 8);
    in_on = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
