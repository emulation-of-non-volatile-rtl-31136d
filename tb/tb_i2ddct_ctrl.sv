// tb_i2ddct_ctrl: the controller with the emulated NV memory and a
// testbench model of the buffer transfer block.
// Checks: cold start (no valid marker) goes Pull -> Halted; Halted -> Running
// when the energy is good; energy_low -> Pre-Checkpoint, which waits for both
// stages to be idle; Push writes marker 0 first, then the state words, the
// 128 TX words at NV_RAM_ADDR, then the valid marker, each access waiting for
// busy, then Halted; after a reset, Pull reads the checkpoint back: state_out
// equals the saved state, 128 RX words in order, one load cycle (Init) and
// Halted. Also a push cut by a reset leaves no valid marker.
module tb_i2ddct_ctrl;
  import nvl_pkg::*;
  logic clk = 0, rst = 1, nv_rst = 1;
  always #5 clk = ~clk;
  logic energy_low, s1_idle, s2_idle, load;
  sys_status_t status;
  ckpt_state_t state_in, state_out;
  logic pb_start_push, pb_start_pull, pb_tx_valid, pb_tx_ready, pb_rx_valid;
  logic [11:0] pb_tx_data, pb_rx_data;
  logic nv_en, nv_we, nv_busy;
  logic [7:0] nv_waddr, nv_raddr;
  logic [15:0] nv_wdata, nv_rdata;
  int checks = 0, failures = 0;
  int tx_i = 0, rx_i = 0, n_load = 0, n_wr = 0;
  logic [7:0] wr_addr [$];

  i2ddct_ctrl dut (.clk, .rst, .energy_low, .status, .s1_idle, .s2_idle, .state_in, .state_out, .load,
    .pb_start_push, .pb_start_pull, .pb_tx_valid, .pb_tx_data, .pb_tx_ready, .pb_rx_valid, .pb_rx_data,
    .nv_en, .nv_we, .nv_waddr, .nv_wdata, .nv_raddr, .nv_rdata, .nv_busy);

  nv_mem #(.AW(8), .DW(16), .DELAY_CYCLES(5)) u_nv (.clk, .rst(nv_rst), .en(nv_en), .we(nv_we),
    .waddr(nv_waddr), .wdata(nv_wdata), .raddr(nv_raddr), .rdata(nv_rdata), .busy(nv_busy));

  // transfer block model: TX word i = 3*i + 7, valid two cycles after start / take
  logic tx_on = 0;
  int tx_gap = 0;
  assign pb_tx_valid = tx_on && tx_gap == 0;
  assign pb_tx_data  = 12'(3 * tx_i + 7);
  always @(posedge clk) begin
    if (rst) tx_on <= 0;
    else if (pb_start_push) begin tx_on <= 1; tx_i <= 0; tx_gap <= 2; end
    else if (tx_on) begin
      if (tx_gap != 0) tx_gap <= tx_gap - 1;
      else if (pb_tx_ready) begin
        tx_i <= tx_i + 1; tx_gap <= 2;
        if (tx_i == 127) tx_on <= 0;
      end
    end
    if (pb_rx_valid) begin
      checks++;
      if (pb_rx_data != 12'(3 * rx_i + 7)) begin failures++; $display("rx %0d = %0d", rx_i, pb_rx_data); end
      rx_i <= rx_i + 1;
    end
    if (load) n_load <= n_load + 1;
    if (nv_en && !nv_busy && nv_we) wr_addr.push_back(nv_waddr);
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    ckpt_state_t saved;
    energy_low = 1; s1_idle = 0; s2_idle = 0; state_in = '0;
    repeat (3) @(negedge clk); rst = 0; nv_rst = 0;
    chk(status == ST_PULL, "starts in Pull");
    repeat (12) @(negedge clk);
    chk(status == ST_HALTED, "cold start halts");
    repeat (5) @(negedge clk);
    chk(status == ST_HALTED, "stays halted while energy low");
    energy_low = 0; @(negedge clk); @(negedge clk);
    chk(status == ST_RUNNING, "running");
    saved = '{s1: '{row: 64'h0123_4567_89AB_CDEF, col: 4'd5, rowi: 3'd6}, s2: '{rowi: 3'd3},
              db: '{wsel: 1'b1, rsel: 1'b0, full: 2'b01}};
    state_in = saved;
    energy_low = 1; @(negedge clk); @(negedge clk);
    chk(status == ST_PRECKPT, "pre-checkpoint");
    repeat (10) @(negedge clk);
    chk(status == ST_PRECKPT, "waits for idle stages");
    s1_idle = 1; s2_idle = 1;
    @(negedge clk); @(negedge clk);
    chk(status == ST_PUSH, "push");
    wait (status == ST_HALTED);
    chk(wr_addr.size() == 2 + CKPT_WORDS + 128, $sformatf("NV writes %0d", wr_addr.size()));
    chk(wr_addr[0] == NV_MARK_ADDR && wr_addr[wr_addr.size()-1] == NV_MARK_ADDR, "marker first and last");
    for (int i = 0; i < 128; i++) begin
      chk(wr_addr[1 + CKPT_WORDS + i] == NV_RAM_ADDR + 8'(i), "RAM word placement");
      chk(u_nv.u_ram.mem[int'(NV_RAM_ADDR) + i] == 16'(3 * i + 7), "RAM word stored");
    end
    chk(u_nv.u_ram.mem[NV_MARK_ADDR] == NV_MARK_VALID, "marker valid");
    // power failure, restore
    state_in = '0;
    rst = 1; nv_rst = 1; repeat (3) @(negedge clk); rst = 0; nv_rst = 0;
    wait (status == ST_INIT);
    chk(load && state_out == saved, "restored state words");
    @(negedge clk); @(negedge clk);
    chk(status == ST_HALTED && n_load == 1, "one init cycle, then halted");
    chk(rx_i == 128, $sformatf("rx words %0d", rx_i));
    // a push cut by reset leaves no valid marker
    energy_low = 0; repeat (3) @(negedge clk);
    energy_low = 1;
    wait (status == ST_PUSH);
    repeat (200) @(negedge clk);
    rst = 1; nv_rst = 1; repeat (3) @(negedge clk);
    chk(u_nv.u_ram.mem[NV_MARK_ADDR] != NV_MARK_VALID, "torn push not valid");
    rst = 0; nv_rst = 0; rx_i = 0;
    repeat (20) @(negedge clk);
    chk(status == ST_HALTED && n_load == 1, "torn checkpoint not restored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
