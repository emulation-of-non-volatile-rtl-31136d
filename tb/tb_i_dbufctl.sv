// tb_i_dbufctl: drives block_cmplt and rd_done in legal random order against
// a model of the ping-pong buffers: full flags and both selects must follow
// the model; run low freezes the controller; load restores a saved state.
module tb_i_dbufctl;
  import nvl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic run, block_cmplt, rd_done, wsel, rsel, load;
  logic [1:0] full;
  dbuf_state_t state_o, state_i;
  logic m_w, m_r;
  logic [1:0] m_f;
  int checks = 0, failures = 0;

  i_dbufctl dut (.clk, .rst, .run, .block_cmplt, .rd_done, .wsel, .rsel, .full, .state_o, .state_i, .load);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    run = 1; block_cmplt = 0; rd_done = 0; load = 0; state_i = '0;
    m_w = 0; m_r = 0; m_f = 0;
    repeat (3) @(negedge clk); rst = 0;
    for (int t = 0; t < 2000; t++) begin
      bit bc, rd;
      bc = !m_f[m_w] && ($urandom % 3 == 0);
      rd = m_f[m_r] && ($urandom % 3 == 0);
      run = (t % 50) != 7;
      block_cmplt = bc; rd_done = rd;
      @(negedge clk);
      if (run) begin
        if (bc) begin m_f[m_w] = 1; m_w = ~m_w; end
        if (rd) begin m_f[m_r] = 0; m_r = ~m_r; end
      end
      chk(wsel == m_w && rsel == m_r && full == m_f, $sformatf("t %0d state", t));
      chk(state_o == '{wsel: m_w, rsel: m_r, full: m_f}, "state_o");
    end
    block_cmplt = 0; rd_done = 0;
    rst = 1; @(negedge clk); rst = 0;
    chk(full == 0 && !wsel && !rsel, "reset");
    state_i = '{wsel: 1'b1, rsel: 1'b0, full: 2'b01}; load = 1; @(negedge clk); load = 0;
    chk(wsel && !rsel && full == 2'b01, "load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
