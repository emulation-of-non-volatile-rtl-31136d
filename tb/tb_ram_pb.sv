// tb_ram_pb: push: the block reads the 128 words of a testbench RAM model
// (one-cycle read latency) and offers them on TX; the testbench takes them
// after random delays and checks order and value, and that done pulses once
// after the last word. Pull: 128 RX words with random gaps must be written to
// consecutive addresses, followed by done.
module tb_ram_pb;
  import nvl_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic start_push, start_pull, ram_we, tx_valid, tx_ready, rx_valid, done;
  logic [6:0] ram_waddr, ram_raddr;
  logic [11:0] ram_wdata, ram_rdata, tx_data, rx_data;
  logic [11:0] mem [128];
  int checks = 0, failures = 0;
  int ndone = 0;

  ram_pb dut (.clk, .rst, .start_push, .start_pull, .ram_we, .ram_waddr, .ram_wdata,
              .ram_raddr, .ram_rdata, .tx_valid, .tx_data, .tx_ready, .rx_valid, .rx_data, .done);

  always @(posedge clk) begin
    ram_rdata <= mem[ram_raddr];
    if (ram_we) mem[ram_waddr] <= ram_wdata;
    if (done && !rst) ndone++;
  end

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; if (failures < 10) $display("FAIL %s", m); end
  endtask

  initial begin
    logic [11:0] src [128];
    for (int i = 0; i < 128; i++) begin mem[i] = 12'(i * 29 + 5); src[i] = 12'($urandom); end
    start_push = 0; start_pull = 0; tx_ready = 0; rx_valid = 0; rx_data = 0;
    repeat (3) @(negedge clk); rst = 0;
    start_push = 1; @(negedge clk); start_push = 0;
    for (int i = 0; i < 128; i++) begin
      while (!tx_valid) @(negedge clk);
      repeat ($urandom % 3) @(negedge clk);
      chk(tx_valid && tx_data == 12'(i * 29 + 5), $sformatf("tx word %0d = %0d", i, tx_data));
      tx_ready = 1; @(negedge clk); tx_ready = 0;
    end
    repeat (2) @(negedge clk);
    chk(ndone == 1, $sformatf("done after push (%0d)", ndone));
    chk(!tx_valid, "idle after push");
    start_pull = 1; @(negedge clk); start_pull = 0;
    for (int i = 0; i < 128; i++) begin
      repeat ($urandom % 3) @(negedge clk);
      rx_valid = 1; rx_data = src[i]; @(negedge clk); rx_valid = 0;
    end
    repeat (2) @(negedge clk);
    chk(ndone == 2, "done after pull");
    for (int i = 0; i < 128; i++) chk(mem[i] == src[i], $sformatf("pulled word %0d", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
