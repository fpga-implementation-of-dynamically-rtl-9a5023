// tb_uart_tx: sends random bytes and decodes the txd line in the testbench
// by sampling the middle of each bit time: start bit low, eight data bits
// LSB first, stop bit high, each exactly CLKS_PER_BIT clocks long.
module tb_uart_tx;
  localparam int CPB = 87;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic send, busy, txd;
  logic [7:0] data;
  uart_tx dut (.*);
  int checks = 0, failures = 0;

  initial begin
    logic [7:0] b, got;
    int t;
    send = 0; data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    checks++;
    if (txd !== 1'b1) begin failures++; $display("FAIL: line not idle high"); end
    for (int n = 0; n < 12; n++) begin
      b = 8'($urandom);
      @(negedge clk); data = b; send = 1; @(negedge clk); send = 0;
      t = 0;
      while (txd) begin @(negedge clk); t++; if (t > 5) break; end
      // now at the first clock of the start bit: go to its middle
      repeat (CPB / 2) @(negedge clk);
      checks++;
      if (txd) begin failures++; $display("FAIL byte %0d: no start bit", n); end
      for (int i = 0; i < 8; i++) begin
        repeat (CPB) @(negedge clk);
        got[i] = txd;
      end
      repeat (CPB) @(negedge clk);
      checks++;
      if (!txd) begin failures++; $display("FAIL byte %0d: no stop bit", n); end
      checks++;
      if (got != b) begin failures++; $display("FAIL byte %0d: %h expected %h", n, got, b); end
      while (busy) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
