// tb_uart_rx: drives the rxd line with frames built in the testbench
// (with a bit time a few percent off the receiver's) and checks the
// received bytes, a frame with a missing stop bit (frame_err) and a short
// glitch on the idle line (ignored).
module tb_uart_rx;
  localparam int CPB = 87;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rxd, valid, frame_err;
  logic [7:0] data;
  uart_rx dut (.*);
  int checks = 0, failures = 0;
  logic [7:0] got[$];
  int errs = 0;

  always @(posedge clk) begin
    if (rst_n && valid) got.push_back(data);
    if (rst_n && frame_err) errs++;
  end

  task automatic frame(input logic [7:0] b, input bit stop, input int bit_clks);
    rxd = 1'b0;
    repeat (bit_clks) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (bit_clks) @(negedge clk);
    end
    rxd = stop;
    repeat (bit_clks) @(negedge clk);
    rxd = 1'b1;
    repeat (2 * bit_clks) @(negedge clk);
  endtask

  initial begin
    logic [7:0] sent[$];
    rxd = 1'b1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int n = 0; n < 10; n++) begin
      sent.push_back(8'($urandom));
      frame(sent[$], 1'b1, (n % 2) ? CPB + 3 : CPB - 3);
    end
    // glitch: two clocks low
    rxd = 1'b0; repeat (2) @(negedge clk); rxd = 1'b1;
    repeat (3 * CPB) @(negedge clk);
    // missing stop bit
    frame(8'h3c, 1'b0, CPB);
    // and a good frame after it
    sent.push_back(8'h96);
    frame(8'h96, 1'b1, CPB);
    repeat (CPB) @(negedge clk);
    checks++;
    if (got.size() != sent.size()) begin
      failures++; $display("FAIL: %0d bytes received, %0d sent: %p / %p", got.size(), sent.size(), got, sent);
    end else
      foreach (sent[i]) begin
        checks++;
        if (got[i] != sent[i]) begin failures++; $display("FAIL byte %0d: %h expected %h", i, got[i], sent[i]); end
      end
    checks++;
    if (errs != 1) begin failures++; $display("FAIL: %0d frame errors, expected 1", errs); end
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
