// tb_fwft_fifo: random writes and reads against a queue model; checks
// that the head word is visible without a read strobe, the full and empty
// flags, and that writes when full and reads when empty are ignored.
module tb_fwft_fifo;
  localparam int WIDTH = 256, DEPTH = 32;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr, rd, full, empty;
  logic [WIDTH-1:0] wdata, rdata;
  logic [$clog2(DEPTH+1)-1:0] count;
  fwft_fifo dut (.*);
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q[$];

  initial begin
    int fills = 0, empties = 0;
    bit do_wr, do_rd;
    wr = 0; rd = 0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      // first word falls through
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH) || count != q.size()) begin
        failures++; $display("FAIL cycle %0d: flags empty=%0b full=%0b count=%0d model %0d", i, empty, full, count, q.size());
      end
      if (q.size() != 0) begin
        checks++;
        if (rdata != q[0]) begin failures++; $display("FAIL cycle %0d: head %h expected %h", i, rdata, q[0]); end
      end
      if (full) fills++;
      if (empty) empties++;
      // bias phases toward filling and draining
      wr = ($urandom % 100) < (((i / 500) % 2) ? 30 : 75);
      rd = ($urandom % 100) < (((i / 500) % 2) ? 75 : 30);
      wdata = {8{$urandom}};
      do_wr = wr && q.size() < DEPTH;
      do_rd = rd && q.size() != 0;
      @(posedge clk);
      #1;
      if (do_rd) void'(q.pop_front());
      if (do_wr) q.push_back(wdata);
    end
    checks++;
    if (fills == 0 || empties == 0) begin failures++; $display("FAIL: full %0d / empty %0d never reached", fills, empties); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
