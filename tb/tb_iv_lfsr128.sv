// tb_iv_lfsr128: compares the IV generator with an independent step model
// of the 128-bit LFSR (taps 128, 126, 101, 99), and checks that a weak
// value (all 16 bytes equal) is skipped rather than presented as valid.
module tb_iv_lfsr128;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic seed_load, next, valid;
  logic [127:0] seed, iv;
  iv_lfsr128 dut (.*);
  int checks = 0, failures = 0;

  // model: bit n of the polynomial numbering is v[n-1]
  function automatic logic [127:0] model_step(input logic [127:0] v);
    logic b = v[127] ^ v[125] ^ v[100] ^ v[98];
    return (v << 1) | 128'(b);
  endfunction

  initial begin
    logic [127:0] m, pre;
    seed_load = 0; next = 0; seed = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m = 128'h0123456789abcdef_fedcba9876543210;
    @(negedge clk); seed = m; seed_load = 1; @(negedge clk); seed_load = 0;
    for (int i = 0; i < 300; i++) begin
      checks++;
      if (iv != m || !valid) begin failures++; $display("FAIL step %0d: %h expected %h", i, iv, m); end
      next = 1; @(negedge clk); next = 0;
      m = model_step(m);
    end
    // seed one step before a weak value: the weak value 0x5555..55 is
    // reached from pre = 0x5555..55 >> 1 with the right bit 127
    for (int top = 0; top < 2; top++) begin
      pre = {1'(top), 127'h2aaa_aaaa_aaaa_aaaa_aaaa_aaaa_aaaa_aaaa};
      if (model_step(pre) == {16{8'h55}}) break;
    end
    checks++;
    if (model_step(pre) != {16{8'h55}}) begin failures++; $display("FAIL: test setup"); end
    @(negedge clk); seed = pre; seed_load = 1; @(negedge clk); seed_load = 0;
    next = 1; @(negedge clk); next = 0;
    checks++;
    if (valid && iv == {16{8'h55}}) begin failures++; $display("FAIL: weak IV presented as valid"); end
    while (!valid) @(negedge clk);
    // first value after pre that is not weak (0xaa..aa follows 0x55..55)
    m = model_step(pre);
    while (m == {16{m[7:0]}}) m = model_step(m);
    checks++;
    if (iv != m) begin failures++; $display("FAIL: weak IV not skipped to the next value"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
