// tb_aes128_core: checks AES-128 encryption and decryption against the
// FIPS-197 example vectors (appendix B and C.1) and against a round trip on
// random blocks, and checks the 10-cycle block latency.
module tb_aes128_core;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic key_load, key_ready, start, decrypt, done, busy;
  logic [127:0] key, din, dout;
  aes128_core dut (.*);
  int checks = 0, failures = 0;

  task automatic load_key(input logic [127:0] k);
    @(negedge clk); key = k; key_load = 1'b1;
    @(negedge clk); key_load = 1'b0;
    while (!key_ready) @(negedge clk);
  endtask

  task automatic crypt(input bit d, input logic [127:0] x, output logic [127:0] y, output int cyc);
    @(negedge clk); din = x; decrypt = d; start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    y = dout;
  endtask

  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [127:0] y, z, r;
    int cyc;
    key_load = 0; start = 0; decrypt = 0; key = '0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    load_key(128'h2b7e151628aed2a6abf7158809cf4f3c);
    crypt(0, 128'h3243f6a8885a308d313198a2e0370734, y, cyc);
    check("FIPS-197 B encrypt", y, 128'h3925841d02dc09fbdc118597196a0b32);
    checks++;
    // start is sampled on the first edge, done follows 10 round edges later
    if (cyc != 11) begin failures++; $display("FAIL latency %0d cycles, expected 11", cyc); end
    crypt(1, y, z, cyc);
    check("FIPS-197 B decrypt", z, 128'h3243f6a8885a308d313198a2e0370734);
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    crypt(0, 128'h00112233445566778899aabbccddeeff, y, cyc);
    check("FIPS-197 C.1 encrypt", y, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    crypt(1, y, z, cyc);
    check("FIPS-197 C.1 decrypt", z, 128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < 8; i++) begin
      r = {$urandom, $urandom, $urandom, $urandom};
      crypt(0, r, y, cyc);
      crypt(1, y, z, cyc);
      check("round trip", z, r);
    end
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
