// tb_post_processor: plays the cipher core and the DO FIFO (with random
// full periods) and checks the output word stream: the decryption
// request built from an encryption (instruction, NPUB, AD copied from the
// snooped blocks, CT with cleared tail bytes, TAG), plaintext released
// only after a passing tag with a success status, a failing tag giving only
// a failure status, and a plaintext too long for the buffer being dropped.
module tb_post_processor;
  import hop_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         proc_start, decrypt, snoop_take, bdo_ready, do_wr, do_full, done, auth_ok, idle;
  logic [7:0]   msg_id;
  logic [127:0] npub;
  logic [15:0]  ad_size, msg_size;
  bdi_t         snoop_bdi;
  core_out_t    core;
  logic [63:0]  do_data;

  post_processor dut (.*);

  logic [63:0] words[$];
  int dones = 0;
  always @(posedge clk) begin
    if (do_wr) words.push_back(do_data);
    if (done) dones++;
  end
  always @(negedge clk) do_full = ($urandom % 4 == 0);

  int checks = 0, failures = 0;
  task automatic expect_words(input string what, input logic [63:0] exp[$]);
    checks++;
    if (words.size() != exp.size()) begin
      failures++; $display("FAIL %s: %0d words, expected %0d", what, words.size(), exp.size());
      return;
    end
    foreach (exp[i]) if (words[i] != exp[i]) begin
      failures++; $display("FAIL %s: word %0d %h expected %h", what, i, words[i], exp[i]);
      return;
    end
  endtask

  task automatic put_bdo(input logic [127:0] d, input logic [4:0] n);
    @(negedge clk);
    core.bdo = d; core.bdo_bytes = n; core.bdo_valid = 1'b1;
    @(posedge clk);
    while (!bdo_ready) @(posedge clk);
    @(negedge clk); core.bdo_valid = 1'b0;
  endtask

  task automatic snoop(input logic [127:0] d, input logic [4:0] n);
    @(negedge clk);
    while (!bdo_ready) @(negedge clk);
    snoop_bdi = '{data: d, bytes: n, ad: 1'b1, eot: 1'b0, eoi: 1'b0}; snoop_take = 1'b1;
    @(negedge clk); snoop_take = 1'b0;
  endtask

  task automatic begin_msg(input bit dec, input logic [15:0] as, input logic [15:0] ms);
    words.delete();
    @(negedge clk);
    decrypt = dec; ad_size = as; msg_size = ms; proc_start = 1'b1;
    @(negedge clk); proc_start = 1'b0;
  endtask

  task automatic wait_idle();
    repeat (2) @(negedge clk);
    while (!idle) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    logic [63:0] e[$];
    proc_start = 0; decrypt = 0; snoop_take = 0; snoop_bdi = '0; core = '0;
    msg_id = 8'h05; npub = 128'h00112233445566778899aabbccddeeff; ad_size = 0; msg_size = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- encryption
    begin_msg(1'b0, 16'd20, 16'd9);
    snoop(128'ha0a1a2a3a4a5a6a7a8a9aaabacadaeaf, 5'd16);
    snoop(128'hb0b1b2b3000000000000000000000000, 5'd4);
    put_bdo(128'hc0c1c2c3c4c5c6c7c800000000000000, 5'd9);
    @(negedge clk);
    core.tag = 128'h0f0e0d0c0b0a09080706050403020100; core.tag_valid = 1'b1;
    @(posedge clk); while (!bdo_ready) @(posedge clk);
    @(negedge clk); core.tag_valid = 1'b0;
    wait_idle();
    e = '{ins_word(8'h05, OP_DEC), hdr_word(8'h05, ST_NPUB, 1'b0, 1'b1, 16'd16),
          64'h0011223344556677, 64'h8899aabbccddeeff,
          hdr_word(8'h05, ST_AD, 1'b0, 1'b1, 16'd20),
          64'ha0a1a2a3a4a5a6a7, 64'ha8a9aaabacadaeaf, 64'hb0b1b2b300000000,
          hdr_word(8'h05, ST_CT, 1'b0, 1'b1, 16'd9),
          64'hc0c1c2c3c4c5c6c7, 64'hc800000000000000,
          hdr_word(8'h05, ST_TAG, 1'b1, 1'b1, 16'd16),
          64'h0f0e0d0c0b0a0908, 64'h0706050403020100};
    expect_words("encryption stream", e);
    checks++; if (dones != 1) begin failures++; $display("FAIL: done pulses %0d", dones); end
    // ---- decryption, tag passes
    begin_msg(1'b1, 16'd0, 16'd20);
    put_bdo(128'h101112131415161718191a1b1c1d1e1f, 5'd16);
    put_bdo(128'h20212223000000000000000000000000, 5'd4);
    repeat (5) @(negedge clk);
    checks++; if (words.size() != 0) begin failures++; $display("FAIL: plaintext released before the verdict"); end
    core.auth_valid = 1'b1; core.auth_done = 1'b1; @(negedge clk); core.auth_done = 1'b0;
    wait_idle();
    e = '{hdr_word(8'h05, ST_MSG, 1'b1, 1'b1, 16'd20),
          64'h1011121314151617, 64'h18191a1b1c1d1e1f, 64'h2021222300000000,
          {8'h05, STATUS_OK, 48'h0}};
    expect_words("authentic plaintext", e);
    checks++; if (!auth_ok) begin failures++; $display("FAIL: auth_ok low"); end
    // ---- decryption, tag fails
    begin_msg(1'b1, 16'd0, 16'd20);
    put_bdo(128'h101112131415161718191a1b1c1d1e1f, 5'd16);
    put_bdo(128'h20212223000000000000000000000000, 5'd4);
    core.auth_valid = 1'b0; core.auth_done = 1'b1; @(negedge clk); core.auth_done = 1'b0;
    wait_idle();
    e = '{{8'h05, STATUS_FAIL, 48'h0}};
    expect_words("forged message", e);
    checks++; if (auth_ok) begin failures++; $display("FAIL: auth_ok high"); end
    // ---- decryption, plaintext longer than the buffer
    begin_msg(1'b1, 16'd0, 16'd320);
    for (int i = 0; i < 20; i++) put_bdo({4{32'(i)}}, 5'd16);
    core.auth_valid = 1'b1; core.auth_done = 1'b1; @(negedge clk); core.auth_done = 1'b0;
    wait_idle();
    e = '{{8'h05, STATUS_FAIL, 48'h0}};
    expect_words("buffer overflow", e);
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
