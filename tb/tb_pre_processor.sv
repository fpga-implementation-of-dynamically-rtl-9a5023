// tb_pre_processor: feeds instruction and segment words through two
// testbench FIFO models and acts as the cipher core. Checks the key
// load / activate handshake in both orders, the nonce, the 16-byte blocks
// (contents, zero fill, byte counts, eot / eoi), empty AD and message
// segments, the expected tag of a decryption, the segment sizes, and
// protocol-error detection.
module tb_pre_processor;
  import hop_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [63:0]  pdi_q[$], sdi_q[$];
  logic [63:0]  pdi_data, sdi_data;
  logic         pdi_empty, pdi_rd, sdi_empty, sdi_rd;
  logic [127:0] key, npub, exp_tag;
  logic         key_ready, key_needs_update, key_updated, bdi_proc, proc_ack, core_busy;
  logic         decrypt, bdi_valid, bdi_read, exp_tag_valid, proto_err;
  logic [7:0]   msg_id;
  logic [15:0]  ad_size, msg_size;
  bdi_t         bdi;

  pre_processor dut (.*);

  assign pdi_empty = (pdi_q.size() == 0);
  assign sdi_empty = (sdi_q.size() == 0);
  assign pdi_data  = pdi_empty ? 64'h0 : pdi_q[0];
  assign sdi_data  = sdi_empty ? 64'h0 : sdi_q[0];
  always @(posedge clk) begin
    if (pdi_rd && !pdi_empty) void'(pdi_q.pop_front());
    if (sdi_rd && !sdi_empty) void'(sdi_q.pop_front());
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // blocks taken by the "core"
  bdi_t blocks[$];
  always @(posedge clk) if (bdi_valid && bdi_read) blocks.push_back(bdi);
  always @(negedge clk) bdi_read = bdi_valid && ($urandom % 3 != 0);

  localparam logic [63:0] K0 = 64'hd7b1cb5221d16d92, K1 = 64'hbb910d157c6f1c04;

  initial begin
    key_updated = 0; proc_ack = 0; core_busy = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // ---- load key, then activate
    sdi_q = '{ins_word(8'h01, OP_LDKEY), hdr_word(8'h01, ST_KEY, 1'b1, 1'b1, 16'd16), K0, K1};
    repeat (8) @(negedge clk);
    check("key", key, {K0, K1});
    check("key_ready after load", key_ready, 1);
    check("needs_update before activate", key_needs_update, 0);
    pdi_q.push_back(ins_word(8'h01, OP_ACTKEY));
    repeat (3) @(negedge clk);
    check("needs_update after activate", key_needs_update, 1);
    key_updated = 1; @(negedge clk); key_updated = 0; @(negedge clk);
    check("flags cleared by key_updated", {key_ready, key_needs_update}, 0);
    // ---- activate first, then load (other order)
    pdi_q.push_back(ins_word(8'h02, OP_ACTKEY));
    repeat (3) @(negedge clk);
    check("needs_update, no key yet", {key_needs_update, key_ready}, 2'b10);
    sdi_q = '{ins_word(8'h02, OP_LDKEY), hdr_word(8'h02, ST_KEY, 1'b1, 1'b1, 16'd16), K1, K0};
    repeat (8) @(negedge clk);
    check("second key", key, {K1, K0});
    check("both flags", {key_needs_update, key_ready}, 2'b11);
    key_updated = 1; @(negedge clk); key_updated = 0;
    // ---- encryption: AD 20 bytes, message 9 bytes
    pdi_q.push_back(ins_word(8'h07, OP_ENC));
    pdi_q.push_back(hdr_word(8'h07, ST_NPUB, 1'b0, 1'b1, 16'd16));
    pdi_q.push_back(64'h0001020304050607);
    pdi_q.push_back(64'h08090a0b0c0d0e0f);
    pdi_q.push_back(hdr_word(8'h07, ST_AD, 1'b0, 1'b1, 16'd20));
    pdi_q.push_back(64'ha0a1a2a3a4a5a6a7);
    pdi_q.push_back(64'ha8a9aaabacadaeaf);
    pdi_q.push_back(64'hb0b1b2b3ffffffff);      // 4 valid bytes, rest must be cleared
    pdi_q.push_back(hdr_word(8'h07, ST_MSG, 1'b1, 1'b1, 16'd9));
    pdi_q.push_back(64'hc0c1c2c3c4c5c6c7);
    pdi_q.push_back(64'hc8eeeeeeeeeeeeee);
    while (!bdi_proc) @(negedge clk);
    check("npub", npub, 128'h000102030405060708090a0b0c0d0e0f);
    check("decrypt flag", decrypt, 0);
    check("msg id", msg_id, 8'h07);
    @(negedge clk); proc_ack = 1; core_busy = 1; @(negedge clk); proc_ack = 0;
    check("bdi_proc dropped after ack", bdi_proc, 0);
    while (blocks.size() < 3) @(negedge clk);
    check("AD block 0", blocks[0].data, 128'ha0a1a2a3a4a5a6a7a8a9aaabacadaeaf);
    check("AD block 0 flags", {blocks[0].bytes, blocks[0].ad, blocks[0].eot, blocks[0].eoi}, {5'd16, 3'b100});
    check("AD block 1 zero fill", blocks[1].data, 128'hb0b1b2b3000000000000000000000000);
    check("AD block 1 flags", {blocks[1].bytes, blocks[1].ad, blocks[1].eot, blocks[1].eoi}, {5'd4, 3'b110});
    check("MSG block", blocks[2].data, 128'hc0c1c2c3c4c5c6c7c800000000000000);
    check("MSG block flags", {blocks[2].bytes, blocks[2].ad, blocks[2].eot, blocks[2].eoi}, {5'd9, 3'b011});
    check("sizes", {ad_size, msg_size}, {16'd20, 16'd9});
    // ---- decryption with empty AD and empty message, then tag
    blocks.delete();
    pdi_q.push_back(ins_word(8'h08, OP_DEC));
    pdi_q.push_back(hdr_word(8'h08, ST_NPUB, 1'b0, 1'b1, 16'd16));
    pdi_q.push_back(64'h1111111111111111);
    pdi_q.push_back(64'h2222222222222222);
    pdi_q.push_back(hdr_word(8'h08, ST_AD, 1'b0, 1'b1, 16'd0));
    pdi_q.push_back(hdr_word(8'h08, ST_CT, 1'b1, 1'b1, 16'd0));
    pdi_q.push_back(hdr_word(8'h08, ST_TAG, 1'b1, 1'b1, 16'd16));
    pdi_q.push_back(64'h3333333333333333);
    pdi_q.push_back(64'h4444444444444444);
    repeat (10) @(negedge clk);
    check("waits while core busy", pdi_q.size(), 9);
    core_busy = 0;
    while (!bdi_proc) @(negedge clk);
    check("decrypt flag", decrypt, 1);
    @(negedge clk); proc_ack = 1; @(negedge clk); proc_ack = 0;
    while (!exp_tag_valid) @(negedge clk);
    check("expected tag", exp_tag, 128'h33333333333333334444444444444444);
    check("empty segments", blocks.size(), 2);
    check("empty AD block", {blocks[0].bytes, blocks[0].ad, blocks[0].eot, blocks[0].eoi}, {5'd0, 3'b110});
    check("empty CT block", {blocks[1].bytes, blocks[1].ad, blocks[1].eot, blocks[1].eoi}, {5'd0, 3'b011});
    check("no protocol error", proto_err, 0);
    // ---- wrong segment type
    pdi_q.push_back(ins_word(8'h09, OP_ENC));
    pdi_q.push_back(hdr_word(8'h09, ST_AD, 1'b0, 1'b1, 16'd16));
    repeat (6) @(negedge clk);
    check("protocol error flagged", proto_err, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
