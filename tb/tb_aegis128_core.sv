// tb_aegis128_core: self-checking testbench for aegis128_core (AEGIS-128).
//
// Each vector (key, nonce, associated data, message) is encrypted and the
// cipher text and tag are compared with values computed independently
// from the published algorithm definition. The cipher text is then
// decrypted, once with the right tag (plaintext and a passing verdict
// expected) and once with a corrupted tag (a failing verdict expected).
// Vectors run with the post-processor always ready and with random
// back-pressure on bdo_ready. Blocks are 16 bytes, the last one partial.
module tb_aegis128_core;
  import hop_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  core_in_t  cin;
  core_out_t cout;
  aegis128_core dut (.clk(clk), .rst_n(rst_n), .cin(cin), .cout(cout));

  int checks = 0, failures = 0;
  localparam int NV = 8;
  localparam logic [127:0]    KEYS  [NV] = '{128'h56c069d12819ada0012b66bf29e51bcd, 128'hd8660e43a23dc5c9a526b86b1c018b96, 128'he32cfe3af0fdd6b12d04bf3b1c1aebf1, 128'h18aa822e863d64de94868a626bc6245b, 128'h2075473c74c598b82db0052e253f88ef, 128'hbc97f46f6bfd4b40d832e29878accec7, 128'h040ea35885c5dc21c4a02c3cce5c027c, 128'h694669783566a72e5fdf08080e17913e};
  localparam logic [127:0]    NPUBS [NV] = '{128'h62c9fcf8b5f26478501fd30171632458, 128'hc462e5da21c4edcc5530ea032ab401b5, 128'h33f32a97f8c0453e701681e39a1a1edc, 128'h5bd8b4128b88315019bd442106f5d2bb, 128'hb10b43163b915b507f6e507d7cd2cb66, 128'hfd30ceebd33b7feb82e81457d815a314, 128'heee52a556cc9d746411b5b05ee540e61, 128'h7d30cda32a744beb8ec614ad330e31ec};
  localparam logic [8*48-1:0] ADS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h9e48068ce600000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h890bd838c9adfa2ba541e0b1a8a489470000000000000000000000000000000000000000000000000000000000000000, 384'ha6444587744e210e417ce2de3762f1b27496727500000000000000000000000000000000000000000000000000000000, 384'hefd7172fa3960c80c2ec52e9795c19e0e2acf1f1c971a41e9602651d4ddc55fdcd3bc6b69a8dc35b81b6df8d1851c734, 384'h514da1000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h5176995734245201a892c1960226c6caab00000000000000000000000000000000000000000000000000000000000000};
  localparam logic [8*48-1:0] PTS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h7237f06ba48b7feea574836309c869ff0000000000000000000000000000000000000000000000000000000000000000, 384'hfdb18fd967aaff0000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h5810970304bd9ae7321d64b7a8c288431fd724cd843c950ee86db68b55dcf12300000000000000000000000000000000, 384'h440fcc0f9fa0ebaf0018a0eefab2cc7574bebbeaab4804d4df7167030b20d53350000000000000000000000000000000, 384'hf970e4e830a9a1bd453bf819a2a7cb3a3ecbae49d2e7ffa0a220517cea346d2e6ac207179a29a55c926ec75f35d824d8, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hf0fc416122c95acf216bad08c2c56e000000000000000000000000000000000000000000000000000000000000000000};
  localparam logic [8*48-1:0] CTS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hea9576bc16597d78461a7dd74127d5a30000000000000000000000000000000000000000000000000000000000000000, 384'h470969cf483a3f0000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hf533b03815e3ce98a9c9d11e473fc5b4e712a34208e166566fb48f4898904f5f00000000000000000000000000000000, 384'h520ebc0e7dd5291c7b9f56eeb9e5e80d46e5d71b11fb002f80a6e7bb10cb90ccaf000000000000000000000000000000, 384'hfb6fd2bb821da0080c2dba6c0e532ac47aaf79847c7a2a993b87c53f26d08a15be81e8da6cfed3b9741c978a78a66506, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h1fee0c461f4e661ef7484e05521372000000000000000000000000000000000000000000000000000000000000000000};
  localparam logic [127:0]    TAGS  [NV] = '{128'h18772c7536db4b83357f84011102cf92, 128'h4912351c1182d9f7aa603888ba5d1273, 128'ha2b8fe79df22b12fa8a86f1c90372d62, 128'h1aabfb5cd48aca671e114eb3000daccd, 128'h6f48352ac74122bf1c0fa1aefb101454, 128'hd51ad2f2f3baf27f959191031621d823, 128'h3efd31bc4d02ea2a61272329c3cbdeac, 128'h34abe92645865887f3d297e2a44f653e};
  localparam int              ADL   [NV] = '{0, 0, 5, 16, 20, 48, 3, 17};
  localparam int              PL    [NV] = '{0, 16, 7, 32, 33, 48, 0, 15};

  logic [7:0]   got[$];
  logic [127:0] got_tag;
  logic         got_tag_v, got_auth, got_auth_v;
  bit           stall;
  int           cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cout.bdo_valid && cin.bdo_ready)
      for (int k = 0; k < int'(cout.bdo_bytes); k++) got.push_back(cout.bdo[127-8*k -: 8]);
    if (cout.tag_valid && cin.bdo_ready && !cout.bdo_valid) begin
      got_tag   <= cout.tag;
      got_tag_v <= 1'b1;
    end
    if (cout.auth_done) begin
      got_auth   <= cout.auth_valid;
      got_auth_v <= 1'b1;
    end
  end

  always @(negedge clk) cin.bdo_ready <= stall ? 1'($urandom % 2) : 1'b1;

  function automatic logic [127:0] block_of(input logic [8*48-1:0] v, input int first, input int n);
    logic [127:0] b = '0;
    for (int k = 0; k < n; k++) b[127-8*k -: 8] = v[8*48-1-8*(first+k) -: 8];
    return b;
  endfunction

  task automatic send_block(input bdi_t b);
    @(negedge clk);
    cin.bdi       = b;
    cin.bdi_valid = 1'b1;
    forever begin
      #1;
      if (cout.bdi_read) break;
      @(negedge clk);
    end
    @(posedge clk);
    #1 cin.bdi_valid = 1'b0;
  endtask

  task automatic send_segment(input logic [8*48-1:0] v, input int len, input bit ad, input bit last);
    bdi_t b;
    int   n;
    if (len == 0) begin
      b = '{data: '0, bytes: 5'd0, ad: ad, eot: 1'b1, eoi: last};
      send_block(b);
    end
    for (int i = 0; i < len; i += 16) begin
      n = (len - i > 16) ? 16 : len - i;
      b = '{data: block_of(v, i, n), bytes: 5'(n), ad: ad, eot: (i + 16 >= len), eoi: last && (i + 16 >= len)};
      send_block(b);
    end
  endtask

  task automatic run(input int v, input bit dec, input bit bad_tag, output int cycles);
    int t0;
    got.delete();
    got_tag_v = 1'b0;
    got_auth_v = 1'b0;
    @(negedge clk);
    cin.key           = KEYS[v];
    cin.npub          = NPUBS[v];
    cin.decrypt       = dec;
    cin.exp_tag       = TAGS[v] ^ (bad_tag ? 128'h1 : 128'h0);
    cin.exp_tag_valid = dec;
    cin.start         = 1'b1;
    t0 = cyc;
    @(negedge clk);
    cin.start = 1'b0;
    send_segment(ADS[v], ADL[v], 1'b1, 1'b0);
    send_segment(dec ? CTS[v] : PTS[v], PL[v], 1'b0, 1'b1);
    while (!(dec ? got_auth_v : got_tag_v)) @(posedge clk);
    cycles = cyc - t0;
    #1;
  endtask

  function automatic int nblk(input int len);
    return (len == 0) ? 1 : (len + 15) / 16;
  endfunction

  initial begin
    int cycles, bound, nad, nm;
    cin = '0;
    stall = 1'b0;
    cyc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      stall = (pass == 1);
      for (int v = 0; v < NV; v++) begin
        nad = nblk(ADL[v]);
        nm  = nblk(PL[v]);
        // encryption
        run(v, 1'b0, 1'b0, cycles);
        checks++;
        if (got.size() != PL[v]) begin
          failures++;
          $display("FAIL v%0d: %0d cipher text bytes, expected %0d", v, got.size(), PL[v]);
        end else begin
          for (int k = 0; k < PL[v]; k++)
            if (got[k] != CTS[v][8*48-1-8*k -: 8]) begin
              failures++;
              $display("FAIL v%0d: cipher text byte %0d %h expected %h", v, k, got[k], CTS[v][8*48-1-8*k -: 8]);
              break;
            end
        end
        checks++;
        if (got_tag != TAGS[v]) begin
          failures++;
          $display("FAIL v%0d: tag %h expected %h", v, got_tag, TAGS[v]);
        end
        bound = 10 + 7 + 3 + nad + nm;
        if (!stall && bound > 0) begin
          checks++;
          if (cycles > bound) begin
            failures++;
            $display("FAIL v%0d: encryption took %0d cycles, bound %0d", v, cycles, bound);
          end
        end
        // decryption, right tag
        run(v, 1'b1, 1'b0, cycles);
        checks++;
        if (!got_auth) begin
          failures++;
          $display("FAIL v%0d: authentic message rejected", v);
        end
        checks++;
        if (got.size() != PL[v]) begin
          failures++;
          $display("FAIL v%0d: %0d plaintext bytes, expected %0d", v, got.size(), PL[v]);
        end else begin
          for (int k = 0; k < PL[v]; k++)
            if (got[k] != PTS[v][8*48-1-8*k -: 8]) begin
              failures++;
              $display("FAIL v%0d: plaintext byte %0d %h expected %h", v, k, got[k], PTS[v][8*48-1-8*k -: 8]);
              break;
            end
        end
        // decryption, corrupted tag
        run(v, 1'b1, 1'b1, cycles);
        checks++;
        if (got_auth) begin
          failures++;
          $display("FAIL v%0d: forged tag accepted", v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
