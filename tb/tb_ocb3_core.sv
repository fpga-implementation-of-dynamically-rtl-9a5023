// tb_ocb3_core: self-checking testbench for ocb3_core (OCB3 (AES-128, 96-bit nonce, 128-bit tag)).
//
// Each vector (key, nonce, associated data, message) is encrypted and the
// cipher text and tag are compared with values computed independently
// from the published algorithm definition. The cipher text is then
// decrypted, once with the right tag (plaintext and a passing verdict
// expected) and once with a corrupted tag (a failing verdict expected).
// Vectors run with the post-processor always ready and with random
// back-pressure on bdo_ready. Blocks are 16 bytes, the last one partial.
module tb_ocb3_core;
  import hop_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  core_in_t  cin;
  core_out_t cout;
  ocb3_core dut (.clk(clk), .rst_n(rst_n), .cin(cin), .cout(cout));

  int checks = 0, failures = 0;
  localparam int NV = 8;
  localparam logic [127:0]    KEYS  [NV] = '{128'h0342f75718f381cc5c1e1b470e8e7f02, 128'ha55efa9df192a8db0c22a2fe431fa4da, 128'he6244bf4529aef394146b10ca2932b4d, 128'hd9c19819b2c7d1ab7bd5720215741956, 128'hd543d9f651a6dd250550fdd9a54509e3, 128'hde8ba5a16503fd8250c82d640bdff9f4, 128'h25508d2d8defda7ec5521b506c684c9c, 128'hc2819881df0daeeedbc008617105b7e8};
  localparam logic [127:0]    NPUBS [NV] = '{128'h4dd0b6c0917ac408ca708c2100000000, 128'hc7ba0b779ee854e3b83b8eef00000000, 128'h6f471b0811a5ec934b99b8d600000000, 128'h182924025f6cf6c7be03a21700000000, 128'h0f5c528db91a5956b4868df000000000, 128'h924be128305f722bb2bd69e000000000, 128'h1b46ff6b56ef262b805484f200000000, 128'h58034383a4b5b6912510bc4200000000};
  localparam logic [8*48-1:0] ADS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h6b7074af1800000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h4cce0d13e93072cb78915049effdc2130000000000000000000000000000000000000000000000000000000000000000, 384'h8f033bc1e0106a8b9bf72269264965280a752bed00000000000000000000000000000000000000000000000000000000, 384'h1fbbe4d3435248e0de69611075ae55f1a463074c60fa2c5a0807b871463b6b10f6c24ad69516ea6c9be8167ff65ce098, 384'h53f67f000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h17cf54a5568571afb50da437de686e62ec00000000000000000000000000000000000000000000000000000000000000};
  localparam logic [8*48-1:0] PTS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hcffc25d0f3d3e3a73944f17e49ba8f260000000000000000000000000000000000000000000000000000000000000000, 384'h9b7136e1b592380000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h2c047580b980a941ffedee9eb529f21b830442a16338b0954631fb82aa42768c00000000000000000000000000000000, 384'hcf5d0ef0e81fa7021b267daf77ce5162f2f7aa66c9981ed37d6db289b7a347ce7b000000000000000000000000000000, 384'h20e9642ff17ef54fcb0f38d3668e1a157c5c915eef7e0254798bd503887432038e5459352e94e5924e690339659ebb38, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h701cd8830093bfc2241acf5143a5cc000000000000000000000000000000000000000000000000000000000000000000};
  localparam logic [8*48-1:0] CTS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hbfbe77ae514eb994463285513180083e0000000000000000000000000000000000000000000000000000000000000000, 384'he6c58a1de540eb0000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hcadf0dc38faa4c1f3c81604d556eeaa3db440249eaf10747decf322bffc6419800000000000000000000000000000000, 384'ha5bea8c6410e84f29d2902b26926b96def44dff150f31469b7c725799747d03915000000000000000000000000000000, 384'ha2643e1d2a3abe6cbe8b6ff56a08c6b0bdddf5ac5cc06e4dc192bba8ac5b0242938d015521ed2198d1fa2741f970f114, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h5b729181725cdc26fd9da0e1f9e28b000000000000000000000000000000000000000000000000000000000000000000};
  localparam logic [127:0]    TAGS  [NV] = '{128'ha15fa04c500f3e3698410c82286c7ca3, 128'hdc66a24d1183d1b466e3a7863cfcfb8e, 128'he6d99973d8d5ada20ca00f7b3be77d53, 128'h7ee344c246e32b183f1030b8a1d50bc5, 128'hdd844ed1292ae206de4c0100e317d221, 128'h07ae6cce88acb8281ce4d2d57a79d487, 128'h2d276d1a9086ca4ca80eb57a4818dd04, 128'hdd2e84cfb105b8e49a37334c933f5807};
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
        bound = 11 + 12*3 + 12*(nad+nm) + 12 + 6;
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
