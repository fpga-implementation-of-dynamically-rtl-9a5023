// tb_ascon128_core: self-checking testbench for ascon128_core (ASCON-128).
//
// Each vector (key, nonce, associated data, message) is encrypted and the
// cipher text and tag are compared with values computed independently
// from the published algorithm definition. The cipher text is then
// decrypted, once with the right tag (plaintext and a passing verdict
// expected) and once with a corrupted tag (a failing verdict expected).
// Vectors run with the post-processor always ready and with random
// back-pressure on bdo_ready. Blocks are 16 bytes, the last one partial.
module tb_ascon128_core;
  import hop_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  core_in_t  cin;
  core_out_t cout;
  ascon128_core dut (.clk(clk), .rst_n(rst_n), .cin(cin), .cout(cout));

  int checks = 0, failures = 0;
  localparam int NV = 8;
  localparam logic [127:0]    KEYS  [NV] = '{128'h6ab74bd74d2a66fb10a819cd361f4472, 128'hb8f901a52386edf3abe8cd16212185f3, 128'hf0e1db7a19a632135160ebd3c11240d0, 128'h65c0ffbc92b33cd1edfc11610c8eca7b, 128'hecc2a3a1fee5acbdd775cfe93f8147a8, 128'hf8a8bdda46c2b3c3a84112729ef7192a, 128'h476309e9615a2e17829545d77811e619, 128'he3c92c6ca436e165506aed5e63b758a3};
  localparam logic [127:0]    NPUBS [NV] = '{128'h56e12cd6bd289686d4199572bcca3947, 128'hb64054d39adc578d9402aa3d5a6c742e, 128'h1417c32460b30fefdc5f7d5870b76e84, 128'h73a8ad97979d2b4717d6670d19e9c65e, 128'h68fb078132cdf6a6ac99ce9a80bd15c2, 128'h11d5222e2a974f84264ba9e91202880c, 128'hb5e7483851dc4514472b97ff1cbda457, 128'hf0663b23d32aa731f92c8c85180c120b};
  localparam logic [8*48-1:0] ADS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hb0cd478be200000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h5bdbdc4f3a5c2436844cc4a7f07dcf090000000000000000000000000000000000000000000000000000000000000000, 384'h7147d4beca396b694c3773173ffac5558f7b6b2e00000000000000000000000000000000000000000000000000000000, 384'h7ca10e2a303d79845fc00931f9e0c9bacae648c77fd6e69c41c2eaba9e6e5e6bee1257acb3fdb7fdd486ffb5305cb78f, 384'h938d8e000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hb131be59201c32a5ef7a715f71fcc2797c00000000000000000000000000000000000000000000000000000000000000};
  localparam logic [8*48-1:0] PTS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h6c22348020efeb27f6fc8fec2f116d540000000000000000000000000000000000000000000000000000000000000000, 384'h1e9410b52b95970000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h436707baaeed8377ff6657ef1b42161ee99f8e56526c60adff75def68513c3c000000000000000000000000000000000, 384'h92d1fac56ed1517e39003d3580b783efdc125b961be277e7d2f65797cb36b7a6f7000000000000000000000000000000, 384'hc258b402c473d7c2497758ccaa559ca188d0643d61e2904ea532c53da2c40195300e1a43765f5c4e0b33f318b2518369, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h3ad35de47d22dc0be6b9432f8e90f3000000000000000000000000000000000000000000000000000000000000000000};
  localparam logic [8*48-1:0] CTS   [NV] = '{384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hd734fa67b199f20fe2f31d1d64627fba0000000000000000000000000000000000000000000000000000000000000000, 384'h352104cffdb0fa0000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'h989adae4d2d6f563622af021ff2704e83eda4153152556e6127a5f204ac2cfe700000000000000000000000000000000, 384'h85369794189c24cee22068e9fb36870e9bf845e85043a280fe6843f8c717c165db000000000000000000000000000000, 384'hf348012b8a581209cb75c817378e3c166ceb81c7fcdf137940920a3c3bac34b9266eb3530228441b6fa6549ab697407b, 384'h000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000000, 384'hc6d866e7cfb093fc7dae09710fff88000000000000000000000000000000000000000000000000000000000000000000};
  localparam logic [127:0]    TAGS  [NV] = '{128'h7cfbb5bcfdcf5c65e5b41824f1a38058, 128'hd220f951a560e9d6cee98a79c8adf9f5, 128'hca50305dd18954b2190afe90c6c04cd7, 128'hae2f28fa590304048809c36555693981, 128'h15d8f88829853a9474daa3ee5f02dade, 128'h5cb4275b0a256d1cb64fdb7df432ae1a, 128'h007ce6f7a1a8dcbc64b13de924f07d87, 128'hed61c7147f79e6b7457c38ad7f718541};
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
        bound = 12 + 7*((ADL[v]==0)?0:ADL[v]/8+1) + 7*(PL[v]/8+1) + 12 + 2*(nad+nm) + 5;
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
