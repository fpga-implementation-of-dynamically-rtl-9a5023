// tb_cipher_partition: reconfigures the partition to ASCON, OCB and AEGIS
// in turn and runs one message through each, playing pre- and
// post-processor; cipher text and tag are compared with values computed
// from the published algorithm definitions (key, nonce, 5 bytes of AD,
// 20 bytes of message; OCB takes the first 12 nonce bytes). Also checks the
// reconfiguration time, the key hand-over in both orders (no start before
// the key is ready), and the routing of the COLM slot to its ports.
module tb_cipher_partition;
  import hop_pkg::*;
  localparam int RC = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         reconfig_req, reconfig_busy, key_ready, key_needs_update, key_updated;
  logic         bdi_proc, decrypt, proc_ack, msg_done, bdi_valid, exp_tag_valid, bdo_ready, ext_rst_n;
  alg_t         reconfig_alg, active_alg;
  logic [127:0] key_in, npub, exp_tag;
  bdi_t         bdi;
  core_out_t    cout, colm_cout, deoxys_cout;
  core_in_t     ext_cin;

  cipher_partition #(.RECONFIG_CYCLES(RC)) dut (.*);

  localparam logic [127:0] K = 128'ha54dca182530bb1d6d132cded6237b2e;
  localparam logic [127:0] N = 128'hd91e3f721fcb1971174494d6493c9d5c;
  localparam logic [127:0] A = 128'h3460be31200000000000000000000000;
  localparam logic [159:0] P = 160'h1e69fedaa0eee8b9997f5c7c2999fdafe593253c;
  localparam logic [159:0] C_ASCON = 160'hc03885739e17b92b91e9497af18976a987197beb;
  localparam logic [127:0] T_ASCON = 128'h8bd544441dc07ee80426c39152269899;
  localparam logic [159:0] C_OCB   = 160'h286b9a5ef7976681f07f0d0382c8462f12cb5d66;
  localparam logic [127:0] T_OCB   = 128'hd3dec380f7068e965f79fdd5fb3b9ad1;
  localparam logic [159:0] C_AEGIS = 160'hc7b87522e964ad3d24f182a9c6b7efe97842d3c6;
  localparam logic [127:0] T_AEGIS = 128'hbcea2d32ce9f3bab59d4fe35cc787ce4;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [159:0] got, input logic [159:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  logic [159:0] ct;
  logic [127:0] tag;
  int           nout;
  always @(posedge clk) begin
    if (cout.bdo_valid && bdo_ready) begin
      if (nout == 0) ct[159:32] <= cout.bdo;
      else           ct[31:0]   <= cout.bdo[127:96];
      nout <= nout + 1;
    end
    if (cout.tag_valid && bdo_ready && !cout.bdo_valid) tag <= cout.tag;
  end

  task automatic send(input bdi_t b);
    @(negedge clk); bdi = b; bdi_valid = 1'b1;
    forever begin #1; if (cout.bdi_read) break; @(negedge clk); end
    @(posedge clk); #1 bdi_valid = 1'b0;
  endtask

  task automatic reconfigure(input alg_t a);
    int busy_cycles = 0;
    @(negedge clk); reconfig_alg = a; reconfig_req = 1'b1;
    @(negedge clk); reconfig_req = 1'b0;
    while (reconfig_busy) begin busy_cycles++; @(negedge clk); end
    check("reconfiguration cycles", busy_cycles, RC);
    check("active algorithm", active_alg, a);
  endtask

  task automatic message(input string name, input logic [159:0] c_exp, input logic [127:0] t_exp);
    nout = 0;
    @(negedge clk); bdi_proc = 1'b1;
    while (!proc_ack) @(negedge clk);
    bdi_proc = 1'b0;
    send('{data: A, bytes: 5'd5, ad: 1'b1, eot: 1'b1, eoi: 1'b0});
    send('{data: P[159:32], bytes: 5'd16, ad: 1'b0, eot: 1'b0, eoi: 1'b0});
    send('{data: {P[31:0], 96'h0}, bytes: 5'd4, ad: 1'b0, eot: 1'b1, eoi: 1'b1});
    while (!msg_done) @(negedge clk);
    @(negedge clk);
    check({name, " cipher text"}, ct, c_exp);
    check({name, " tag"}, tag, t_exp);
  endtask

  initial begin
    reconfig_req = 0; reconfig_alg = ALG_AEGIS; key_ready = 0; key_needs_update = 0;
    bdi_proc = 0; decrypt = 0; npub = N; exp_tag = '0; exp_tag_valid = 0; bdo_ready = 1;
    bdi = '0; bdi_valid = 0; key_in = K;
    colm_cout = '0; deoxys_cout = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // key activation before the key is loaded: no start meanwhile
    @(negedge clk); key_needs_update = 1'b1; bdi_proc = 1'b1;
    repeat (10) @(negedge clk);
    check("no start while the key is missing", {proc_ack, key_updated}, 2'b00);
    key_ready = 1'b1;
    while (!key_updated) @(negedge clk);
    key_ready = 1'b0; key_needs_update = 1'b0; bdi_proc = 1'b0;
    repeat (3) @(negedge clk);
    reconfigure(ALG_ASCON);
    message("ASCON", C_ASCON, T_ASCON);
    check("key_updated cleared at message end", key_updated, 0);
    reconfigure(ALG_OCB);
    message("OCB", C_OCB, T_OCB);
    reconfigure(ALG_AEGIS);
    message("AEGIS", C_AEGIS, T_AEGIS);
    // COLM slot goes to the ports
    reconfigure(ALG_COLM);
    repeat (2) @(negedge clk);
    check("COLM slot out of reset", ext_rst_n, 1);
    colm_cout.bdo = 128'h5a5a; colm_cout.busy = 1'b1;
    #1 check("COLM outputs routed", {cout.bdo, cout.busy}, {128'h5a5a, 1'b1});
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
