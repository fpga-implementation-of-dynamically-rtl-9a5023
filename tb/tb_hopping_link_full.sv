// tb_hopping_link_full: the two-node link at its real size and timing,
// with no parameter overrides: 16700-cycle partition reconfiguration
// (1.67 ms at 10 MHz), 87 clocks per UART bit (115200 baud at 10 MHz),
// 32-word FIFOs. Three sessions: ASCON, then OCB, then AEGIS with the IV
// generator replacing the nonce. Same host model and checks as
// tb_hopping_link; each mechanism seen here is counted and must occur.
module tb_hopping_link_full;
  import hop_pkg::*;
  localparam int CPB = 87;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         tx_seed_load, iv_seed_load, tx_pdi_wr, tx_pdi_full, tx_sdi_wr, tx_sdi_full, hop_start;
  logic         tx_session_done, tx_session_ok, tx_busy, tx_proto_err;
  logic [4:0]   tx_seed, tx_lfsr, rx_seed, rx_lfsr;
  logic [127:0] iv_seed;
  logic [63:0]  tx_pdi_wdata, tx_sdi_wdata, rx_pdi_wdata, rx_sdi_wdata, rx_do_rdata;
  logic         rx_seed_load, rx_pdi_wr, rx_pdi_full, rx_sdi_wr, rx_sdi_full, rx_do_rd, rx_do_empty;
  logic         rx_session_done, rx_session_ok, rx_id_mismatch, rx_busy, rx_proto_err;
  alg_t         tx_alg, rx_alg;
  core_in_t     tx_ext_cin, rx_ext_cin;
  logic         tx_ext_rst_n, rx_ext_rst_n;
  core_out_t    tx_colm_cout, tx_deoxys_cout, rx_colm_cout, rx_deoxys_cout;

  hopping_link dut (.*);

  localparam logic [127:0] K = 128'ha54dca182530bb1d6d132cded6237b2e;
  localparam logic [127:0] K_WRONG = K ^ 128'h80;
  localparam logic [127:0] N = 128'hd91e3f721fcb1971174494d6493c9d5c;
  localparam logic [63:0]  A = 64'h3460be3120000000;
  localparam logic [191:0] P = 192'h1e69fedaa0eee8b9997f5c7c2999fdafe593253c00000000;
  localparam logic [191:0] C_ASCON = 192'hc03885739e17b92b91e9497af18976a987197beb00000000;
  localparam logic [127:0] T_ASCON = 128'h8bd544441dc07ee80426c39152269899;
  localparam logic [191:0] C_OCB   = 192'h286b9a5ef7976681f07f0d0382c8462f12cb5d6600000000;
  localparam logic [127:0] T_OCB   = 128'hd3dec380f7068e965f79fdd5fb3b9ad1;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // ---- mechanism counters
  int n_reconf_tx = 0, n_reconf_rx = 0, n_key_tx = 0, n_key_rx = 0;
  int n_ascon = 0, n_ocb = 0, n_aegis = 0, n_iv = 0, n_auth_fail = 0, n_mismatch = 0;
  int n_hop = 0, n_status = 0, n_frames = 0;
  logic rb_tx_q = 0, rb_rx_q = 0, ku_tx_q = 0, ku_rx_q = 0;
  always @(posedge clk) begin
    rb_tx_q <= dut.u_sender.reconfig_busy;
    rb_rx_q <= dut.u_receiver.reconfig_busy;
    if (dut.u_sender.reconfig_busy && !rb_tx_q) n_reconf_tx++;
    if (dut.u_receiver.reconfig_busy && !rb_rx_q) n_reconf_rx++;
    ku_tx_q <= dut.u_sender.key_updated;
    ku_rx_q <= dut.u_receiver.key_updated;
    if (dut.u_sender.key_updated && !ku_tx_q) n_key_tx++;
    if (dut.u_receiver.key_updated && !ku_rx_q) n_key_rx++;
  end

  // ---- forward line decoder: collects each frame as ID + words
  logic [7:0]  fwd_bytes[$];
  logic [7:0]  back_bytes[$];
  task automatic uart_mon(ref logic line, ref logic [7:0] q[$]);
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !line) begin
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = line; end
        repeat (CPB) @(negedge clk);
        q.push_back(b);
      end
    end
  endtask
  initial uart_mon(dut.line_fwd, fwd_bytes);
  initial uart_mon(dut.line_back, back_bytes);

  task automatic host_w(input bit tx, input bit sdi, input logic [63:0] w);
    @(negedge clk);
    if (tx && sdi)  begin tx_sdi_wdata = w; tx_sdi_wr = 1; end
    if (tx && !sdi) begin tx_pdi_wdata = w; tx_pdi_wr = 1; end
    if (!tx && sdi) begin rx_sdi_wdata = w; rx_sdi_wr = 1; end
    if (!tx && !sdi) begin rx_pdi_wdata = w; rx_pdi_wr = 1; end
    @(negedge clk);
    tx_sdi_wr = 0; tx_pdi_wr = 0; rx_sdi_wr = 0; rx_pdi_wr = 0;
  endtask

  task automatic load_key(input bit tx, input logic [127:0] k);
    host_w(tx, 1, ins_word(8'h00, OP_LDKEY));
    host_w(tx, 1, hdr_word(8'h00, ST_KEY, 1'b1, 1'b1, 16'd16));
    host_w(tx, 1, k[127:64]);
    host_w(tx, 1, k[63:0]);
    host_w(tx, 0, ins_word(8'h00, OP_ACTKEY));
    repeat (30) @(negedge clk);
  endtask

  task automatic seed_both(input logic [4:0] s_tx, input logic [4:0] s_rx);
    @(negedge clk); tx_seed = s_tx; rx_seed = s_rx; tx_seed_load = 1; rx_seed_load = 1;
    @(negedge clk); tx_seed_load = 0; rx_seed_load = 0;
  endtask

  function automatic logic [4:0] lfsr_next(input logic [4:0] s);
    return {s[3:0], ~(s[4] ^ s[2])};
  endfunction

  logic [127:0] last_iv = '0;

  task automatic session(input logic [7:0] mid, input bit expect_ok, input string name);
    logic [63:0] w[$];
    logic [63:0] got[$];
    logic [4:0]  tx_before, rx_before;
    alg_t        alg;
    bit          mism;
    tx_before = tx_lfsr; rx_before = rx_lfsr;
    $display("[%0t] session %s  lfsr tx %h rx %h", $time, name, tx_before, rx_before);
    alg  = alg_of_id(tx_before[2:0]);
    mism = alg != alg_of_id(rx_before[2:0]);
    fwd_bytes.delete(); back_bytes.delete();
    host_w(1, 0, ins_word(mid, OP_ENC));
    host_w(1, 0, hdr_word(mid, ST_NPUB, 1'b0, 1'b1, 16'd16));
    host_w(1, 0, N[127:64]);
    host_w(1, 0, N[63:0]);
    host_w(1, 0, hdr_word(mid, ST_AD, 1'b0, 1'b1, 16'd5));
    host_w(1, 0, A);
    host_w(1, 0, hdr_word(mid, ST_MSG, 1'b1, 1'b1, 16'd20));
    host_w(1, 0, P[191:128]);
    host_w(1, 0, P[127:64]);
    host_w(1, 0, P[63:0]);
    @(negedge clk); hop_start = 1; @(negedge clk); hop_start = 0;
    fork
      begin while (!tx_session_done) @(negedge clk); end
      begin while (!rx_session_done) @(negedge clk); end
    join
    check({name, " sender algorithm"}, tx_alg, alg);
    // decode the frame: SYNC, ID, count, words
    n_frames++;
    check({name, " frame sync"}, fwd_bytes[0], SYNC_DATA);
    check({name, " frame ID"}, fwd_bytes[1], {5'h0, tx_before[2:0]});
    check({name, " frame word count"}, fwd_bytes[2], 13);
    for (int i = 0; i < 13; i++) begin
      logic [63:0] x;
      for (int k = 0; k < 8; k++) x = {x[55:0], fwd_bytes[3 + 8 * i + k]};
      w.push_back(x);
    end
    check({name, " frame instruction"}, w[0], ins_word(mid, OP_DEC));
    check({name, " frame AD"}, w[5], A);
    if (alg == ALG_ASCON) begin
      check({name, " ASCON cipher text"}, {w[7], w[8], w[9]}, C_ASCON);
      check({name, " ASCON tag"}, {w[11], w[12]}, T_ASCON);
    end
    if (alg == ALG_OCB) begin
      check({name, " OCB cipher text"}, {w[7], w[8], w[9]}, C_OCB);
      check({name, " OCB tag"}, {w[11], w[12]}, T_OCB);
    end
    if (alg == ALG_AEGIS) begin
      check({name, " AEGIS nonce is the generated IV"}, {w[2], w[3]}, dut.u_sender.iv);
      check({name, " AEGIS IV differs from host nonce"}, {w[2], w[3]} != N, 1);
      check({name, " AEGIS IV fresh"}, {w[2], w[3]} != last_iv, 1);
      if ({w[2], w[3]} != N && {w[2], w[3]} != last_iv) n_iv++;
      last_iv = {w[2], w[3]};
    end else begin
      check({name, " nonce"}, {w[2], w[3]}, N);
    end
    // verdict on both ends, status frame, receiver's DO
    check({name, " receiver verdict"}, rx_session_ok, expect_ok);
    check({name, " sender verdict"}, tx_session_ok, expect_ok);
    check({name, " ID mismatch flag"}, rx_id_mismatch, mism);
    check({name, " status frame"}, {back_bytes[0], back_bytes[1]},
          {SYNC_STATUS, expect_ok ? STATUS_OK : STATUS_FAIL});
    if (back_bytes.size() == 2) n_status++;
    repeat (4) @(negedge clk);
    while (!rx_do_empty) begin
      got.push_back(rx_do_rdata);
      @(negedge clk); rx_do_rd = 1; @(negedge clk); rx_do_rd = 0;
    end
    if (mism) begin
      check({name, " dropped frame leaves DO empty"}, got.size(), 0);
      n_mismatch++;
    end else if (expect_ok) begin
      check({name, " DO words"}, got.size(), 5);
      if (got.size() == 5) begin
        check({name, " MSG header"}, got[0], hdr_word(mid, ST_MSG, 1'b1, 1'b1, 16'd20));
        check({name, " plaintext"}, {got[1], got[2], got[3]}, P);
        check({name, " status word"}, got[4], {mid, STATUS_OK, 48'h0});
        check({name, " receiver algorithm"}, rx_alg, alg);
        case (alg)
          ALG_ASCON: n_ascon++;
          ALG_OCB:   n_ocb++;
          ALG_AEGIS: n_aegis++;
          default: ;
        endcase
      end
    end else begin
      check({name, " DO words"}, got.size(), 1);
      if (got.size() == 1) check({name, " failure status word"}, got[0], {mid, STATUS_FAIL, 48'h0});
      n_auth_fail++;
    end
    check({name, " sender hop"}, tx_lfsr, lfsr_next(tx_before));
    check({name, " receiver hop"}, rx_lfsr, lfsr_next(rx_before));
    if (tx_lfsr == lfsr_next(tx_before)) n_hop++;
    check("no protocol error", tx_proto_err | rx_proto_err, 0);
  endtask

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", what); end
    else $display("mechanism %-28s %0d", what, n);
  endtask

  initial begin
    tx_seed_load = 0; rx_seed_load = 0; iv_seed_load = 0; hop_start = 0;
    tx_pdi_wr = 0; tx_sdi_wr = 0; rx_pdi_wr = 0; rx_sdi_wr = 0; rx_do_rd = 0;
    tx_seed = 0; rx_seed = 0; iv_seed = '0;
    tx_pdi_wdata = '0; tx_sdi_wdata = '0; rx_pdi_wdata = '0; rx_sdi_wdata = '0;
    tx_colm_cout = '0; tx_deoxys_cout = '0; rx_colm_cout = '0; rx_deoxys_cout = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); iv_seed = 128'h0123456789abcdeffedcba9876543210; iv_seed_load = 1;
    @(negedge clk); iv_seed_load = 0;
    load_key(1, K);
    load_key(0, K);
    seed_both(5'h00, 5'h00);
    session(8'h21, 1, "1 ASCON");           // 00 -> 01
    seed_both(5'h03, 5'h03);
    session(8'h22, 1, "2 OCB");             // 03 -> 07
    session(8'h23, 1, "3 AEGIS");           // 07 -> 0E
    need("sender reconfigurations", n_reconf_tx);
    need("receiver reconfigurations", n_reconf_rx);
    need("sender key activations", n_key_tx);
    need("receiver key activations", n_key_rx);
    need("ASCON sessions", n_ascon);
    need("OCB sessions", n_ocb);
    need("AEGIS sessions", n_aegis);
    need("AEGIS IV replacement", n_iv);
    need("LFSR hops", n_hop);
    need("status frames", n_status);
    need("data frames", n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired (sender %s, receiver %s, rx pre %0d key %0d, rx part %0d, rx post idle %0d)",
             dut.u_sender.nst.name(), dut.u_receiver.nst.name(), dut.u_receiver.u_pre.pst, dut.u_receiver.u_pre.kst,
             dut.u_receiver.u_partition.cst, dut.u_receiver.pp_idle);
    $display("sender pre %0d key %0d part %0d post idle %0d msg_seen %0d pdi_empty %0d aegis st %0d", dut.u_sender.u_pre.pst, dut.u_sender.u_pre.kst, dut.u_sender.u_partition.cst, dut.u_sender.pp_idle, dut.u_sender.msg_seen, dut.u_sender.pdi_empty, dut.u_sender.u_partition.u_aegis.st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
