// tb_hop_node: the decryption node on its own. The testbench plays the
// sending node on the serial line: it sends UART frames holding the
// algorithm ID and a decryption request whose cipher text and tag were
// computed from the published algorithm definitions, and decodes the
// status frames the node sends back. Sessions: ASCON (passes), OCB with an
// ID that disagrees with the node's own hopping LFSR (dropped unread), OCB with a
// corrupted tag (refused), AEGIS (passes). Checks the plaintext and status
// words in the DO FIFO, the status frames, the LFSR stepping once per
// session and the partition following the received ID.
module tb_hop_node;
  import hop_pkg::*;
  localparam int CPB = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         seed_load, iv_seed_load, pdi_wr, pdi_full, sdi_wr, sdi_full, do_rd, do_empty;
  logic         hop_start, session_done, session_ok, id_mismatch, busy, proto_err, uart_txd, uart_rxd, ext_rst_n;
  logic [4:0]   seed, lfsr_state;
  logic [127:0] iv_seed;
  logic [63:0]  pdi_wdata, sdi_wdata, do_rdata;
  alg_t         active_alg;
  core_in_t     ext_cin;
  core_out_t    colm_cout, deoxys_cout;

  hop_node #(.IS_SENDER(1'b0), .RECONFIG_CYCLES(50), .CLKS_PER_BIT(CPB)) dut (.*);

  localparam logic [127:0] K = 128'ha54dca182530bb1d6d132cded6237b2e;
  localparam logic [127:0] N = 128'hd91e3f721fcb1971174494d6493c9d5c;
  localparam logic [63:0]  A = 64'h3460be3120000000;
  localparam logic [191:0] P = 192'h1e69fedaa0eee8b9997f5c7c2999fdafe593253c00000000;
  localparam logic [191:0] C_ASCON = 192'hc03885739e17b92b91e9497af18976a987197beb00000000;
  localparam logic [127:0] T_ASCON = 128'h8bd544441dc07ee80426c39152269899;
  localparam logic [191:0] C_OCB   = 192'h286b9a5ef7976681f07f0d0382c8462f12cb5d6600000000;
  localparam logic [127:0] T_OCB   = 128'hd3dec380f7068e965f79fdd5fb3b9ad1;
  localparam logic [191:0] C_AEGIS = 192'hc7b87522e964ad3d24f182a9c6b7efe97842d3c600000000;
  localparam logic [127:0] T_AEGIS = 128'hbcea2d32ce9f3bab59d4fe35cc787ce4;

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  // ---- serial line model
  task automatic uart_send(input logic [7:0] b);
    uart_rxd = 1'b0; repeat (CPB) @(negedge clk);
    for (int i = 0; i < 8; i++) begin uart_rxd = b[i]; repeat (CPB) @(negedge clk); end
    uart_rxd = 1'b1; repeat (CPB) @(negedge clk);
  endtask

  logic [7:0] rx_bytes[$];
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge clk);
      if (rst_n && !uart_txd) begin
        repeat (CPB / 2) @(negedge clk);
        for (int i = 0; i < 8; i++) begin repeat (CPB) @(negedge clk); b[i] = uart_txd; end
        repeat (CPB) @(negedge clk);
        rx_bytes.push_back(b);
      end
    end
  end

  task automatic host_pdi(input logic [63:0] w);
    @(negedge clk); pdi_wdata = w; pdi_wr = 1'b1; @(negedge clk); pdi_wr = 1'b0;
  endtask
  task automatic host_sdi(input logic [63:0] w);
    @(negedge clk); sdi_wdata = w; sdi_wr = 1'b1; @(negedge clk); sdi_wr = 1'b0;
  endtask

  task automatic session(input logic [2:0] id, input logic [191:0] c, input logic [127:0] t,
                         input bit expect_ok, input string name);
    logic [63:0] w[$];
    logic [63:0] got[$];
    logic [4:0]  lfsr_before;
    lfsr_before = lfsr_state;
    rx_bytes.delete();
    w = '{ins_word(8'h01, OP_DEC), hdr_word(8'h01, ST_NPUB, 1'b0, 1'b1, 16'd16), N[127:64], N[63:0],
          hdr_word(8'h01, ST_AD, 1'b0, 1'b1, 16'd5), A,
          hdr_word(8'h01, ST_CT, 1'b0, 1'b1, 16'd20), c[191:128], c[127:64], c[63:0],
          hdr_word(8'h01, ST_TAG, 1'b1, 1'b1, 16'd16), t[127:64], t[63:0]};
    uart_send(SYNC_DATA);
    uart_send({5'h0, id});
    uart_send(8'(w.size()));
    foreach (w[i]) for (int k = 7; k >= 0; k--) uart_send(w[i][8*k +: 8]);
    while (!session_done) @(negedge clk);
    if (alg_of_id(id) == alg_of_id(lfsr_before[2:0]))
      check({name, " active algorithm"}, active_alg, alg_of_id(id));
    check({name, " verdict"}, session_ok, expect_ok);
    while (rx_bytes.size() < 2) @(negedge clk);
    check({name, " status frame"}, {rx_bytes[0], rx_bytes[1]},
          {SYNC_STATUS, expect_ok ? STATUS_OK : STATUS_FAIL});
    while (!do_empty) begin
      got.push_back(do_rdata);
      @(negedge clk); do_rd = 1'b1; @(negedge clk); do_rd = 1'b0;
    end
    if (id != lfsr_before[2:0] && alg_of_id(id) != alg_of_id(lfsr_before[2:0])) begin
      check({name, " frame dropped, DO empty"}, got.size(), 0);
    end else if (expect_ok) begin
      check({name, " DO words"}, got.size(), 5);
      if (got.size() == 5) begin
        check({name, " MSG header"}, got[0], hdr_word(8'h01, ST_MSG, 1'b1, 1'b1, 16'd20));
        check({name, " plaintext"}, {got[1], got[2]}, P[191:64]);
        check({name, " plaintext tail"}, got[3], P[63:0]);
        check({name, " status word"}, got[4], {8'h01, STATUS_OK, 48'h0});
      end
    end else begin
      check({name, " DO words"}, got.size(), 1);
      if (got.size() == 1) check({name, " status word"}, got[0], {8'h01, STATUS_FAIL, 48'h0});
    end
    check({name, " LFSR stepped"}, lfsr_state, {lfsr_before[3:0], ~(lfsr_before[4] ^ lfsr_before[2])});
  endtask

  initial begin
    seed_load = 0; iv_seed_load = 0; pdi_wr = 0; sdi_wr = 0; do_rd = 0; hop_start = 0;
    seed = 0; iv_seed = '0; pdi_wdata = '0; sdi_wdata = '0; uart_rxd = 1'b1;
    colm_cout = '0; deoxys_cout = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); seed = 5'h00; seed_load = 1; @(negedge clk); seed_load = 0;
    host_sdi(ins_word(8'h00, OP_LDKEY));
    host_sdi(hdr_word(8'h00, ST_KEY, 1'b1, 1'b1, 16'd16));
    host_sdi(K[127:64]);
    host_sdi(K[63:0]);
    host_pdi(ins_word(8'h00, OP_ACTKEY));
    repeat (20) @(negedge clk);
    // LFSR 00 -> ID 0: ASCON
    session(3'd0, C_ASCON, T_ASCON, 1'b1, "ASCON");
    check("no ID mismatch", id_mismatch, 0);
    // LFSR 01 -> ID 1 (COLM) but the frame says OCB: refused
    session(3'd3, C_OCB, T_OCB, 1'b0, "OCB, wrong ID");
    check("ID mismatch flagged", id_mismatch, 1);
    // LFSR 03 -> ID 3: OCB with a corrupted tag
    session(3'd3, C_OCB, T_OCB ^ 128'h1, 1'b0, "OCB, forged tag");
    // LFSR 07 -> ID 7: AEGIS
    session(3'd7, C_AEGIS, T_AEGIS, 1'b1, "AEGIS");
    check("no protocol error", proto_err, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
