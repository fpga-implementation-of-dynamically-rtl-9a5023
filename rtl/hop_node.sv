// hop_node: one end of the algorithm-hopping link, the encryption module
// (IS_SENDER = 1) or the decryption module (IS_SENDER = 0).
//
// Static part: PDI, SDI and DO FIFOs (64-bit words), the pre- and
// post-processor, a UART, the hopping LFSR, the AEGIS IV generator and the
// session controller. Dynamic part: the cipher partition.
//
// Sender session: hop_start takes the algorithm ID from the LFSR's three
// low bits and reconfigures the partition (for AEGIS it also draws a new IV
// from the 128-bit LFSR, which replaces the nonce of the message). The
// message the host placed in the PDI FIFO is then encrypted; the output,
// formatted as a complete decryption request, collects in the DO FIFO. When
// the message is done the UART sends SYNC_DATA, the ID, the word count and
// the words (8 bytes each, most significant byte first). The receiver's
// status frame (SYNC_STATUS, status code) ends the session: session_done
// pulses, session_ok gives the verdict and the LFSR steps to the next hop.
//
// Receiver session: a SYNC_DATA frame from the UART gives the ID, which is
// compared with the algorithm the receiver's own LFSR selects. If they
// agree, the partition is reconfigured to it and the words are written into
// the PDI FIFO, where the pre-processor picks them up; the plaintext and
// status word collect in the DO FIFO for the host. If they disagree
// (id_mismatch) the words are read off the line and dropped, nothing is
// decrypted and nothing reaches DO. Either way the status is sent back
// (failure if the tag or the ID did not match) and the LFSR steps.
//
// Host ports write the PDI and SDI FIFOs between sessions (keys, Activate
// Key, and on the sender the message) and read the DO FIFO (receiver).
//
// Origin: the split into a static part (FIFOs, pre/post-processor, UART, LFSR)
// and a reconfigurable cipher partition, and the session steps (seed, select,
// encrypt, send ID and data, decrypt, status back, next hop) come from the
// hopping system. The 64-bit word width, the frame format, the host ports and
// the dropping of frames with a mismatched ID are this design's choices.
module hop_node
  import hop_pkg::*;
#(
  parameter bit          IS_SENDER       = 1'b1,
  parameter int unsigned RECONFIG_CYCLES = 16700,
  parameter int unsigned CLKS_PER_BIT    = 87,
  parameter int unsigned FIFO_DEPTH      = 32,
  parameter int unsigned SDI_DEPTH       = 8,
  parameter int unsigned MSG_WORDS       = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // seeds
  input  logic         seed_load,
  input  logic [4:0]   seed,
  input  logic         iv_seed_load,
  input  logic [127:0] iv_seed,
  // host FIFO ports
  input  logic [63:0]  pdi_wdata,
  input  logic         pdi_wr,
  output logic         pdi_full,
  input  logic [63:0]  sdi_wdata,
  input  logic         sdi_wr,
  output logic         sdi_full,
  output logic [63:0]  do_rdata,
  input  logic         do_rd,
  output logic         do_empty,
  // session
  input  logic         hop_start,
  output logic         session_done,
  output logic         session_ok,
  output logic         id_mismatch,
  output logic         busy,
  output alg_t         active_alg,
  output logic [4:0]   lfsr_state,
  output logic         proto_err,
  // serial link
  output logic         uart_txd,
  input  logic         uart_rxd,
  // slots of the cipher modules that are not in this RTL
  output core_in_t     ext_cin,
  output logic         ext_rst_n,
  input  core_out_t    colm_cout,
  input  core_out_t    deoxys_cout
);

  // ---------------- FIFOs ------------------------------------------------
  logic [63:0] pdi_data, sdi_data, do_wdata, pdi_in;
  logic        pdi_empty, pdi_rd, sdi_empty, sdi_rd, do_wr, do_full, do_pop, pdi_push;
  logic [63:0] rx_word;
  logic        rx_word_wr;
  logic [$clog2(FIFO_DEPTH+1)-1:0] do_count;

  assign pdi_push = pdi_wr | rx_word_wr;
  assign pdi_in   = rx_word_wr ? rx_word : pdi_wdata;

  fwft_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_pdi_fifo (
    .clk(clk), .rst_n(rst_n), .wr(pdi_push), .wdata(pdi_in), .full(pdi_full),
    .rd(pdi_rd), .rdata(pdi_data), .empty(pdi_empty), .count()
  );
  fwft_fifo #(.WIDTH(64), .DEPTH(SDI_DEPTH)) u_sdi_fifo (
    .clk(clk), .rst_n(rst_n), .wr(sdi_wr), .wdata(sdi_wdata), .full(sdi_full),
    .rd(sdi_rd), .rdata(sdi_data), .empty(sdi_empty), .count()
  );
  fwft_fifo #(.WIDTH(64), .DEPTH(FIFO_DEPTH)) u_do_fifo (
    .clk(clk), .rst_n(rst_n), .wr(do_wr), .wdata(do_wdata), .full(do_full),
    .rd(do_pop), .rdata(do_rdata), .empty(do_empty), .count(do_count)
  );

  // ---------------- LFSRs ------------------------------------------------
  logic       lfsr_step;
  logic [2:0] lfsr_id;
  alg_t       lfsr_alg;
  hop_lfsr u_hop_lfsr (
    .clk(clk), .rst_n(rst_n), .seed_load(seed_load), .seed(seed), .step(lfsr_step),
    .state(lfsr_state), .id(lfsr_id), .alg(lfsr_alg)
  );

  logic         iv_next, iv_valid;
  logic [127:0] iv;
  iv_lfsr128 u_iv_lfsr (
    .clk(clk), .rst_n(rst_n), .seed_load(iv_seed_load), .seed(iv_seed),
    .next(iv_next), .iv(iv), .valid(iv_valid)
  );

  // ---------------- AEAD top: pre-processor, partition, post-processor ---
  logic [127:0] key, npub, npub_eff, exp_tag;
  logic         key_ready, key_needs_update, key_updated, bdi_proc, proc_ack, core_busy;
  logic         decrypt, bdi_valid, exp_tag_valid, msg_done, run_en;
  logic [7:0]   msg_id;
  logic [15:0]  ad_size, msg_size;
  bdi_t         bdi;
  core_out_t    cout;
  logic         pp_ready, pp_done, pp_auth_ok, pp_idle;
  logic         reconfig_req, reconfig_busy;
  alg_t         reconfig_alg;

  pre_processor u_pre (
    .clk(clk), .rst_n(rst_n),
    .pdi_data(pdi_data), .pdi_empty(pdi_empty), .pdi_rd(pdi_rd),
    .sdi_data(sdi_data), .sdi_empty(sdi_empty), .sdi_rd(sdi_rd),
    .key(key), .key_ready(key_ready), .key_needs_update(key_needs_update),
    .key_updated(key_updated),
    .bdi_proc(bdi_proc), .proc_ack(proc_ack), .core_busy(core_busy),
    .decrypt(decrypt), .msg_id(msg_id), .npub(npub),
    .ad_size(ad_size), .msg_size(msg_size),
    .bdi(bdi), .bdi_valid(bdi_valid), .bdi_read(cout.bdi_read),
    .exp_tag(exp_tag), .exp_tag_valid(exp_tag_valid), .proto_err(proto_err)
  );

  // the sender replaces the AEGIS nonce with the IV generator's value
  assign npub_eff  = (IS_SENDER && active_alg == ALG_AEGIS) ? iv : npub;
  assign core_busy = cout.busy;

  cipher_partition #(.RECONFIG_CYCLES(RECONFIG_CYCLES)) u_partition (
    .clk(clk), .rst_n(rst_n),
    .reconfig_req(reconfig_req), .reconfig_alg(reconfig_alg),
    .reconfig_busy(reconfig_busy), .active_alg(active_alg),
    .key_in(key), .key_ready(key_ready), .key_needs_update(key_needs_update),
    .key_updated(key_updated),
    .bdi_proc(bdi_proc && run_en), .decrypt(decrypt), .npub(npub_eff),
    .proc_ack(proc_ack), .msg_done(msg_done),
    .bdi(bdi), .bdi_valid(bdi_valid && pp_ready), .exp_tag(exp_tag),
    .exp_tag_valid(exp_tag_valid), .bdo_ready(pp_ready), .cout(cout),
    .ext_cin(ext_cin), .ext_rst_n(ext_rst_n),
    .colm_cout(colm_cout), .deoxys_cout(deoxys_cout)
  );

  post_processor #(.MSG_WORDS(MSG_WORDS)) u_post (
    .clk(clk), .rst_n(rst_n),
    .proc_start(proc_ack), .decrypt(decrypt), .msg_id(msg_id), .npub(npub_eff),
    .ad_size(ad_size), .msg_size(msg_size),
    .snoop_bdi(bdi), .snoop_take(bdi_valid && pp_ready && cout.bdi_read),
    .core(cout), .bdo_ready(pp_ready),
    .do_data(do_wdata), .do_wr(do_wr), .do_full(do_full),
    .done(pp_done), .auth_ok(pp_auth_ok), .idle(pp_idle)
  );

  // ---------------- UART -------------------------------------------------
  logic       tx_send, tx_busy, rx_valid, rx_err;
  logic [7:0] tx_data, rx_data;
  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_tx (
    .clk(clk), .rst_n(rst_n), .send(tx_send), .data(tx_data), .busy(tx_busy), .txd(uart_txd)
  );
  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_uart_rx (
    .clk(clk), .rst_n(rst_n), .rxd(uart_rxd), .data(rx_data), .valid(rx_valid), .frame_err(rx_err)
  );

  // ---------------- session controller -----------------------------------
  typedef enum logic [3:0] {
    N_IDLE, N_RECONF, N_RUN, N_TX_HDR, N_TX_WORD, N_WAIT_ST, N_ST_CODE,
    N_RX_ID, N_RX_CNT, N_RX_WORDS, N_RX_DROP, N_RX_RUN, N_TX_ST
  } nst_t;
  nst_t nst;

  logic [7:0]  wcount, hdr_byte [3];
  logic [1:0]  hidx;
  logic [2:0]  bidx;
  logic [63:0] txw;
  logic        msg_seen, tx_pending;

  // host reads the DO FIFO on the receiver, the UART drains it on the sender
  assign do_pop = IS_SENDER ? (nst == N_TX_WORD && !tx_busy && !tx_send && bidx == 3'd0 && !tx_pending && !do_empty)
                            : do_rd;
  assign run_en = (nst == N_RUN) || (nst == N_RX_WORDS && !reconfig_busy && !reconfig_req) ||
                  (nst == N_RX_RUN);
  assign busy   = (nst != N_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nst <= N_IDLE;
      reconfig_req <= 1'b0; reconfig_alg <= ALG_AEGIS; iv_next <= 1'b0; lfsr_step <= 1'b0;
      session_done <= 1'b0; session_ok <= 1'b0; id_mismatch <= 1'b0;
      tx_send <= 1'b0; tx_data <= '0; wcount <= '0; hidx <= '0; bidx <= '0; txw <= '0;
      hdr_byte[0] <= '0; hdr_byte[1] <= '0; hdr_byte[2] <= '0;
      msg_seen <= 1'b0; tx_pending <= 1'b0; rx_word <= '0; rx_word_wr <= 1'b0;
    end else begin
      reconfig_req <= 1'b0;
      iv_next      <= 1'b0;
      lfsr_step    <= 1'b0;
      session_done <= 1'b0;
      tx_send      <= 1'b0;
      rx_word_wr   <= 1'b0;
      if (pp_done) msg_seen <= 1'b1;
      unique case (nst)
        // ---- sender ------------------------------------------------------
        N_IDLE: begin
          msg_seen <= 1'b0;
          if (IS_SENDER && hop_start) begin
            reconfig_req <= 1'b1;
            reconfig_alg <= lfsr_alg;
            iv_next      <= (lfsr_alg == ALG_AEGIS);
            nst          <= N_RECONF;
          end else if (!IS_SENDER && rx_valid && rx_data == SYNC_DATA) begin
            nst <= N_RX_ID;
          end
        end
        N_RECONF: if (!reconfig_req && !reconfig_busy && iv_valid) nst <= N_RUN;
        N_RUN: if (msg_seen && pp_idle) begin
          hdr_byte[0] <= SYNC_DATA;
          hdr_byte[1] <= {5'h0, lfsr_id};
          hdr_byte[2] <= 8'(do_count);
          hidx        <= '0;
          nst         <= N_TX_HDR;
        end
        N_TX_HDR: if (!tx_busy && !tx_send) begin
          tx_data <= hdr_byte[hidx];
          tx_send <= 1'b1;
          hidx    <= hidx + 2'd1;
          if (hidx == 2'd2) begin
            bidx       <= '0;
            tx_pending <= 1'b0;
            nst        <= N_TX_WORD;
          end
        end
        N_TX_WORD: begin
          if (do_pop) begin
            txw        <= do_rdata;
            tx_pending <= 1'b1;
          end else if (tx_pending && !tx_busy && !tx_send) begin
            tx_data <= txw[63 - 8*bidx -: 8];
            tx_send <= 1'b1;
            bidx    <= bidx + 3'd1;
            if (bidx == 3'd7) tx_pending <= 1'b0;
          end else if (!tx_pending && do_empty && !tx_busy && !tx_send) begin
            nst <= N_WAIT_ST;
          end
        end
        N_WAIT_ST: if (rx_valid && rx_data == SYNC_STATUS) nst <= N_ST_CODE;
        N_ST_CODE: if (rx_valid) begin
          session_ok   <= (rx_data == STATUS_OK);
          session_done <= 1'b1;
          lfsr_step    <= 1'b1;
          nst          <= N_IDLE;
        end
        // ---- receiver ----------------------------------------------------
        N_RX_ID: if (rx_valid) begin
          // A frame whose ID disagrees with this node's own hop sequence is
          // read off the line and dropped: no reconfiguration, no decryption.
          id_mismatch  <= (alg_of_id(rx_data[2:0]) != lfsr_alg);
          reconfig_req <= (alg_of_id(rx_data[2:0]) == lfsr_alg);
          reconfig_alg <= alg_of_id(rx_data[2:0]);
          nst          <= N_RX_CNT;
        end
        N_RX_CNT: if (rx_valid) begin
          wcount <= rx_data;
          bidx   <= '0;
          nst    <= (rx_data != 8'd0) ? N_RX_WORDS : id_mismatch ? N_RX_DROP : N_RX_RUN;
        end
        N_RX_WORDS: if (rx_valid) begin
          rx_word <= {rx_word[55:0], rx_data};
          bidx    <= bidx + 3'd1;
          if (bidx == 3'd7) begin
            rx_word_wr <= !id_mismatch;
            wcount     <= wcount - 8'd1;
            if (wcount == 8'd1) nst <= id_mismatch ? N_RX_DROP : N_RX_RUN;
          end
        end
        N_RX_DROP: begin
          hdr_byte[0] <= SYNC_STATUS;
          hdr_byte[1] <= STATUS_FAIL;
          session_ok  <= 1'b0;
          hidx        <= '0;
          nst         <= N_TX_ST;
        end
        N_RX_RUN: if (msg_seen && pp_idle) begin
          hdr_byte[0] <= SYNC_STATUS;
          hdr_byte[1] <= pp_auth_ok ? STATUS_OK : STATUS_FAIL;
          session_ok  <= pp_auth_ok;
          hidx        <= '0;
          nst         <= N_TX_ST;
        end
        N_TX_ST: if (!tx_busy && !tx_send) begin
          tx_data <= hdr_byte[hidx];
          tx_send <= 1'b1;
          hidx    <= hidx + 2'd1;
          if (hidx == 2'd1) begin
            session_done <= 1'b1;
            lfsr_step    <= 1'b1;
            nst          <= N_IDLE;
          end
        end
        default: nst <= N_IDLE;
      endcase
    end
  end

endmodule
