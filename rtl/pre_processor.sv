// pre_processor: turns the PDI and SDI word streams into keys, a nonce and
// 128-bit blocks for the cipher core.
//
// SDI: a Load Key instruction, a key segment header and two 64-bit key
// words load the 128-bit key register and raise key_ready. PDI: an
// Activate Key instruction raises key_needs_update; both flags drop when
// the cipher core acknowledges with key_updated, so a new key can be
// loaded while the previous one is still in use. An Encrypt or Decrypt
// instruction is followed by segments in a fixed order: NPUB (16 bytes),
// AD, MSG or CT, and for decryption TAG (16 bytes). After the nonce,
// bdi_proc announces the message until proc_ack. AD and message data are
// packed serial-in parallel-out into 16-byte blocks, bytes beyond the
// segment size are cleared (zero fill; cipher-specific padding is left to
// the core), and the bytes still to come are counted down. An empty AD or
// message segment is passed on as one block with bytes = 0 and eot set.
// The segment sizes go to the post-processor.
//
// Word formats are in hop_pkg. Timing: one FIFO word per clock; a block is
// offered on bdi with bdi_valid and taken in the cycle the core raises
// bdi_read.
//
// Origin: the pre-processor role (instruction and segment decoding, key loading
// through SDI with Activate Key through PDI, block delivery with bdi_eot and
// bdi_eoi) follows the CAESAR hardware API used by the hopping system; the
// word layout and block size are this design's choices.
module pre_processor
  import hop_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // PDI and SDI FIFOs (first word fall through)
  input  logic [63:0]  pdi_data,
  input  logic         pdi_empty,
  output logic         pdi_rd,
  input  logic [63:0]  sdi_data,
  input  logic         sdi_empty,
  output logic         sdi_rd,
  // key handshake
  output logic [127:0] key,
  output logic         key_ready,
  output logic         key_needs_update,
  input  logic         key_updated,
  // message control
  output logic         bdi_proc,
  input  logic         proc_ack,
  input  logic         core_busy,
  output logic         decrypt,
  output logic [7:0]   msg_id,
  output logic [127:0] npub,
  output logic [15:0]  ad_size,
  output logic [15:0]  msg_size,
  // blocks
  output bdi_t         bdi,
  output logic         bdi_valid,
  input  logic         bdi_read,
  output logic [127:0] exp_tag,
  output logic         exp_tag_valid,
  output logic         proto_err
);

  typedef enum logic [3:0] {
    P_INS, P_NPUB_HDR, P_NPUB0, P_NPUB1, P_AD_HDR, P_MSG_HDR, P_DATA, P_EMIT,
    P_TAG_HDR, P_TAG0, P_TAG1
  } pst_t;
  pst_t pst;

  typedef enum logic [1:0] {K_INS, K_HDR, K_W0, K_W1} kst_t;
  kst_t kst;

  logic [15:0]  remaining;
  logic         cur_ad, wi;
  logic [127:0] blk;
  logic [4:0]   blk_bytes;
  logic [63:0]  word_kept;
  logic [3:0]   wbytes;

  // bytes the current word contributes
  always_comb begin
    wbytes = (remaining >= 16'd8) ? 4'd8 : 4'(remaining);
    word_kept = pdi_data;
    for (int k = 0; k < 8; k++) if (k >= int'(wbytes)) word_kept[63-8*k -: 8] = 8'h00;
  end

  always_comb begin
    pdi_rd = 1'b0;
    if (!pdi_empty) begin
      unique case (pst)
        P_INS:   pdi_rd = !bdi_proc && !core_busy;
        P_NPUB_HDR, P_NPUB0, P_NPUB1, P_AD_HDR, P_MSG_HDR, P_DATA,
        P_TAG_HDR, P_TAG0, P_TAG1: pdi_rd = 1'b1;
        default: pdi_rd = 1'b0;
      endcase
    end
    sdi_rd = !sdi_empty;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pst <= P_INS; kst <= K_INS;
      key <= '0; key_ready <= 1'b0; key_needs_update <= 1'b0;
      bdi_proc <= 1'b0; decrypt <= 1'b0; msg_id <= '0; npub <= '0;
      ad_size <= '0; msg_size <= '0; bdi <= '0; bdi_valid <= 1'b0;
      exp_tag <= '0; exp_tag_valid <= 1'b0; proto_err <= 1'b0;
      remaining <= '0; cur_ad <= 1'b0; wi <= 1'b0; blk <= '0; blk_bytes <= '0;
    end else begin
      // ---- key path (SDI) -------------------------------------------
      if (key_updated) begin
        key_ready        <= 1'b0;
        key_needs_update <= 1'b0;
      end
      if (sdi_rd) begin
        unique case (kst)
          K_INS: if (sdi_data[55:48] == OP_LDKEY) kst <= K_HDR;
          K_HDR: begin
            if (sdi_data[55:52] != ST_KEY) proto_err <= 1'b1;
            kst <= K_W0;
          end
          K_W0: begin key[127:64] <= sdi_data; kst <= K_W1; end
          K_W1: begin key[63:0] <= sdi_data; key_ready <= 1'b1; kst <= K_INS; end
          default: kst <= K_INS;
        endcase
      end
      // ---- data path (PDI) ------------------------------------------
      if (proc_ack) bdi_proc <= 1'b0;
      unique case (pst)
        P_INS: if (pdi_rd) begin
          if (pdi_data[55:48] == OP_ACTKEY) key_needs_update <= 1'b1;
          else if (pdi_data[55:48] == OP_ENC || pdi_data[55:48] == OP_DEC) begin
            decrypt       <= (pdi_data[55:48] == OP_DEC);
            msg_id        <= pdi_data[63:56];
            exp_tag_valid <= 1'b0;
            pst           <= P_NPUB_HDR;
          end
        end
        P_NPUB_HDR: if (pdi_rd) begin
          if (pdi_data[55:52] != ST_NPUB) proto_err <= 1'b1;
          pst <= P_NPUB0;
        end
        P_NPUB0: if (pdi_rd) begin npub[127:64] <= pdi_data; pst <= P_NPUB1; end
        P_NPUB1: if (pdi_rd) begin
          npub[63:0] <= pdi_data;
          bdi_proc   <= 1'b1;
          pst        <= P_AD_HDR;
        end
        P_AD_HDR, P_MSG_HDR: if (pdi_rd) begin
          cur_ad <= (pst == P_AD_HDR);
          if (pst == P_AD_HDR) begin
            if (pdi_data[55:52] != ST_AD) proto_err <= 1'b1;
            ad_size <= pdi_data[15:0];
          end else begin
            if (pdi_data[55:52] != ST_MSG && pdi_data[55:52] != ST_CT) proto_err <= 1'b1;
            msg_size <= pdi_data[15:0];
          end
          remaining <= pdi_data[15:0];
          blk       <= '0;
          blk_bytes <= '0;
          wi        <= 1'b0;
          if (pdi_data[15:0] == 16'd0) begin       // empty segment
            bdi       <= '{data: '0, bytes: 5'd0, ad: (pst == P_AD_HDR), eot: 1'b1,
                           eoi: (pst == P_MSG_HDR)};
            bdi_valid <= 1'b1;
            pst       <= P_EMIT;
          end else begin
            pst <= P_DATA;
          end
        end
        P_DATA: if (pdi_rd) begin
          if (!wi) blk[127:64] <= word_kept;
          else     blk[63:0]   <= word_kept;
          remaining <= remaining - 16'(wbytes);
          if (wi || remaining <= 16'd8) begin
            bdi.data  <= wi ? {blk[127:64], word_kept} : {word_kept, 64'h0};
            bdi.bytes <= blk_bytes + 5'(wbytes);
            bdi.ad    <= cur_ad;
            bdi.eot   <= (remaining <= 16'(wbytes));
            bdi.eoi   <= !cur_ad && (remaining <= 16'(wbytes));
            bdi_valid <= 1'b1;
            blk_bytes <= '0;
            wi        <= 1'b0;
            pst       <= P_EMIT;
          end else begin
            blk_bytes <= blk_bytes + 5'(wbytes);
            wi        <= 1'b1;
          end
        end
        P_EMIT: if (bdi_read) begin
          bdi_valid <= 1'b0;
          if (!bdi.eot)    pst <= P_DATA;
          else if (cur_ad) pst <= P_MSG_HDR;
          else if (decrypt) pst <= P_TAG_HDR;
          else pst <= P_INS;
        end
        P_TAG_HDR: if (pdi_rd) begin
          if (pdi_data[55:52] != ST_TAG) proto_err <= 1'b1;
          pst <= P_TAG0;
        end
        P_TAG0: if (pdi_rd) begin exp_tag[127:64] <= pdi_data; pst <= P_TAG1; end
        P_TAG1: if (pdi_rd) begin
          exp_tag[63:0] <= pdi_data;
          exp_tag_valid <= 1'b1;
          pst           <= P_INS;
        end
        default: pst <= P_INS;
      endcase
    end
  end

  // an offered block stays unchanged until the core takes it
  a_bdi_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (bdi_valid && !bdi_read) |=> (bdi_valid && $stable(bdi)));

endmodule
