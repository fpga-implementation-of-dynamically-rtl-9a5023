// post_processor: formats what the cipher core produces into 64-bit
// output words for the DO FIFO.
//
// Output blocks are split parallel-in serial-out into words; bytes beyond
// a block's length are cleared, and words that would hold none of its
// bytes are not written. Encryption output is formatted as the segment
// stream the receiving node decrypts: a Decrypt instruction, the NPUB
// segment, the AD segment (the AD blocks are copied as the core reads
// them), the CT segment and the TAG segment. Decrypted plaintext is held
// in an internal buffer of MSG_WORDS words until the tag has been
// checked: if it passes, a MSG segment with the plaintext and a success
// status word follow; if it fails (or the plaintext did not fit) only a
// failure status word is written and the plaintext is dropped.
//
// Words pass through an 8-word queue into the DO FIFO, one per clock while
// the FIFO is not full. bdo_ready (the back-pressure to the core) is high
// while the queue has room for the largest burst of one event (four words)
// and no release is in progress. Plaintext beyond the buffer is dropped and
// the message is then reported as failed. `done` pulses when
// the last word of a message has been queued; auth_ok holds the verdict;
// idle is high once the queue has drained.
//
// Origin: the post-processor role (formatting output words, reporting the
// authentication result) follows the CAESAR hardware API used by the hopping
// system; the output program format, the plaintext hold buffer and the status
// codes are this design's choices.
module post_processor
  import hop_pkg::*;
#(
  parameter int unsigned MSG_WORDS = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // message context from the pre-processor
  input  logic         proc_start,
  input  logic         decrypt,
  input  logic [7:0]   msg_id,
  input  logic [127:0] npub,
  input  logic [15:0]  ad_size,
  input  logic [15:0]  msg_size,
  input  bdi_t         snoop_bdi,
  input  logic         snoop_take,
  // from the cipher core
  input  core_out_t    core,
  output logic         bdo_ready,
  // DO FIFO
  output logic [63:0]  do_data,
  output logic         do_wr,
  input  logic         do_full,
  // status
  output logic         done,
  output logic         auth_ok,
  output logic         idle
);

  localparam int unsigned QD = 8;
  localparam int unsigned BW = $clog2(MSG_WORDS);

  logic [63:0] q [QD];
  logic [2:0]  qwp, qrp;
  logic [3:0]  qcnt;
  logic [63:0] pw [4];
  logic [2:0]  pn;
  logic        pop;

  logic [63:0] mbuf [MSG_WORDS];
  logic [BW:0] mcnt, fidx;
  logic        dec, ad_hdr, ct_hdr, flushing, mover;

  typedef enum logic [1:0] {F_IDLE, F_MSG, F_STATUS} fst_t;
  fst_t fst;

  logic bdo_x, tag_x;
  assign bdo_x = core.bdo_valid && bdo_ready;
  assign tag_x = core.tag_valid && bdo_ready && !core.bdo_valid;

  function automatic logic [2:0] nwords(input logic [4:0] bytes);
    return (bytes == 5'd0) ? 3'd0 : (bytes <= 5'd8) ? 3'd1 : 3'd2;
  endfunction

  assign bdo_ready = (qcnt <= 4'(QD - 4)) && !flushing;

  // words to queue this cycle
  always_comb begin
    pn = '0;
    for (int k = 0; k < 4; k++) pw[k] = '0;
    if (proc_start && !decrypt) begin
      pw[0] = ins_word(msg_id, OP_DEC);
      pw[1] = hdr_word(msg_id, ST_NPUB, 1'b0, 1'b1, 16'd16);
      pw[2] = npub[127:64];
      pw[3] = npub[63:0];
      pn    = 3'd4;
    end else if (!dec && snoop_take && snoop_bdi.ad) begin
      if (!ad_hdr) begin
        pw[0] = hdr_word(msg_id, ST_AD, 1'b0, 1'b1, ad_size);
        pw[1] = snoop_bdi.data[127:64];
        pw[2] = snoop_bdi.data[63:0];
        pn    = 3'd1 + nwords(snoop_bdi.bytes);
      end else begin
        pw[0] = snoop_bdi.data[127:64];
        pw[1] = snoop_bdi.data[63:0];
        pn    = nwords(snoop_bdi.bytes);
      end
    end else if (!dec && bdo_x) begin
      if (!ct_hdr) begin
        pw[0] = hdr_word(msg_id, ST_CT, 1'b0, 1'b1, msg_size);
        pw[1] = core.bdo[127:64];
        pw[2] = core.bdo[63:0];
        pn    = 3'd1 + nwords(core.bdo_bytes);
      end else begin
        pw[0] = core.bdo[127:64];
        pw[1] = core.bdo[63:0];
        pn    = nwords(core.bdo_bytes);
      end
    end else if (!dec && tag_x) begin
      pw[0] = hdr_word(msg_id, ST_TAG, 1'b1, 1'b1, 16'd16);
      pw[1] = core.tag[127:64];
      pw[2] = core.tag[63:0];
      pn    = 3'd3;
    end else if (fst == F_MSG && qcnt < 4'(QD)) begin
      pw[0] = (fidx == '0) ? hdr_word(msg_id, ST_MSG, 1'b1, 1'b1, msg_size) : mbuf[fidx[BW-1:0] - 1'b1];
      pn    = 3'd1;
    end else if (fst == F_STATUS && qcnt < 4'(QD)) begin
      pw[0] = {msg_id, auth_ok ? STATUS_OK : STATUS_FAIL, 48'h0};
      pn    = 3'd1;
    end
  end

  assign idle    = (qcnt == 4'd0) && (fst == F_IDLE);
  assign pop     = (qcnt != 4'd0) && !do_full;
  assign do_wr   = pop;
  assign do_data = q[qrp];

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++)
      if (k < int'(pn)) q[qwp + 3'(k)] <= pw[k];
    if (dec && bdo_x && !mover) begin
      if (core.bdo_bytes != 5'd0)  mbuf[mcnt[BW-1:0]]        <= core.bdo[127:64];
      if (core.bdo_bytes > 5'd8)   mbuf[mcnt[BW-1:0] + 1'b1] <= core.bdo[63:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qwp <= '0; qrp <= '0; qcnt <= '0;
      mcnt <= '0; fidx <= '0; dec <= 1'b0; ad_hdr <= 1'b0; ct_hdr <= 1'b0;
      flushing <= 1'b0; mover <= 1'b0; fst <= F_IDLE; done <= 1'b0; auth_ok <= 1'b0;
    end else begin
      done <= 1'b0;
      qwp  <= qwp + pn;
      if (pop) qrp <= qrp + 3'd1;
      qcnt <= qcnt + 4'(pn) - (pop ? 4'd1 : 4'd0);
      if (proc_start) begin
        dec    <= decrypt;
        ad_hdr <= 1'b0;
        ct_hdr <= 1'b0;
        mcnt   <= '0;
        mover  <= 1'b0;
      end
      if (!dec && snoop_take && snoop_bdi.ad) ad_hdr <= 1'b1;
      if (!dec && bdo_x) ct_hdr <= 1'b1;
      if (!dec && tag_x) begin
        done    <= 1'b1;
        auth_ok <= 1'b1;
      end
      // decryption: hold plaintext, release it once authenticated
      if (dec && bdo_x) begin
        if (mcnt + (BW+1)'(nwords(core.bdo_bytes)) > (BW+1)'(MSG_WORDS)) mover <= 1'b1;
        else mcnt <= mcnt + (BW+1)'(nwords(core.bdo_bytes));
      end
      if (dec && core.auth_done) begin
        auth_ok  <= core.auth_valid && !mover;
        flushing <= 1'b1;
        fidx     <= '0;
        fst      <= (core.auth_valid && !mover) ? F_MSG : F_STATUS;
      end
      if (fst == F_MSG && pn != 3'd0) begin
        fidx <= fidx + 1'b1;
        if (fidx == mcnt) fst <= F_STATUS;
      end
      if (fst == F_STATUS && pn != 3'd0) begin
        fst      <= F_IDLE;
        flushing <= 1'b0;
        done     <= 1'b1;
      end
    end
  end

endmodule
