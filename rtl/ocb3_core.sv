// ocb3_core: OCB (OCB3, AES-128, 96-bit nonce, 128-bit tag) authenticated
// encryption / decryption core.
//
// All block-cipher calls go through one iterative aes128_core. On start the
// core expands the key, computes L* = E_K(0), L$ = double(L*) and
// L0 = double(L$), and derives the first offset from the nonce:
// Ktop = E_K(nonce block with its low 6 bits cleared), Stretch =
// Ktop || (Ktop[1..64] xor Ktop[9..72]), Offset0 = Stretch shifted left by
// the low 6 nonce bits. Each full block i then moves the offset on by
// L_ntz(i) (L_j = L0 doubled j times) and is enciphered as
// Offset xor E_K(Block xor Offset); associated data is hashed the same way
// into Sum. A short last block uses L* and a pad E_K(Offset*). The checksum
// of the plaintext gives the tag E_K(Checksum xor Offset xor L$) xor Sum.
// Decryption uses the AES inverse for full blocks.
//
// Interface: core_in_t / core_out_t (hop_pkg); the nonce is npub[127:32].
// Timing: 10 cycles of key expansion and three block-cipher calls of
// setup, then one block-cipher call (about 12 cycles) per block and one
// for the tag.
//
// Origin: the hopping system uses OCB with AES as one of its five ciphers; the
// mode follows RFC 7253. Sharing one iterative AES core for all steps is this
// design's choice.
module ocb3_core
  import hop_pkg::*;
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  core_in_t  cin,
  output core_out_t cout
);

  typedef enum logic [3:0] {
    S_IDLE, S_KEY, S_LSTAR, S_KTOP, S_WAIT_AD, S_AD, S_WAIT_MSG, S_MSG, S_TAG_E, S_TAG
  } st_t;
  st_t st;

  logic         aes_key_load, aes_key_ready, aes_start, aes_dec, aes_done, aes_busy;
  logic [127:0] aes_din, aes_dout;

  aes128_core u_aes (
    .clk(clk), .rst_n(rst_n), .key_load(aes_key_load), .key(cin.key),
    .key_ready(aes_key_ready), .start(aes_start), .decrypt(aes_dec),
    .din(aes_din), .dout(aes_dout), .done(aes_done), .busy(aes_busy)
  );

  function automatic logic [127:0] dbl(input logic [127:0] v);
    return {v[126:0], 1'b0} ^ (v[127] ? 128'h87 : 128'h0);
  endfunction

  // L_j = L0 doubled j times
  function automatic logic [127:0] l_of(input logic [127:0] l0, input logic [3:0] j);
    logic [127:0] v = l0;
    for (int k = 0; k < 15; k++) if (k < int'(j)) v = dbl(v);
    return v;
  endfunction

  function automatic logic [3:0] ntz(input logic [15:0] i);
    logic [3:0] n = 4'd15;
    for (int k = 14; k >= 0; k--) if (i[k]) n = 4'(k);
    return n;
  endfunction

  core_out_t    co;
  logic [127:0] lstar, ldollar, l0, nonce, offset, sum, checksum, blk, xin;
  logic [5:0]   bottom;
  logic [15:0]  ia, im;
  logic [4:0]   bn;
  logic         beot, dec, partial;

  logic take_ad, take_msg;
  assign take_ad  = (st == S_WAIT_AD) && cin.bdi_valid && cin.bdi.ad && !aes_busy;
  assign take_msg = (st == S_WAIT_MSG) && cin.bdi_valid && !cin.bdi.ad && !aes_busy &&
                    (!co.bdo_valid || cin.bdo_ready);

  always_comb begin
    cout          = co;
    cout.bdi_read = take_ad | take_msg;
  end

  // offsets for the block being taken
  logic [127:0] off_ad_n, off_msg_n;
  logic [191:0] stretch;
  assign off_ad_n  = (cin.bdi.bytes == 5'd16) ? offset ^ l_of(l0, ntz(ia)) : offset ^ lstar;
  assign off_msg_n = (cin.bdi.bytes == 5'd16) ? offset ^ l_of(l0, ntz(im)) : offset ^ lstar;
  assign stretch   = {aes_dout, aes_dout[127:64] ^ aes_dout[119:56]};

  logic [127:0] msg_out, plain;
  always_comb begin
    if (partial) msg_out = keep_bytes(blk ^ aes_dout, bn);       // pad xor text
    else         msg_out = offset ^ aes_dout;
    plain = dec ? msg_out : blk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      co <= '0;
      {lstar, ldollar, l0, nonce, offset, sum, checksum, blk, xin} <= '0;
      bottom <= '0; ia <= '0; im <= '0; bn <= '0; beot <= 1'b0; dec <= 1'b0; partial <= 1'b0;
      aes_key_load <= 1'b0; aes_start <= 1'b0; aes_dec <= 1'b0; aes_din <= '0;
    end else begin
      aes_key_load <= 1'b0;
      aes_start    <= 1'b0;
      co.auth_done <= 1'b0;
      if (co.bdo_valid && cin.bdo_ready) co.bdo_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (cin.start) begin
          dec          <= cin.decrypt;
          nonce        <= {31'h0, 1'b1, cin.npub[127:32]};
          aes_key_load <= 1'b1;
          co.busy      <= 1'b1;
          st           <= S_KEY;
        end
        S_KEY: if (aes_key_ready && !aes_key_load) begin
          aes_din   <= '0;
          aes_dec   <= 1'b0;
          aes_start <= 1'b1;
          st        <= S_LSTAR;
        end
        S_LSTAR: if (aes_done) begin
          lstar     <= aes_dout;
          ldollar   <= dbl(aes_dout);
          l0        <= dbl(dbl(aes_dout));
          bottom    <= nonce[5:0];
          aes_din   <= {nonce[127:6], 6'b0};
          aes_start <= 1'b1;
          st        <= S_KTOP;
        end
        S_KTOP: if (aes_done) begin
          offset   <= stretch[191 - int'(bottom) -: 128];   // Offset0 of the message
          xin      <= stretch[191 - int'(bottom) -: 128];
          sum      <= '0;
          checksum <= '0;
          ia       <= 16'd1;
          im       <= 16'd1;
          st       <= S_WAIT_AD;
        end
        // ---- associated data: HASH(K, A) with its own offset from zero
        S_WAIT_AD: begin
          if (take_ad) begin
            if (cin.bdi.bytes == 5'd0) begin
              offset <= xin;                      // empty AD: message offset
              st     <= S_WAIT_MSG;
            end else begin
              if (ia == 16'd1) begin
                // AD offsets start from zero; keep Offset0 of the message in xin
                offset  <= (cin.bdi.bytes == 5'd16) ? l_of(l0, 4'd0) : lstar;
                aes_din <= (cin.bdi.bytes == 5'd16) ? (cin.bdi.data ^ l_of(l0, 4'd0))
                         : ((cin.bdi.data | pad_bit(cin.bdi.bytes)) ^ lstar);
              end else begin
                offset  <= off_ad_n;
                aes_din <= (cin.bdi.bytes == 5'd16) ? (cin.bdi.data ^ off_ad_n)
                         : ((cin.bdi.data | pad_bit(cin.bdi.bytes)) ^ off_ad_n);
              end
              aes_dec   <= 1'b0;
              aes_start <= 1'b1;
              beot      <= cin.bdi.eot;
              ia        <= ia + 16'd1;
              st        <= S_AD;
            end
          end else if (cin.bdi_valid && !cin.bdi.ad) begin
            offset <= xin;
            st     <= S_WAIT_MSG;
          end
        end
        S_AD: if (aes_done) begin
          sum <= sum ^ aes_dout;
          if (beot) begin
            offset <= xin;
            st     <= S_WAIT_MSG;
          end else begin
            st <= S_WAIT_AD;
          end
        end
        // ---- message / cipher text
        S_WAIT_MSG: if (take_msg) begin
          blk     <= cin.bdi.data;
          bn      <= cin.bdi.bytes;
          beot    <= cin.bdi.eot;
          partial <= (cin.bdi.bytes != 5'd16);
          if (cin.bdi.bytes == 5'd0) begin        // empty message
            co.bdo       <= '0;
            co.bdo_bytes <= '0;
            co.bdo_valid <= 1'b1;
            st           <= S_TAG_E;
          end else begin
            offset    <= off_msg_n;
            aes_din   <= (cin.bdi.bytes == 5'd16) ? (cin.bdi.data ^ off_msg_n) : off_msg_n;
            aes_dec   <= dec && (cin.bdi.bytes == 5'd16);
            aes_start <= 1'b1;
            im        <= im + 16'd1;
            st        <= S_MSG;
          end
        end
        S_MSG: if (aes_done) begin
          co.bdo       <= msg_out;
          co.bdo_bytes <= bn;
          co.bdo_valid <= 1'b1;
          checksum     <= checksum ^ (partial ? (plain | pad_bit(bn)) : plain);
          st           <= beot ? S_TAG_E : S_WAIT_MSG;
        end
        // ---- tag
        S_TAG_E: if (!aes_busy && !aes_start) begin
          aes_din   <= checksum ^ offset ^ ldollar;
          aes_dec   <= 1'b0;
          aes_start <= 1'b1;
          st        <= S_TAG;
        end
        S_TAG: begin
          if (aes_done) co.tag <= aes_dout ^ sum;
          if (!dec) begin
            if (aes_done) co.tag_valid <= 1'b1;
            else if (co.tag_valid && !co.bdo_valid && cin.bdo_ready) begin
              co.tag_valid <= 1'b0;
              co.busy      <= 1'b0;
              st           <= S_IDLE;
            end
          end else if (!aes_busy && !aes_start && !aes_done && cin.exp_tag_valid && !co.bdo_valid) begin
            co.auth_done  <= 1'b1;
            co.auth_valid <= (co.tag == cin.exp_tag);
            co.busy       <= 1'b0;
            st            <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
