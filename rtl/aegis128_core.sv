// aegis128_core: AEGIS-128 authenticated encryption / decryption core.
//
// The 80-byte state S0..S4 is updated with one 16-byte word per clock by
// five parallel AES round functions: S0' = R(S4)^S0^m, S1' = R(S0)^S1,
// S2' = R(S1)^S2, S3' = R(S2)^S3, S4' = R(S3)^S4 (R = SubBytes, ShiftRows,
// MixColumns, no key). Initialisation loads S0 = K^IV, S1 = const1,
// S2 = const0, S3 = K^const0, S4 = K^const1 and runs 10 updates with K and
// K^IV alternately. Each AD block and each plaintext block is one update;
// the keystream is S1^S4^(S2&S3). Finalisation runs 7 updates with
// S3 ^ (64-bit AD bit length || 64-bit message bit length, little endian)
// and the tag is S0^S1^S2^S3^S4. The state update follows the equations the
// module was built from; the constants, initialisation and finalisation are
// the published AEGIS-128 definition.
//
// Interface: core_in_t / core_out_t (hop_pkg). Partial last blocks arrive
// zero filled; the cipher text of a partial block is truncated and a
// decrypted partial block is cleared beyond its length before it enters
// the state.
// Timing: 10 cycles of initialisation, then one cycle per 16-byte block
// (plus a cycle whenever the post-processor holds bdo), 7 finalisation
// cycles and one cycle for the tag.
module aegis128_core
  import hop_pkg::*;
  import aes_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  core_in_t  cin,
  output core_out_t cout
);

  localparam logic [127:0] CONST0 = 128'h000101020305080d1522375990e97962;
  localparam logic [127:0] CONST1 = 128'hdb3d18556dc22ff12011314273b528dd;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_AD, S_MSG, S_FIN, S_TAG} st_t;
  st_t st;
  core_out_t co;           // registered outputs; bdi_read is combinational

  logic [127:0] s0, s1, s2, s3, s4;
  logic [127:0] key, npub, fin_word;
  logic [3:0]   cnt;
  logic [60:0]  adlen, msglen;
  logic         dec;

  function automatic logic [63:0] bswap64(input logic [63:0] v);
    logic [63:0] o;
    for (int k = 0; k < 8; k++) o[8*k +: 8] = v[63-8*k -: 8];
    return o;
  endfunction

  // one state update with message word m
  logic [127:0] m_upd;
  logic [127:0] n0, n1, n2, n3, n4;
  always_comb begin
    n0 = aes_round(s4, s0 ^ m_upd);
    n1 = aes_round(s0, s1);
    n2 = aes_round(s1, s2);
    n3 = aes_round(s2, s3);
    n4 = aes_round(s3, s4);
  end

  logic [127:0] ks, out_blk, plain_blk;
  logic         take_msg, take_ad;
  always_comb begin
    ks        = s1 ^ s4 ^ (s2 & s3);
    out_blk   = keep_bytes(cin.bdi.data ^ ks, cin.bdi.bytes);
    plain_blk = dec ? out_blk : cin.bdi.data;
    take_ad   = (st == S_AD)  && cin.bdi_valid && cin.bdi.ad;
    take_msg  = (st == S_MSG) && cin.bdi_valid && !cin.bdi.ad && (!co.bdo_valid || cin.bdo_ready);
    unique case (st)
      S_INIT:  m_upd = cnt[0] ? (key ^ npub) : key;
      S_AD:    m_upd = cin.bdi.data;
      S_MSG:   m_upd = plain_blk;
      S_FIN:   m_upd = fin_word;
      default: m_upd = '0;
    endcase
  end

  always_comb begin
    cout          = co;
    cout.bdi_read = take_ad | take_msg;
  end

  logic [127:0] tag_calc;
  assign tag_calc = s0 ^ s1 ^ s2 ^ s3 ^ s4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      {s0, s1, s2, s3, s4} <= '0;
      key <= '0; npub <= '0; fin_word <= '0;
      cnt <= '0; adlen <= '0; msglen <= '0; dec <= 1'b0;
      co <= '0;
    end else begin
      co.auth_done <= 1'b0;
      if (co.bdo_valid && cin.bdo_ready) co.bdo_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (cin.start) begin
          key  <= cin.key;
          npub <= cin.npub;
          dec  <= cin.decrypt;
          s0 <= cin.key ^ cin.npub; s1 <= CONST1; s2 <= CONST0;
          s3 <= cin.key ^ CONST0;   s4 <= cin.key ^ CONST1;
          cnt <= '0; adlen <= '0; msglen <= '0;
          co.busy <= 1'b1;
          st <= S_INIT;
        end
        S_INIT: begin
          {s0, s1, s2, s3, s4} <= {n0, n1, n2, n3, n4};
          cnt <= cnt + 4'd1;
          if (cnt == 4'd9) st <= S_AD;
        end
        S_AD: begin
          if (take_ad) begin
            if (cin.bdi.bytes != 5'd0) begin
              {s0, s1, s2, s3, s4} <= {n0, n1, n2, n3, n4};
              adlen <= adlen + 61'(cin.bdi.bytes);
            end
            if (cin.bdi.eot) st <= S_MSG;
          end else if (cin.bdi_valid && !cin.bdi.ad) begin
            st <= S_MSG;                       // no associated data
          end
        end
        S_MSG: if (take_msg) begin
          co.bdo       <= out_blk;
          co.bdo_bytes <= cin.bdi.bytes;
          co.bdo_valid <= 1'b1;
          if (cin.bdi.bytes != 5'd0) begin
            {s0, s1, s2, s3, s4} <= {n0, n1, n2, n3, n4};
            msglen <= msglen + 61'(cin.bdi.bytes);
          end
          if (cin.bdi.eot) begin
            st  <= S_FIN;
            cnt <= '0;
            // S3 of the state after this block is needed: take it from n3
            // when the state is updated, else the current s3
            fin_word <= ((cin.bdi.bytes != 5'd0) ? n3 : s3) ^
                        {bswap64({adlen, 3'b000}),
                         bswap64({msglen + 61'(cin.bdi.bytes), 3'b000})};
          end
        end
        S_FIN: begin
          {s0, s1, s2, s3, s4} <= {n0, n1, n2, n3, n4};
          cnt <= cnt + 4'd1;
          if (cnt == 4'd6) st <= S_TAG;
        end
        S_TAG: begin
          if (!dec) begin
            if (!co.tag_valid && !co.bdo_valid) begin
              co.tag       <= tag_calc;
              co.tag_valid <= 1'b1;
            end else if (co.tag_valid && cin.bdo_ready) begin
              co.tag_valid <= 1'b0;
              co.busy      <= 1'b0;
              st             <= S_IDLE;
            end
          end else if (cin.exp_tag_valid && !co.bdo_valid) begin
            co.tag        <= tag_calc;
            co.auth_done  <= 1'b1;
            co.auth_valid <= (tag_calc == cin.exp_tag);
            co.busy       <= 1'b0;
            st              <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
