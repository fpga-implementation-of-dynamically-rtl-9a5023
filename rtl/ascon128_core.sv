// ascon128_core: ASCON-128 authenticated encryption / decryption core.
//
// The 320-bit state x0..x4 goes through one permutation round per clock:
// round-constant addition, the 5-bit S-box layer (ascon_masked_sbox:
// bit-sliced logic functions, no look-up table, with a randomly swapped
// decoy S-box fed from a free-running LFSR to mask the power trace), and
// the linear diffusion layer. Initialisation loads IV || K || N and runs the 12-round
// permutation p^a; each 8-byte rate block of associated data or message is
// XORed into x0 and followed by the 6-round permutation p^b; the last rate
// block carries the 10* padding; finalisation XORs the key into x1,x2, runs
// p^a and outputs the tag x3^K0 || x4^K1. Parameters are those of
// ASCON-128 (k = 128, r = 64, a = 12, b = 6).
//
// Interface: core_in_t / core_out_t (hop_pkg). The core takes 16-byte
// blocks from the pre-processor and absorbs them as two 64-bit rate
// halves; the last block may be partial and arrives zero filled.
// Timing: 12 cycles of initialisation, 7 cycles per 8-byte rate half (one
// absorb cycle and 6 rounds), 12 finalisation cycles.
//
// Origin: the hopping system uses ASCON-128 as one of its five ciphers; the
// algorithm follows its designers' specification. One round per clock, the
// 16-byte block interface and the state machine are this design's choice,
// as is the pseudo-random mask source (a true random source would replace
// the LFSR in a hardened device).
module ascon128_core
  import hop_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  core_in_t  cin,
  output core_out_t cout
);

  localparam logic [63:0] IV = 64'h80400c0600000000;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_WAIT_AD, S_ABS_AD, S_PERM_AD,
    S_WAIT_MSG, S_ABS_MSG, S_PERM_MSG, S_FIN, S_TAG
  } st_t;
  st_t st;

  typedef logic [4:0][63:0] ascon_state_t;   // [0] = x0

  function automatic logic [63:0] ror(input logic [63:0] v, input int n);
    return (v >> n) | (v << (64 - n));
  endfunction

  function automatic ascon_state_t add_const(input ascon_state_t s, input logic [3:0] r);
    ascon_state_t o = s;
    o[2] = s[2] ^ {56'h0, 4'hf - r, r};
    return o;
  endfunction

  function automatic ascon_state_t linear(input ascon_state_t s);
    ascon_state_t o;
    o[0] = s[0] ^ ror(s[0], 19) ^ ror(s[0], 28);
    o[1] = s[1] ^ ror(s[1], 61) ^ ror(s[1], 39);
    o[2] = s[2] ^ ror(s[2], 1)  ^ ror(s[2], 6);
    o[3] = s[3] ^ ror(s[3], 10) ^ ror(s[3], 17);
    o[4] = s[4] ^ ror(s[4], 7)  ^ ror(s[4], 41);
    return o;
  endfunction

  // keep the first n bytes of a 64-bit half (n = 0..8)
  function automatic logic [63:0] keep8(input logic [63:0] v, input logic [3:0] n);
    logic [63:0] m;
    for (int k = 0; k < 8; k++) m[63-8*k -: 8] = (k < int'(n)) ? 8'hff : 8'h00;
    return v & m;
  endfunction

  function automatic logic [63:0] pad8(input logic [3:0] n);
    logic [63:0] m;
    m = '0;
    for (int k = 0; k < 8; k++) if (k == int'(n)) m[63-8*k -: 8] = 8'h80;
    return m;
  endfunction

  ascon_state_t x, x_rnd;
  logic [127:0] key;
  logic [127:0] blk, outblk;
  logic [4:0]   bn;
  logic         beot, dec;
  logic [1:0]   hi;
  logic [3:0]   rnd;
  core_out_t    co;

  // one round: constant, masked S-box layer, linear layer
  ascon_state_t x_pc, x_sb, mask;
  logic [63:0]  rng;
  assign x_pc = add_const(x, rnd);
  assign mask = {ror(rng, 13), ror(rng, 29), ror(rng, 41), ror(rng, 53), ~rng};
  ascon_masked_sbox #(.N(64)) u_sbox (.x(x_pc), .xr(mask), .swap(ror(rng, 7)), .y(x_sb));
  assign x_rnd = linear(x_sb);

  // free-running 64-bit Galois LFSR (x^64 + x^63 + x^61 + x^60 + 1) for the
  // decoy inputs and swap bits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rng <= 64'h9e3779b97f4a7c15;
    else        rng <= {1'b0, rng[63:1]} ^ (rng[0] ? 64'hd800000000000000 : 64'h0);
  end

  // current rate half
  logic [63:0] h, h_out;
  logic [3:0]  hb;
  logic        h_final;
  always_comb begin
    unique case (hi)
      2'd0:    h = blk[127:64];
      2'd1:    h = blk[63:0];
      default: h = '0;
    endcase
    if (int'(bn) >= 8 * int'(hi) + 8) hb = 4'd8;
    else if (int'(bn) <= 8 * int'(hi)) hb = 4'd0;
    else hb = 4'(int'(bn) - 8 * int'(hi));
    h_final = beot && (hb != 4'd8);
    h_out   = keep8(x[0] ^ h, hb);
  end

  logic take_ad, take_msg;
  assign take_ad  = (st == S_WAIT_AD) && cin.bdi_valid && cin.bdi.ad;
  assign take_msg = (st == S_WAIT_MSG) && cin.bdi_valid && !cin.bdi.ad &&
                    (!co.bdo_valid || cin.bdo_ready);

  always_comb begin
    cout          = co;
    cout.bdi_read = take_ad | take_msg;
  end

  logic [127:0] outblk_n;
  always_comb begin
    outblk_n = outblk;
    if (hi == 2'd0) outblk_n[127:64] = h_out;
    if (hi == 2'd1) outblk_n[63:0]   = h_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;
      x <= '0; key <= '0; blk <= '0; outblk <= '0;
      bn <= '0; beot <= 1'b0; dec <= 1'b0; hi <= '0; rnd <= '0;
      co <= '0;
    end else begin
      co.auth_done <= 1'b0;
      if (co.bdo_valid && cin.bdo_ready) co.bdo_valid <= 1'b0;
      unique case (st)
        S_IDLE: if (cin.start) begin
          key <= cin.key;
          dec <= cin.decrypt;
          x   <= {cin.npub[63:0], cin.npub[127:64], cin.key[63:0], cin.key[127:64], IV};
          rnd <= 4'd0;
          co.busy <= 1'b1;
          st  <= S_INIT;
        end
        S_INIT: begin
          x   <= x_rnd;
          rnd <= rnd + 4'd1;
          if (rnd == 4'd11) begin
            x[3] <= x_rnd[3] ^ key[127:64];
            x[4] <= x_rnd[4] ^ key[63:0];
            st   <= S_WAIT_AD;
          end
        end
        S_WAIT_AD: begin
          if (take_ad) begin
            blk <= cin.bdi.data; bn <= cin.bdi.bytes; beot <= cin.bdi.eot; hi <= 2'd0;
            if (cin.bdi.bytes == 5'd0) begin        // empty associated data
              x[4][0] <= ~x[4][0];
              st <= S_WAIT_MSG;
            end else begin
              st <= S_ABS_AD;
            end
          end else if (cin.bdi_valid && !cin.bdi.ad) begin
            x[4][0] <= ~x[4][0];
            st <= S_WAIT_MSG;
          end
        end
        S_ABS_AD: begin
          x[0] <= x[0] ^ h ^ (h_final ? pad8(hb) : 64'h0);
          rnd  <= 4'd6;
          st   <= S_PERM_AD;
        end
        S_PERM_AD: begin
          x   <= x_rnd;
          rnd <= rnd + 4'd1;
          if (rnd == 4'd11) begin
            if (beot && hb != 4'd8) begin           // padded half absorbed
              x[4] <= x_rnd[4] ^ 64'h1;             // domain separation
              st   <= S_WAIT_MSG;
            end else if (!beot && hi == 2'd1) begin
              st <= S_WAIT_AD;
            end else begin
              hi <= hi + 2'd1;
              st <= S_ABS_AD;
            end
          end
        end
        S_WAIT_MSG: if (take_msg) begin
          blk <= cin.bdi.data; bn <= cin.bdi.bytes; beot <= cin.bdi.eot; hi <= 2'd0;
          outblk <= '0;
          st <= S_ABS_MSG;
        end
        S_ABS_MSG: begin
          x[0]   <= x[0] ^ (dec ? h_out : h) ^ (h_final ? pad8(hb) : 64'h0);
          outblk <= outblk_n;
          if (h_final || (!beot && hi == 2'd1)) begin
            co.bdo       <= outblk_n;
            co.bdo_bytes <= bn;
            co.bdo_valid <= 1'b1;
          end
          if (h_final) begin
            x[1] <= x[1] ^ key[127:64];
            x[2] <= x[2] ^ key[63:0];
            rnd  <= 4'd0;
            st   <= S_FIN;
          end else begin
            rnd <= 4'd6;
            st  <= S_PERM_MSG;
          end
        end
        S_PERM_MSG: begin
          x   <= x_rnd;
          rnd <= rnd + 4'd1;
          if (rnd == 4'd11) begin
            if (!beot && hi == 2'd1) st <= S_WAIT_MSG;
            else begin
              hi <= hi + 2'd1;
              st <= S_ABS_MSG;
            end
          end
        end
        S_FIN: begin
          x   <= x_rnd;
          rnd <= rnd + 4'd1;
          if (rnd == 4'd11) begin
            co.tag <= {x_rnd[3] ^ key[127:64], x_rnd[4] ^ key[63:0]};
            st     <= S_TAG;
          end
        end
        S_TAG: begin
          if (!dec) begin
            if (!co.tag_valid && !co.bdo_valid) co.tag_valid <= 1'b1;
            else if (co.tag_valid && cin.bdo_ready) begin
              co.tag_valid <= 1'b0;
              co.busy      <= 1'b0;
              st           <= S_IDLE;
            end
          end else if (cin.exp_tag_valid && !co.bdo_valid) begin
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
