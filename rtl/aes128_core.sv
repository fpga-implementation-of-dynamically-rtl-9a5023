// aes128_core: iterative AES-128 block cipher, encryption and decryption.
//
// key_load stores the key and expands the eleven round keys, one per
// clock, into a register file (key_ready rises after 10 cycles). A block
// then takes one round per clock: encryption XORs round key 0 on start and
// runs rounds 1..10 (the last without MixColumns); decryption runs the
// inverse rounds from round key 10 down to round key 0. dout is valid with
// the one-cycle done pulse, 10 cycles after start in either direction.
// This is the block cipher E_K that OCB calls; a single instance is shared
// by all the block-cipher calls of a mode.
//
// Origin: AES-128 itself is the standard cipher (FIPS-197), used here as the block
// cipher inside OCB as in the hopping system; the iterative one-round-per-cycle
// structure and stored round keys are this design's choice.
module aes128_core
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         key_load,
  input  logic [127:0] key,
  output logic         key_ready,
  input  logic         start,
  input  logic         decrypt,
  input  logic [127:0] din,
  output logic [127:0] dout,
  output logic         done,
  output logic         busy
);

  logic [127:0] rk [11];
  logic [3:0]   kcnt, cnt;
  logic [7:0]   rcon;
  logic         expanding, dec;
  logic [127:0] s, s_enc, s_dec;

  assign s_enc = (cnt == 4'd10) ? aes_final_round(s, rk[10]) : aes_round(s, rk[cnt]);
  assign s_dec = aes_inv_round(s, rk[cnt]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 11; i++) rk[i] <= '0;
      kcnt <= '0; rcon <= 8'h01; expanding <= 1'b0; key_ready <= 1'b0;
      cnt <= '0; dec <= 1'b0; s <= '0; dout <= '0; done <= 1'b0; busy <= 1'b0;
    end else begin
      done <= 1'b0;
      if (key_load) begin
        rk[0]     <= key;
        kcnt      <= 4'd1;
        rcon      <= 8'h01;
        expanding <= 1'b1;
        key_ready <= 1'b0;
      end else if (expanding) begin
        rk[kcnt] <= next_round_key(rk[kcnt - 4'd1], rcon);
        rcon     <= xtime(rcon);
        kcnt     <= kcnt + 4'd1;
        if (kcnt == 4'd10) begin
          expanding <= 1'b0;
          key_ready <= 1'b1;
        end
      end
      if (start && !busy) begin
        busy <= 1'b1;
        dec  <= decrypt;
        if (decrypt) begin
          s   <= aes_inv_final_round(din, rk[10]);
          cnt <= 4'd9;
        end else begin
          s   <= din ^ rk[0];
          cnt <= 4'd1;
        end
      end else if (busy) begin
        if (!dec) begin
          s   <= s_enc;
          cnt <= cnt + 4'd1;
          if (cnt == 4'd10) begin
            dout <= s_enc;
            done <= 1'b1;
            busy <= 1'b0;
          end
        end else begin
          s   <= s_dec;
          cnt <= cnt - 4'd1;
          if (cnt == 4'd1) begin
            dout <= s_dec ^ rk[0];
            done <= 1'b1;
            busy <= 1'b0;
          end
        end
      end
    end
  end

endmodule
