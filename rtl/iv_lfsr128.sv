// iv_lfsr128: 128-bit Fibonacci LFSR that supplies fresh AEGIS
// initialisation vectors.
//
// Taps 128, 126, 101 and 99 (XOR feedback) give a maximum-length sequence,
// so an IV is not repeated within 2^128 - 1 steps. A `next` pulse advances
// the register by one step; values whose 16 bytes are all equal (which
// would make the AEGIS state words equal, the weak states) are skipped by
// stepping again, so `valid` is low while a skip is in progress. The seed
// is loaded with seed_load (an all-zero seed, the lock-up state, is
// replaced by 1). iv holds the current value.
//
// Origin: a 128-bit LFSR generating the AEGIS IVs on both sides, and the skipping
// of IVs that would give all-equal 16-byte states, come from the hopping
// system, and so do the taps at 128, 126, 101 and 99; the reset value and
// stepping one position per cycle while skipping are this design's choices.
module iv_lfsr128 (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         seed_load,
  input  logic [127:0] seed,
  input  logic         next,
  output logic [127:0] iv,
  output logic         valid
);

  function automatic logic [127:0] step1(input logic [127:0] v);
    return {v[126:0], v[127] ^ v[125] ^ v[100] ^ v[98]};
  endfunction

  function automatic logic is_weak(input logic [127:0] v);
    logic w = 1'b1;
    for (int k = 1; k < 16; k++) if (v[8*k +: 8] != v[7:0]) w = 1'b0;
    return w;
  endfunction

  logic [127:0] nxt;
  assign nxt = step1(iv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iv    <= 128'h1;
      valid <= 1'b1;
    end else if (seed_load) begin
      iv    <= (seed == '0) ? 128'h1 : seed;
      valid <= 1'b1;
    end else if (next || !valid) begin
      iv    <= nxt;
      valid <= !is_weak(nxt);
    end
  end

endmodule
