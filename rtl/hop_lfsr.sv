// hop_lfsr: 5-bit Fibonacci LFSR that produces the algorithm-hopping
// sequence.
//
// Feedback polynomial 1 + x^3 + x^5 with an XNOR gate, so the register
// runs through the 31 states other than all ones (which is the lock-up
// state of an XNOR LFSR and is therefore mapped to all zeros when loaded
// as a seed). The seed is loaded with seed_load; each `step` pulse moves
// to the next state, i.e. the next session. The three least significant
// bits form the algorithm ID; IDs of 4 and above select AEGIS (alg).
// Both the sending and the receiving node run one of these from the same
// seed, so they hop through the same sequence.
//
// Origin: the 5-bit Fibonacci LFSR with polynomial 1 + x^3 + x^5, XNOR taps and
// the ID taken from its three low bits come from the hopping system; the
// mapping of IDs 4-7 to AEGIS and the handling of the all-ones seed are this
// design's choices.
module hop_lfsr
  import hop_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       seed_load,
  input  logic [4:0] seed,
  input  logic       step,
  output logic [4:0] state,
  output logic [2:0] id,
  output alg_t       alg
);

  logic fb;
  assign fb = ~(state[4] ^ state[2]);       // taps at bits 5 and 3

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         state <= '0;
    else if (seed_load) state <= (seed == 5'h1f) ? 5'h00 : seed;
    else if (step)      state <= {state[3:0], fb};
  end

  assign id  = state[2:0];
  assign alg = alg_of_id(state[2:0]);

endmodule
