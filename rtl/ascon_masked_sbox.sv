// ascon_masked_sbox: the ASCON 5-bit S-box layer with a power-masking
// decoy S-box, applied to N bit-sliced columns at once.
//
// Each column has two identical S-box units, the real one and a decoy S*.
// A random bit per column (swap) decides which unit receives the real
// 5-bit input x and which receives a random 5-bit input xr; the outputs
// are swapped back by the same bit, so y is always S(x). The power drawn
// by the S-box layer therefore mixes the real computation with an
// unrelated one at a random position, which hides the correlation between
// the S-box input and the consumption that a first- or last-round power
// analysis relies on. The S-box itself is written as bit-sliced logic
// functions, not as a table.
//
// Interface: x, xr and y are five N-bit words ([0] = x0 ... [4] = x4, bit
// j of every word forms column j); swap has one bit per column. Purely
// combinational.
//
// Origin: a random masking S-box beside the real one, fed a random 5-bit
// input, with the results swapped twice, is the countermeasure of the
// hopping system for ASCON, and the bit-sliced S-box is ASCON's. Using an
// identical S-box as the decoy and one swap bit per column are this
// design's choices.
module ascon_masked_sbox #(
  parameter int unsigned N = 64
) (
  input  logic [4:0][N-1:0] x,
  input  logic [4:0][N-1:0] xr,
  input  logic [N-1:0]      swap,
  output logic [4:0][N-1:0] y
);

  function automatic logic [4:0][N-1:0] sbox(input logic [4:0][N-1:0] s);
    logic [N-1:0] x0, x1, x2, x3, x4, t0, t1, t2, t3, t4;
    {x4, x3, x2, x1, x0} = s;
    x0 = x0 ^ x4; x4 = x4 ^ x3; x2 = x2 ^ x1;
    t0 = ~x0 & x1; t1 = ~x1 & x2; t2 = ~x2 & x3; t3 = ~x3 & x4; t4 = ~x4 & x0;
    x0 = x0 ^ t1; x1 = x1 ^ t2; x2 = x2 ^ t3; x3 = x3 ^ t4; x4 = x4 ^ t0;
    x1 = x1 ^ x0; x0 = x0 ^ x4; x3 = x3 ^ x2; x2 = ~x2;
    return {x4, x3, x2, x1, x0};
  endfunction

  logic [4:0][N-1:0] a_in, b_in, a_out, b_out;

  always_comb begin
    for (int w = 0; w < 5; w++) begin
      a_in[w] = (x[w] & ~swap) | (xr[w] & swap);    // first swap
      b_in[w] = (xr[w] & ~swap) | (x[w] & swap);
    end
    a_out = sbox(a_in);                             // S
    b_out = sbox(b_in);                             // S*
    for (int w = 0; w < 5; w++)
      y[w] = (a_out[w] & ~swap) | (b_out[w] & swap);  // second swap
  end

endmodule
