// tb_ascon_masked_sbox: drives random inputs, decoy inputs and swap bits
// into the masked S-box layer and checks every column's output against
// the ASCON S-box table (the 32-entry table from the cipher definition,
// column value x0 as most significant bit). Also checks that the unit
// not computing the real value really receives the decoy input, and that
// both swap polarities occur.
module tb_ascon_masked_sbox;
  localparam int N = 64;
  localparam logic [4:0] SBOX [32] = '{
    5'h04, 5'h0b, 5'h1f, 5'h14, 5'h1a, 5'h15, 5'h09, 5'h02,
    5'h1b, 5'h05, 5'h08, 5'h12, 5'h1d, 5'h03, 5'h06, 5'h1c,
    5'h1e, 5'h13, 5'h07, 5'h0e, 5'h00, 5'h0d, 5'h11, 5'h18,
    5'h10, 5'h0c, 5'h01, 5'h19, 5'h16, 5'h0a, 5'h0f, 5'h17};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0][N-1:0] x, xr, y;
  logic [N-1:0]      swap;
  ascon_masked_sbox #(.N(N)) dut (.*);

  int checks = 0, failures = 0, n_swapped = 0, n_straight = 0;

  function automatic logic [4:0] col(input logic [4:0][N-1:0] v, input int j);
    return {v[0][j], v[1][j], v[2][j], v[3][j], v[4][j]};
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int w = 0; w < 5; w++) begin
        x[w]  = {$urandom, $urandom};
        xr[w] = {$urandom, $urandom};
      end
      swap = {$urandom, $urandom};
      @(posedge clk);
      for (int j = 0; j < N; j++) begin
        checks++;
        if (col(y, j) != SBOX[col(x, j)]) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d col %0d: S(%h) = %h, got %h", t, j, col(x, j), SBOX[col(x, j)], col(y, j));
        end
        checks++;
        if ((swap[j] ? col(dut.a_in, j) : col(dut.b_in, j)) != col(xr, j)) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d col %0d: decoy unit not fed the random input", t, j);
        end
        if (swap[j]) n_swapped++; else n_straight++;
      end
    end
    checks++;
    if (n_swapped == 0 || n_straight == 0) begin failures++; $display("FAIL: one swap polarity never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
