// tb_hop_lfsr: checks the hopping LFSR against a hand-worked start of its
// sequence, checks that every seed runs through 31 distinct states without
// reaching all ones, and checks the mapping of IDs to algorithms.
module tb_hop_lfsr;
  import hop_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic seed_load, step;
  logic [4:0] seed, state;
  logic [2:0] id;
  alg_t alg;
  hop_lfsr dut (.*);
  int checks = 0, failures = 0;

  // 1 + x^3 + x^5, XNOR, from seed 0: worked out by hand
  localparam logic [4:0] EXP [8] = '{5'h00, 5'h01, 5'h03, 5'h07, 5'h0e, 5'h1c, 5'h19, 5'h12};

  initial begin
    bit seen [32];
    int period;
    seed_load = 0; step = 0; seed = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); seed = 5'h00; seed_load = 1; @(negedge clk); seed_load = 0;
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (state != EXP[i]) begin failures++; $display("FAIL step %0d: %h expected %h", i, state, EXP[i]); end
      step = 1; @(negedge clk); step = 0;
    end
    for (int s = 0; s < 31; s++) begin
      @(negedge clk); seed = 5'(s); seed_load = 1; @(negedge clk); seed_load = 0;
      foreach (seen[k]) seen[k] = 0;
      period = 0;
      do begin
        seen[state] = 1;
        step = 1; @(negedge clk); step = 0;
        period++;
        if (state == 5'h1f) begin failures++; $display("FAIL: all-ones state reached"); end
      end while (state != 5'(s) && period < 40);
      checks++;
      if (period != 31) begin failures++; $display("FAIL seed %0d: period %0d", s, period); end
    end
    // all-ones seed is not a lock-up
    @(negedge clk); seed = 5'h1f; seed_load = 1; @(negedge clk); seed_load = 0;
    checks++;
    if (state == 5'h1f) begin failures++; $display("FAIL: all-ones seed kept"); end
    // ID mapping
    for (int s = 0; s < 31; s++) begin
      @(negedge clk); seed = 5'(s); seed_load = 1; @(negedge clk); seed_load = 0;
      checks++;
      if (id != 3'(s) || alg != ((s % 8) >= 4 ? ALG_AEGIS : alg_t'(s % 8))) begin
        failures++; $display("FAIL seed %0d: id %0d alg %0d", s, id, alg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
