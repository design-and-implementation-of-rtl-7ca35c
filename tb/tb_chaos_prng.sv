// tb_chaos_prng: checks the random generator against a separate model of
// its recurrence (logistic map x' = 4x(1-x) in Q0.32, XORed with the
// x^32+x^22+x^2+x+1 LFSR), that reseeding restarts the sequence, that
// `en` low holds the state, and simple statistics over 20000 words:
// the fraction of ones is close to 1/2 and no word repeats its
// predecessor.
module tb_chaos_prng;
  logic clk = 0, rst_n = 0, en = 0, seed_we = 0;
  logic [31:0] seed = 0, rnd;
  int checks = 0, failures = 0;

  chaos_prng dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] mx, ml, prev, first[8];
  longint ones = 0;
  int repeats = 0;

  task automatic model_step();
    logic [63:0] pr;
    logic [31:0] nl;
    nl = {ml[30:0], ml[31] ^ ml[21] ^ ml[1] ^ ml[0]};
    pr = 64'(mx) * (64'h1_0000_0000 - 64'(mx));
    mx = pr[61:30] ^ nl;
    ml = nl;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); seed_we = 1; seed = 32'hDEADBEEF;
    @(negedge clk); seed_we = 0; en = 1;
    mx = 32'hDEADBEEF; ml = 32'hDEADBEEF;
    checks++; if (rnd != mx) begin failures++; $display("seed not loaded"); end
    prev = rnd;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      model_step();
      checks++;
      if (rnd != mx) begin failures++; if (failures < 5) $display("t=%0d rnd=%h exp=%h", t, rnd, mx); end
      if (t < 8) first[t] = rnd;
      ones += $countones(rnd);
      if (rnd == prev) repeats++;
      prev = rnd;
    end
    checks++;
    if (ones < 20000 * 16 * 98 / 100 || ones > 20000 * 16 * 102 / 100 || repeats != 0) begin
      failures++; $display("statistics ones=%0d repeats=%0d", ones, repeats);
    end
    // hold
    en = 0; prev = rnd;
    repeat (5) @(negedge clk);
    checks++; if (rnd != prev) begin failures++; $display("state moved with en low"); end
    // reseed restarts the sequence
    seed_we = 1; seed = 32'hDEADBEEF; @(negedge clk); seed_we = 0; en = 1;
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      checks++; if (rnd != first[t]) begin failures++; $display("reseed t=%0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
