// tb_gfau: self-checking test of the dual-field arithmetic unit.
//
// Runs MA, MS, multiplication and division over several prime fields and
// binary fields (N = 32), with the random-domain mask rnd set to zero
// (MM/MD), to all ones (MMM/MMD) and to random values. Results are checked
// with the defining congruences, computed here with plain 64-bit integer
// and carry-less arithmetic:
//   MUL: R * 2^lambda == X * Y,   DIV: R * Y == X * 2^lambda  (mod p)
// and must be fully reduced. The latency is checked too: 2 cycles for
// MA/MS, m+1 for the multiplication, and for the division the number of
// GCD steps (counted here by a separate loop) plus 2.
module tb_gfau;
  import ecc_pkg::*;
  localparam int N = 32;

  logic clk = 0, rst_n = 0, start = 0;
  gf_op_e op;
  field_e field;
  logic [N:0] p, fl;
  logic [N-1:0] x, y, rnd, mask, result;
  logic busy, done;
  int checks = 0, failures = 0;

  gfau #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference arithmetic
  function automatic logic [63:0] pmod(logic [63:0] a, logic [63:0] b, logic [63:0] m);
    logic [127:0] t = a * b;
    return 64'(t % m);
  endfunction
  function automatic logic [63:0] bmul(logic [63:0] a, logic [63:0] b, logic [63:0] pp, int m);
    logic [63:0] r = 0, aa = a;
    for (int i = 0; i < 64; i++) begin
      if (b[i]) r ^= aa;
      aa = aa << 1;
      if (aa[m]) aa ^= pp;
    end
    return r;
  endfunction
  function automatic logic [63:0] fmul(bit bin, logic [63:0] a, logic [63:0] b, logic [63:0] pp, int m);
    return bin ? bmul(a, b, pp, m) : pmod(a, b, pp);
  endfunction
  function automatic logic [63:0] pow2(bit bin, int e, logic [63:0] pp, int m);
    logic [63:0] r = 1;
    for (int i = 0; i < e; i++) begin
      r = r << 1;
      if (bin) begin if (r[m]) r ^= pp; end
      else if (r >= pp) r -= pp;
    end
    return r;
  endfunction
  function automatic int gcd_steps(bit bin, logic [63:0] u, logic [63:0] v);
    int n = 0;
    while (v != 0) begin
      if (!u[0]) u = u >> 1;
      else if (!v[0]) v = v >> 1;
      else if (u > v) u = (bin ? (u ^ v) : (u - v)) >> 1;
      else v = (bin ? (u ^ v) : (v - u)) >> 1;
      n++;
    end
    return n;
  endfunction

  task automatic run(gf_op_e o, output int lat);
    @(negedge clk);
    op = o; start = 1;
    @(negedge clk);
    start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
  endtask

  logic [63:0] P, X, Y, R, lhs, rhs, rr;
  int m, lat, lam, exp_lat, topbit;
  bit bin;
  logic [63:0] primes[4] = '{64'd13, 64'd251, 64'd65521, 64'd4294967291};
  int          pm[4]     = '{4, 8, 16, 32};
  logic [63:0] polys[4]  = '{64'h13, 64'h11B, 64'h20009, 64'h80000009};
  int          bm[4]     = '{4, 8, 17, 31};
  int n_mul = 0, n_div = 0, n_add = 0, n_sub = 0;

  initial begin
    mask = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      bin = (f >= 4);
      P = bin ? polys[f-4] : primes[f];
      m = bin ? bm[f-4] : pm[f];
      field = bin ? FIELD_B : FIELD_P;
      p = (N+1)'(P);
      fl = (N+1)'(1) << m;
      for (int t = 0; t < 60; t++) begin
        X = {$urandom, $urandom};
        Y = {$urandom, $urandom};
        if (bin) begin
          X &= (64'd1 << m) - 1; Y &= (64'd1 << m) - 1;
        end else begin
          X %= P; Y %= P;
        end
        if (Y == 0) Y = 1;
        x = N'(X); y = N'(Y);
        mask = $urandom;
        case (t % 3)
          0: rr = 0;
          1: rr = (64'd1 << m) - 1;
          default: rr = {$urandom, $urandom} & ((64'd1 << m) - 1);
        endcase
        rnd = N'(rr) | (N'($urandom) << m); // bits at and above m must be ignored
        lam = $countones(rr);
        topbit = 0;
        for (int i = 0; i < m; i++) if (rr[i]) topbit = i + 1;

        // ---- MA / MS
        run(GF_ADD, lat); R = 64'(result);
        rhs = bin ? (X ^ Y) : ((X + Y) % P);
        checks++; if (R != rhs || lat != 2) begin failures++; $display("ADD f=%0d X=%h Y=%h R=%h exp=%h lat=%0d", f, X, Y, R, rhs, lat); end
        n_add++;
        run(GF_SUB, lat); R = 64'(result);
        rhs = bin ? (X ^ Y) : ((X + P - Y) % P);
        checks++; if (R != rhs || lat != 2) begin failures++; $display("SUB f=%0d X=%h Y=%h R=%h exp=%h", f, X, Y, R, rhs); end
        n_sub++;

        // ---- multiplication
        run(GF_MUL, lat); R = 64'(result);
        lhs = fmul(bin, R, pow2(bin, lam, P, m), P, m);
        rhs = fmul(bin, X, Y, P, m);
        checks++;
        if (lhs != rhs || (bin ? (R >> m) != 0 : R >= P) || lat != m + 1) begin
          failures++; $display("MUL f=%0d X=%h Y=%h r=%h R=%h lat=%0d", f, X, Y, rr, R, lat);
        end
        n_mul++;

        // ---- division
        run(GF_DIV, lat); R = 64'(result);
        lhs = fmul(bin, R, Y, P, m);
        rhs = fmul(bin, X, pow2(bin, lam, P, m), P, m);
        exp_lat = gcd_steps(bin, P, Y);
        if (topbit > exp_lat) exp_lat = topbit;
        exp_lat += 2;
        checks++;
        if (lhs != rhs || (bin ? (R >> m) != 0 : R >= P) || lat != exp_lat) begin
          failures++; $display("DIV f=%0d X=%h Y=%h r=%h R=%h lat=%0d exp=%0d", f, X, Y, rr, R, lat, exp_lat);
        end
        n_div++;
      end
    end
    // the paper's worked example: p=13, X=9, Y=7, m=4 -> MMD 2, MD 5
    field = FIELD_P; p = 13; fl = 1 << 4; x = 9; y = 7;
    rnd = '1; run(GF_DIV, lat);
    checks++; if (result != 2) begin failures++; $display("example MMD %0d", result); end
    rnd = '0; run(GF_DIV, lat);
    checks++; if (result != 5) begin failures++; $display("example MD %0d", result); end
    $display("ops: add=%0d sub=%0d mul=%0d div=%0d", n_add, n_sub, n_mul, n_div);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
