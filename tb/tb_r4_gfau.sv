// tb_r4_gfau: self-checking test of the radix-4 dual-field arithmetic unit.
//
// Runs MA, MS, multiplication and division over prime fields and binary
// fields (N = 32, even and odd m), in plain form (mont = 0: MM, MD) and
// Montgomery form (mont = 1: MMM, MMD). Results are checked with the
// defining congruences, computed with plain 64-bit integer and
// carry-less arithmetic:
//   MUL: R * 2^e == X * Y,   DIV: R * Y == X * 2^e  (mod p),  e = m or 0
// and must be fully reduced. Latency: 2 cycles for MA/MS, ceil(m/2) + 1
// for the multiplication, and for the division the number of radix-4 GCD
// steps (counted here by a separate loop, including the extra one-bit
// step of the Montgomery form) plus 2. Every step type of the division,
// plain and mirrored, must occur.
module tb_r4_gfau;
  import ecc_pkg::*;
  localparam int N = 32;

  logic clk = 0, rst_n = 0, start = 0, mont = 0;
  gf_op_e op;
  field_e field;
  logic [N:0] p, fl;
  logic [N-1:0] x, y, result;
  logic busy, done;
  int checks = 0, failures = 0;

  r4_gfau #(.N(N)) dut (.*);

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
  // radix-4 step count: two bits per step where U or V mod 4 allows it
  function automatic int r4_steps(bit bin, bit mt, int m, logic [63:0] u, logic [63:0] v);
    int n = 0, i = 0;
    logic [1:0] c, d;
    while (v != 0) begin
      c = u[1:0]; d = v[1:0];
      if (mt && i == m - 1) i++;
      else if (c == 0) begin u = u >> 2; i += 2; end
      else if (d == 0) begin v = v >> 2; i += 2; end
      else if (c == d) begin
        if (u > v) u = (bin ? (u ^ v) : (u - v)) >> 2; else v = (bin ? (u ^ v) : (v - u)) >> 2;
        i += 2;
      end else if (c == 2) begin
        if ((u >> 1) > v) u = (bin ? ((u >> 1) ^ v) : ((u >> 1) - v)) >> 1;
        else begin v = (bin ? (v ^ (u >> 1)) : (v - (u >> 1))) >> 1; u = u >> 1; end
        i += 2;
      end else if (d == 2) begin
        if (u > (v >> 1)) begin u = (bin ? (u ^ (v >> 1)) : (u - (v >> 1))) >> 1; v = v >> 1; end
        else v = (bin ? ((v >> 1) ^ u) : ((v >> 1) - u)) >> 1;
        i += 2;
      end else begin
        if (u > v) u = (bin ? (u ^ v) : (u - v)) >> 1; else v = (bin ? (u ^ v) : (v - u)) >> 1;
        i += 1;
      end
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

  // step types seen during division: [mirrored][type]
  int seen[2][6];
  always @(posedge clk) if (dut.state == 2'd3 && dut.v != 0) seen[dut.mir][dut.ty]++;

  logic [63:0] P, X, Y, R, lhs, rhs;
  int m, lat, e, exp_lat;
  bit bin;
  logic [63:0] primes[4] = '{64'd13, 64'd251, 64'd65521, 64'd4294967291};
  int          pm[4]     = '{4, 8, 16, 32};
  logic [63:0] polys[4]  = '{64'h13, 64'h11B, 64'h20009, 64'h80000009};
  int          bm[4]     = '{4, 8, 17, 31};

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      bin = (f >= 4);
      P = bin ? polys[f-4] : primes[f];
      m = bin ? bm[f-4] : pm[f];
      field = bin ? FIELD_B : FIELD_P;
      p = (N+1)'(P);
      fl = (N+1)'(1) << m;
      for (int t = 0; t < 80; t++) begin
        X = {$urandom, $urandom};
        Y = {$urandom, $urandom};
        if (bin) begin
          X &= (64'd1 << m) - 1; Y &= (64'd1 << m) - 1;
        end else begin
          X %= P; Y %= P;
        end
        if (Y == 0) Y = 1;
        x = N'(X); y = N'(Y);
        mont = t[0];
        e = mont ? m : 0;

        run(GF_ADD, lat); R = 64'(result);
        rhs = bin ? (X ^ Y) : ((X + Y) % P);
        checks++; if (R != rhs || lat != 2) begin failures++; $display("ADD f=%0d X=%h Y=%h R=%h", f, X, Y, R); end
        run(GF_SUB, lat); R = 64'(result);
        rhs = bin ? (X ^ Y) : ((X + P - Y) % P);
        checks++; if (R != rhs || lat != 2) begin failures++; $display("SUB f=%0d X=%h Y=%h R=%h", f, X, Y, R); end

        run(GF_MUL, lat); R = 64'(result);
        lhs = fmul(bin, R, pow2(bin, e, P, m), P, m);
        rhs = fmul(bin, X, Y, P, m);
        checks++;
        if (lhs != rhs || (bin ? (R >> m) != 0 : R >= P) || lat != (m + 1) / 2 + 1) begin
          failures++; $display("MUL f=%0d mont=%0d X=%h Y=%h R=%h lat=%0d", f, mont, X, Y, R, lat);
        end

        run(GF_DIV, lat); R = 64'(result);
        lhs = fmul(bin, R, Y, P, m);
        rhs = fmul(bin, X, pow2(bin, e, P, m), P, m);
        exp_lat = r4_steps(bin, mont, m, P, Y) + 2;
        checks++;
        if (lhs != rhs || (bin ? (R >> m) != 0 : R >= P) || lat != exp_lat) begin
          failures++; $display("DIV f=%0d mont=%0d X=%h Y=%h R=%h lat=%0d exp=%0d", f, mont, X, Y, R, lat, exp_lat);
        end
      end
    end
    for (int mi = 0; mi < 2; mi++)
      for (int ti = 1; ti < 6; ti++) begin
        checks++;
        if (seen[mi][ti] == 0) begin failures++; $display("division step type %0d mirrored=%0d never seen", ti, mi); end
      end
    checks++; if (seen[0][0] == 0) begin failures++; $display("one-bit Montgomery step never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
