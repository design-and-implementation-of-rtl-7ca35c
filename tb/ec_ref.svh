`ifndef REF_W
`define REF_W 64
`endif
// ec_ref.svh: reference field and elliptic-curve arithmetic for the
// testbenches, on REF_W-bit integers (define REF_W before including it;
// field size up to REF_W-2 bits). Affine
// points with an explicit point at infinity; GF(p) uses % and a Fermat
// inverse, GF(2^m) carry-less multiplication and x^(2^m-2).
typedef struct packed {
  logic        inf;
  logic [`REF_W-1:0] x, y;
} ref_pt_t;

function automatic logic [`REF_W-1:0] r_mul(bit bin, logic [`REF_W-1:0] a, logic [`REF_W-1:0] b, logic [`REF_W-1:0] p, int m);
  logic [`REF_W-1:0] r = 0, aa = a;
  logic [2*`REF_W-1:0] t;
  if (!bin) begin
    t = a * b;
    return `REF_W'(t % p);
  end
  for (int i = 0; i < m; i++) begin
    if (b[i]) r ^= aa;
    aa = aa << 1;
    if (aa[m]) aa ^= p;
  end
  return r;
endfunction

function automatic logic [`REF_W-1:0] r_add(bit bin, logic [`REF_W-1:0] a, logic [`REF_W-1:0] b, logic [`REF_W-1:0] p);
  return bin ? (a ^ b) : ((a + b) % p);
endfunction

function automatic logic [`REF_W-1:0] r_sub(bit bin, logic [`REF_W-1:0] a, logic [`REF_W-1:0] b, logic [`REF_W-1:0] p);
  return bin ? (a ^ b) : ((a + p - b) % p);
endfunction

function automatic logic [`REF_W-1:0] r_inv(bit bin, logic [`REF_W-1:0] a, logic [`REF_W-1:0] p, int m);
  logic [`REF_W-1:0] e, r = 1, b = a;
  e = bin ? ((`REF_W'(1) << m) - 2) : (p - 2);
  while (e != 0) begin
    if (e[0]) r = r_mul(bin, r, b, p, m);
    b = r_mul(bin, b, b, p, m);
    e = e >> 1;
  end
  return r;
endfunction

function automatic ref_pt_t r_padd(bit bin, ref_pt_t P, ref_pt_t Q, logic [`REF_W-1:0] a, logic [`REF_W-1:0] p, int m);
  ref_pt_t R;
  logic [`REF_W-1:0] l, num, den;
  R.inf = 0; R.x = 0; R.y = 0;
  if (P.inf) return Q;
  if (Q.inf) return P;
  if (P.x == Q.x) begin
    // P == -Q ?
    if (bin ? (Q.y == (P.x ^ P.y)) : (Q.y == ((p - P.y) % p))) begin R.inf = 1; return R; end
    if (P.y != Q.y) begin R.inf = 1; return R; end
    // doubling
    if (bin) begin
      if (P.x == 0) begin R.inf = 1; return R; end
      l = P.x ^ r_mul(1, P.y, r_inv(1, P.x, p, m), p, m);
      R.x = r_mul(1, l, l, p, m) ^ l ^ a;
      R.y = r_mul(1, l, P.x ^ R.x, p, m) ^ R.x ^ P.y;
    end else begin
      if (P.y == 0) begin R.inf = 1; return R; end
      num = r_add(0, r_mul(0, 3, r_mul(0, P.x, P.x, p, m), p, m), a, p);
      den = r_add(0, P.y, P.y, p);
      l = r_mul(0, num, r_inv(0, den, p, m), p, m);
      R.x = r_sub(0, r_sub(0, r_mul(0, l, l, p, m), P.x, p), P.x, p);
      R.y = r_sub(0, r_mul(0, l, r_sub(0, P.x, R.x, p), p, m), P.y, p);
    end
    return R;
  end
  l = r_mul(bin, r_sub(bin, Q.y, P.y, p), r_inv(bin, r_sub(bin, Q.x, P.x, p), p, m), p, m);
  if (bin) R.x = r_mul(1, l, l, p, m) ^ l ^ P.x ^ Q.x ^ a;
  else     R.x = r_sub(0, r_sub(0, r_mul(0, l, l, p, m), P.x, p), Q.x, p);
  if (bin) R.y = r_mul(1, l, P.x ^ R.x, p, m) ^ R.x ^ P.y;
  else     R.y = r_sub(0, r_mul(0, l, r_sub(0, P.x, R.x, p), p, m), P.y, p);
  return R;
endfunction

function automatic ref_pt_t r_smul(bit bin, logic [`REF_W-1:0] k, ref_pt_t P, logic [`REF_W-1:0] a, logic [`REF_W-1:0] p, int m);
  ref_pt_t Q;
  Q.inf = 1; Q.x = 0; Q.y = 0;
  for (int i = `REF_W-1; i >= 0; i--) begin
    Q = r_padd(bin, Q, Q, a, p, m);
    if (k[i]) Q = r_padd(bin, Q, P, a, p, m);
  end
  return Q;
endfunction

// NAF of k as two digit masks
task automatic r_naf(logic [`REF_W-1:0] k, output logic [`REF_W:0] kp, output logic [`REF_W:0] kn);
  logic [`REF_W+1:0] kk = (`REF_W+2)'(k);
  kp = 0; kn = 0;
  for (int i = 0; i <= `REF_W; i++) begin
    if (kk[0]) begin
      if (kk[1]) begin kn[i] = 1; kk = kk + 1; end
      else begin kp[i] = 1; kk = kk - 1; end
    end
    kk = kk >> 1;
  end
endtask
