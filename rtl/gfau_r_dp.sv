// gfau_r_dp: R data-path of the arithmetic unit.
//
// Computes res = H( A (+|-) B mod p ), where H is either the identity or
// the modular halving. This one cell serves MA and MS (add/sub, no
// halving), the multiplication step R + X_i*S with or without the
// Montgomery halving, and the division steps R/2, S/2, (R-S)/2, (S-R)/2
// and R-S, S-R. In GF(p) the sum or difference is brought back into
// [0, p-1] with one conditional correction by p, then an odd value has p
// added before the shift, so the result stays in [0, p-1] and no final
// reduction step is needed. In GF(2^m) the sum is an XOR and the halving
// adds p when the constant term is set, then shifts.
// Inputs must be reduced (< p, or degree < m). Purely combinational.
module gfau_r_dp
  import ecc_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  field_e       field,
  input  logic [N:0]   p,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         use_b,   // 0: B is taken as zero
  input  logic         sub,     // 1: A - B, 0: A + B
  input  logic         half,    // 1: divide the result by 2 (or by x)
  output logic [N-1:0] res
);
  logic [N+1:0] bb, t, tc, h;

  always_comb begin
    bb = use_b ? {2'b00, b} : '0;
    t  = '0;
    if (field == FIELD_B) begin
      tc = {2'b00, a} ^ bb;
      h  = tc[0] ? (tc ^ {1'b0, p}) : tc;
    end else begin
      if (sub) begin
        t  = {2'b00, a} - bb;
        tc = t[N+1] ? t + {1'b0, p} : t;          // negative: add p
      end else begin
        t  = {2'b00, a} + bb;
        tc = (t >= {1'b0, p}) ? t - {1'b0, p} : t; // >= p: subtract p
      end
      h = tc[0] ? tc + {1'b0, p} : tc;
    end
    res = half ? h[N:1] : tc[N-1:0];
  end
endmodule
