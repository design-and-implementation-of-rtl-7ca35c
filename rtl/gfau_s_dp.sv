// gfau_s_dp: S data-path of the arithmetic unit (modular doubling).
//
// Computes 2*A mod p. In GF(p) one conditional subtraction of p follows
// the shift. In GF(2^m) the shifted value is reduced by p when its degree
// reaches m, found by the degree checker against the one-hot field-length
// word. While the unit does not need a doubling the controller feeds this
// cell random data, so that its switching activity carries no information
// about the operands. Purely combinational.
module gfau_s_dp
  import ecc_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  field_e       field,
  input  logic [N:0]   p,
  input  logic [N:0]   fl,      // one-hot, bit m set
  input  logic [N-1:0] a,
  output logic [N-1:0] res
);
  logic [N:0] t, r;
  logic       deg_m;

  degree_checker #(.W(N + 1)) u_deg (.din(t), .fl(fl), .dout(deg_m));

  always_comb begin
    t = {a, 1'b0};
    if (field == FIELD_B)
      r = deg_m ? (t ^ p) : t;
    else
      r = (t >= p) ? (t - p) : t;
    res = r[N-1:0];
  end
endmodule
