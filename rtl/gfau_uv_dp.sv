// gfau_uv_dp: U,V data-path of the arithmetic unit (one binary-GCD step).
//
// For the division the operands U and V start as p and Y. Each step
// removes at least one bit from U or V, following the four properties of
// the radix-2 unified division: U even -> U/2; V even -> V/2; U > V ->
// (U-V)/2; otherwise (V-U)/2. In GF(2^m) the difference is an XOR and the
// halving a division by x; the magnitude comparison is shared by both
// fields (for polynomials it only has to pick one of the two, both keep
// the invariants). The step taken is reported as `ctrl`, which the unit
// registers and hands to the R,S data-paths in the next cycle.
// Purely combinational.
module gfau_uv_dp
  import ecc_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  field_e     field,
  input  logic [N:0] u,
  input  logic [N:0] v,
  output uv_ctrl_e   ctrl,
  output logic [N:0] u_next,
  output logic [N:0] v_next,
  output logic       v_zero
);
  logic [N:0] d_uv, d_vu;

  always_comb begin
    if (field == FIELD_B) begin
      d_uv = u ^ v;
      d_vu = u ^ v;
    end else begin
      d_uv = u - v;
      d_vu = v - u;
    end
    u_next = u;
    v_next = v;
    if (!u[0]) begin
      ctrl   = UV_U_EVEN;
      u_next = u >> 1;
    end else if (!v[0]) begin
      ctrl   = UV_V_EVEN;
      v_next = v >> 1;
    end else if (u > v) begin
      ctrl   = UV_U_GT;
      u_next = d_uv >> 1;
    end else begin
      ctrl   = UV_V_GE;
      v_next = d_vu >> 1;
    end
  end

  assign v_zero = (v == '0);
endmodule
