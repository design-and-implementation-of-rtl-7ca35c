// r4_gfau: radix-4 dual-field Galois-field arithmetic unit (no random
// domain), the faster, larger alternative to the radix-2 unit.
//
// Operations, selected by `op` and `field`; `mont` picks the Montgomery
// form of multiplication and division:
//   GF_ADD/GF_SUB  R = X +/- Y mod p                       2 cycles
//   GF_MUL         R = X*Y (mont=0) or X*Y*2^-m (mont=1)    ceil(m/2) + 1 cycles
//   GF_DIV         R = X/Y (mont=0) or X/Y*2^m  (mont=1)    (radix-4 GCD steps) + 1 cycles
// Multiplication consumes two bits of X per cycle:
// R = R + x0*S + x1*2S, then R = R/4 (Montgomery) or S = 4S; an odd m ends
// with a one-bit step.
// Division: U,V start at p,Y and R,S at 0,X. Each cycle takes one
// radix-4 GCD step chosen by U mod 4 and V mod 4: U/4, V/4, (U-V)/4,
// (U/2-V)/2, (U-V/2)/2 with V/2, or a radix-2 step (U-V)/2 when no
// two-bit reduction applies; the larger operand is replaced. R and S
// follow U and V. In Montgomery form each step multiplies instead of
// divides (scaled by 4 for a two-bit step, 2 for a one-bit step) until m
// bits have been counted; when exactly one bit is left a step doubles both
// R and S and leaves U,V alone. The division ends when V is 0.
// Swap logic: every step exists as a pair mirrored in R<->S (and U<->V).
// One operation set works on (A, B) = (R, S), or on (S, R) when the step
// is the mirrored one, and the results are swapped back.
// A bit counter i (thermometer code, bit k set after k bits) is tested by
// the degree checker against the one-hot field length `fl` (bit m set).
//
// Steps follow the radix-4 unified division and multiplication of the
// design. Two points are this RTL's reading: the R,S operations of the two
// half-step cases are derived from the invariant that R tracks U and S
// tracks V (each Montgomery step is the plain step scaled by 4 or 2), and
// the U,V decision is not registered (no data-path separation here).
// Interface and timing as gfau: pulse `start` while `busy` is low; `done`
// pulses with `result` valid. Reset is synchronous, active low.
module r4_gfau
  import ecc_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  gf_op_e       op,
  input  field_e       field,
  input  logic         mont,
  input  logic [N:0]   p,
  input  logic [N:0]   fl,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] result
);
  typedef enum logic [1:0] {ST_IDLE, ST_ADD, ST_MUL, ST_DIV} state_e;
  // step types on (A, B); the mirrored step uses (S, R)
  typedef enum logic [2:0] {T_ONE, T_Q4, T_SUB4, T_HSUB, T_SUBH, T_SUB2} step_e;

  // ---------------------------------------------------------- modular cells
  function automatic logic [N-1:0] madd(logic [N-1:0] a, logic [N-1:0] b, field_e f, logic [N:0] pp);
    logic [N+1:0] t;
    if (f == FIELD_B) return a ^ b;
    t = {2'b0, a} + {2'b0, b};
    if (t >= {1'b0, pp}) t = t - {1'b0, pp};
    return t[N-1:0];
  endfunction
  function automatic logic [N-1:0] msub(logic [N-1:0] a, logic [N-1:0] b, field_e f, logic [N:0] pp);
    logic [N:0] t;
    if (f == FIELD_B) return a ^ b;
    t = {1'b0, a} - {1'b0, b};
    if (a < b) t = t + pp;
    return t[N-1:0];
  endfunction
  function automatic logic [N-1:0] mhalf(logic [N-1:0] a, field_e f, logic [N:0] pp);
    logic [N+1:0] t;
    t = {2'b0, a};
    if (a[0]) t = (f == FIELD_B) ? (t ^ {1'b0, pp}) : (t + {1'b0, pp});
    return t[N:1];
  endfunction
  function automatic logic [N-1:0] mdbl(logic [N-1:0] a, field_e f, logic [N:0] pp, logic [N:0] fll);
    logic [N:0] t;
    t = {a, 1'b0};
    if (f == FIELD_B) begin
      if (|(t & fll)) t = t ^ pp;
    end else if (t >= pp) t = t - pp;
    return t[N-1:0];
  endfunction

  // ---------------------------------------------------------- registers
  state_e       state;
  logic [N:0]   u, v;
  logic [N-1:0] r, s, xs;
  logic [N:0]   therm;
  logic         mont_q;

  // bit counter tests: i >= m, i == m-1
  logic [N:0] fl_m1;
  logic       at_m, at_m1;
  assign fl_m1 = fl >> 1;
  degree_checker #(.W(N + 1)) u_cm  (.din(therm), .fl(fl),    .dout(at_m));
  degree_checker #(.W(N + 1)) u_cm1 (.din(therm), .fl(fl_m1), .dout(at_m1));
  logic last1;                 // exactly one bit left
  assign last1 = at_m1 && !at_m;

  // ---------------------------------------------------------- U,V step
  step_e      ty;
  logic       mir;             // mirrored step: operate on (S, R)
  logic       two;             // two bits consumed
  logic [N:0] u_nx, v_nx;
  always_comb begin
    logic [1:0] c, d;
    logic [N:0] uh, vh, t;
    logic       gt;
    c = u[1:0]; d = v[1:0];
    t = '0; gt = 1'b0;
    uh = u >> 1; vh = v >> 1;
    u_nx = u; v_nx = v;
    ty = T_SUB2; mir = 1'b0; two = 1'b1;
    if (mont_q && last1) begin
      ty = T_ONE; two = 1'b0;
    end else if (c == 2'd0) begin
      u_nx = u >> 2; ty = T_Q4;
    end else if (d == 2'd0) begin
      v_nx = v >> 2; ty = T_Q4; mir = 1'b1;
    end else if (c == d) begin
      ty = T_SUB4;
      if (u > v) begin
        t = (field == FIELD_B) ? (u ^ v) : (u - v); u_nx = t >> 2;
      end else begin
        t = (field == FIELD_B) ? (v ^ u) : (v - u); v_nx = t >> 2; mir = 1'b1;
      end
    end else if (c == 2'd2) begin
      gt = uh > v;
      if (gt) begin
        t = (field == FIELD_B) ? (uh ^ v) : (uh - v); u_nx = t >> 1; ty = T_HSUB;
      end else begin
        t = (field == FIELD_B) ? (v ^ uh) : (v - uh); v_nx = t >> 1; u_nx = uh;
        ty = T_SUBH; mir = 1'b1;
      end
    end else if (d == 2'd2) begin
      gt = u > vh;
      if (gt) begin
        t = (field == FIELD_B) ? (u ^ vh) : (u - vh); u_nx = t >> 1; v_nx = vh; ty = T_SUBH;
      end else begin
        t = (field == FIELD_B) ? (vh ^ u) : (vh - u); v_nx = t >> 1; ty = T_HSUB; mir = 1'b1;
      end
    end else begin
      two = 1'b0; ty = T_SUB2;
      if (u > v) begin
        t = (field == FIELD_B) ? (u ^ v) : (u - v); u_nx = t >> 1;
      end else begin
        t = (field == FIELD_B) ? (v ^ u) : (v - u); v_nx = t >> 1; mir = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------- R,S step (swap logic)
  logic [N-1:0] a_in, b_in, a_out, b_out, r_div, s_div;
  logic         mstep;         // Montgomery-form step (bits still to count)
  assign mstep = mont_q && !at_m;
  assign a_in  = mir ? s : r;
  assign b_in  = mir ? r : s;
  always_comb begin
    logic [N-1:0] b2, a2, b4;
    b2 = mdbl(b_in, field, p, fl);
    a2 = mdbl(a_in, field, p, fl);
    b4 = mdbl(b2, field, p, fl);
    a_out = a_in; b_out = b_in;
    if (mstep) begin
      unique case (ty)
        T_ONE:  begin a_out = a2; b_out = b2; end
        T_Q4:   b_out = b4;
        T_SUB4: begin a_out = msub(a_in, b_in, field, p); b_out = b4; end
        T_HSUB: begin a_out = msub(a_in, b2, field, p); b_out = b4; end
        T_SUBH: begin a_out = msub(a2, b_in, field, p); b_out = b2; end
        default: begin a_out = msub(a_in, b_in, field, p); b_out = b2; end   // T_SUB2
      endcase
    end else begin
      unique case (ty)
        T_ONE:  ;
        T_Q4:   a_out = mhalf(mhalf(a_in, field, p), field, p);
        T_SUB4: a_out = mhalf(mhalf(msub(a_in, b_in, field, p), field, p), field, p);
        T_HSUB: a_out = mhalf(msub(mhalf(a_in, field, p), b_in, field, p), field, p);
        T_SUBH: begin
          b_out = mhalf(b_in, field, p);
          a_out = mhalf(msub(a_in, b_out, field, p), field, p);
        end
        default: a_out = mhalf(msub(a_in, b_in, field, p), field, p);          // T_SUB2
      endcase
    end
    r_div = mir ? b_out : a_out;
    s_div = mir ? a_out : b_out;
  end

  // ---------------------------------------------------------- multiplication step
  logic [N-1:0] r_mul, s_mul;
  always_comb begin
    logic [N-1:0] s2, t;
    s2 = mdbl(s, field, p, fl);
    t  = madd(r, xs[0] ? s : '0, field, p);
    if (!last1) t = madd(t, xs[1] ? s2 : '0, field, p);
    r_mul = t;
    s_mul = s;
    if (mont_q) begin
      r_mul = mhalf(t, field, p);
      if (!last1) r_mul = mhalf(r_mul, field, p);
    end else
      s_mul = mdbl(s2, field, p, fl);
  end

  logic [N:0] therm_mul;
  logic       mul_end;
  assign therm_mul = last1 ? {therm[N-1:0], 1'b1} : {therm[N-2:0], 2'b11};
  degree_checker #(.W(N + 1)) u_cme (.din(therm_mul), .fl(fl), .dout(mul_end));

  // ---------------------------------------------------------- FSM
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      u      <= '0;
      v      <= '0;
      r      <= '0;
      s      <= '0;
      xs     <= '0;
      therm  <= '0;
      mont_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          mont_q <= mont;
          therm  <= {{N{1'b0}}, 1'b1};
          unique case (op)
            GF_ADD: begin r <= madd(x, y, field, p); state <= ST_ADD; end
            GF_SUB: begin r <= msub(x, y, field, p); state <= ST_ADD; end
            GF_MUL: begin r <= '0; s <= y; xs <= x; state <= ST_MUL; end
            GF_DIV: begin u <= p; v <= {1'b0, y}; r <= '0; s <= x; state <= ST_DIV; end
          endcase
        end
        ST_ADD: begin
          state <= ST_IDLE;
          done  <= 1'b1;
        end
        ST_MUL: begin
          r  <= r_mul;
          s  <= s_mul;
          xs <= xs >> 2;
          therm <= therm_mul;
          if (mul_end) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
        ST_DIV: begin
          if (v == '0) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end else begin
            u <= u_nx;
            v <= v_nx;
            r <= r_div;
            s <= s_div;
            if (!at_m) therm <= two ? {therm[N-2:0], 2'b11} : {therm[N-1:0], 1'b1};
          end
        end
      endcase
    end
  end

  assign busy   = (state != ST_IDLE);
  assign result = r;

  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("r4_gfau: start while busy");

endmodule
