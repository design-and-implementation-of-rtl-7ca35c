// gfau: dual-field Galois-field arithmetic unit with power-analysis
// countermeasures (radix-2).
//
// Operations, selected by `op` and `field`:
//   GF_ADD  R = X + Y mod p                      2 cycles
//   GF_SUB  R = X - Y mod p                      2 cycles
//   GF_MUL  R = X * Y * 2^-lambda mod p          m + 1 cycles
//   GF_DIV  R = X * Y^-1 * 2^lambda mod p        (GCD steps) + 2 cycles
// where lambda is the number of ones in rnd[m-1:0]. rnd = 0 gives the
// plain modular multiplication / division (MM, MD), rnd = all ones the
// Montgomery forms (MMM, MMD), any other value the random-domain forms
// used by the countermeasure (unified random multiplication / division).
//
// Multiplication: one bit X_i per cycle, R = R + X_i*S mod p, then
// either R = R/2 mod p (rnd_i = 1) or S = 2S mod p (rnd_i = 0).
// Division: U,V start at p,Y and R,S at 0,X. Each cycle the U,V data-path
// takes one binary-GCD step and registers its decision; the R,S
// data-paths apply that decision one cycle later (data-path separation,
// which costs one cycle but leaves one adder on each path). For step k
// with rnd_k = 1 (and k < m, found by the degree checker on a thermometer
// counter) the step raises the domain by one (e.g. R = R - S, S = 2S);
// otherwise it keeps the domain (e.g. R = (R-S)/2). The loop ends when V
// is zero; this RTL also keeps running doubling steps until every bit of
// rnd has been used, so lambda is exact even for a short GCD sequence.
// While the S data-path has no doubling to do it is fed `mask`.
//
// Interface: pulse `start` for one cycle while `busy` is low; operands
// are sampled then. `done` pulses for one cycle with `result` valid; it
// stays valid until the next start. Reset is synchronous, active low. `fl` is one-hot with bit m set.
// Latency is counted from the start edge to the edge that raises done.
module gfau
  import ecc_pkg::*;
#(
  parameter int unsigned N = N_MAX
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  gf_op_e       op,
  input  field_e       field,
  input  logic [N:0]   p,
  input  logic [N:0]   fl,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] rnd,
  input  logic [N-1:0] mask,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] result
);
  typedef enum logic [1:0] {ST_IDLE, ST_ADD, ST_MUL, ST_DIV} state_e;

  state_e       state;
  gf_op_e       op_q;
  logic [N:0]   u, v;
  logic [N-1:0] r, s, rnd_q;
  logic [N:0]   therm;         // thermometer: bit k set after k steps
  uv_ctrl_e     ctrl_q;
  logic         mode_q, ctrl_v;

  // ---------------------------------------------------------------- U,V
  uv_ctrl_e   uv_ctrl;
  logic [N:0] u_nx, v_nx;
  logic       v_zero;

  gfau_uv_dp #(.N(N)) u_uv (
    .field(field), .u(u), .v(v), .ctrl(uv_ctrl),
    .u_next(u_nx), .v_next(v_nx), .v_zero(v_zero)
  );

  // k >= m ?
  logic cnt_m, cnt_m_nx;
  degree_checker #(.W(N + 1)) u_cnt  (.din(therm), .fl(fl), .dout(cnt_m));
  degree_checker #(.W(N + 1)) u_cntn (.din({therm[N-1:0], 1'b1}), .fl(fl), .dout(cnt_m_nx));

  // ---------------------------------------------------------------- R,S
  logic [N-1:0] ra, rb, r_res, sa, s_res;
  logic         r_use_b, r_sub, r_half;

  gfau_r_dp #(.N(N)) u_rdp (
    .field(field), .p(p), .a(ra), .b(rb), .use_b(r_use_b),
    .sub(r_sub), .half(r_half), .res(r_res)
  );

  gfau_s_dp #(.N(N)) u_sdp (
    .field(field), .p(p), .fl(fl), .a(sa), .res(s_res)
  );

  // Operand selection of the two R,S cells.
  always_comb begin
    ra = r; rb = s; r_use_b = 1'b1; r_sub = 1'b0; r_half = 1'b0;
    sa = mask;
    unique case (state)
      ST_ADD: begin
        r_sub = (op_q == GF_SUB);
      end
      ST_MUL: begin
        r_use_b = u[0];
        r_half  = rnd_q[0];
        if (!rnd_q[0]) sa = s;
      end
      ST_DIV: begin
        unique case (ctrl_q)
          UV_U_EVEN: begin ra = r; r_use_b = 1'b0; r_half = 1'b1; if (mode_q) sa = s; end
          UV_V_EVEN: begin ra = s; r_use_b = 1'b0; r_half = 1'b1; if (mode_q) sa = r; end
          UV_U_GT:   begin ra = r; rb = s; r_sub = 1'b1; r_half = !mode_q; if (mode_q) sa = s; end
          UV_V_GE:   begin ra = s; rb = r; r_sub = 1'b1; r_half = !mode_q; if (mode_q) sa = r; end
        endcase
        if (!ctrl_v) sa = mask;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- FSM
  logic [N-1:0] mmask;     // ones below bit m
  assign mmask = fl[N-1:0] - 1'b1 | (fl[N] ? '1 : '0);

  logic div_more;          // another U,V step is due
  assign div_more = !v_zero || (rnd_q != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      op_q   <= GF_ADD;
      u      <= '0;
      v      <= '0;
      r      <= '0;
      s      <= '0;
      rnd_q  <= '0;
      therm  <= '0;
      ctrl_q <= UV_U_EVEN;
      mode_q <= 1'b0;
      ctrl_v <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        ST_IDLE: if (start) begin
          op_q   <= op;
          therm  <= {{N{1'b0}}, 1'b1};
          rnd_q  <= rnd & mmask;
          ctrl_v <= 1'b0;
          unique case (op)
            GF_ADD, GF_SUB: begin r <= x; s <= y; state <= ST_ADD; end
            GF_MUL: begin r <= '0; s <= y; u <= {1'b0, x}; state <= ST_MUL; end
            GF_DIV: begin
              u <= p; v <= {1'b0, y}; r <= '0; s <= x; state <= ST_DIV;
            end
          endcase
        end
        ST_ADD: begin
          r     <= r_res;
          state <= ST_IDLE;
          done  <= 1'b1;
        end
        ST_MUL: begin
          r     <= r_res;
          if (!rnd_q[0]) s <= s_res;
          u     <= u >> 1;
          rnd_q <= rnd_q >> 1;
          therm <= {therm[N-1:0], 1'b1};
          if (cnt_m_nx) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
        ST_DIV: begin
          // U,V step, decision registered for the R,S data-paths
          if (div_more) begin
            u      <= u_nx;
            v      <= v_nx;
            ctrl_q <= uv_ctrl;
            mode_q <= rnd_q[0] && !cnt_m;
            rnd_q  <= rnd_q >> 1;
            therm  <= {therm[N-1:0], 1'b1};
            ctrl_v <= 1'b1;
          end else begin
            ctrl_v <= 1'b0;
          end
          // R,S step of the previous decision
          if (ctrl_v) begin
            unique case (ctrl_q)
              UV_U_EVEN: if (mode_q) s <= s_res; else r <= r_res;
              UV_V_EVEN: if (mode_q) r <= s_res; else s <= r_res;
              UV_U_GT:   begin r <= r_res; if (mode_q) s <= s_res; end
              UV_V_GE:   begin s <= r_res; if (mode_q) r <= s_res; end
            endcase
          end
          if (!div_more) begin
            state <= ST_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  assign busy   = (state != ST_IDLE);
  assign result = r;

  // A start while busy is ignored; the controller must not issue one.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy)
    else $error("gfau: start while busy");

endmodule
