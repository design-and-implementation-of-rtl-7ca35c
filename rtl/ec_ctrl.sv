// ec_ctrl: EC controller of the processor (instruction decoding, domain
// conversion, point doubling / addition / subtraction and scalar
// multiplication), driving the arithmetic unit over the register file.
//
// Work is done by micro-programs: lists of field operations (add, sub,
// multiply, divide) with a destination and two source registers. Each
// micro-operation reads its two sources, starts the arithmetic unit,
// waits for `done` and writes the result back. Points are affine:
//   ECDBL  GF(p):   L = (3x^2+a)/(2y), x3 = L^2-2x, y3 = L(x-x3)-y
//          GF(2^m): L = x + y/x,  x3 = L^2+L+a,   y3 = L(x+x3)+x3+y
//   ECADD  GF(p):   L = (y2-y1)/(x2-x1), x3 = L^2-x1-x2, y3 = L(x1-x3)-y1
//          GF(2^m): L = (y2+y1)/(x2+x1), x3 = L^2+L+x1+x2+a, y3 = L(x1+x3)+x3+y1
//   ECSUB  P is negated in place (y = -y, or y = x+y in GF(2^m)), added,
//          and negated back, so no extra point register is needed.
// Every operation runs in a random domain 2^lambda: all multiplications
// and divisions use the same mask r (lambda = ones in r), which keeps
// products and quotients in that domain. Pre-processing maps Px, Py and
// a in with a division by 1 (X*2^lambda); post-processing maps Qx, Qy out
// with a multiplication by 1. With the countermeasure on, r is filled
// from the random generator (NW words) at the start of each scalar
// multiplication or pre-processing command; with it off r is all ones,
// which is the Montgomery domain.
// ECSM uses double-and-add/sub-always over a NAF key given as two masks
// (key_pos: digit +1, key_neg: digit -1): after each doubling a zero
// digit still performs Q + P, into the dummy registers RX, RY. With the
// countermeasure off, zero digits skip the addition (plain NAF
// double-and-add/sub). Leading zero digits are skipped; the top digit must
// be +1 (else `error`).
//
// Interface: pulse `cmd_start` while `busy` is low; `done` pulses when the
// command has finished. The host must leave the register file alone
// while busy. The arithmetic unit and the register file are external.
// Reset is synchronous, active low.
module ec_ctrl
  import ecc_pkg::*;
#(
  parameter int unsigned N  = N_MAX,
  parameter int unsigned NW = (N + 31) / 32
) (
  input  logic         clk,
  input  logic         rst_n,
  // command
  input  logic         cmd_start,
  input  cmd_e         cmd,
  input  gf_op_e       ff_op,
  input  dom_e         ff_dom,
  input  rf_addr_e     ff_dst,
  input  rf_addr_e     ff_a,
  input  rf_addr_e     ff_b,
  input  field_e       field,
  input  logic         cm_en,
  input  logic [N:0]   key_pos,
  input  logic [N:0]   key_neg,
  output logic         busy,
  output logic         done,
  output logic         error,
  // random generator
  input  logic [31:0]  prng_data,
  // register file
  output rf_addr_e     rf_ra,
  output rf_addr_e     rf_rb,
  input  logic [N-1:0] rf_rda,
  input  logic [N-1:0] rf_rdb,
  output logic         rf_we,
  output rf_addr_e     rf_wa,
  output logic [N-1:0] rf_wd,
  // arithmetic unit
  output logic         g_start,
  output gf_op_e       g_op,
  output logic [N-1:0] g_x,
  output logic [N-1:0] g_y,
  output logic [N-1:0] g_rnd,
  output logic [N-1:0] g_mask,
  input  logic         g_done,
  input  logic [N-1:0] g_result
);
  typedef enum logic [2:0] {
    PG_DBL, PG_ADD, PG_NEG, PG_PRE, PG_POST, PG_COPY
  } prog_e;

  typedef enum logic [3:0] {
    PH_PRE, PH_COPY, PH_SCAN, PH_DBL, PH_DIGIT, PH_NEG1, PH_ADD1,
    PH_NEG2, PH_NEXT, PH_POST, PH_END
  } phase_e;

  typedef enum logic [2:0] {
    S_IDLE, S_GATHER, S_SEQ, S_ISSUE, S_WAIT
  } state_e;

  localparam int unsigned IW = $clog2(N + 1);

  // ------------------------------------------------------- micro-programs
  function automatic uop_t mk(gf_op_e o, rf_addr_e d, rf_addr_e a, rf_addr_e b);
    return '{valid: 1'b1, op: o, dst: d, src_a: a, src_b: b};
  endfunction

  function automatic uop_t rom(prog_e pg, field_e f, logic [3:0] i);
    uop_t u = '0;
    unique case (pg)
      PG_PRE: unique case (i)
        0: u = mk(GF_DIV, RF_PX, RF_PX, RF_ONE);
        1: u = mk(GF_DIV, RF_PY, RF_PY, RF_ONE);
        2: u = mk(GF_DIV, RF_A,  RF_A,  RF_ONE);
        default: ;
      endcase
      PG_POST: unique case (i)
        0: u = mk(GF_MUL, RF_QX, RF_QX, RF_ONE);
        1: u = mk(GF_MUL, RF_QY, RF_QY, RF_ONE);
        default: ;
      endcase
      PG_COPY: unique case (i)
        0: u = mk(GF_ADD, RF_QX, RF_PX, RF_ZERO);
        1: u = mk(GF_ADD, RF_QY, RF_PY, RF_ZERO);
        default: ;
      endcase
      PG_NEG: if (i == 0)
        u = (f == FIELD_P) ? mk(GF_SUB, RF_PY, RF_ZERO, RF_PY)
                           : mk(GF_ADD, RF_PY, RF_PX, RF_PY);
      PG_DBL: if (f == FIELD_P) begin
        unique case (i)
          0:  u = mk(GF_MUL, RF_T1, RF_QX, RF_QX);   // x^2
          1:  u = mk(GF_ADD, RF_T2, RF_T1, RF_T1);   // 2x^2
          2:  u = mk(GF_ADD, RF_T1, RF_T2, RF_T1);   // 3x^2
          3:  u = mk(GF_ADD, RF_T1, RF_T1, RF_A);    // 3x^2 + a
          4:  u = mk(GF_ADD, RF_T2, RF_QY, RF_QY);   // 2y
          5:  u = mk(GF_DIV, RF_L,  RF_T1, RF_T2);   // L
          6:  u = mk(GF_MUL, RF_T1, RF_L,  RF_L);    // L^2
          7:  u = mk(GF_SUB, RF_T1, RF_T1, RF_QX);
          8:  u = mk(GF_SUB, RF_T1, RF_T1, RF_QX);   // x3
          9:  u = mk(GF_SUB, RF_T2, RF_QX, RF_T1);   // x - x3
          10: u = mk(GF_MUL, RF_T2, RF_L,  RF_T2);
          11: u = mk(GF_SUB, RF_QY, RF_T2, RF_QY);   // y3
          12: u = mk(GF_ADD, RF_QX, RF_T1, RF_ZERO); // x3 into place
          default: ;
        endcase
      end else begin
        unique case (i)
          0: u = mk(GF_DIV, RF_T1, RF_QY, RF_QX);    // y/x
          1: u = mk(GF_ADD, RF_L,  RF_T1, RF_QX);    // L
          2: u = mk(GF_MUL, RF_T1, RF_L,  RF_L);
          3: u = mk(GF_ADD, RF_T1, RF_T1, RF_L);
          4: u = mk(GF_ADD, RF_T1, RF_T1, RF_A);     // x3
          5: u = mk(GF_ADD, RF_T2, RF_QX, RF_T1);
          6: u = mk(GF_MUL, RF_T2, RF_L,  RF_T2);
          7: u = mk(GF_ADD, RF_T2, RF_T2, RF_T1);
          8: u = mk(GF_ADD, RF_QY, RF_T2, RF_QY);    // y3
          9: u = mk(GF_ADD, RF_QX, RF_T1, RF_ZERO);
          default: ;
        endcase
      end
      PG_ADD: if (f == FIELD_P) begin
        unique case (i)
          0: u = mk(GF_SUB, RF_T1, RF_PY, RF_QY);
          1: u = mk(GF_SUB, RF_T2, RF_PX, RF_QX);
          2: u = mk(GF_DIV, RF_L,  RF_T1, RF_T2);
          3: u = mk(GF_MUL, RF_T1, RF_L,  RF_L);
          4: u = mk(GF_SUB, RF_T1, RF_T1, RF_QX);
          5: u = mk(GF_SUB, RF_T1, RF_T1, RF_PX);    // x3
          6: u = mk(GF_SUB, RF_T2, RF_QX, RF_T1);
          7: u = mk(GF_MUL, RF_T2, RF_L,  RF_T2);
          8: u = mk(GF_SUB, RF_QY, RF_T2, RF_QY);    // y3
          9: u = mk(GF_ADD, RF_QX, RF_T1, RF_ZERO);
          default: ;
        endcase
      end else begin
        unique case (i)
          0:  u = mk(GF_ADD, RF_T1, RF_PY, RF_QY);
          1:  u = mk(GF_ADD, RF_T2, RF_PX, RF_QX);
          2:  u = mk(GF_DIV, RF_L,  RF_T1, RF_T2);
          3:  u = mk(GF_MUL, RF_T1, RF_L,  RF_L);
          4:  u = mk(GF_ADD, RF_T1, RF_T1, RF_L);
          5:  u = mk(GF_ADD, RF_T1, RF_T1, RF_QX);
          6:  u = mk(GF_ADD, RF_T1, RF_T1, RF_PX);
          7:  u = mk(GF_ADD, RF_T1, RF_T1, RF_A);    // x3
          8:  u = mk(GF_ADD, RF_T2, RF_QX, RF_T1);
          9:  u = mk(GF_MUL, RF_T2, RF_L,  RF_T2);
          10: u = mk(GF_ADD, RF_T2, RF_T2, RF_T1);
          11: u = mk(GF_ADD, RF_QY, RF_T2, RF_QY);   // y3
          12: u = mk(GF_ADD, RF_QX, RF_T1, RF_ZERO);
          default: ;
        endcase
      end
      default: ;
    endcase
    return u;
  endfunction

  // ------------------------------------------------------- state
  state_e     state;
  phase_e     ph;
  cmd_e       cmd_q;
  prog_e      prog;
  logic [3:0] uidx;
  logic       dummy;          // current ECADD writes to RX, RY
  logic       single;         // CMD_FF: one host micro-operation
  uop_t       ff_uop;
  dom_e       dom_q;
  logic [IW-1:0] idx;         // key digit index
  logic [N-1:0]  r;           // random-domain mask
  logic [$clog2(NW+1)-1:0] gcnt;

  uop_t cur, nxt;
  assign cur = single ? ff_uop : rom(prog, field, uidx);
  assign nxt = single ? '0     : rom(prog, field, uidx + 4'd1);

  // operands and result
  assign rf_ra  = cur.src_a;
  assign rf_rb  = cur.src_b;
  assign g_op   = cur.op;
  assign g_x    = rf_rda;
  assign g_y    = rf_rdb;
  logic [NW*32-1:0] mask_rep;
  assign mask_rep = {NW{prng_data}};
  assign g_mask   = mask_rep[N-1:0];
  always_comb begin
    g_rnd = r;
    if (single) begin
      unique case (dom_q)
        DOM_INT:  g_rnd = '0;
        DOM_MONT: g_rnd = '1;
        default:  g_rnd = r;
      endcase
    end
  end
  assign g_start = (state == S_ISSUE);
  assign rf_we   = (state == S_WAIT) && g_done;
  assign rf_wd   = g_result;
  always_comb begin
    rf_wa = cur.dst;
    if (dummy && cur.dst == RF_QX) rf_wa = RF_RX;
    if (dummy && cur.dst == RF_QY) rf_wa = RF_RY;
  end

  assign busy = (state != S_IDLE);

  logic dig_p, dig_n;
  assign dig_p = key_pos[idx];
  assign dig_n = key_neg[idx];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ph     <= PH_END;
      cmd_q  <= CMD_NOP;
      prog   <= PG_DBL;
      uidx   <= '0;
      dummy  <= 1'b0;
      single <= 1'b0;
      ff_uop <= '0;
      dom_q  <= DOM_INT;
      idx    <= '0;
      r      <= '1;
      gcnt   <= '0;
      done   <= 1'b0;
      error  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_start) begin
          cmd_q  <= cmd;
          single <= 1'b0;
          dummy  <= 1'b0;
          error  <= 1'b0;
          gcnt   <= '0;
          unique case (cmd)
            CMD_FF: begin
              single <= 1'b1;
              ff_uop <= '{valid: 1'b1, op: ff_op, dst: ff_dst, src_a: ff_a, src_b: ff_b};
              dom_q  <= ff_dom;
              state  <= S_ISSUE;
            end
            CMD_PRE, CMD_ECSM: begin
              ph <= PH_PRE;
              if (cm_en) state <= S_GATHER;
              else begin r <= '1; state <= S_SEQ; end
            end
            CMD_POST:  begin ph <= PH_POST; state <= S_SEQ; end
            CMD_ECDBL: begin ph <= PH_DBL;  state <= S_SEQ; end
            CMD_ECADD: begin ph <= PH_ADD1; state <= S_SEQ; end
            CMD_ECSUB: begin ph <= PH_NEG1; state <= S_SEQ; end
            default:   done <= 1'b1;
          endcase
        end

        // fill r with NW words of the random generator
        S_GATHER: begin
          r    <= N'({r, prng_data});
          gcnt <= gcnt + 1'b1;
          if (gcnt == ($clog2(NW+1))'(NW - 1)) state <= S_SEQ;
        end

        // choose the next micro-program
        S_SEQ: begin
          uidx  <= '0;
          dummy <= 1'b0;
          state <= S_ISSUE;
          unique case (ph)
            PH_PRE: begin
              prog <= PG_PRE;
              ph   <= (cmd_q == CMD_ECSM) ? PH_COPY : PH_END;
            end
            PH_COPY: begin
              prog <= PG_COPY;
              ph   <= PH_SCAN;
              idx  <= IW'(N);
            end
            PH_SCAN: begin
              // find the leading non-zero digit, one digit per cycle
              state <= S_SEQ;
              if (dig_p || dig_n) begin
                if (dig_n) error <= 1'b1;
                if (idx == '0) ph <= PH_POST;
                else begin idx <= idx - 1'b1; ph <= PH_DBL; end
              end else if (idx == '0) begin
                error <= 1'b1;
                ph    <= PH_POST;
              end else
                idx <= idx - 1'b1;
            end
            PH_DBL: begin
              prog <= PG_DBL;
              ph   <= (cmd_q == CMD_ECSM) ? PH_DIGIT : PH_END;
            end
            PH_DIGIT: begin
              if (dig_n) begin
                prog <= PG_NEG;
                ph   <= PH_ADD1;
              end else if (dig_p || cm_en) begin
                prog  <= PG_ADD;
                dummy <= !dig_p;          // add-always
                ph    <= PH_NEXT;
              end else begin
                state <= S_SEQ;           // plain double-and-add: nothing to add
                ph    <= PH_NEXT;
              end
            end
            PH_NEG1: begin prog <= PG_NEG; ph <= PH_ADD1; end
            PH_ADD1: begin
              prog <= PG_ADD;
              ph   <= (cmd_q == CMD_ECADD) ? PH_END : PH_NEG2;
            end
            PH_NEG2: begin
              prog <= PG_NEG;
              ph   <= (cmd_q == CMD_ECSM) ? PH_NEXT : PH_END;
            end
            PH_NEXT: begin
              state <= S_SEQ;
              if (idx == '0) ph <= PH_POST;
              else begin idx <= idx - 1'b1; ph <= PH_DBL; end
            end
            PH_POST: begin prog <= PG_POST; ph <= PH_END; end
            default: begin                 // PH_END
              state <= S_IDLE;
              done  <= 1'b1;
            end
          endcase
        end

        S_ISSUE: state <= S_WAIT;

        S_WAIT: if (g_done) begin
          if (single) begin
            state  <= S_IDLE;
            single <= 1'b0;
            done   <= 1'b1;
          end else if (nxt.valid) begin
            uidx  <= uidx + 1'b1;
            state <= S_ISSUE;
          end else
            state <= S_SEQ;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cmd_start |-> !busy)
    else $error("ec_ctrl: command while busy");

endmodule
