// tb_ec_ctrl: self-checking test of the EC controller, run with the
// arithmetic unit, register file and random generator at N = 32.
// Curves: GF(2^31-1) and GF(2^31) (x^31+x^3+1), random a and random base
// points (the affine formulas do not use b). It checks
//  - scalar multiplication with the countermeasure on and off against a
//    reference double-and-add, and that every NAF digit kind (+1, -1, 0)
//    was exercised;
//  - single field operations (integer and Montgomery domain);
//  - the PRE, ECADD, ECSUB, ECDBL, POST command sequence.
// The register file is loaded and read through its host port.
module tb_ec_ctrl;
  import ecc_pkg::*;
  `include "ec_ref.svh"
  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // controller
  logic cmd_start = 0, busy, done, error;
  cmd_e cmd; gf_op_e ff_op; dom_e ff_dom; rf_addr_e ff_dst, ff_a, ff_b;
  field_e field; logic cm_en; logic [N:0] key_pos, key_neg;
  logic [31:0] prng_data;
  rf_addr_e rf_ra, rf_rb, rf_wa; logic [N-1:0] rf_rda, rf_rdb, rf_wd; logic rf_we;
  logic g_start, g_done, g_busy; gf_op_e g_op; logic [N-1:0] g_x, g_y, g_rnd, g_mask, g_result;
  logic [N:0] p, fl;
  // host port
  logic hwe = 0; rf_addr_e hreg; logic [31:0] hwdata, hrdata;

  ec_ctrl #(.N(N)) dut (.*);
  gfau #(.N(N)) u_gfau (.clk, .rst_n, .start(g_start), .op(g_op), .field, .p, .fl,
    .x(g_x), .y(g_y), .rnd(g_rnd), .mask(g_mask), .busy(g_busy), .done(g_done), .result(g_result));
  ecc_regfile #(.N(N)) u_rf (.clk, .ra(rf_ra), .rb(rf_rb), .rda(rf_rda), .rdb(rf_rdb),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd), .hwe, .hreg, .hword(1'b0), .hwdata, .hrdata);
  chaos_prng u_prng (.clk, .rst_n, .en(1'b1), .seed_we(1'b0), .seed(32'h0), .rnd(prng_data));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count micro-operations by kind and dummy additions
  int n_dummy_wr = 0, n_gather = 0;
  always @(posedge clk) begin
    if (rf_we && (rf_wa == RF_RX)) n_dummy_wr++;
    if (dut.state == 3'd1) n_gather++;  // S_GATHER
  end

  task automatic wr(rf_addr_e r, logic [31:0] d);
    @(negedge clk); hwe = 1; hreg = r; hwdata = d;
    @(negedge clk); hwe = 0;
  endtask
  task automatic rd(rf_addr_e r, output logic [63:0] d);
    @(negedge clk); hreg = r; #1 d = 64'(hrdata);
  endtask
  task automatic issue(cmd_e c, output int cyc);
    @(negedge clk); cmd = c; cmd_start = 1;
    @(negedge clk); cmd_start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
  endtask
  task automatic ff(gf_op_e o, dom_e d, rf_addr_e dst, rf_addr_e a, rf_addr_e b);
    int c;
    ff_op = o; ff_dom = d; ff_dst = dst; ff_a = a; ff_b = b;
    issue(CMD_FF, c);
  endtask

  bit bin; logic [63:0] P_, A_, k, gx, gy, qx, qy, v; int m, cyc;
  logic [64:0] kp, kn;
  ref_pt_t G, Q, E, H;
  int n_pos = 0, n_neg = 0, n_zero = 0, n_ecsm = 0;

  initial begin
    ff_op = GF_ADD; ff_dom = DOM_INT; ff_dst = RF_G0; ff_a = RF_G0; ff_b = RF_G0;
    cmd = CMD_NOP; key_pos = 0; key_neg = 0; cm_en = 1; hreg = RF_PX; hwdata = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      bin = t[0];
      cm_en = (t % 4) != 1;
      field = bin ? FIELD_B : FIELD_P;
      P_ = bin ? 64'h80000009 : 64'd2147483647; m = 31;
      p = (N+1)'(P_); fl = (N+1)'(1) << m;
      A_ = 64'($urandom) & 64'h7fffffff; if (!bin) A_ %= P_;
      gx = 64'($urandom) & 64'h7fffffff; if (!bin) gx %= P_;
      gy = 64'($urandom) & 64'h7fffffff; if (!bin) gy %= P_;
      if (gx == 0) gx = 5;
      G.inf = 0; G.x = gx; G.y = gy;
      k = 64'($urandom) & 64'h3fffffff; if (k < 2) k = 77;
      r_naf(k, kp, kn);
      key_pos = (N+1)'(kp); key_neg = (N+1)'(kn);
      begin
        int top = 0;
        for (int i = 0; i < 33; i++) if (kp[i] || kn[i]) top = i;
        for (int i = 0; i < top; i++) begin
          if (kp[i]) n_pos++; else if (kn[i]) n_neg++; else n_zero++;
        end
      end
      wr(RF_PX, 32'(gx)); wr(RF_PY, 32'(gy)); wr(RF_A, 32'(A_));
      issue(CMD_ECSM, cyc);
      n_ecsm++;
      rd(RF_QX, qx); rd(RF_QY, qy);
      E = r_smul(bin, k, G, A_, P_, m);
      checks++;
      if (E.inf || qx != E.x || qy != E.y || error) begin
        failures++; $display("ECSM t=%0d bin=%0d k=%h got (%h,%h) exp (%h,%h) inf=%0d", t, bin, k, qx, qy, E.x, E.y, E.inf);
      end
      // P must be restored to the working domain value, not negated:
      // check by post-processing a copy of P
      ff(GF_MUL, DOM_RAND, RF_G0, RF_PX, RF_ONE);
      ff(GF_MUL, DOM_RAND, RF_G1, RF_PY, RF_ONE);
      rd(RF_G0, qx); rd(RF_G1, qy);
      checks++;
      if (qx != gx || qy != gy) begin failures++; $display("P not restored t=%0d", t); end

      // single field operations, integer and Montgomery domain
      wr(RF_G2, 32'(gx)); wr(RF_G3, 32'(gy));
      ff(GF_MUL, DOM_INT, RF_G0, RF_G2, RF_G3);
      ff(GF_DIV, DOM_INT, RF_G1, RF_G0, RF_G3);
      rd(RF_G0, qx); rd(RF_G1, qy);
      checks++;
      if (qx != r_mul(bin, gx, gy, P_, m) || qy != gx) begin failures++; $display("FF MM/MD t=%0d", t); end
      ff(GF_DIV, DOM_MONT, RF_G0, RF_G2, RF_ONE);   // gx * 2^m
      ff(GF_MUL, DOM_MONT, RF_G1, RF_G0, RF_G3);    // gx * gy
      ff(GF_SUB, DOM_INT, RF_G1, RF_G1, RF_G2);
      rd(RF_G1, qy);
      checks++;
      if (qy != r_sub(bin, r_mul(bin, gx, gy, P_, m), gx, P_)) begin failures++; $display("FF MMD/MMM t=%0d", t); end

      // command sequence: Q = 5P via PRE, ECDBL, ECADD, ECSUB, POST
      // Q0 = P;  Q = 2Q (2P); Q = Q+P (3P); Q = 2Q (6P); Q = Q-P (5P)
      wr(RF_PX, 32'(gx)); wr(RF_PY, 32'(gy)); wr(RF_A, 32'(A_));
      issue(CMD_PRE, cyc);
      ff(GF_ADD, DOM_INT, RF_QX, RF_PX, RF_ZERO);
      ff(GF_ADD, DOM_INT, RF_QY, RF_PY, RF_ZERO);
      issue(CMD_ECDBL, cyc);
      issue(CMD_ECADD, cyc);
      issue(CMD_ECDBL, cyc);
      issue(CMD_ECSUB, cyc);
      issue(CMD_POST, cyc);
      rd(RF_QX, qx); rd(RF_QY, qy);
      E = r_smul(bin, 5, G, A_, P_, m);
      checks++;
      if (qx != E.x || qy != E.y) begin failures++; $display("cmd seq t=%0d got (%h,%h) exp (%h,%h)", t, qx, qy, E.x, E.y); end
    end
    $display("ecsm=%0d digits +1=%0d -1=%0d 0=%0d dummy_writes=%0d gather_cycles=%0d", n_ecsm, n_pos, n_neg, n_zero, n_dummy_wr, n_gather);
    checks++;
    if (n_pos == 0 || n_neg == 0 || n_zero == 0 || n_dummy_wr == 0 || n_gather == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
