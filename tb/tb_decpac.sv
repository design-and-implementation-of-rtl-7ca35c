// tb_decpac: end-to-end test of the processor at its default size
// (N = 521), driven only through the AHB slave like a host CPU would.
//  1. P-256 over GF(p), m = 256, countermeasure on (random domain):
//     a full scalar multiplication [k]G with a random 256-bit key.
//  2. A binary field GF(2^233) (x^233+x^74+1), a = 1, a random base point,
//     countermeasure off (Montgomery domain): [k]P with a 232-bit key.
//  3. Field operations at the full width, GF(2^521-1), m = 521: MA, MS,
//     integer multiplication and Montgomery division.
// Results are compared with a reference model (ec_ref.svh). It also counts
// how often each mechanism occurred: random-mask gathering, dummy
// additions (zero digits), point subtractions (-1 digits), pre- and
// post-processing, masked idle S data-path cycles, both fields, both
// countermeasure settings, the done interrupt; one never seen is a failure.
module tb_decpac;
  import ecc_pkg::*;
  `define REF_W 1056
  `include "ec_ref.svh"
  localparam int N  = N_MAX;
  localparam int NW = (N + 31) / 32;
  localparam int PW = (N + 1 + 31) / 32;
  typedef logic [`REF_W-1:0] wide_t;

  logic hclk = 0, hresetn = 0, hsel = 0, hwrite = 0, hready = 1;
  logic [11:0] haddr = 0; logic [1:0] htrans = 0; logic [2:0] hsize = 3'b010;
  logic [31:0] hwdata = 0, hrdata; logic hreadyout, hresp, irq;
  int checks = 0, failures = 0;

  decpac dut (.*);

  always #5 hclk = ~hclk;

  initial begin
    repeat (4000000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------- mechanism counters
  int n_gather = 0, n_dummy = 0, n_neg = 0, n_pre = 0, n_post = 0, n_masked = 0, n_irq = 0;
  always @(posedge hclk) if (hresetn) begin
    if (dut.u_ctrl.state == 3'd1) n_gather++;                                 // S_GATHER
    if (dut.rf_we && dut.rf_wa == RF_RX) n_dummy++;
    if (dut.u_ctrl.state == 3'd3 && dut.u_ctrl.prog == 3'd2 && !dut.u_ctrl.single) n_neg++;  // PG_NEG issued
    if (dut.u_ctrl.state == 3'd3 && dut.u_ctrl.prog == 3'd3 && dut.u_ctrl.uidx == 0 && !dut.u_ctrl.single) n_pre++;
    if (dut.u_ctrl.state == 3'd3 && dut.u_ctrl.prog == 3'd4 && dut.u_ctrl.uidx == 0 && !dut.u_ctrl.single) n_post++;
    if (dut.g_r2.u_gfau.state == 2'd3 && dut.g_r2.u_gfau.ctrl_v && !dut.g_r2.u_gfau.mode_q) n_masked++;
  end
  always @(posedge irq) n_irq++;

  // ---------------------------------------------------- AHB host tasks
  task automatic wr32(logic [11:0] a, logic [31:0] d);
    @(negedge hclk); hsel = 1; htrans = 2'b10; hwrite = 1; haddr = a;
    @(negedge hclk); hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
  endtask
  task automatic rd32(logic [11:0] a, output logic [31:0] d);
    @(negedge hclk); hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(negedge hclk); hsel = 0; htrans = 2'b00; #1 d = hrdata;
  endtask
  task automatic wr_wide(logic [11:0] base, wide_t v, int words);
    for (int w = 0; w < words; w++) wr32(base + 12'(4 * w), v[w*32 +: 32]);
  endtask
  task automatic wr_reg(rf_addr_e r, wide_t v);
    wr_wide(12'(r) << 7, v, NW);
  endtask
  task automatic rd_reg(rf_addr_e r, output wide_t v);
    logic [31:0] d;
    v = 0;
    for (int w = 0; w < NW; w++) begin rd32((12'(r) << 7) + 12'(4 * w), d); v[w*32 +: 32] = d; end
  endtask
  task automatic command(logic [31:0] c, output int cyc);
    logic [31:0] st;
    wr32(12'hA08, 32'h2);                 // clear done
    wr32(12'hA00, c);
    cyc = 0;
    do begin
      repeat (64) @(negedge hclk);
      cyc += 64;
      rd32(12'hA08, st);
    end while (!st[1]);
    checks++;
    if (st[2]) begin failures++; $display("error flag set"); end
  endtask
  function automatic logic [31:0] ffcmd(gf_op_e o, dom_e d, rf_addr_e dst, rf_addr_e a, rf_addr_e b);
    return {12'b0, 4'(b), 4'(a), 4'(dst), 2'(d), 2'(o), 4'(CMD_FF)};
  endfunction

  // ---------------------------------------------------- test
  wide_t P_, A_, k, gx, gy, qx, qy, v1, v2;
  logic [`REF_W:0] kp, kn;
  ref_pt_t G, E;
  int m, cyc;
  bit bin;

  task automatic ecsm(bit b_, int m_, wide_t p_, wide_t a_, wide_t x_, wide_t y_, wide_t k_, bit cm);
    bin = b_; m = m_; P_ = p_; A_ = a_;
    G.inf = 0; G.x = x_; G.y = y_;
    wr_wide(12'h800, p_, PW);
    wr32(12'hA04, {14'b0, cm, b_, 5'b0, 11'(m_)});
    r_naf(k_, kp, kn);
    wr_wide(12'h880, wide_t'(kp), PW);
    wr_wide(12'h900, wide_t'(kn), PW);
    wr_reg(RF_PX, x_); wr_reg(RF_PY, y_); wr_reg(RF_A, a_);
    command({28'b0, 4'(CMD_ECSM)}, cyc);
    rd_reg(RF_QX, qx); rd_reg(RF_QY, qy);
    E = r_smul(b_, k_, G, a_, p_, m_);
    checks++;
    if (E.inf || qx != E.x || qy != E.y) begin
      failures++;
      $display("ECSM mismatch bin=%0d m=%0d\n got x=%h\n exp x=%h", b_, m_, qx, E.x);
    end
    $display("ECSM field=%s m=%0d countermeasure=%0d: about %0d cycles", b_ ? "GF(2^m)" : "GF(p)", m_, cm, cyc);
  endtask

  initial begin
    repeat (4) @(negedge hclk);
    hresetn = 1;
    wr32(12'hA0C, 32'h1234_5678);         // seed

    // 1. P-256, random domain
    ecsm(0, 256,
         wide_t'(256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF),
         wide_t'(256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFC),
         wide_t'(256'h6B17D1F2E12C4247F8BCE6E563A440F277037D812DEB33A0F4A13945D898C296),
         wide_t'(256'h4FE342E2FE1A7F9B8EE7EB4A7C0F9E162BCE33576B315ECECBB6406837BF51F5),
         wide_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) >> 1,
         1);

    // 2. GF(2^233), Montgomery domain
    v1 = wide_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) & ((wide_t'(1) << 233) - 1);
    v2 = wide_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) & ((wide_t'(1) << 233) - 1);
    ecsm(1, 233, (wide_t'(1) << 233) | (wide_t'(1) << 74) | 1, 1, v1, v2,
         wide_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) & ((wide_t'(1) << 232) - 1),
         0);

    // 3. full-width field operations, p = 2^521 - 1
    P_ = (wide_t'(1) << 521) - 1;
    wr_wide(12'h800, P_, PW);
    wr32(12'hA04, {14'b0, 1'b1, 1'b0, 5'b0, 11'd521});
    v1 = wide_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                  $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) % P_;
    v2 = wide_t'({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom,
                  $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom}) % P_;
    wr_reg(RF_G0, v1); wr_reg(RF_G1, v2);
    command(ffcmd(GF_ADD, DOM_INT, RF_G2, RF_G0, RF_G1), cyc);
    rd_reg(RF_G2, qx);
    checks++; if (qx != r_add(0, v1, v2, P_)) begin failures++; $display("MA 521 mismatch"); end
    command(ffcmd(GF_SUB, DOM_INT, RF_G2, RF_G0, RF_G1), cyc);
    rd_reg(RF_G2, qx);
    checks++; if (qx != r_sub(0, v1, v2, P_)) begin failures++; $display("MS 521 mismatch"); end
    command(ffcmd(GF_MUL, DOM_INT, RF_G2, RF_G0, RF_G1), cyc);
    rd_reg(RF_G2, qx);
    checks++; if (qx != r_mul(0, v1, v2, P_, 521)) begin failures++; $display("MM 521 mismatch"); end
    command(ffcmd(GF_DIV, DOM_MONT, RF_G3, RF_G0, RF_G1), cyc);    // v1/v2 * 2^521
    rd_reg(RF_G3, qy);
    checks++;
    if (r_mul(0, qy, v2, P_, 521) != r_mul(0, v1, (wide_t'(1) << 521) % P_, P_, 521)) begin
      failures++; $display("MMD 521 mismatch");
    end

    $display("mechanisms: gather=%0d dummy_add=%0d neg=%0d pre=%0d post=%0d masked_S=%0d irq=%0d",
             n_gather, n_dummy, n_neg, n_pre, n_post, n_masked, n_irq);
    checks++;
    if (n_gather == 0 || n_dummy == 0 || n_neg == 0 || n_pre < 2 || n_post < 2 || n_masked == 0 || n_irq == 0) begin
      failures++; $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
