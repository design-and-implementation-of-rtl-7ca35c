// tb_decpac_workloads: runs the processor, at its default size (N = 521),
// on the field sizes whose results the design is measured against, and
// reports the cycle counts next to the published ones.
//  1. 256-bit arithmetic-unit operations with the random domain on, over
//     GF(p256) and GF(2^256) (x^256+x^10+x^5+x^2+1): random division RD,
//     random multiplication RM, addition MA, subtraction MS. The unit
//     latency is measured at the arithmetic unit itself: RM must take
//     exactly m+1 = 257 cycles and MA/MS 2 cycles (published: 257 and 2);
//     RD must lie between m+2 and 2m+2 (published: 316 cycles over GF(p256)
//     and 427 over GF(2^256), as averages).
//  2. A 521-bit scalar multiplication over GF(2^521-1), random domain on,
//     random 521-bit key (published: 2,020,494 cycles).
//  3. A 409-bit scalar multiplication over GF(2^409) (x^409+x^87+1), random
//     domain on, random 409-bit key (published: 1,224,496 cycles).
// The affine formulas never use the curve constant b, so any point (x, y)
// lies on some curve with the chosen a; random points are used. Results are
// compared with the reference model in ec_ref.svh. Scalar-multiplication
// cycle counts must lie within 25% of the published figures; the exact
// count depends on the key's NAF and on this design's micro-programs.
module tb_decpac_workloads;
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
    repeat (8000000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycle counters: arithmetic-unit latency and command busy time
  longint cyc = 0, t0 = 0, tc = 0;
  int lat = 0, busy_cyc = 0;
  always @(posedge hclk) begin
    cyc++;
    if (dut.g_start) t0 = cyc;
    if (dut.g_done) lat = int'(cyc - t0);
    if (dut.cmd_start) tc = cyc;
    if (dut.done) busy_cyc = int'(cyc - tc);
  end

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
  task automatic command(logic [31:0] c);
    logic [31:0] st;
    wr32(12'hA08, 32'h2);
    wr32(12'hA00, c);
    do begin
      repeat (16) @(negedge hclk);
      rd32(12'hA08, st);
    end while (!st[1]);
    checks++;
    if (st[2]) begin failures++; $display("error flag set"); end
  endtask
  function automatic logic [31:0] ffcmd(gf_op_e o, rf_addr_e dst, rf_addr_e a, rf_addr_e b);
    return {12'b0, 4'(b), 4'(a), 4'(dst), 2'(DOM_RAND), 2'(o), 4'(CMD_FF)};
  endfunction
  function automatic wide_t rnd_wide(int bits);
    wide_t v = 0;
    for (int i = 0; i < (bits + 31) / 32; i++) v[i*32 +: 32] = $urandom;
    return v & ((wide_t'(1) << bits) - 1);
  endfunction
  function automatic bit near_pct(int got, int paper, int pct);
    return got * 100 >= paper * (100 - pct) && got * 100 <= paper * (100 + pct);
  endfunction
  function automatic wide_t pw2(bit b, int e, wide_t p, int m);   // 2^e (or x^e) mod p
    wide_t t = 1;
    for (int i = 0; i < e; i++) begin
      if (b) begin t = t << 1; if (t[m]) t ^= p; end
      else t = r_add(b, t, t, p);
    end
    return t;
  endfunction

  // ---------------------------------------------------- 1. unit operations
  task automatic unit_ops(bit b, int m, wide_t p);
    wide_t x, y, r, lhs, rhs, rm;
    int lam, rd_lat;
    wr_wide(12'h800, p, PW);
    wr32(12'hA04, {14'b0, 1'b1, b, 5'b0, 11'(m)});
    x = b ? rnd_wide(m) : rnd_wide(m) % p;
    y = b ? rnd_wide(m) : rnd_wide(m) % p;
    if (y == 0) y = 1;
    wr_reg(RF_G0, x); wr_reg(RF_G1, y);
    command({28'b0, 4'(CMD_PRE)});           // draws a fresh random mask r
    wr_reg(RF_G0, x); wr_reg(RF_G1, y);      // PRE rewrote the point registers only
    rm = wide_t'(dut.u_ctrl.r) & ((wide_t'(1) << m) - 1);
    lam = $countones(rm);

    command(ffcmd(GF_ADD, RF_G2, RF_G0, RF_G1));
    rd_reg(RF_G2, r);
    checks++; if (r != r_add(b, x, y, p) || lat != 2) begin failures++; $display("MA m=%0d lat=%0d", m, lat); end
    command(ffcmd(GF_SUB, RF_G2, RF_G0, RF_G1));
    rd_reg(RF_G2, r);
    checks++; if (r != r_sub(b, x, y, p) || lat != 2) begin failures++; $display("MS m=%0d lat=%0d", m, lat); end

    command(ffcmd(GF_MUL, RF_G2, RF_G0, RF_G1));      // R = X*Y*2^-lambda
    rd_reg(RF_G2, r);
    lhs = r_mul(b, r, pw2(b, lam, p, m), p, m);
    rhs = r_mul(b, x, y, p, m);
    checks++; if (lhs != rhs || lat != m + 1) begin failures++; $display("RM m=%0d lat=%0d", m, lat); end
    $display("RM  field=%s m=%0d: %0d cycles (published 257)", b ? "GF(2^m)" : "GF(p)", m, lat);

    command(ffcmd(GF_DIV, RF_G3, RF_G0, RF_G1));      // R = X/Y*2^lambda
    rd_reg(RF_G3, r);
    rd_lat = lat;
    lhs = r_mul(b, r, y, p, m);
    rhs = r_mul(b, x, pw2(b, lam, p, m), p, m);
    checks++;
    if (lhs != rhs || rd_lat < m + 2 || rd_lat > 2 * m + 2) begin
      failures++; $display("RD m=%0d lat=%0d", m, rd_lat);
    end
    $display("RD  field=%s m=%0d lambda=%0d: %0d cycles (published %0d)",
             b ? "GF(2^m)" : "GF(p)", m, lam, rd_lat, b ? 427 : 316);
  endtask

  // ---------------------------------------------------- 2./3. scalar multiplication
  task automatic ecsm(bit b, int m, wide_t p, int paper);
    wide_t a, x, y, k, qx, qy;
    logic [`REF_W:0] kp, kn;
    ref_pt_t G, E;
    a = b ? rnd_wide(m) : rnd_wide(m) % p;
    x = b ? rnd_wide(m) : rnd_wide(m) % p;
    y = b ? rnd_wide(m) : rnd_wide(m) % p;
    k = rnd_wide(m);
    k[m-1] = 1'b1;
    G.inf = 0; G.x = x; G.y = y;
    wr_wide(12'h800, p, PW);
    wr32(12'hA04, {14'b0, 1'b1, b, 5'b0, 11'(m)});
    r_naf(k, kp, kn);
    wr_wide(12'h880, wide_t'(kp), PW);
    wr_wide(12'h900, wide_t'(kn), PW);
    wr_reg(RF_PX, x); wr_reg(RF_PY, y); wr_reg(RF_A, a);
    command({28'b0, 4'(CMD_ECSM)});
    rd_reg(RF_QX, qx); rd_reg(RF_QY, qy);
    E = r_smul(b, k, G, a, p, m);
    checks++;
    if (E.inf || qx != E.x || qy != E.y) begin
      failures++; $display("ECSM mismatch field=%0d m=%0d", b, m);
    end
    checks++;
    if (!near_pct(busy_cyc, paper, 25)) begin
      failures++; $display("ECSM cycle count far from the published figure");
    end
    $display("ECSM field=%s m=%0d: %0d cycles (published %0d)", b ? "GF(2^m)" : "GF(p)", m, busy_cyc, paper);
  endtask

  initial begin
    repeat (4) @(negedge hclk);
    hresetn = 1;
    wr32(12'hA0C, 32'h9E37_79B9);

    unit_ops(0, 256, wide_t'(256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF));
    unit_ops(1, 256, (wide_t'(1) << 256) | (wide_t'(1) << 10) | (wide_t'(1) << 5) | (wide_t'(1) << 2) | 1);
    ecsm(0, 521, (wide_t'(1) << 521) - 1, 2020494);
    ecsm(1, 409, (wide_t'(1) << 409) | (wide_t'(1) << 87) | 1, 1224496);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
