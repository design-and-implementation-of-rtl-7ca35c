// tb_decpac_r4: end-to-end test of the processor built with the radix-4
// arithmetic unit (RADIX = 4, N = 521): scalar multiplications in the
// Montgomery domain over GF(p256) (P-256 prime), GF(2^256)
// (x^256+x^10+x^5+x^2+1), GF(p160) (secp160r1 prime) and GF(2^163)
// (x^163+x^7+x^6+x^3+1), with random keys and random points, checked
// against the reference model in ec_ref.svh. The countermeasure bit is
// set but must have no effect (the radix-4 unit has no random domain).
// Cycle counts are reported next to the published radix-4 figures
// (256-bit: 193,386 over GF(p), 165,354 over GF(2^m); 160-bit: 79,528 over
// GF(p), 56,698 over GF(2^m), here with x^160+x^5+x^3+x^2+1). Over GF(p)
// they must lie within 25% of them. Over GF(2^m) they are only reported:
// the binary-field division of this design takes about m steps on average
// where the published unit takes about 0.84m, so these runs are 13-36%
// slower.
// It also checks that the one-bit Montgomery division step occurred.
module tb_decpac_r4;
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

  decpac #(.RADIX(4)) dut (.*);

  always #5 hclk = ~hclk;

  initial begin
    repeat (3000000) @(posedge hclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-bit Montgomery division steps of the radix-4 unit
  int n_single = 0;
  always @(posedge hclk) if (dut.g_r4.u_gfau.state == 2'd3 && dut.g_r4.u_gfau.ty == 3'd0) n_single++;

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

  // ---------------------------------------------------- scalar multiplication
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
    if (!b) checks++;
    if (!b && !near_pct(busy_cyc, paper, 25)) begin
      failures++; $display("ECSM cycle count far from the published figure");
    end
    $display("ECSM field=%s m=%0d: %0d cycles (published %0d)", b ? "GF(2^m)" : "GF(p)", m, busy_cyc, paper);
  endtask

  initial begin
    repeat (4) @(negedge hclk);
    hresetn = 1;
    wr32(12'hA0C, 32'h9E37_79B9);

    ecsm(0, 256, wide_t'(256'hFFFFFFFF00000001000000000000000000000000FFFFFFFFFFFFFFFFFFFFFFFF), 193386);
    ecsm(1, 256, (wide_t'(1) << 256) | (wide_t'(1) << 10) | (wide_t'(1) << 5) | (wide_t'(1) << 2) | 1, 165354);
    ecsm(0, 160, wide_t'(160'hFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFFF7FFFFFFF), 79528);
    ecsm(1, 160, (wide_t'(1) << 160) | (wide_t'(1) << 5) | (wide_t'(1) << 3) | (wide_t'(1) << 2) | 1, 56698);
    checks++;
    if (n_single == 0) begin failures++; $display("no one-bit Montgomery division step seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
