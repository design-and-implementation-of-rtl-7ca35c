// decpac: dual-field elliptic curve cryptographic processor with power
// analysis countermeasures (radix-2), top level.
//
// A host CPU drives the AHB slave: it loads the modulus, the field size,
// the curve coefficient a, the base point and the NAF key into the
// register file and control registers, then starts a command (a single
// field operation, domain conversion, point doubling / addition /
// subtraction, or a full scalar multiplication) and reads the results
// back. The EC controller runs each command as micro-operations on the
// radix-2 dual-field arithmetic unit, which reads and writes the register
// file. The chaotic random generator supplies the random-domain mask r
// of each scalar multiplication (m bits out of NW 32-bit words) and the
// data fed to the idle doubling path of the arithmetic unit.
// Any field up to N bits is supported: GF(p) with an odd prime p < 2^N,
// or GF(2^m), m <= N, with an irreducible polynomial.
// RADIX selects the arithmetic unit: 2 (default) is the radix-2 unit with
// the random-domain countermeasure; 4 is the faster radix-4 unit, which
// has no random domain, so the countermeasure bit is then ignored and the
// processor works in the Montgomery domain without dummy additions.
// Ports: the AHB slave signals (12-bit address, 32-bit data) and `irq`.
// Reset (hresetn) is synchronous, active low.
module decpac
  import ecc_pkg::*;
#(
  parameter int unsigned N     = N_MAX,
  parameter int unsigned RADIX = 2
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hsel,
  input  logic [11:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  input  logic        hready,
  output logic [31:0] hrdata,
  output logic        hreadyout,
  output logic        hresp,
  output logic        irq
);
  localparam int unsigned NW = (N + 31) / 32;

  // host port of the register file
  logic                  rf_hwe;
  rf_addr_e              rf_hreg;
  logic [$clog2(NW)-1:0] rf_hword;
  logic [31:0]           rf_hwdata, rf_hrdata;
  // configuration and command
  logic [N:0]  p, fl, key_pos, key_neg;
  field_e      field;
  logic        cm_en, cmd_start, busy, done, error, seed_we;
  cmd_e        cmd;
  gf_op_e      ff_op;
  dom_e        ff_dom;
  rf_addr_e    ff_dst, ff_a, ff_b;
  logic [31:0] seed, prng_data;
  // engine side of the register file
  rf_addr_e     rf_ra, rf_rb, rf_wa;
  logic [N-1:0] rf_rda, rf_rdb, rf_wd;
  logic         rf_we;
  // arithmetic unit
  logic         g_start, g_busy, g_done;
  gf_op_e       g_op;
  logic [N-1:0] g_x, g_y, g_rnd, g_mask, g_result;

  ahb_slave #(.N(N)) u_ahb (
    .hclk, .hresetn, .hsel, .haddr, .htrans, .hwrite, .hsize, .hwdata, .hready,
    .hrdata, .hreadyout, .hresp, .irq,
    .rf_hwe, .rf_hreg, .rf_hword, .rf_hwdata, .rf_hrdata,
    .p, .fl, .field, .cm_en, .key_pos, .key_neg,
    .cmd_start, .cmd, .ff_op, .ff_dom, .ff_dst, .ff_a, .ff_b,
    .busy, .done, .error, .seed_we, .seed
  );

  chaos_prng u_prng (
    .clk(hclk), .rst_n(hresetn), .en(1'b1), .seed_we, .seed, .rnd(prng_data)
  );

  // The radix-4 unit has no random domain: the countermeasure stays off.
  logic cm_on;
  assign cm_on = (RADIX == 2) ? cm_en : 1'b0;

  ec_ctrl #(.N(N)) u_ctrl (
    .clk(hclk), .rst_n(hresetn),
    .cmd_start, .cmd, .ff_op, .ff_dom, .ff_dst, .ff_a, .ff_b,
    .field, .cm_en(cm_on), .key_pos, .key_neg, .busy, .done, .error,
    .prng_data,
    .rf_ra, .rf_rb, .rf_rda, .rf_rdb, .rf_we, .rf_wa, .rf_wd,
    .g_start, .g_op, .g_x, .g_y, .g_rnd, .g_mask, .g_done, .g_result
  );

  ecc_regfile #(.N(N)) u_rf (
    .clk(hclk), .ra(rf_ra), .rb(rf_rb), .rda(rf_rda), .rdb(rf_rdb),
    .we(rf_we), .wa(rf_wa), .wd(rf_wd),
    .hwe(rf_hwe), .hreg(rf_hreg), .hword(rf_hword), .hwdata(rf_hwdata),
    .hrdata(rf_hrdata)
  );

  if (RADIX == 4) begin : g_r4
    // plain form for rnd = 0, Montgomery form otherwise (rnd is 0 or all ones)
    r4_gfau #(.N(N)) u_gfau (
      .clk(hclk), .rst_n(hresetn), .start(g_start), .op(g_op), .field,
      .mont(|g_rnd), .p, .fl, .x(g_x), .y(g_y),
      .busy(g_busy), .done(g_done), .result(g_result)
    );
  end else begin : g_r2
    gfau #(.N(N)) u_gfau (
      .clk(hclk), .rst_n(hresetn), .start(g_start), .op(g_op), .field, .p, .fl,
      .x(g_x), .y(g_y), .rnd(g_rnd), .mask(g_mask),
      .busy(g_busy), .done(g_done), .result(g_result)
    );
  end

  if (RADIX != 2 && RADIX != 4) begin : g_bad_radix
    $error("decpac: RADIX must be 2 or 4");
  end

  // The controller only starts the arithmetic unit when it is idle.
  assert property (@(posedge hclk) disable iff (!hresetn) g_start |-> !g_busy)
    else $error("decpac: arithmetic unit started while busy");

endmodule
