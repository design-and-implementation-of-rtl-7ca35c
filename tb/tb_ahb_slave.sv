// tb_ahb_slave: checks the AHB slave and its control registers (N = 70).
// A small word array stands in for the register file's host port. It
// checks: register-file word writes and read-back through HRDATA; p and
// key registers and their outputs; CFG fields and the one-hot field
// length; a CMD write producing one start pulse with decoded fields;
// writes and commands ignored while busy; the sticky done flag, its
// clear and irq; the seed strobe; HREADYOUT and HRESP.
module tb_ahb_slave;
  import ecc_pkg::*;
  localparam int N = 70, NW = 3;
  logic hclk = 0, hresetn = 0, hsel = 0, hwrite = 0, hready = 1;
  logic [11:0] haddr = 0; logic [1:0] htrans = 0; logic [2:0] hsize = 3'b010;
  logic [31:0] hwdata = 0, hrdata;
  logic hreadyout, hresp, irq;
  logic rf_hwe; rf_addr_e rf_hreg; logic [1:0] rf_hword; logic [31:0] rf_hwdata, rf_hrdata;
  logic [N:0] p, fl, key_pos, key_neg;
  field_e field; logic cm_en;
  logic cmd_start; cmd_e cmd; gf_op_e ff_op; dom_e ff_dom; rf_addr_e ff_dst, ff_a, ff_b;
  logic busy = 0, done = 0, error = 0, seed_we; logic [31:0] seed;
  int checks = 0, failures = 0;

  ahb_slave #(.N(N)) dut (.*);
  always #5 hclk = ~hclk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // register-file stand-in
  logic [31:0] mem [16][NW];
  assign rf_hrdata = mem[rf_hreg][rf_hword];
  always @(posedge hclk) if (rf_hwe) mem[rf_hreg][rf_hword] <= rf_hwdata;

  // start pulses
  int n_start = 0, n_seed = 0;
  logic [31:0] last_cmd;
  always @(posedge hclk) begin
    if (cmd_start) begin n_start++; last_cmd <= {12'b0, 4'(ff_b), 4'(ff_a), 4'(ff_dst), 2'(ff_dom), 2'(ff_op), 4'(cmd)}; end
    if (seed_we) begin n_seed++; end
  end

  task automatic wr32(logic [11:0] a, logic [31:0] d);
    @(negedge hclk); hsel = 1; htrans = 2'b10; hwrite = 1; haddr = a;
    @(negedge hclk); hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge hclk);
    checks++; if (!hreadyout || hresp) begin failures++; $display("HREADYOUT/HRESP"); end
  endtask
  task automatic rd32(logic [11:0] a, output logic [31:0] d);
    @(negedge hclk); hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(negedge hclk); hsel = 0; htrans = 2'b00; #1 d = hrdata;
  endtask
  task automatic chk(string what, logic [127:0] got, logic [127:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  logic [31:0] d, w[16][NW];
  logic [95:0] pv, kv, nv;
  initial begin
    for (int r = 0; r < 16; r++) for (int i = 0; i < NW; i++) mem[r][i] = 0;
    repeat (2) @(negedge hclk); hresetn = 1;
    // register file words
    for (int r = 0; r < 14; r++) for (int i = 0; i < NW; i++) begin
      w[r][i] = $urandom; wr32(12'(r << 7 | i << 2), w[r][i]);
    end
    for (int r = 0; r < 14; r++) for (int i = 0; i < NW; i++) begin
      rd32(12'(r << 7 | i << 2), d); chk("rf read", d, w[r][i]);
    end
    // p and key
    pv = {$urandom, $urandom, $urandom}; kv = {$urandom, $urandom, $urandom}; nv = {$urandom, $urandom, $urandom};
    for (int i = 0; i < NW; i++) begin
      wr32(12'h800 + 12'(4 * i), pv[i*32 +: 32]);
      wr32(12'h880 + 12'(4 * i), kv[i*32 +: 32]);
      wr32(12'h900 + 12'(4 * i), nv[i*32 +: 32]);
    end
    chk("p", p, pv[N:0]); chk("key_pos", key_pos, kv[N:0]); chk("key_neg", key_neg, nv[N:0]);
    rd32(12'h884, d); chk("key read", d, kv[63:32]);
    // CFG
    wr32(12'hA04, {14'b0, 1'b0, 1'b1, 5'b0, 11'd67});
    chk("field", field, FIELD_B); chk("cm_en", cm_en, 0); chk("fl", fl, (N+1)'(1) << 67);
    rd32(12'hA04, d); chk("cfg read", d, {14'b0, 1'b0, 1'b1, 5'b0, 11'd67});
    // command
    wr32(12'hA00, 32'h000F_E5A1);
    chk("start count", n_start, 1); chk("cmd fields", last_cmd, 32'h000F_E5A1);
    // busy: writes and commands ignored
    busy = 1;
    wr32(12'hA00, 32'h7);
    wr32(12'h000, 32'hFFFF_0000);
    wr32(12'hA04, 32'h0);
    chk("start while busy", n_start, 1);
    chk("rf write while busy", mem[0][0], w[0][0]);
    chk("cfg write while busy", field, FIELD_B);
    rd32(12'hA08, d); chk("status busy", d[0], 1);
    // done sticky, irq, clear
    @(negedge hclk); done = 1; @(negedge hclk); done = 0; busy = 0;
    chk("irq", irq, 1);
    rd32(12'hA08, d); chk("status done", d[1:0], 2'b10);
    wr32(12'hA08, 32'h2); @(negedge hclk);
    chk("irq cleared", irq, 0);
    // seed
    wr32(12'hA0C, 32'hCAFE_F00D); @(negedge hclk);
    chk("seed strobe", n_seed, 1); chk("seed", seed, 32'hCAFE_F00D);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
