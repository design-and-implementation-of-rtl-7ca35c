// tb_ecc_regfile: checks the register file against a shadow array:
// full-width engine writes, 32-bit host word writes, both read ports,
// the host word read, the constant entries 0 and 1, and that the engine
// port wins over a simultaneous host write. N = 70 (3 words).
module tb_ecc_regfile;
  import ecc_pkg::*;
  localparam int N = 70, NW = 3;
  logic clk = 0;
  rf_addr_e ra, rb, wa, hreg;
  logic [N-1:0] rda, rdb, wd;
  logic we = 0, hwe = 0;
  logic [1:0] hword;
  logic [31:0] hwdata, hrdata;
  int checks = 0, failures = 0;

  ecc_regfile #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [95:0] sh [16];
  function automatic logic [95:0] expv(int a);
    if (a == 14) return 0;
    if (a == 15) return 1;
    return sh[a];
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) sh[i] = 0;
    // initialise storage through the engine port
    for (int i = 0; i < 14; i++) begin
      @(negedge clk); we = 1; wa = rf_addr_e'(i); wd = '0;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1); hwe = $urandom_range(0, 1);
      wa = rf_addr_e'($urandom_range(0, 15)); hreg = rf_addr_e'($urandom_range(0, 15));
      if (t % 10 == 0) hreg = wa;
      hword = 2'($urandom_range(0, NW - 1));
      wd = {$urandom, $urandom, $urandom}; hwdata = $urandom;
      ra = rf_addr_e'($urandom_range(0, 15)); rb = rf_addr_e'($urandom_range(0, 15));
      #1;
      checks++;
      if (rda != N'(expv(ra)) || rdb != N'(expv(rb)) || hrdata != expv(hreg)[hword*32 +: 32]) begin
        failures++; $display("t=%0d ra=%0d rda=%h exp=%h hreg=%0d hw=%0d hr=%h", t, ra, rda, expv(ra), hreg, hword, hrdata);
      end
      @(posedge clk);
      if (we && wa < 14) sh[wa] = 96'(wd);
      else if (hwe && hreg < 14) sh[hreg][hword*32 +: 32] = hwdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
