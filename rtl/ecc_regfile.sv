// ecc_regfile: operand register file of the processor.
//
// Sixteen N-bit entries addressed by ecc_pkg::rf_addr_e. Entries 0..13
// are storage; entry 14 reads as the constant 0 and entry 15 as the
// constant 1, which the pre-/post-processing and copy micro-operations
// use as operands. Two combinational read ports feed the arithmetic
// unit; one synchronous write port takes its result. A second, 32-bit
// port lets the host bus write and read one word of an entry at a time
// (word w holds bits [32w+31:32w]); the engine port wins if both write
// the same cycle. The entry count, the constants and the host port are
// choices of this RTL: the design only calls for a register file that
// holds the operands for the arithmetic unit.
module ecc_regfile
  import ecc_pkg::*;
#(
  parameter int unsigned N  = N_MAX,
  parameter int unsigned NW = (N + 31) / 32
) (
  input  logic                   clk,
  // engine side
  input  rf_addr_e               ra,
  input  rf_addr_e               rb,
  output logic [N-1:0]           rda,
  output logic [N-1:0]           rdb,
  input  logic                   we,
  input  rf_addr_e               wa,
  input  logic [N-1:0]           wd,
  // host side, one 32-bit word
  input  logic                   hwe,
  input  rf_addr_e               hreg,
  input  logic [$clog2(NW)-1:0]  hword,
  input  logic [31:0]            hwdata,
  output logic [31:0]            hrdata
);
  localparam int unsigned NP = NW * 32;

  logic [NP-1:0] mem [14];

  function automatic logic [NP-1:0] rd(rf_addr_e a, logic [NP-1:0] m [14]);
    if (a == RF_ZERO) return '0;
    if (a == RF_ONE)  return NP'(1);
    return m[a];
  endfunction

  logic [NP-1:0] ra_full, rb_full, h_full;
  always_comb begin
    ra_full = rd(ra, mem);
    rb_full = rd(rb, mem);
    h_full  = rd(hreg, mem);
  end
  assign rda    = ra_full[N-1:0];
  assign rdb    = rb_full[N-1:0];
  assign hrdata = h_full[hword*32 +: 32];

  always_ff @(posedge clk) begin
    if (we && wa < RF_ZERO)
      mem[wa] <= NP'(wd);
    else if (hwe && hreg < RF_ZERO)
      mem[hreg][hword*32 +: 32] <= hwdata;
  end
endmodule
