// chaos_prng: 32-bit pseudo random number generator with a chaotic core.
//
// The state x is a Q0.32 fraction iterated through the logistic map
// x' = 4x(1-x), computed as x*(2^32-x) >> 30 with a 32x32 multiplier.
// A finite-precision logistic map falls into short cycles and into the
// fixed point 0, so every step XORs a 32-bit maximal-length LFSR
// (x^32+x^22+x^2+x+1) into the new state, which keeps it moving. One
// 32-bit word is produced per enabled cycle on `rnd`. Loading `seed`
// (seed_we) sets both the map state and the LFSR (a zero LFSR seed is
// replaced by a constant). The processor concatenates successive words
// into the m-bit random number of each scalar multiplication and uses
// the current word as masking data. The width follows the design; the
// map, the perturbation and the seeding are choices of this RTL.
// Reset is synchronous, active low.
module chaos_prng (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        seed_we,
  input  logic [31:0] seed,
  output logic [31:0] rnd
);
  localparam logic [31:0] LFSR_INIT = 32'hACE1_2468;
  localparam logic [31:0] X_INIT    = 32'h5A5A_1234;

  logic [31:0] x, l;
  logic [63:0] prod;
  logic [31:0] fx, l_nx;

  always_comb begin
    prod = 64'(x) * (64'h1_0000_0000 - 64'(x));
    fx   = prod[61:30];
    // Fibonacci LFSR, taps 32, 22, 2, 1
    l_nx = {l[30:0], l[31] ^ l[21] ^ l[1] ^ l[0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= X_INIT;
      l <= LFSR_INIT;
    end else if (seed_we) begin
      x <= seed;
      l <= (seed == '0) ? LFSR_INIT : seed;
    end else if (en) begin
      x <= fx ^ l_nx;
      l <= l_nx;
    end
  end

  assign rnd = x;
endmodule
