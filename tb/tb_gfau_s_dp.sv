// tb_gfau_s_dp: checks the S data-path cell (2A mod p) for GF(p) and for
// binary fields of several degrees m, with reference arithmetic in 64 bits.
module tb_gfau_s_dp;
  import ecc_pkg::*;
  localparam int N = 32;
  field_e field;
  logic [N:0] p, fl;
  logic [N-1:0] a, res;
  int checks = 0, failures = 0;

  gfau_s_dp #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] P, A, E;
  int m;
  logic [63:0] polys[4] = '{64'h13, 64'h11B, 64'h20009, 64'h80000009};
  int          bm[4]    = '{4, 8, 17, 31};
  initial begin
    for (int t = 0; t < 4000; t++) begin
      if (t % 2 == 0) begin
        field = FIELD_P; P = (t % 4 == 0) ? 64'd4294967291 : 64'd65521; m = (t % 4 == 0) ? 32 : 16;
        A = {$urandom, $urandom} % P;
      end else begin
        field = FIELD_B; P = polys[(t / 2) % 4]; m = bm[(t / 2) % 4];
        A = {$urandom, $urandom} & ((64'd1 << m) - 1);
      end
      p = 33'(P); fl = 33'(1) << m; a = 32'(A);
      #1;
      E = A << 1;
      if (field == FIELD_B) begin if (E[m]) E ^= P; end
      else if (E >= P) E -= P;
      checks++;
      if (64'(res) != E) begin failures++; $display("f=%0d m=%0d a=%h res=%h exp=%h", field, m, A, res, E); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
