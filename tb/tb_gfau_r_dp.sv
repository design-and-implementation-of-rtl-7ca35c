// tb_gfau_r_dp: checks the R data-path cell. For GF(p) (p = 2^31-1 and a
// 32-bit prime) and GF(2^31) (x^31+x^3+1) it compares every combination
// of add/sub, with/without B and with/without halving against plain
// 64-bit reference arithmetic; a halved result h must satisfy 2h == t.
module tb_gfau_r_dp;
  import ecc_pkg::*;
  localparam int N = 32;
  field_e field;
  logic [N:0] p;
  logic [N-1:0] a, b, res;
  logic use_b, sub, half;
  int checks = 0, failures = 0;

  gfau_r_dp #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] P, A, B, T, E;
  initial begin
    for (int t = 0; t < 6000; t++) begin
      case (t % 3)
        0: begin field = FIELD_P; P = 64'd2147483647; end
        1: begin field = FIELD_P; P = 64'd4294967291; end
        default: begin field = FIELD_B; P = 64'h80000009; end
      endcase
      p = 33'(P);
      A = {$urandom, $urandom}; B = {$urandom, $urandom};
      if (field == FIELD_B) begin A &= 64'h7fffffff; B &= 64'h7fffffff; end
      else begin A %= P; B %= P; end
      {use_b, sub, half} = 3'($urandom);
      a = 32'(A); b = 32'(B);
      #1;
      if (!use_b) B = 0;
      if (field == FIELD_B) begin
        T = A ^ B;
        E = half ? (T[0] ? (T ^ P) >> 1 : T >> 1) : T;
      end else begin
        T = sub ? (A + P - B) % P : (A + B) % P;
        E = half ? (T[0] ? (T + P) >> 1 : T >> 1) : T;
      end
      checks++;
      if (64'(res) != E) begin
        failures++; $display("f=%0d a=%h b=%h ub=%b sub=%b half=%b res=%h exp=%h", field, A, B, use_b, sub, half, res, E);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
