// tb_gfau_uv_dp: checks one binary-GCD step of the U,V data-path over both
// fields against the four rules (U even, V even, U > V, otherwise), and
// that iterating the step from (p, Y) ends in U = 1, V = 0 for a prime
// or irreducible p.
module tb_gfau_uv_dp;
  import ecc_pkg::*;
  localparam int N = 32;
  field_e field;
  logic [N:0] u, v, u_next, v_next;
  uv_ctrl_e ctrl;
  logic v_zero;
  int checks = 0, failures = 0;

  gfau_uv_dp #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N:0] eu, ev;
  uv_ctrl_e ec;
  initial begin
    for (int t = 0; t < 4000; t++) begin
      field = (t % 2) ? FIELD_B : FIELD_P;
      u = {$urandom, $urandom}; v = {$urandom, $urandom};
      if (t % 5 == 0) u[0] = 1;
      if (t % 5 <= 1) v[0] = 1;
      if (t % 7 == 0) v = u;
      #1;
      eu = u; ev = v;
      if (!u[0]) begin ec = UV_U_EVEN; eu = u / 2; end
      else if (!v[0]) begin ec = UV_V_EVEN; ev = v / 2; end
      else if (u > v) begin ec = UV_U_GT; eu = (field == FIELD_B) ? (u ^ v) / 2 : (u - v) / 2; end
      else begin ec = UV_V_GE; ev = (field == FIELD_B) ? (u ^ v) / 2 : (v - u) / 2; end
      checks++;
      if (ctrl != ec || u_next != eu || v_next != ev || v_zero != (v == 0)) begin
        failures++; $display("u=%h v=%h ctrl=%0d exp=%0d un=%h vn=%h", u, v, ctrl, ec, u_next, v_next);
      end
    end
    // full GCD runs
    for (int t = 0; t < 200; t++) begin
      int n;
      n = 0;
      field = (t % 2) ? FIELD_B : FIELD_P;
      u = (field == FIELD_B) ? 33'h80000009 : 33'd4294967291;
      v = {1'b0, $urandom} % u; if (v == 0) v = 1;
      if (field == FIELD_B) v[32:31] = 0;
      #1;
      while (!v_zero && n < 200) begin u = u_next; v = v_next; n++; #1; end
      checks++;
      if (u != 1 || v != 0) begin failures++; $display("gcd end u=%h v=%h n=%0d", u, v, n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
