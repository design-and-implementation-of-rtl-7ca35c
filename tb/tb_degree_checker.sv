// tb_degree_checker: checks the degree checker against a direct test of
// bit m, for random values and every field length m of a 33-bit word.
module tb_degree_checker;
  localparam int W = 33;
  logic [W-1:0] din, fl;
  logic dout;
  int checks = 0, failures = 0;

  degree_checker #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < W; m++) begin
      fl = '0; fl[m] = 1'b1;
      for (int t = 0; t < 40; t++) begin
        din = {$urandom, $urandom};
        if (t == 0) din = '0;
        if (t == 1) din = ~('1 << m);        // all bits below m
        if (t == 2) din = W'(1) << m;        // exactly bit m
        #1;
        checks++;
        if (dout !== din[m]) begin
          failures++; $display("m=%0d din=%h dout=%b", m, din, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
