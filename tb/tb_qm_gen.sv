// tb_qm_gen: checks the q*N generator at NBITS = 64. For random odd moduli
// and every combination of P[2:0] and k it computes the expected quotient
// digit independently (the q in 0..2^(k+1)-1 for which P + q*N is divisible
// by 2^(k+1), found by search) and checks that q matches and that
// q1m +/- q2m equals q*N.
module tb_qm_gen;
  localparam int NB = 64;
  localparam int W  = NB + 6;

  logic [2:0]    p_low, nneg3, q;
  logic [1:0]    k;
  logic [NB-1:0] nmod;
  logic [W-1:0]  q1m, q2m;
  logic          cin;
  int checks = 0, failures = 0;

  qm_gen #(.NBITS(NB), .W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] sum, expect_qn;
    int qe, m;
    for (int t = 0; t < 200; t++) begin
      nmod = {$urandom, $urandom};
      nmod[0] = 1'b1;
      nneg3 = 3'(-nmod[2:0]);
      for (int kk = 0; kk < 3; kk++) begin
        for (int pl = 0; pl < 8; pl++) begin
          p_low = 3'(pl);
          k     = 2'(kk);
          #1;
          m  = 1 << (kk + 1);
          qe = -1;
          for (int c = 0; c < m; c++) if ((pl + c * int'(nmod[2:0])) % m == 0) qe = c;
          expect_qn = W'(qe) * W'(nmod);
          sum = cin ? q1m - q2m : q1m + q2m;
          checks++;
          if (int'(q) != qe || sum != expect_qn) begin
            failures++;
            $display("N=%h P=%0d k=%0d: q=%0d expected %0d", nmod, pl, kk, q, qe);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
