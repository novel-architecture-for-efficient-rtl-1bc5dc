// tb_csdme_ltr: end-to-end check of the left-to-right exponentiator (one multiplier)
// at NBITS = 64 and KE = 64. For random odd moduli it computes M^E mod N and
// compares with a reference square-and-multiply using wide-integer
// arithmetic, and bounds the clock count by KE+popcount(E)+4 multiplication times.
// Operands include M = 0, M = 1, M = N-1, E = 0 and E all ones.
// It also counts the operations per Select code: one 00, KE squarings (01),
// popcount(E) products (10), one 11, with a conversion after all but the last.
module tb_csdme_ltr;
  import tb_ref_pkg::*;

  localparam int NB = 64;
  localparam int KE = 64;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] n, m, r2, r1, c;
  logic [KE-1:0] e;
  logic busy, done;
  int checks = 0, failures = 0;

  csdme_ltr #(.NBITS(NB), .KE(KE)) dut (.*);

  always #5 clk = ~clk;

  int clocks = 0;
  always @(posedge clk) if (busy) clocks++;

  // operation counters, read from inside the design
  int n_mul = 0, n_conv = 0;
  int n_sel[4];
  always @(posedge clk) begin
    if (dut.mul_start) begin n_mul++; n_sel[dut.sel]++; end
    if (dut.conv_start) n_conv++;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(wide_t nv, wide_t mv, wide_t ev);
    wide_t expect_c;
    int pop, waited, mtime;
    pop = $countones(ev[KE-1:0]);
    n_mul = 0; n_conv = 0; foreach (n_sel[i]) n_sel[i] = 0;
    n  = nv[NB-1:0];
    m  = mv[NB-1:0];
    e  = ev[KE-1:0];
    r2 = pow2mod(2 * (NB + 2), nv);
    r1 = pow2mod(NB + 2, nv);
    expect_c = powmod(mv, ev, KE, nv);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    clocks = 0;
    waited = 0;
    while (!done && waited < 2000000) begin @(posedge clk); #1 waited++; end
    checks++;
    if (wide_t'(c) != expect_c) begin
      failures++;
      $display("C=%h expected %h (N=%h M=%h E=%h)", c, expect_c[NB-1:0], n, m, e);
    end
    // one product for F, one squaring per bit, one product per set bit, the final one
    checks++;
    if (n_mul != KE + pop + 2 || n_conv != KE + pop + 2 ||
        n_sel[0] != 1 || n_sel[1] != KE || n_sel[2] != pop || n_sel[3] != 1) begin
      failures++;
      $display("operation counts: %0d products, %0d conversions (pop %0d)", n_mul, n_conv, pop);
    end
    // conversions run alongside the products, so the whole operation must fit
    // in KE+popcount(E)+4 multiplication times, a multiplication time being the conversion
    // time ceil((NB+2)/2) plus three clocks
    mtime = (NB + 3) / 2 + 3;
    checks++;
    if (clocks > (KE + pop + 4) * mtime) begin
      failures++;
      $display("%0d clocks, more than %0d", clocks, (KE + pop + 4) * mtime);
    end
    @(negedge clk);
  endtask

  initial begin
    wide_t nv, mv, ev;
    n = '0; m = '0; e = '0; r2 = '0; r1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      nv = rand_wide(NB);
      nv[0] = 1'b1;
      nv[NB-1] = 1'b1;
      mv = rand_wide(NB) % nv;
      ev = rand_wide(KE);
      unique case (t)
        0: mv = 0;
        1: mv = 1;
        2: mv = nv - 1;
        3: ev = 0;
        4: ev = {KE{1'b1}};
        default: ;
      endcase
      run(nv, mv, ev);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
