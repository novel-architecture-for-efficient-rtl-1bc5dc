// tb_csdme_rtl: end-to-end check of the right-to-left exponentiator (two multipliers)
// at NBITS = 64 and KE = 64. For random odd moduli it computes M^E mod N and
// compares with a reference square-and-multiply using wide-integer
// arithmetic, and bounds the clock count by KE+4 multiplication times.
// Operands include M = 0, M = 1, M = N-1, E = 0 and E all ones.
// It also counts the operations: KE+1 products on the F multiplier (one of them
// in parallel with each S product), popcount(E)+1 on the S multiplier and KE+1
// conversions, so KE+2 multiplication slots in sequence.
module tb_csdme_rtl;
  import tb_ref_pkg::*;

  localparam int NB = 64;
  localparam int KE = 64;

  logic clk = 0, rst_n = 0, start = 0;
  logic [NB-1:0] n, m, r2, r1, c;
  logic [KE-1:0] e;
  logic busy, done;
  int checks = 0, failures = 0;

  csdme_rtl #(.NBITS(NB), .KE(KE)) dut (.*);

  always #5 clk = ~clk;

  int clocks = 0;
  always @(posedge clk) if (busy) clocks++;

  // operation counters, read from inside the design
  int n_mulf = 0, n_muls = 0, n_conv = 0;
  always @(posedge clk) begin
    if (dut.mulf_start) n_mulf++;
    if (dut.muls_start) n_muls++;
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
    n_mulf = 0; n_muls = 0; n_conv = 0;
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
    // squarings: one to form F plus one per bit; products: one per set bit plus the final one
    checks++;
    if (n_mulf != KE + 1 || n_muls != pop + 1 || n_conv != KE + 1) begin
      failures++;
      $display("operation counts: %0d F-products, %0d S-products, %0d conversions (pop %0d)",
               n_mulf, n_muls, n_conv, pop);
    end
    // conversions run alongside the products, so the whole operation must fit
    // in KE+4 multiplication times, a multiplication time being the conversion
    // time ceil((NB+2)/2) plus three clocks
    mtime = (NB + 3) / 2 + 3;
    checks++;
    if (clocks > (KE + 4) * mtime) begin
      failures++;
      $display("%0d clocks, more than %0d", clocks, (KE + 4) * mtime);
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
