// tb_csdme_full: one complete 1024-bit modular exponentiation on each of the
// two exponentiators of csdme_top, at the top's default parameters
// (NBITS = 1024, KE = 1024), run at the same time. The modulus is a random
// odd 1024-bit number with its top bit set, the message a random value below
// it and the exponent a random 1024-bit value. Both results are compared with
// a reference modular power, and the clock count of each unit is printed.
module tb_csdme_full;
  import tb_ref_pkg::*;

  localparam int NB = 1024;
  localparam int KE = 1024;

  logic clk = 0, rst_n = 0;
  logic rtl_start = 0, ltr_start = 0;
  logic [NB-1:0] rtl_n, rtl_m, rtl_r2, rtl_r1, rtl_c;
  logic [NB-1:0] ltr_n, ltr_m, ltr_r2, ltr_r1, ltr_c;
  logic [KE-1:0] rtl_e, ltr_e;
  logic rtl_busy, rtl_done, ltr_busy, ltr_done;
  int checks = 0, failures = 0;
  int rtl_cycles = 0, ltr_cycles = 0;

  csdme_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rtl_busy) rtl_cycles++;
    if (ltr_busy) ltr_cycles++;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wide_t nv, mv, ev, cv;
    nv = rand_wide(NB);
    nv[0] = 1'b1;
    nv[NB-1] = 1'b1;
    mv = rand_wide(NB) % nv;
    ev = rand_wide(KE);
    rtl_n = nv[NB-1:0]; rtl_m = mv[NB-1:0]; rtl_e = ev[KE-1:0];
    rtl_r2 = pow2mod(2 * (NB + 2), nv); rtl_r1 = pow2mod(NB + 2, nv);
    ltr_n = rtl_n; ltr_m = rtl_m; ltr_e = rtl_e; ltr_r2 = rtl_r2; ltr_r1 = rtl_r1;
    cv = powmod(mv, ev, KE, nv);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) begin rtl_start = 1; ltr_start = 1; end
    @(negedge clk) begin rtl_start = 0; ltr_start = 0; end
    while (rtl_busy || ltr_busy) @(posedge clk);
    #1;
    checks += 2;
    if (wide_t'(rtl_c) != cv) begin failures++; $display("RtL result wrong"); end
    if (wide_t'(ltr_c) != cv) begin failures++; $display("LtR result wrong"); end
    $display("exponent weight %0d, RtL %0d clocks, LtR %0d clocks",
             $countones(ev[KE-1:0]), rtl_cycles, ltr_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
