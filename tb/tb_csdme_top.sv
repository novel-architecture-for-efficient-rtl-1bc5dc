// tb_csdme_top: end-to-end test of both exponentiators of csdme_top, run at
// the same time on different operands, at NBITS = 63 and KE = 40 (a width
// whose NBITS+2 positions are not a multiple of three, unlike the 64-bit
// block tests). Each result is compared with a reference modular power.
// It counts how often each mechanism of the design occurs and fails if one
// never does:
//   - a right-to-left step with e_i = 1 (S product in parallel with the
//     squaring) and with e_i = 0 (squaring only)
//   - a left-to-right step with and without the extra product
//   - each of the four Select codes of the left-to-right unit
//   - Select1 and Select2 at both values in the right-to-left unit
//   - CSD digits that subtract, zero groups, and the top-digit rewrite of
//     the converter over one and over two positions
//   - a zero operand replaced by the modulus, and a result of N reported as 0
//   - a multiplier stalling for digits its converter has not produced yet
module tb_csdme_top;
  import tb_ref_pkg::*;

  localparam int NB = 63;
  localparam int KE = 40;

  logic clk = 0, rst_n = 0;
  logic rtl_start = 0, ltr_start = 0;
  logic [NB-1:0] rtl_n, rtl_m, rtl_r2, rtl_r1, rtl_c;
  logic [NB-1:0] ltr_n, ltr_m, ltr_r2, ltr_r1, ltr_c;
  logic [KE-1:0] rtl_e, ltr_e;
  logic rtl_busy, rtl_done, ltr_busy, ltr_done;
  int checks = 0, failures = 0;

  csdme_top #(.NBITS(NB), .KE(KE)) dut (.*);

  always #5 clk = ~clk;

  // state codes of the two controllers (their enum order)
  localparam int RTL_LOOP_START = 3, RTL_MUL_C = 6, LTR_DECIDE = 5, LTR_MUL_C = 8;

  // mechanism counters
  typedef enum int {
    EV_RTL_MUL, EV_RTL_SKIP, EV_LTR_MUL, EV_LTR_SKIP,
    EV_SEL00, EV_SEL01, EV_SEL10, EV_SEL11,
    EV_SELECT1_0, EV_SELECT1_1, EV_SELECT2_0, EV_SELECT2_1,
    EV_SUB_DIGIT, EV_ZERO_GROUP, EV_TOP_FIX1, EV_TOP_FIX2,
    EV_ZERO_OPERAND, EV_RESULT_N, EV_RTL_STALL, EV_LTR_STALL, EV_COUNT
  } event_t;
  int ev[EV_COUNT];

  task automatic count_digit(logic emit, logic [2:0] d);
    if (emit && d[1:0] != 2'd3 && d[2]) ev[EV_SUB_DIGIT]++;
    if (emit && d[1:0] == 2'd3) ev[EV_ZERO_GROUP]++;
  endtask

  // a scan step that starts a top-digit rewrite moves fix from 0 to 1 or 2
  task automatic count_fix(logic [1:0] fix_was, logic [1:0] fix_now);
    if (fix_was == 2'd0 && fix_now == 2'd1) ev[EV_TOP_FIX1]++;
    if (fix_was == 2'd0 && fix_now == 2'd2) ev[EV_TOP_FIX2]++;
  endtask

  always @(posedge clk) begin
    if (dut.u_rtl.u_mul_f.busy && dut.u_rtl.u_mul_f.stall) ev[EV_RTL_STALL]++;
    if (dut.u_ltr.u_mul.busy && dut.u_ltr.u_mul.stall) ev[EV_LTR_STALL]++;
    if (int'(dut.u_rtl.state) == RTL_LOOP_START)
      ev[dut.u_rtl.e_i ? EV_RTL_MUL : EV_RTL_SKIP]++;
    if (int'(dut.u_ltr.state) == LTR_DECIDE)
      ev[dut.u_ltr.e_i ? EV_LTR_MUL : EV_LTR_SKIP]++;
    if (dut.u_ltr.mul_start) ev[EV_SEL00 + int'(dut.u_ltr.sel)]++;
    if (dut.u_rtl.mulf_start) ev[dut.u_rtl.select1 ? EV_SELECT1_1 : EV_SELECT1_0]++;
    if (dut.u_rtl.muls_start) ev[dut.u_rtl.select2 ? EV_SELECT2_1 : EV_SELECT2_0]++;
    if (dut.u_rtl.u_conv.busy) begin
      count_digit(dut.u_rtl.u_conv.emit0, dut.u_rtl.u_conv.d0);
      count_digit(dut.u_rtl.u_conv.emit1, dut.u_rtl.u_conv.d1);
      count_fix(dut.u_rtl.u_conv.st.fix, dut.u_rtl.u_conv.st0.fix);
      if (dut.u_rtl.u_conv.two) count_fix(dut.u_rtl.u_conv.st0.fix, dut.u_rtl.u_conv.st1.fix);
    end
    if (dut.u_ltr.u_conv.busy) begin
      count_digit(dut.u_ltr.u_conv.emit0, dut.u_ltr.u_conv.d0);
      count_digit(dut.u_ltr.u_conv.emit1, dut.u_ltr.u_conv.d1);
      count_fix(dut.u_ltr.u_conv.st.fix, dut.u_ltr.u_conv.st0.fix);
      if (dut.u_ltr.u_conv.two) count_fix(dut.u_ltr.u_conv.st0.fix, dut.u_ltr.u_conv.st1.fix);
    end
    if (dut.u_rtl.conv_start && dut.u_rtl.conv_x == '0) ev[EV_ZERO_OPERAND]++;
    if (dut.u_ltr.conv_start && dut.u_ltr.conv_x == '0) ev[EV_ZERO_OPERAND]++;
    if (int'(dut.u_rtl.state) == RTL_MUL_C && dut.u_rtl.muls_done &&
        dut.u_rtl.muls_s == {1'b0, dut.u_rtl.n_q}) ev[EV_RESULT_N]++;
    if (int'(dut.u_ltr.state) == LTR_MUL_C && dut.u_ltr.mul_done &&
        dut.u_ltr.mul_s == {1'b0, dut.u_ltr.n_q}) ev[EV_RESULT_N]++;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic wide_t rand_mod();
    wide_t nv = rand_wide(NB);
    nv[0] = 1'b1;
    nv[NB-1] = 1'b1;
    return nv;
  endfunction

  initial begin
    wide_t na, ma, ea, nb, mb, eb, ca, cb;
    int waited;
    event_t evn;
    foreach (ev[i]) ev[i] = 0;
    rtl_n = '0; rtl_m = '0; rtl_e = '0; rtl_r2 = '0; rtl_r1 = '0;
    ltr_n = '0; ltr_m = '0; ltr_e = '0; ltr_r2 = '0; ltr_r1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      na = rand_mod(); ma = rand_wide(NB) % na; ea = rand_wide(KE);
      nb = rand_mod(); mb = rand_wide(NB) % nb; eb = rand_wide(KE);
      if (t == 0) begin ma = 0; mb = 0; end
      if (t == 1) begin ea = 1; eb = 1; end
      rtl_n = na[NB-1:0]; rtl_m = ma[NB-1:0]; rtl_e = ea[KE-1:0];
      rtl_r2 = pow2mod(2 * (NB + 2), na); rtl_r1 = pow2mod(NB + 2, na);
      ltr_n = nb[NB-1:0]; ltr_m = mb[NB-1:0]; ltr_e = eb[KE-1:0];
      ltr_r2 = pow2mod(2 * (NB + 2), nb); ltr_r1 = pow2mod(NB + 2, nb);
      ca = powmod(ma, ea, KE, na);
      cb = powmod(mb, eb, KE, nb);
      @(negedge clk) begin rtl_start = 1; ltr_start = 1; end
      @(negedge clk) begin rtl_start = 0; ltr_start = 0; end
      waited = 0;
      while (rtl_busy || ltr_busy) begin
        @(posedge clk); #1 waited++;
        if (waited > 5000000) break;
      end
      checks += 2;
      if (wide_t'(rtl_c) != ca) begin
        failures++;
        $display("RtL: C=%h expected %h", rtl_c, ca[NB-1:0]);
      end
      if (wide_t'(ltr_c) != cb) begin
        failures++;
        $display("LtR: C=%h expected %h", ltr_c, cb[NB-1:0]);
      end
    end
    for (int i = 0; i < EV_COUNT; i++) begin
      evn = event_t'(i);
      $display("%-16s %0d", evn.name(), ev[i]);
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("mechanism %s never occurred", evn.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
