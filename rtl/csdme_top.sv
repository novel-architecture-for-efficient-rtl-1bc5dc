// csdme_top: the two proposed modular exponentiators side by side.
//
// Both compute C = M^E mod N for an odd NBITS-bit modulus and a KE-bit
// exponent using compact signed-digit Montgomery multiplication with
// R = 2^(NBITS+2). The right-to-left unit (csdme_rtl) uses two multipliers
// that square and multiply in parallel; the left-to-right unit (csdme_ltr)
// uses one. They share the clock and reset only; each has its own operand
// inputs, start pulse and result outputs, with the timing described in its
// own module. R^2 mod N and R mod N are supplied with the operands.
module csdme_top #(
  parameter int unsigned NBITS = 1024,
  parameter int unsigned KE    = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  // right-to-left exponentiator
  input  logic             rtl_start,
  input  logic [NBITS-1:0] rtl_n,
  input  logic [NBITS-1:0] rtl_m,
  input  logic [KE-1:0]    rtl_e,
  input  logic [NBITS-1:0] rtl_r2,
  input  logic [NBITS-1:0] rtl_r1,
  output logic             rtl_busy,
  output logic             rtl_done,
  output logic [NBITS-1:0] rtl_c,
  // left-to-right exponentiator
  input  logic             ltr_start,
  input  logic [NBITS-1:0] ltr_n,
  input  logic [NBITS-1:0] ltr_m,
  input  logic [KE-1:0]    ltr_e,
  input  logic [NBITS-1:0] ltr_r2,
  input  logic [NBITS-1:0] ltr_r1,
  output logic             ltr_busy,
  output logic             ltr_done,
  output logic [NBITS-1:0] ltr_c
);

  csdme_rtl #(.NBITS(NBITS), .KE(KE)) u_rtl (
    .clk, .rst_n, .start(rtl_start), .n(rtl_n), .m(rtl_m), .e(rtl_e),
    .r2(rtl_r2), .r1(rtl_r1), .busy(rtl_busy), .done(rtl_done), .c(rtl_c)
  );

  csdme_ltr #(.NBITS(NBITS), .KE(KE)) u_ltr (
    .clk, .rst_n, .start(ltr_start), .n(ltr_n), .m(ltr_m), .e(ltr_e),
    .r2(ltr_r2), .r1(ltr_r1), .busy(ltr_busy), .done(ltr_done), .c(ltr_c)
  );

endmodule
