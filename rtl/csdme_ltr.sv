// csdme_ltr: left-to-right modular exponentiator built on one CSD Montgomery
// multiplier (LtR CSDME).
//
// Computes C = M^E mod N with R = 2^(NBITS+2). The exponent is scanned from
// its most significant bit. Every step squares S and, when e_i = 1, then
// multiplies it by F = M*R mod N; after each product S is converted to CSD
// (S_CSD), which is the multiplier of the next product. The 2-bit Select
// chooses the operand pair of the single multiplier, with the codes of the
// document's block diagram:
//   00  multiplier R^2_CSD, multiplicand M   F = M*R mod N     (once)
//   01  multiplier S_CSD,   multiplicand S   square
//   10  multiplier S_CSD,   multiplicand F   multiply
//   11  multiplier S_CSD,   multiplicand 1   C = S*R^-1 mod N   (once, last)
// The sequence: convert R^2 mod N; F = product 00; convert R mod N (the
// initial S_CSD, with S = R mod N); then per exponent bit product 01 and a
// conversion, and if e_i = 1 product 10 and a conversion; finally product 11.
//
// Follows the document: one multiplier, the four Select codes and their
// operand pairs, the F register, the S_CSD register initialised to R_CSD
// and the exponent shift register. This design's own choices: R^2 mod N and
// R mod N are inputs computed beforehand; R^2_CSD and S_CSD share the
// converter's one register, as they are never needed at the same time; the
// binary S is kept in a register of its own; and the result N (produced only by an operand
// congruent to 0) is reported as 0.
//
// Interface: pulse start with n, m, e, r2, r1 valid (they are registered).
// busy is high until done pulses for one clock with c valid; c holds until
// the next start. Each product starts one clock after the conversion of its
// multiplier and follows it digit by digit (see csdm2), so a product costs
// the longer of the conversion (about NBITS/2 clocks) and one clock per CSD
// digit, plus two clocks.
module csdme_ltr
  import csd_pkg::*;
#(
  parameter int unsigned NBITS = 1024,
  parameter int unsigned KE    = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NBITS-1:0] n,      // odd modulus
  input  logic [NBITS-1:0] m,      // message, below n
  input  logic [KE-1:0]    e,      // exponent
  input  logic [NBITS-1:0] r2,     // R^2 mod n
  input  logic [NBITS-1:0] r1,     // R mod n
  output logic             busy,
  output logic             done,
  output logic [NBITS-1:0] c
);

  localparam int unsigned MAXD = max_digits(NBITS);
  localparam int unsigned DW   = $clog2(MAXD + 1);
  localparam int unsigned KW   = $clog2(KE + 1);

  typedef enum logic [1:0] {
    SEL_M_R2 = 2'b00, SEL_S_SQ = 2'b01, SEL_F_MUL = 2'b10, SEL_ONE = 2'b11
  } select_t;

  typedef enum logic [3:0] {
    IDLE, F_START, MUL_F, SQ0_START, MUL_SQ, DECIDE, MUL_MUL, NEXT_BIT, MUL_C
  } state_t;

  state_t  state;
  select_t sel;

  logic [NBITS-1:0] n_q, m_q;
  logic [NBITS:0]   f_q, s_q;
  logic [KW-1:0]    bit_cnt;

  logic conv_start, mul_start, exp_load, exp_update, e_i;
  logic [NBITS:0] conv_x, mul_y, mul_s;
  logic conv_busy, conv_done, mul_busy, mul_done;
  csd_digit_t [MAXD-1:0] s_csd;
  logic [DW-1:0]         s_ndig;

  // Mux1 of the block diagram: the multiplicand for each Select code. Mux2
  // picks the multiplier; R^2_CSD (code 00) and S_CSD (the others) are the
  // same register at different times.
  always_comb begin
    unique case (sel)
      SEL_M_R2:  mul_y = {1'b0, m_q};
      SEL_S_SQ:  mul_y = s_q;
      SEL_F_MUL: mul_y = f_q;
      default:   mul_y = (NBITS + 1)'(1);
    endcase
  end

  exp_shift_reg #(.KE(KE), .LSB_FIRST(1'b0)) u_exp (
    .clk, .rst_n, .load(exp_load), .update(exp_update), .e, .e_i
  );

  csd_converter #(.NBITS(NBITS)) u_conv (
    .clk, .rst_n, .start(conv_start), .x(conv_x), .nmod(n_q),
    .busy(conv_busy), .done(conv_done), .digits(s_csd), .ndig(s_ndig)
  );

  csdm2 #(.NBITS(NBITS)) u_mul (
    .clk, .rst_n, .start(mul_start), .y(mul_y), .nmod(n_q),
    .digits(s_csd), .navail(s_ndig), .complete(!conv_busy), .busy(mul_busy), .done(mul_done), .s(mul_s)
  );

  logic last_bit;
  assign last_bit = (bit_cnt == KW'(KE - 1));

  always_comb begin
    conv_start = 1'b0;
    conv_x     = mul_s;
    mul_start  = 1'b0;
    exp_load   = 1'b0;
    exp_update = 1'b0;
    sel        = SEL_S_SQ;
    unique case (state)
      IDLE: begin
        exp_load   = start;
        conv_start = start;
        conv_x     = {1'b0, r2};
      end
      F_START: begin
        sel       = SEL_M_R2;
        mul_start = 1'b1;
      end
      MUL_F: begin
        sel        = SEL_M_R2;
        conv_start = mul_done;
        conv_x     = {1'b0, r1};
      end
      SQ0_START: mul_start = 1'b1;
      MUL_SQ:    conv_start = mul_done;
      DECIDE: begin
        sel       = SEL_F_MUL;
        mul_start = e_i;
      end
      MUL_MUL: begin
        sel        = SEL_F_MUL;
        conv_start = mul_done;
      end
      NEXT_BIT: begin
        exp_update = 1'b1;
        sel        = last_bit ? SEL_ONE : SEL_S_SQ;
        mul_start  = 1'b1;
      end
      MUL_C:    sel = SEL_ONE;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= IDLE;
      n_q     <= '0;
      m_q     <= '0;
      f_q     <= '0;
      s_q     <= '0;
      bit_cnt <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      c       <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          n_q     <= n;
          m_q     <= m;
          s_q     <= {1'b0, r1};
          bit_cnt <= '0;
          busy    <= 1'b1;
          state   <= F_START;
        end
        F_START:   state <= MUL_F;
        MUL_F:     if (mul_done) begin
          f_q   <= mul_s;
          state <= SQ0_START;
        end
        SQ0_START: state <= MUL_SQ;
        MUL_SQ:    if (mul_done) begin
          s_q   <= mul_s;
          state <= DECIDE;
        end
        DECIDE:    state <= e_i ? MUL_MUL : NEXT_BIT;
        MUL_MUL:   if (mul_done) begin
          s_q   <= mul_s;
          state <= NEXT_BIT;
        end
        NEXT_BIT: begin
          bit_cnt <= bit_cnt + KW'(1);
          state   <= last_bit ? MUL_C : MUL_SQ;
        end
        MUL_C:     if (mul_done) begin
          c     <= (mul_s == {1'b0, n_q}) ? '0 : mul_s[NBITS-1:0];
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_conv_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                 conv_start |-> !conv_busy);
  a_mul_idle  : assert property (@(posedge clk) disable iff (!rst_n)
                                 mul_start |-> !mul_busy);

endmodule
