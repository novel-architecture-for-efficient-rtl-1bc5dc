// csdme_rtl: right-to-left modular exponentiator built on two CSD Montgomery
// multipliers (RtL CSDME).
//
// Computes C = M^E mod N with R = 2^(NBITS+2). The exponent is scanned from
// its least significant bit. Each step squares F on one multiplier and, when
// e_i = 1, multiplies S by F on the other; both use the same CSD form of F
// (M_CSD), so they run side by side and finish together. The sequence is
//   1. convert R^2 mod N to CSD;              F = CSD(M, R^2_CSD)   (Select1 = 1)
//   2. S = R mod N; convert F to CSD (M_CSD)
//   3. for i = 0 .. KE-1:  S = CSD(S, M_CSD) if e_i;  F = CSD(F, M_CSD)  (Select1 = 0,
//      Select2 = 0);  convert F to CSD unless this was the last bit
//   4. C = CSD(S, 1_CSD)                                           (Select2 = 1)
// The multiplier that produces F feeds the converter, whose register holds
// M_CSD; the other multiplier's result goes to the S register, loaded with
// R mod N at the start, and is the output C at the end.
//
// Follows the document: the two multipliers, Select1 choosing (F, M_CSD) or
// (M, R^2_CSD), Select2 choosing M_CSD or 1_CSD, the S register starting at
// R mod N and the exponent shift register. This design's own choices: R^2 mod
// N and R mod N are inputs computed beforehand; R^2_CSD and M_CSD share the
// converter's one register, since they are never needed at the same time;
// 1_CSD is a constant; the last conversion of F is skipped, as nothing reads
// it; and the result N (which only an operand congruent to 0 produces) is
// reported as 0.
//
// Overlap: each multiplication starts one clock after the conversion of its
// multiplier and consumes the digits as the converter writes them, stalling
// when it catches up. One exponent bit therefore costs about one
// multiplication time rather than a conversion plus a multiplication, which
// is the document's "format conversion processed in parallel".
//
// Interface: pulse start with n, m, e, r2, r1 valid (they are registered).
// busy is high until done pulses for one clock with c valid; c holds until
// the next start. The latency depends on the operands: each exponent bit
// takes the longer of the conversion of F (about NBITS/2 clocks) and the
// multiplication (one clock per CSD digit of F), plus two clocks.
module csdme_rtl
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
  // CSD form of the constant 1 (see csd_converter for the top-digit rule)
  localparam int unsigned ONE_R    = (NBITS + 1) % 3;
  localparam int unsigned ONE_NDIG = ONE_R + 1 + (NBITS + 1 - ONE_R) / 3;

  typedef enum logic [2:0] {
    IDLE, F0_START, MUL_F0, LOOP_START, MUL_LOOP, START_C, MUL_C
  } state_t;

  state_t state;

  logic [NBITS-1:0] n_q, m_q;
  logic [NBITS:0]   f_q, s_q;
  logic [KW-1:0]    bit_cnt;

  // control
  logic select1, select2;
  logic conv_start, mulf_start, muls_start, exp_load, exp_update;
  logic [NBITS:0] conv_x;
  logic e_i;

  // converter and multipliers
  logic                  conv_busy, conv_done;
  csd_digit_t [MAXD-1:0] m_csd, one_csd, muls_digits;
  logic [DW-1:0]         m_ndig, muls_ndig;
  logic                  mulf_busy, mulf_done, muls_busy, muls_done;
  logic [NBITS:0]        mulf_y, muls_y, mulf_s, muls_s;
  logic [NBITS:0]        s_next;
  logic                  m_complete, muls_complete;

  always_comb begin
    one_csd = '0;
    for (int unsigned j = 0; j < ONE_R; j++) one_csd[j] = '{typ: 1'b1, len: 2'd0};
    one_csd[ONE_R] = '{typ: 1'b0, len: 2'd0};
    for (int unsigned j = ONE_R + 1; j < ONE_NDIG; j++) one_csd[j] = '{typ: 1'b0, len: 2'd3};
  end

  // Mux1 / Mux3 of the block diagram
  assign mulf_y      = select1 ? {1'b0, m_q} : f_q;
  assign muls_y      = s_q;
  assign muls_digits = select2 ? one_csd : m_csd;
  assign muls_ndig   = select2 ? DW'(ONE_NDIG) : m_ndig;
  // a list from the converter is complete once it has stopped; 1_CSD always is
  assign m_complete    = !conv_busy;
  assign muls_complete = select2 | m_complete;

  exp_shift_reg #(.KE(KE), .LSB_FIRST(1'b1)) u_exp (
    .clk, .rst_n, .load(exp_load), .update(exp_update), .e, .e_i
  );

  csd_converter #(.NBITS(NBITS)) u_conv (
    .clk, .rst_n, .start(conv_start), .x(conv_x), .nmod(n_q),
    .busy(conv_busy), .done(conv_done), .digits(m_csd), .ndig(m_ndig)
  );

  csdm2 #(.NBITS(NBITS)) u_mul_f (
    .clk, .rst_n, .start(mulf_start), .y(mulf_y), .nmod(n_q),
    .digits(m_csd), .navail(m_ndig), .complete(m_complete), .busy(mulf_busy), .done(mulf_done), .s(mulf_s)
  );

  csdm2 #(.NBITS(NBITS)) u_mul_s (
    .clk, .rst_n, .start(muls_start), .y(muls_y), .nmod(n_q),
    .digits(muls_digits), .navail(muls_ndig), .complete(muls_complete), .busy(muls_busy), .done(muls_done), .s(muls_s)
  );

  // S after the current step: the product when e_i = 1, otherwise unchanged
  assign s_next = e_i ? muls_s : s_q;

  always_comb begin
    conv_start = 1'b0;
    conv_x     = mulf_s;
    mulf_start = 1'b0;
    muls_start = 1'b0;
    exp_load   = 1'b0;
    exp_update = 1'b0;
    select1    = 1'b0;
    select2    = 1'b0;
    unique case (state)
      IDLE: begin
        exp_load   = start;
        conv_start = start;
        conv_x     = {1'b0, r2};
      end
      F0_START: begin
        select1    = 1'b1;
        mulf_start = 1'b1;
      end
      MUL_F0: begin
        select1    = 1'b1;
        conv_start = mulf_done;
      end
      LOOP_START: begin
        mulf_start = 1'b1;
        muls_start = e_i;
      end
      MUL_LOOP: begin
        exp_update = mulf_done;
        conv_start = mulf_done && (bit_cnt != KW'(KE - 1));
      end
      START_C: begin
        select2    = 1'b1;
        muls_start = 1'b1;
      end
      MUL_C: begin
        select2 = 1'b1;
      end
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
          state   <= F0_START;
        end
        F0_START: state <= MUL_F0;
        MUL_F0:   if (mulf_done) begin
          f_q   <= mulf_s;
          state <= LOOP_START;
        end
        LOOP_START: state <= MUL_LOOP;
        MUL_LOOP: if (mulf_done) begin
          f_q     <= mulf_s;
          s_q     <= s_next;
          bit_cnt <= bit_cnt + KW'(1);
          state   <= (bit_cnt == KW'(KE - 1)) ? START_C : LOOP_START;
        end
        START_C:  state <= MUL_C;
        MUL_C:    if (muls_done) begin
          c     <= (muls_s == {1'b0, n_q}) ? '0 : muls_s[NBITS-1:0];
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // both multipliers share M_CSD and therefore finish together
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n)
                                (state == MUL_LOOP && muls_busy) |-> (mulf_done == muls_done));
  a_conv_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                 conv_start |-> !conv_busy);

endmodule
