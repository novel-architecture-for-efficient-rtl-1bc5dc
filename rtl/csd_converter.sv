// csd_converter: binary to compact signed-digit (CSD) conversion, with the
// register that holds the result.
//
// The operand x (below 2^(NBITS+1)) is first recoded into its non-adjacent
// form (NAF, the canonical signed-digit recoding) in one step: with h = 3x,
// NAF digit i is h[i+1] - x[i+1]. The NAF is then scanned from the least
// significant position upward, two positions per clock, and grouped into
// CSD digits: a nonzero NAF digit closes a digit whose len field is the
// number of zeros (0..2) seen since the last digit was emitted, and every
// third consecutive zero is emitted as a zero group (len = 3). The digits of
// an operand must cover exactly NBITS+2 positions, so the zeros above the
// most significant nonzero digit must come in threes. When they do not, the
// top digit d at position t is rewritten as -d at t (and at t+1) followed by
// +d one or two positions higher; this keeps the value and leaves a multiple
// of three zeros on top. An operand of zero has no nonzero digit at all and
// is replaced by the modulus, which is congruent to it.
//
// Digits are written least significant first, at most two per clock, and
// ndig counts those written so far. A multiplier can therefore consume the
// list while it is still being produced (see csdm2), which is how a format
// conversion runs in parallel with the multiplication that uses it.
//
// The NAF recoding, the (Type, Length) digit format and the overlap of the
// conversion with multiplication follow the document; the scan order and
// rate, the zero-group rule, the top-of-operand rewrite and the zero
// substitution are this design's own choices.
//
// Interface: pulse start with x and nmod valid. busy is high while scanning;
// done pulses for one clock when the list is complete, and digits/ndig then
// stay until the next start. Latency: done is high ceil((NBITS+2)/2) clocks
// after the clock edge that samples start.
module csd_converter
  import csd_pkg::*;
#(
  parameter int unsigned NBITS = 1024,
  localparam int unsigned MAXD = max_digits(NBITS),
  localparam int unsigned DW   = $clog2(MAXD + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [NBITS:0]              x,      // operand, below 2^(NBITS+1)
  input  logic [NBITS-1:0]            nmod,   // modulus, used when x is zero
  output logic                        busy,
  output logic                        done,
  output csd_digit_t [MAXD-1:0]       digits, // digit 0 is the least significant
  output logic [DW-1:0]               ndig    // digits written so far
);

  localparam int unsigned P  = NBITS + 2;   // positions covered by one operand
  localparam int unsigned PW = $clog2(P + 1);

  // scan state carried from one position to the next
  typedef struct packed {
    logic [1:0] zeros;     // zeros seen since the last emitted digit
    logic [1:0] above3;    // (NBITS+1 - position) mod 3
    logic [1:0] fix;       // positions left in the top-digit rewrite
    logic       fix_typ;   // sign of the rewritten top digit
  } scan_t;

  // one position of the scan: pos/neg is the NAF digit there, rest_zero
  // tells that every NAF digit above it is zero
  function automatic void scan_step(input scan_t st, input logic pos, input logic neg,
                                    input logic rest_zero, output logic emit,
                                    output csd_digit_t d, output scan_t st_n);
    st_n        = st;
    st_n.above3 = (st.above3 == 2'd0) ? 2'd2 : st.above3 - 2'd1;
    emit        = 1'b0;
    d           = '{typ: 1'b0, len: 2'b00};
    if (st.fix != 2'd0) begin
      // inside the rewritten top: -d below, +d at the last position
      emit       = 1'b1;
      d          = '{typ: (st.fix == 2'd1) ? st.fix_typ : ~st.fix_typ, len: 2'b00};
      st_n.fix   = st.fix - 2'd1;
      st_n.zeros = 2'd0;
    end else if (pos | neg) begin
      emit       = 1'b1;
      st_n.zeros = 2'd0;
      if (rest_zero && st.above3 != 2'd0) begin
        d            = '{typ: ~neg, len: st.zeros};
        st_n.fix     = st.above3;
        st_n.fix_typ = neg;
      end else begin
        d = '{typ: neg, len: st.zeros};
      end
    end else if (st.zeros == 2'd2) begin
      emit       = 1'b1;
      d          = '{typ: 1'b0, len: LEN_ZERO_GROUP};
      st_n.zeros = 2'd0;
    end else begin
      st_n.zeros = st.zeros + 2'd1;
    end
  endfunction

  // NAF of the operand, formed combinationally at start
  logic [NBITS+2:0] xe, h;
  logic [P-1:0]     naf_pos_d, naf_neg_d;

  always_comb begin
    xe = (x == '0) ? {3'b000, nmod} : {2'b00, x};
    h  = xe + {xe[NBITS+1:0], 1'b0};
    naf_pos_d =  h[P:1] & ~xe[P:1];
    naf_neg_d = ~h[P:1] &  xe[P:1];
  end

  logic [P-1:0]  npos, nneg;     // remaining NAF digits, current one at bit 0
  logic [PW-1:0] left;           // positions still to scan
  scan_t         st;
  logic [DW-1:0] wr;

  // the two positions scanned in this clock
  logic       emit0, emit1, two;
  csd_digit_t d0, d1;
  scan_t      st0, st1;
  logic       rest_zero0, rest_zero1;

  always_comb begin
    two        = (left >= PW'(2));
    rest_zero0 = ~|((npos | nneg) >> 1);
    rest_zero1 = ~|((npos | nneg) >> 2);
    scan_step(st,  npos[0], nneg[0], rest_zero0, emit0, d0, st0);
    scan_step(st0, npos[1], nneg[1], rest_zero1, emit1, d1, st1);
    if (!two) begin
      emit1 = 1'b0;
      st1   = st0;
    end
  end

  assign ndig = wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      npos   <= '0;
      nneg   <= '0;
      left   <= '0;
      st     <= '0;
      wr     <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      digits <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        npos  <= naf_pos_d;
        nneg  <= naf_neg_d;
        left  <= PW'(P);
        st    <= '{zeros: 2'd0, above3: 2'((NBITS + 1) % 3), fix: 2'd0, fix_typ: 1'b0};
        wr    <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        npos <= npos >> 2;
        nneg <= nneg >> 2;
        left <= two ? left - PW'(2) : left - PW'(1);
        st   <= st1;
        if (emit0) digits[wr] <= d0;
        if (emit1) digits[emit0 ? wr + DW'(1) : wr] <= d1;
        wr <= wr + DW'(emit0) + DW'(emit1);
        if (left <= PW'(2)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // the digit list never overflows, and the last position always closes a digit
  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
                                   busy |-> (32'(wr) + 32'(emit0) + 32'(emit1) <= MAXD));
  a_closed_top  : assert property (@(posedge clk) disable iff (!rst_n)
                                   (busy && left <= PW'(2)) |-> (two ? emit1 : emit0));

endmodule
