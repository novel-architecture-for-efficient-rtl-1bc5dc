// csdm2: compact signed-digit Montgomery modular multiplier (CSDM2).
//
// Computes S = X * Y * 2^-(NBITS+2) mod N, with the multiplier X given as a
// list of CSD digits (see csd_pkg) and the multiplicand Y in binary. One
// digit is retired per clock. For a digit with len = L < 3 and sign typ the
// step is
//     P  = S + (-1)^typ * Y * 2^L          (k = L)
// and for a zero group (len = 3) it is P = S (k = 2). Then
//     q  = P[k:0] * (-N^-1) mod 2^(k+1)
//     S' = (P + q*N) / 2^(k+1)             (exact division, arithmetic shift)
// so every digit removes k+1 of the NBITS+2 positions of X. -N^-1 mod 8 is
// simply -N mod 8, because an odd N is its own inverse modulo 8.
//
// Structure as in the document's CSDM2 block diagram: the "Length = 3" test
// (a NAND of the two len bits) selects 0 or Y, a shifter scales Y by 2^k, an
// XOR with typ plus a carry-in of typ negates it, an adder forms P, the q*N
// generator (qm_gen) works from P[2:0] and returns q1M, q2M and Cin, a second
// adder adds q1M and q2M XOR Cin plus Cin, and a second shifter divides by
// 2^(k+1). Design choices of its own: the two additions are plain
// carry-propagate additions on a signed NBITS+6 bit accumulator rather than
// carry-save adders, and the current digit is picked from the digit register
// by an index rather than shifted out.
//
// Operands: X and Y below 2N, N odd and below 2^NBITS. Because R = 2^(NBITS+2)
// is at least 4N, the result is below 2N and no final subtraction is needed.
//
// Digit supply: navail is the number of digits of the list available so far
// and complete tells that no more will come. The multiplier retires digit
// idx when idx < navail and stalls otherwise, so it can start together with
// the conversion that produces its multiplier and follow it digit by digit
// (the document runs the format conversion in parallel with multiplication).
// A list that is already complete is given with navail = its length and
// complete = 1.
//
// Interface: pulse start with y and nmod valid. Digits below navail must not
// change until done. done pulses for one clock with s valid; s holds until
// the next start. Latency for a complete list: done is high ndig clocks
// after the clock edge that samples start (one clock per CSD digit), plus
// one clock per stall while digits are still being produced.
module csdm2
  import csd_pkg::*;
#(
  parameter int unsigned NBITS = 1024,
  localparam int unsigned MAXD = max_digits(NBITS),
  localparam int unsigned DW   = $clog2(MAXD + 1),
  localparam int unsigned W    = acc_width(NBITS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [NBITS:0]        y,       // multiplicand, below 2N
  input  logic [NBITS-1:0]      nmod,    // odd modulus
  input  csd_digit_t [MAXD-1:0] digits,  // multiplier in CSD form
  input  logic [DW-1:0]         navail,  // digits available so far
  input  logic                  complete,// no further digits will come
  output logic                  busy,
  output logic                  done,
  output logic [NBITS:0]        s
);

  logic [NBITS:0]     y_q;       // multiplicand register
  logic [NBITS-1:0]   n_q;       // modulus register
  logic [2:0]         nneg3;     // -N^-1 mod 8
  logic signed [W-1:0] acc;      // S
  logic [DW-1:0]      idx;
  logic               stall;     // digit idx not yet produced

  // datapath of one digit
  csd_digit_t          dig;
  logic                fsel;
  logic [1:0]          k;
  logic signed [W-1:0] ysh, yx, p, s1, s2;
  logic [W-1:0]        q1m, q2m;
  logic                cin;
  logic [2:0]          q, qmask;

  always_comb begin
    dig   = digits[idx];
    fsel  = ~(dig.len[1] & dig.len[0]);              // 0 for a zero group
    k     = fsel ? dig.len : 2'd2;
    ysh   = fsel ? (W'(y_q) <<< k) : '0;
    yx    = ysh ^ {W{dig.typ}};
    p     = acc + yx + W'(dig.typ);
    qmask = (k == 2'd0) ? 3'b001 : (k == 2'd1) ? 3'b011 : 3'b111;
    s1    = p + $signed(q1m) + $signed(q2m ^ {W{cin}}) + W'(cin);
    s2    = s1 >>> (k + 2'd1);
  end

  qm_gen #(.NBITS(NBITS), .W(W)) u_qm (
    .p_low(p[2:0]), .k, .nneg3, .nmod(n_q), .q, .q1m, .q2m, .cin
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q   <= '0;
      n_q   <= '0;
      nneg3 <= '0;
      acc   <= '0;
      idx   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        y_q   <= y;
        n_q   <= nmod;
        nneg3 <= 3'(-nmod[2:0]);
        acc   <= '0;
        idx   <= '0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (!stall) begin
          acc <= s2;
          idx <= idx + DW'(1);
        end
        if (complete && (stall || idx == navail - DW'(1))) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign stall = (idx >= navail);
  assign s     = acc[NBITS:0];

  // the low k+1 bits cancel, and the final result is a non-negative value below 2^(NBITS+1)
  a_exact_div : assert property (@(posedge clk) disable iff (!rst_n)
                                 (busy && !stall) |-> ((s1[2:0] & qmask) == 3'b000));
  a_q_width   : assert property (@(posedge clk) disable iff (!rst_n)
                                 (busy && !stall) |-> ((q & ~qmask) == 3'b000));
  a_result_range : assert property (@(posedge clk) disable iff (!rst_n)
                                    done |-> (acc[W-1:NBITS+1] == '0));
  a_modulus_odd : assert property (@(posedge clk) disable iff (!rst_n)
                                   start |-> nmod[0]);

endmodule
