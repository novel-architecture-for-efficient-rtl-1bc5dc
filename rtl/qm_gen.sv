// qm_gen: the q*N generator of the CSD Montgomery multiplier.
//
// From the low bits of the partial result P and the shift k (0..2) it finds
// the quotient digit q = P[k:0] * (-N^-1) mod 2^(k+1), which makes
// P + q*N divisible by 2^(k+1), and returns q*N as two terms for the second
// adder: q*N = q1m + (q2m XOR {W{cin}}) + cin, that is q1m + q2m or
// q1m - q2m. The recoding of q (0..7) is
//     q    : 0  1  2  3     4  5     6      7
//     q1m  : 0  N  2N 4N    4N 4N    4N     8N
//     q2m  : 0  0  0  N(-)  0  N(+)  2N(+)  N(-)
// so each term is a shifted copy of N and no multiplier is needed.
// nneg3 is -N^-1 mod 8, which for an odd N equals -N mod 8.
//
// The outputs q1M, q2M and Cin and the XOR on q2M are those of the
// document's CSDM2 block diagram; the recoding table above is this design's
// own, as the document does not give the generator's insides.
// Purely combinational.
module qm_gen #(
  parameter int unsigned NBITS = 1024,
  parameter int unsigned W     = NBITS + 6
) (
  input  logic [2:0]       p_low,   // P[2:0]
  input  logic [1:0]       k,       // 0..2: reduce k+1 bits
  input  logic [2:0]       nneg3,   // -N^-1 mod 8
  input  logic [NBITS-1:0] nmod,
  output logic [2:0]       q,       // quotient digit, for checking
  output logic [W-1:0]     q1m,
  output logic [W-1:0]     q2m,
  output logic             cin      // 1: subtract q2m
);

  logic [5:0]   qfull;
  logic [W-1:0] n1;

  always_comb begin
    qfull = p_low * nneg3;
    unique case (k)
      2'd0:    q = {2'b00, qfull[0]};
      2'd1:    q = {1'b0, qfull[1:0]};
      default: q = qfull[2:0];
    endcase
    n1  = W'(nmod);
    q1m = '0;
    q2m = '0;
    cin = 1'b0;
    unique case (q)
      3'd1: q1m = n1;
      3'd2: q1m = n1 << 1;
      3'd3: begin q1m = n1 << 2; q2m = n1;      cin = 1'b1; end
      3'd4: q1m = n1 << 2;
      3'd5: begin q1m = n1 << 2; q2m = n1;      end
      3'd6: begin q1m = n1 << 2; q2m = n1 << 1; end
      3'd7: begin q1m = n1 << 3; q2m = n1;      cin = 1'b1; end
      default: ;
    endcase
  end

endmodule
