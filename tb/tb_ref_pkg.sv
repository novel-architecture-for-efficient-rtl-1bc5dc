// tb_ref_pkg: reference arithmetic for the testbenches, written with plain
// wide-integer operators and independent of the design's datapath.
//   mulmod, powmod, pow2mod : modular arithmetic on up to 1040-bit operands
//   ref_csd                 : the expected CSD digit list of an operand,
//                             from the textbook NAF algorithm (subtract the
//                             digit 2 - (k mod 4) while k is odd, halve) and
//                             the grouping rules of the converter
//   csd_value               : the value and the number of positions a digit
//                             list stands for
//   rand_wide               : a random value of a given number of bits
package tb_ref_pkg;

  localparam int RW = 2112;
  typedef logic [RW-1:0] wide_t;

  function automatic wide_t mulmod(wide_t a, wide_t b, wide_t n);
    return (a * b) % n;
  endfunction

  function automatic wide_t powmod(wide_t m, wide_t e, int ke, wide_t n);
    wide_t r = 1 % n;
    wide_t b = m % n;
    for (int i = 0; i < ke; i++) begin
      if (e[i]) r = mulmod(r, b, n);
      b = mulmod(b, b, n);
    end
    return r;
  endfunction

  function automatic wide_t pow2mod(int k, wide_t n);
    wide_t r = 1 % n;
    for (int i = 0; i < k; i++) begin
      r = r << 1;
      if (r >= n) r = r - n;
    end
    return r;
  endfunction

  function automatic wide_t rand_wide(int bits);
    wide_t r = '0;
    for (int i = 0; i < bits; i += 32) r[i +: 32] = $urandom;
    for (int i = bits; i < RW; i++) r[i] = 1'b0;
    return r;
  endfunction

  // digit encoding: {typ, len[1:0]}
  function automatic void ref_csd(wide_t x, wide_t nmod, int nbits, ref logic [2:0] q[$]);
    int    naf[];
    wide_t k;
    int    t, r, d, zeros, neg;
    naf = new[nbits + 2];
    foreach (naf[i]) naf[i] = 0;
    k = (x == 0) ? nmod : x;
    for (int i = 0; k != 0; i++) begin
      if (k[0]) begin
        if (k[1]) begin naf[i] = -1; k = k + 1; end
        else      begin naf[i] =  1; k = k - 1; end
      end
      k = k >> 1;
    end
    t = 0;
    for (int i = 0; i < nbits + 2; i++) if (naf[i] != 0) t = i;
    r = (nbits + 1 - t) % 3;
    d = naf[t];
    if (r >= 1) begin naf[t] = -d; naf[t + r] = d; end
    if (r == 2) naf[t + 1] = -d;
    q.delete();
    zeros = 0;
    for (int i = 0; i < nbits + 2; i++) begin
      if (naf[i] != 0) begin
        neg = (naf[i] < 0) ? 1 : 0;
        q.push_back({neg[0], zeros[1:0]});
        zeros = 0;
      end else if (zeros == 2) begin
        q.push_back(3'b011);
        zeros = 0;
      end else begin
        zeros++;
      end
    end
  endfunction

  // value (which must come out non-negative) and positions of a digit list
  function automatic void csd_value(logic [2:0] q[$], output wide_t val, output int pos);
    val = '0;
    pos = 0;
    foreach (q[i]) begin
      if (q[i][1:0] == 2'd3) pos += 3;
      else begin
        if (q[i][2]) val = val - (wide_t'(1) << (pos + q[i][1:0]));
        else         val = val + (wide_t'(1) << (pos + q[i][1:0]));
        pos += q[i][1:0] + 1;
      end
    end
  endfunction

endpackage
