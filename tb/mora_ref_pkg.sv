// Reference model for the testbenches of the carry-save linear array.
//
// Computes the array word by word, the way the structure is drawn: a list of words
// (operands 1..NOP-1, then partial sums in the order they are made), CSA k adding list
// entries 2k and 2k+1 to the previous CSA's carry word shifted up one bit (operand 0
// for CSA 0), sum = A^B^Ci, carry = majority(A,B,Ci) shifted up one bit, truncated to
// N bits. It shares no code with the RTL, which builds the same array from diagonal
// CPAs. Words are held in MAXW bits and masked to N.
package mora_ref_pkg;

  localparam int MAXW = 128;
  typedef logic [MAXW-1:0] word_t;

  typedef struct {
    word_t sf;          // final sum word
    word_t cf;          // final carry word
    int    msb_drops;   // CSAs whose carry out of bit N-1 was dropped
    int    fed_sums;    // partial sum words that were nonzero when reused
    int    chained;     // CSAs whose carry input from the previous CSA was nonzero
  } ref_result_t;

  function automatic word_t mask_n(input int n);
    return (n >= MAXW) ? '1 : ((word_t'(1) << n) - word_t'(1));
  endfunction

  function automatic ref_result_t compress(input word_t ops[], input int n);
    ref_result_t res;
    word_t lst[$];
    word_t ci, a, b, s, co, m;
    int    nop = ops.size();
    m = mask_n(n);
    res.msb_drops = 0;
    res.fed_sums  = 0;
    res.chained   = 0;
    for (int i = 1; i < nop; i++) lst.push_back(ops[i] & m);
    ci = ops[0] & m;
    s  = '0;
    for (int k = 0; k < nop - 2; k++) begin
      b = lst[2*k];
      a = lst[2*k+1];
      if (k > 0 && ci != '0) res.chained++;
      if (2*k >= nop - 1 && b != '0) res.fed_sums++;
      if (2*k + 1 >= nop - 1 && a != '0) res.fed_sums++;
      s  = a ^ b ^ ci;
      co = (a & b) | (a & ci) | (b & ci);
      if (co[n-1]) res.msb_drops++;
      co = (co << 1) & m;
      if (k < nop - 3) lst.push_back(s);
      ci = co;
    end
    res.sf = s & m;
    res.cf = ci;
    return res;
  endfunction

  // Plain modular sum of all operands, independent of any carry-save structure.
  function automatic word_t mod_sum(input word_t ops[], input int n);
    word_t acc = '0;
    foreach (ops[i]) acc = acc + ops[i];
    return acc & mask_n(n);
  endfunction

  // True (unwrapped) sum exceeds N bits: the result wraps.
  function automatic bit wraps(input word_t ops[], input int n);
    logic [MAXW+7:0] acc = '0;
    foreach (ops[i]) acc = acc + (MAXW+8)'(ops[i] & mask_n(n));
    return (acc >> n) != '0;
  endfunction

endpackage
