// ft_fft_pkg: types, constants and helper functions shared by the
// fault-tolerant parallel FFT design.
//
// The design protects K parallel FFTs against single soft faults by adding
// one parity FFT (fed with the sum of the K inputs) and a set of Parseval
// (sum-of-squares, SOS) checks. Two schemes are provided:
//   PARITY_SOS     : one SOS check per FFT; the set flag names the faulty FFT.
//   PARITY_SOS_ECC : the SOS checks run on sums of FFTs chosen by a Hamming
//                    code, so only C = ceil-log checks are needed; the
//                    syndrome names the faulty FFT.
// This package holds the scheme enum, the Hamming code construction
// (columns of weight two or more, counted down from all-ones, which gives the
// 111/110/101/011 assignment for four FFTs), the number of checks each scheme
// needs, and the base-4 digit reversal used by the radix-4 FFT.
package ft_fft_pkg;

  typedef enum logic [0:0] {
    PARITY_SOS     = 1'b0,
    PARITY_SOS_ECC = 1'b1
  } scheme_e;

  // Number of Hamming check bits C needed to locate a fault in one of k
  // modules: smallest C with 2^C - 1 - C >= k.
  function automatic int unsigned hamming_checks(input int unsigned k);
    int unsigned c;
    c = 2;
    while (((1 << c) - 1 - c) < k) c++;
    return c;
  endfunction

  // Hamming code column of module m (0-based): the m-th number, counting down
  // from 2^c - 1, whose binary weight is at least two. Bit (c-1) is check c1.
  function automatic int unsigned hamming_code(input int unsigned c,
                                               input int unsigned m);
    int unsigned found;
    int unsigned code;
    found = 0;
    code  = 0;
    for (int v = (1 << c) - 1; v > 0; v--) begin
      if ($countones(v) >= 2) begin
        if (found == m) code = v;
        found++;
      end
    end
    return code;
  endfunction

  // Number of SOS checks used by a scheme protecting k FFTs.
  function automatic int unsigned num_checks(input scheme_e s,
                                             input int unsigned k);
    return (s == PARITY_SOS) ? k : hamming_checks(k);
  endfunction

  // Membership mask: bit m is set when FFT m takes part in check c.
  function automatic logic [31:0] check_mask(input scheme_e s,
                                             input int unsigned k,
                                             input int unsigned c);
    logic [31:0] mask;
    logic [31:0] code;
    int unsigned nc;
    mask = '0;
    nc   = hamming_checks(k);
    for (int unsigned m = 0; m < k; m++) begin
      code = hamming_code(nc, m);
      if (s == PARITY_SOS) mask[m] = (m == c);
      else                 mask[m] = code[nc-1-c];
    end
    return mask;
  endfunction

  // Reverse the order of the lowest 'digits' base-4 digits of v.
  function automatic logic [15:0] digit_rev4(input logic [15:0] v,
                                             input int unsigned digits);
    logic [15:0] r;
    r = '0;
    for (int unsigned d = 0; d < digits; d++)
      r[2*(digits-1-d) +: 2] = v[2*d +: 2];
    return r;
  endfunction

endpackage
