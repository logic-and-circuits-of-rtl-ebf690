// sieve_pkg: constants and helpers shared by the delay-line number sieve.
//
// The sieve stores one delay line per modulus. The full machine uses the first
// 31 primes, 2 through 127, as line lengths; a smaller machine is obtained by
// choosing a contiguous slice of this table (the two-line machine uses the last
// two entries, 113 and 127). chain_length() gives the length of the single
// serial register the lines form in idle mode; the two beat-counter lines must
// have coprime lengths whose product equals it.
package sieve_pkg;

  localparam int unsigned NUM_PRIMES = 31;

  // Line lengths of the full machine, in chain order (first line first).
  localparam int unsigned PRIMES [NUM_PRIMES] = '{
      2,   3,   5,   7,  11,  13,  17,  19,  23,  29,
     31,  37,  41,  43,  47,  53,  59,  61,  67,  71,
     73,  79,  83,  89,  97, 101, 103, 107, 109, 113,
    127
  };

  // Total length of the serial chain formed by lines FIRST .. FIRST+N-1.
  function automatic int unsigned chain_length(int unsigned first, int unsigned n);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < n; i++) sum += PRIMES[first + i];
    return sum;
  endfunction

  // Greatest common divisor, used to check that the beat lines are coprime.
  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

endpackage
