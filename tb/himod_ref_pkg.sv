// himod_ref_pkg: reference model of the mapping hash for the testbenches.
//
// Computes a bucket address the way a program would: start from 0 and, for each
// of the 16 characters in turn, exclusive-OR in the prime that the low six bits
// of the character select, then keep the low K bits.  The prime for word a of
// coder c is row a/10, column a%10 + c of the prime rows, plus 1 when a is even.
package himod_ref_pkg;
  import himod_pkg::*;

  function automatic int unsigned ref_prime(int unsigned coder, int unsigned a);
    int unsigned v;
    v = PRIME_ROWS[a / 10][a % 10 + coder];
    if ((a & 1) == 0) v++;
    return v;
  endfunction

  function automatic int unsigned ref_hash(int unsigned coder, key_t key, int unsigned k);
    int unsigned temp;
    temp = 0;
    for (int i = 0; i < 16; i++) temp = temp ^ ref_prime(coder, key[i*8 +: 8] % 64);
    return temp % (1 << k);
  endfunction

  // A random key of upper-case letters and digits, whose low six bits differ.
  function automatic key_t rand_key();
    key_t kk;
    for (int i = 0; i < 16; i++) begin
      int unsigned r;
      r = $urandom_range(0, 35);
      kk[i*8 +: 8] = (r < 26) ? 8'(65 + r) : 8'(48 + r - 26);
    end
    return kk;
  endfunction
endpackage
