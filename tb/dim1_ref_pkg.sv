// dim1_ref_pkg -- reference arithmetic for the diminished-one modulo 2^n+1
// adder testbenches.
//
// Everything here is computed from integer arithmetic on the represented
// values, not from carry equations: an operand X* stands for X = X* + 1, the
// sum S = (A + B) mod (2^n + 1) is formed directly, and S* = S - 1 is
// returned with a flag for S = 0.  The carry reference gives the carry
// into each bit of A* + B* + c_in with the end-around carry
// c_in = NOT (carry out of A* + B*).  Widths up to 32 bits.
package dim1_ref_pkg;

  typedef longint unsigned u64_t;

  function automatic u64_t mask(int n);
    return (u64_t'(1) << n) - 1;
  endfunction

  // Diminished-one modulo 2^n+1 sum of a and b.
  function automatic void dim1_add_ref(input int n, input u64_t a, input u64_t b,
                                       output u64_t s, output bit zero);
    u64_t modulus;
    u64_t r;
    modulus = (u64_t'(1) << n) + 1;
    r = ((a + 1) + (b + 1)) % modulus;
    zero = (r == 0);
    s = zero ? 0 : r - 1;
  endfunction

  // True when A* + B* overflows n bits (no increment needed).
  function automatic bit carry_out(int n, u64_t a, u64_t b);
    return ((a + b) >> n) != 0;
  endfunction

  // Carry into bit i of the modulo 2^n+1 addition (bit 0: end-around carry).
  function automatic bit carry_into(int n, u64_t a, u64_t b, int i);
    u64_t cm1;
    cm1 = carry_out(n, a, b) ? 0 : 1;
    if (i == 0) return cm1[0];
    return (((a & mask(i)) + (b & mask(i)) + cm1) >> i) != 0;
  endfunction

  // Operand pair for the random tests: plain random values mixed with the
  // corner cases of the modulo addition (complementary operands, sums just
  // below, at and above 2^n).
  function automatic void pick_operands(input int n, output u64_t a, output u64_t b);
    u64_t m;
    int   kind;
    m = mask(n);
    a = {$urandom, $urandom} & m;
    kind = int'($urandom % 6);
    case (kind)
      0: b = ~a & m;                         // A* + B* = 2^n - 1: real zero
      1: b = ((u64_t'(1) << n) - a) & m;     // A* + B* = 2^n (or a = 0)
      2: b = (~a - 1) & m;                   // A* + B* = 2^n - 2
      3: b = (~a ^ (u64_t'(1) << ($urandom % n))) & m;  // one bit off
      default: b = {$urandom, $urandom} & m;
    endcase
  endfunction

endpackage
