// pmac_pkg: types and helpers shared by the Booth encoders, the CSA tree and
// the MAC top.
//
// A Booth digit is carried between recoder and partial-product selection as
// a one-hot magnitude plus a sign, the usual form of a modified Booth
// encoder: the magnitude picks a multiple of the multiplicand, the sign
// inverts it (one's complement) and sets the row's negate bit.
package pmac_pkg;

  // Radix-4 digit d in {-2..2}: magnitude one-hot (one, two), sign neg.
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_r4_t;

  // Radix-8 digit d in {-4..4}: magnitude one-hot (one..four), sign neg.
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
    logic three;
    logic four;
  } booth_r8_t;

  // Number of partial-product rows for an N-bit multiplier.
  function automatic int unsigned pp_rows(int unsigned n, int unsigned radix);
    return (radix == 8) ? (n + 3) / 3 : n / 2;
  endfunction

  // Width of one one's-complement partial product (sign bit included):
  // N+1 bits for radix-4 (|d*Y| <= 2^N), N+2 bits for radix-8 (|d*Y| <= 2^(N+1)).
  function automatic int unsigned pp_width(int unsigned n, int unsigned radix);
    return (radix == 8) ? n + 2 : n + 1;
  endfunction

  // Bits of multiplier consumed per Booth digit.
  function automatic int unsigned pp_shift(int unsigned radix);
    return (radix == 8) ? 3 : 2;
  endfunction

endpackage
