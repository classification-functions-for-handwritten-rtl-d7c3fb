// cls_pkg: constants, types and helper functions shared by the pair-unit
// digit classifier.
//
// The classifier recognises binarised 28x28 digit images (784 bits, one bit
// per pixel) as one of ten digits. It uses one ternary classifier ("pair
// unit") for every unordered pair of digits i<j, 45 pairs in all. Pair units
// are numbered 0..44 in lexicographic order of (i,j):
//   0:(0,1) 1:(0,2) ... 8:(0,9) 9:(1,2) ... 44:(8,9).
// The functions below convert between that number and the digit pair.
//
// A pair unit's two-bit vote is {vote_i, vote_j}: 2'b10 means digit i,
// 2'b01 means digit j and 2'b00 means some other digit or unknown. The code
// 2'b11 is never written by a sane loader; if it is read the counters see one
// vote for each digit, which is harmless.
package cls_pkg;

  localparam int unsigned N_PIXELS = 784;  // 28 x 28 image bits
  localparam int unsigned N_DIGITS = 10;   // classes
  localparam int unsigned N_PAIRS  = 45;   // 10 choose 2 pair units per group

  typedef enum logic [1:0] {
    VOTE_NONE = 2'b00,  // other digit or unknown
    VOTE_J    = 2'b01,  // image is the larger digit j of the pair
    VOTE_I    = 2'b10   // image is the smaller digit i of the pair
  } vote_e;

  // Smaller digit of pair unit u (u in 0..44).
  function automatic int unsigned pair_i(input int unsigned u);
    int unsigned k;
    k = u;
    for (int unsigned i = 0; i < N_DIGITS; i++) begin
      if (k < N_DIGITS - 1 - i) return i;
      k -= N_DIGITS - 1 - i;
    end
    return 0;
  endfunction

  // Larger digit of pair unit u (u in 0..44).
  function automatic int unsigned pair_j(input int unsigned u);
    int unsigned k;
    k = u;
    for (int unsigned i = 0; i < N_DIGITS; i++) begin
      if (k < N_DIGITS - 1 - i) return i + 1 + k;
      k -= N_DIGITS - 1 - i;
    end
    return 0;
  endfunction

  // Pair unit number of the pair (i,j) with i<j.
  function automatic int unsigned pair_index(input int unsigned i, input int unsigned j);
    int unsigned u;
    u = 0;
    for (int unsigned a = 0; a < i; a++) u += N_DIGITS - 1 - a;
    return u + (j - i - 1);
  endfunction

endpackage
