// mm_pkg: shared constants and types of the 4x4 constant-matrix multiplier.
//
// The multiplier computes C = A x B where A is a 4x4 matrix of integers from
// 1 to 16 held in a block RAM and B is a fixed 4x4 matrix of constants that is
// hard-wired into the datapath as shift/add networks. Results are unsigned
// fixed point with INT_W = 7 integer bits (the largest element of C for A all
// 16s is about 124.2) and FRAC_W fractional bits; the main configuration uses
// 6 fractional bits, a 13-bit word. The word sizes, the B matrix and the
// default contents of A (16 down to 1, row-major) are taken from the design
// description. The element encoding (bconst_e) and the 5-bit width of an A
// element are this implementation's choices.
package mm_pkg;

  localparam int unsigned N      = 4;   // matrix dimension
  localparam int unsigned A_W    = 5;   // an element of A: integer 1..16
  localparam int unsigned INT_W  = 7;   // integer bits of a product or sum
  localparam int unsigned DEPTH  = N * N;
  localparam int unsigned ADDR_W = $clog2(DEPTH);
  localparam int unsigned PAIR_W = $clog2(DEPTH / 2);  // address of a BRAM pair

  typedef logic [A_W-1:0] a_elem_t;

  // The twelve distinct constants that appear in B.
  typedef enum logic [3:0] {
    B_ONE,         // 1
    B_EIGHTH,      // 1/8
    B_QUARTER,     // 1/4
    B_HALF,        // 1/2
    B_TWO,         // 2
    B_THREE,       // 3     = 2 + 1
    B_FIVE,        // 5     = 4 + 1
    B_3_4,         // 3/4   = 1 - 1/4
    B_3_2,         // 3/2   = 1 + 1/2
    B_3_8,         // 3/8   = 1/2 - 1/8
    B_7_15,        // 7/15, truncated to FRAC_W bits
    B_140_123      // 140/123, truncated to FRAC_W bits
  } bconst_e;

  // Matrix B: element (k, j) multiplies A_ik on its way into C_ij.
  //   [ 1    1/8      3     1/4 ]
  //   [ 3/4  3/2      3/8   2   ]
  //   [ 1/2  5        7/15  3   ]
  //   [ 1    140/123  1/4   3/4 ]
  function automatic bconst_e b_elem(input int k, input int j);
    case (k * 4 + j)
      0:  return B_ONE;      1:  return B_EIGHTH;
      2:  return B_THREE;    3:  return B_QUARTER;
      4:  return B_3_4;      5:  return B_3_2;
      6:  return B_3_8;      7:  return B_TWO;
      8:  return B_HALF;     9:  return B_FIVE;
      10: return B_7_15;     11: return B_THREE;
      12: return B_ONE;      13: return B_140_123;
      14: return B_QUARTER;  default: return B_3_4;
    endcase
  endfunction

  // Default contents of the A memory: 16, 15, ..., 1 in row-major order,
  // so address 0 holds A11 = 16 and address 15 holds A44 = 1.
  function automatic logic [DEPTH-1:0][A_W-1:0] default_a();
    logic [DEPTH-1:0][A_W-1:0] m;
    for (int i = 0; i < DEPTH; i++) m[i] = A_W'(DEPTH - i);
    return m;
  endfunction

  localparam logic [DEPTH-1:0][A_W-1:0] A_DEFAULT = default_a();

endpackage
