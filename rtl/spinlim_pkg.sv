// spinlim_pkg: types and helper functions shared by the SpinLiM blocks.
//
// A ternary value P in {-1, 0, +1} is kept as two bits, one per memory cell
// of a computing cell (the split follows the document's encoding table):
//   p1 (sign bit, cell-1):     1 for +1, 0 for -1, don't care for 0
//   p2 (non-zero bit, cell-2): 1 for +1 and -1, 0 for 0
// The product of two such values is again in this form:
//   (XNOR(p1, q1), AND(p2, q2)).
// This design encodes 0 with p1 = 0 (the document leaves it free).
package spinlim_pkg;

  typedef struct packed {
    logic p1;  // sign: 1 = +1, 0 = -1
    logic p2;  // non-zero flag
  } trit_t;

  // Layer kind handled by the mapping control.
  typedef enum logic {
    MODE_FC   = 1'b0,  // fully connected: P = weight row, Q = input activation
    MODE_CONV = 1'b1   // convolution: P = shifted input window, Q = kernel value
  } layer_mode_e;

  // Encode a signed integer (-1, 0, +1) as a trit.
  function automatic trit_t trit_from_int(input int v);
    trit_t t;
    t.p2 = (v != 0);
    t.p1 = (v > 0);
    return t;
  endfunction

  // Value of a trit as a signed two-bit number (-1, 0, +1).
  function automatic logic signed [1:0] trit_value(input trit_t t);
    if (!t.p2) return 2'sd0;
    return t.p1 ? 2'sd1 : -2'sd1;
  endfunction

  // Reference ternary product (used by the digital blocks and testbenches).
  function automatic trit_t trit_mul(input trit_t p, input trit_t q);
    trit_t r;
    r.p1 = ~(p.p1 ^ q.p1);
    r.p2 = p.p2 & q.p2;
    return r;
  endfunction

endpackage
