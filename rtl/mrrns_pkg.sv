// mrrns_pkg: types and small-ring helpers shared by the MRRNS datapath.
//
// The datapath works in three tiny rings, Z_3, Z_5 and Z_7, whose product ring
// Z_105 holds every result coefficient. All ring values travel as 3-bit words
// (Z_3 uses codes 0..2 and leaves code 3 unused), so every two-operand ring
// operation is a 6-input logic function. Channels and polynomial coefficients
// are indexed by base-3 digits, one digit per indeterminate: in a channel index
// a digit selects the root the indeterminate is evaluated at (0 -> 0, 1 -> +1,
// 2 -> -1); in a coefficient index the digit is the exponent (0, 1 or 2).
// Digit 0 belongs to W, then X, Y, Z and last T (the complex unit).
// The moduli and the coefficient range [-52,52] follow the design; the 3-bit
// encoding and the digit order are this implementation's choices.
package mrrns_pkg;

  localparam int NMOD = 3;
  localparam int MODULI [NMOD] = '{3, 5, 7};
  localparam int RW = 3;                 // width of one ring value
  localparam int M_PROD = 105;           // 3 * 5 * 7
  localparam int C_HALF = 52;            // coefficients lie in [-52, 52]
  localparam int COEF_W = 7;             // signed width of such a coefficient

  typedef logic [RW-1:0] ring_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  typedef enum logic [1:0] {RING_ADD = 2'd0, RING_SUB = 2'd1, RING_MUL = 2'd2} ring_op_e;

  // Least non-negative residue of any integer.
  function automatic int mod_int(int v, int m);
    int r;
    r = v % m;
    if (r < 0) r += m;
    return r;
  endfunction

  function automatic ring_t ring_add(ring_t a, ring_t b, int m);
    return ring_t'(mod_int(int'(a) + int'(b), m));
  endfunction

  function automatic ring_t ring_sub(ring_t a, ring_t b, int m);
    return ring_t'(mod_int(int'(a) - int'(b), m));
  endfunction

  function automatic ring_t ring_mul(ring_t a, ring_t b, int m);
    return ring_t'(mod_int(int'(a) * int'(b), m));
  endfunction

  // Multiplicative inverse of 2 in Z_m, m odd.
  function automatic int inv2(int m);
    return (m + 1) / 2;
  endfunction

  function automatic int pow3(int n);
    int p;
    p = 1;
    for (int i = 0; i < n; i++) p *= 3;
    return p;
  endfunction

  // Base-3 digit number v of index idx.
  function automatic int digit3(int idx, int v);
    int q;
    q = idx;
    for (int i = 0; i < v; i++) q /= 3;
    return q % 3;
  endfunction

  // Root selected by a channel digit: 0 -> 0, 1 -> +1, 2 -> -1.
  function automatic int root_of(int d);
    return (d == 2) ? -1 : d;
  endfunction

  // Power-of-2 weight exponent of a monomial whose exponent digits are those of
  // idx over the first nv bit indeterminates; indeterminate v stands for 2^(2^v).
  function automatic int weight_of(int idx, int nv);
    int w;
    w = 0;
    for (int v = 0; v < nv; v++) w += digit3(idx, v) << v;
    return w;
  endfunction

endpackage
