// gsd_pkg: shared arithmetic for generalized signed-digit (GSD) multipliers.
//
// A GSD number has a power-of-two radix R = 2**LOG2R and digits in the set
// [-ALPHA, BETA] with ALPHA + BETA + 1 > R. Digits are carried on wires as
// two's-complement signed fields; the helpers below size those fields and
// split a position sum into a transfer digit and a remainder digit.
//
// The split follows the cheap hardware recipe: take the upper bits of the
// position sum as the transfer and the low LOG2R bits as the remainder, then,
// if the remainder exceeds its upper bound, subtract R from it and add one to
// the transfer. The remainder therefore lands in [WU-R+1, WU]. The choice of
// WU is a per-design parameter.
package gsd_pkg;

  // Bits needed for a two's-complement field holding every value in [lo, hi].
  function automatic int sbits(input int lo, input int hi);
    integer b;
    b = 1;
    while (!((lo >= -(1 <<< (b - 1))) && (hi <= (1 <<< (b - 1)) - 1))) b++;
    return b;
  endfunction

  // Ceiling division for a >= 0, b > 0.
  function automatic int cdiv(input int a, input int b);
    return (a + b - 1) / b;
  endfunction

  // Floor division for b > 0.
  function automatic int fdiv(input int a, input int b);
    return (a >= 0) ? a / b : -((-a + b - 1) / b);
  endfunction

  function automatic int imax(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // Result of splitting a position sum p into p = R*t + w.
  typedef struct packed {
    logic signed [31:0] t;
    logic signed [31:0] w;
  } split_t;

  // p = R*t + w with w in [wu-R+1, wu]: upper/lower bit fields, one compare,
  // one conditional adjustment.
  function automatic split_t split_digit(input int p, input int log2r, input int wu);
    split_t s;
    integer r;
    r   = 1 << log2r;
    s.t = p >>> log2r;
    s.w = p & (r - 1);
    if (s.w > wu) begin
      s.w = s.w - r;
      s.t = s.t + 1;
    end
    return s;
  endfunction

  // Result of the parallel two-transfer split p = R^2*t + R*u + w.
  typedef struct packed {
    logic signed [31:0] t;
    logic signed [31:0] u;
    logic signed [31:0] w;
  } split3_t;

  // Upper, middle and lower bit fields of p; the middle and lower fields are
  // compared with their bounds at the same time and all three adjusted in
  // parallel. The middle digit absorbs the adjustment coming from the lower
  // field, so it can reach uu+1.
  function automatic split3_t split3_digit(input int p, input int log2r, input int wu,
                                           input int uu);
    split3_t s;
    integer r, u0;
    r   = 1 << log2r;
    s.t = p >>> (2 * log2r);
    u0  = (p >>> log2r) & (r - 1);
    s.u = u0;
    s.w = p & (r - 1);
    if (s.w > wu) begin
      s.w = s.w - r;
      s.u = s.u + 1;
    end
    if (u0 > uu) begin
      s.u = s.u - r;
      s.t = s.t + 1;
    end
    return s;
  endfunction

endpackage
