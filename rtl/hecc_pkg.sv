// hecc_pkg -- shared constants and types of the genus-3 hyperelliptic curve
// scalar multiplier.
//
// The field is GF(2^54) in polynomial basis, reduced by the trinomial
// F(x) = x^54 + x^9 + 1, one of the two reduction polynomials the design was
// evaluated with (the other, a 19-term polynomial, gives the same function
// with a denser reduction network). The curve is C: y^2 + y = x^7 + x^5 + x^4
// + x + 1, i.e. h(x) = 1 and f = x^7 + f5 x^5 + f4 x^4 + f1 x + f0 with all
// four coefficients equal to one. A reduced divisor of weight three is held
// in Mumford form (u, v): u = x^3 + u2 x^2 + u1 x + u0 (monic, so only three
// coefficients are stored) and v = v2 x^2 + v1 x + v0.
//
// The digit size of the multipliers (4) and the number of multipliers (4)
// follow the design description. The scalar width of 162 bits is this
// design's choice: a genus-3 Jacobian over GF(2^54) has about 2^162
// elements, and a scalar is reduced modulo the group order.
package hecc_pkg;

  localparam int unsigned N      = 54;   // field degree
  localparam int unsigned DIGIT  = 4;    // LSD multiplier digit size
  localparam int unsigned NMUL   = 4;    // field multipliers per arithmetic unit
  localparam int unsigned KBITS  = 162;  // scalar width

  // Low part of the reduction polynomial: F(x) = x^N + POLY_LOW.
  localparam logic [N-1:0] POLY_LOW = 54'h000_0000_0000_0201;  // x^9 + 1

  typedef logic [N-1:0] felem_t;

  // Curve constants: f(x) = x^7 + f5 x^5 + f4 x^4 + f3 x^3 + f2 x^2 + f1 x + f0.
  localparam felem_t CURVE_F0 = felem_t'(1);
  localparam felem_t CURVE_F1 = felem_t'(1);
  localparam felem_t CURVE_F2 = felem_t'(0);
  localparam felem_t CURVE_F3 = felem_t'(0);
  localparam felem_t CURVE_F4 = felem_t'(1);
  localparam felem_t CURVE_F5 = felem_t'(1);

  // Reduced divisor of weight three in Mumford form.
  typedef struct packed {
    felem_t u2, u1, u0;
    felem_t v2, v1, v0;
  } divisor_t;

  // Negation on a curve with h(x) = 1: -(u, v) = (u, v + 1).
  function automatic divisor_t divisor_neg(divisor_t d);
    divisor_t r = d;
    r.v0 = d.v0 ^ felem_t'(1);
    return r;
  endfunction

endpackage
