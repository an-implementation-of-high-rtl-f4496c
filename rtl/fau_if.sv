// fau_if -- request/response bundle between a point-arithmetic controller and
// the field arithmetic unit (four multipliers and one inverter).
//
// A controller starts all four multipliers together with `mul_start` and the
// operand pairs mul_a[i] * mul_b[i]; `mul_done` pulses when the four products
// are on `mul_p`. Likewise `inv_start` with `inv_a`, answered by `inv_done`
// and `inv_q`. Starts are single-cycle pulses and a controller waits for the
// matching done before starting that kind of operation again. The bundle
// is this design's own; the description only says that every field unit
// reports completion with a status signal.
interface fau_if
  import hecc_pkg::*;
();
  logic                    mul_start;
  felem_t [NMUL-1:0]       mul_a;
  felem_t [NMUL-1:0]       mul_b;
  logic                    mul_done;
  felem_t [NMUL-1:0]       mul_p;
  logic                    inv_start;
  felem_t                  inv_a;
  logic                    inv_done;
  felem_t                  inv_q;

  modport client (output mul_start, mul_a, mul_b, inv_start, inv_a,
                  input  mul_done, mul_p, inv_done, inv_q);
  modport server (input  mul_start, mul_a, mul_b, inv_start, inv_a,
                  output mul_done, mul_p, inv_done, inv_q);
endinterface
