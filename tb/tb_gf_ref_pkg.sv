// tb_gf_ref_pkg -- reference field arithmetic for the testbenches.
//
// Multiplication is the plain bit-serial shift-and-add method with one
// reduction step per bit (a different algorithm from the digit-serial
// hardware); reduction polynomial x^54 + x^9 + 1, written out here rather
// than taken from the design package.
// Interface: functions ref_mul and rand_fe, no timing. Entirely this
// testbench suite's own.
package tb_gf_ref_pkg;
  localparam int RN = 54;
  typedef logic [RN-1:0] fe_t;
  localparam fe_t REF_POLY_LOW = fe_t'((64'd1 << 9) | 64'd1);

  function automatic fe_t ref_mul(fe_t a, fe_t b);
    fe_t acc = '0;
    fe_t x   = a;
    for (int i = 0; i < RN; i++) begin
      if (b[i]) acc ^= x;
      x = x[RN-1] ? ((x << 1) ^ REF_POLY_LOW) : (x << 1);
    end
    return acc;
  endfunction

  // 64-bit pseudo-random field element
  function automatic fe_t rand_fe();
    return fe_t'({$urandom, $urandom});
  endfunction
endpackage
