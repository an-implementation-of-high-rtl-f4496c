// tb_vectors19_pkg -- reference values in GF(2^54) reduced by the 19-term
// polynomial x^54 + x^34 + x^32 + x^31 + x^30 + x^29 + x^27 + x^25 + x^21 +
// x^18 + x^17 + x^16 + x^15 + x^13 + x^7 + x^4 + x^2 + x + 1.
//
// Divisors on y^2 + y = x^7 + x^5 + x^4 + x + 1, written {u2, u1, u0, v2,
// v1, v0}. Sums, doubles and the scalar multiple were computed with Cantor's
// general divisor-addition algorithm in this field, independently of the
// explicit formulae the hardware uses.
// Interface: constants only, no timing. The polynomial comes from the
// design description; the divisors and scalar are random choices.
package tb_vectors19_pkg;
  import hecc_pkg::*;
  localparam felem_t POLY19_LOW = 54'h000005ea27a097;
  localparam int NVEC19 = 2;
  localparam divisor_t V19_P [NVEC19] = '{
    '{54'h26d57d0ad785bf, 54'h21067e886bfde2, 54'h137f91bca81aa0, 54'h3f5a661cbf06b2, 54'h3b48980b5eaea6, 54'h26368f38d59148},
    '{54'h09bf5f17c70266, 54'h0de07a58a40db1, 54'h141566d1239286, 54'h0417e45ef84843, 54'h1bda97a4236367, 54'h32fdf2bd661e1b}
  };
  localparam divisor_t V19_Q [NVEC19] = '{
    '{54'h0f2b7729e5a522, 54'h1b52455917041a, 54'h11829a812d56a5, 54'h3ef8c5b6dd73c3, 54'h3f76684406b7ce, 54'h06d0d5a00813d6},
    '{54'h37fc94c18c4e27, 54'h2cfe796f116c04, 54'h00a142cd3d5a26, 54'h24466b309adccd, 54'h1741dfd44b30ab, 54'h15358eaeb71874}
  };
  localparam divisor_t V19_SUM [NVEC19] = '{
    '{54'h015f6ec0ce5e9f, 54'h034a5f0baae9bb, 54'h34fdccc2851990, 54'h3cb480ff3e78f8, 54'h24f921587b1011, 54'h0053f9aa57cc47},
    '{54'h169503ab8342b6, 54'h2519147c00f633, 54'h12785241b1b6ff, 54'h244e7e17828663, 54'h2b8cc098b50f9f, 54'h32f1671d9f7b6a}
  };
  localparam divisor_t V19_DBL [NVEC19] = '{
    '{54'h258e5f037ee5e4, 54'h124808e62c0038, 54'h31fd74bbc665a4, 54'h2660756d4d088a, 54'h2c71e55e8e2a25, 54'h3ea774caa51064},
    '{54'h1239d09c32e616, 54'h0c218541294075, 54'h2549bede0e8b13, 54'h346d8c9459dc22, 54'h0ee6725e3efbb1, 54'h02192be6cec961}
  };
  localparam logic [KBITS-1:0] K19 = 162'h35a73a0d5d87f528e8faf583207419670557dab3d;
  localparam divisor_t K19_P = '{54'h228be65e3ce06a, 54'h1117f2163d64ce, 54'h15ed625399300d, 54'h103b5b59481076, 54'h2360854c6a1243, 54'h0c18d0d4cd399e};
endpackage
