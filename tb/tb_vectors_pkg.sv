// tb_vectors_pkg -- reference values for the testbenches.
//
// Divisors on y^2 + y = x^7 + x^5 + x^4 + x + 1 over GF(2^54) mod x^54+x^9+1,
// each written as {u2, u1, u0, v2, v1, v0}. VEC_DBL, VEC_DBL_Q and
// VEC_DBL_SUM are the doubles of VEC_P, VEC_Q and VEC_SUM. The sums, doubles and scalar
// multiples were computed with Cantor's general divisor-addition algorithm
// (polynomial extended GCDs and reduction), an independent route from the
// explicit formulae the hardware uses. The random divisors are sums of three
// random curve points.
// Interface: constants only, no timing. The divisors and scalars are
// random choices of this testbench suite.
package tb_vectors_pkg;
  import hecc_pkg::*;
  localparam int NVEC = 4;
  localparam divisor_t VEC_P [NVEC] = '{
    '{54'h1ed497aac3ca0d, 54'h2d35815731e066, 54'h25c20af5797483, 54'h3f9e62af3a3c42, 54'h35b6a015459ac5, 54'h254f3886242f05},
    '{54'h0438308b012fc0, 54'h013a848331d1b1, 54'h36a7263f283a0c, 54'h3e47d2ad1cca8f, 54'h1fa37f449daf7c, 54'h2853538b3e1f05},
    '{54'h3a194e0d978a13, 54'h3af46d66572844, 54'h1141700219f7fb, 54'h30945de43e5732, 54'h0a309e6b3ee0b7, 54'h1f26f35ac2a39f},
    '{54'h2aedf07006f693, 54'h2ef3e7ed5762b0, 54'h00a56145238cfb, 54'h3ba1773d5f58e2, 54'h1bbe0b74b25122, 54'h09accc47f2a17c}
  };
  localparam divisor_t VEC_Q [NVEC] = '{
    '{54'h1776c895da2f86, 54'h0c238eb0491a04, 54'h39a47322f7f3d1, 54'h0063436e3ea87e, 54'h012943e807a2b8, 54'h106d636496611a},
    '{54'h39629285a76be9, 54'h244abac59c03d6, 54'h1d343154d61f01, 54'h0f145fff7a4deb, 54'h1c5c108a8d2f0e, 54'h0ce89f138a5bc5},
    '{54'h1e77f2e0d4959f, 54'h0829a361e8f76f, 54'h185c4d78d6ede2, 54'h0a12412c16974b, 54'h181cf043635e4a, 54'h14cfeddd22b3a3},
    '{54'h160a3082be9343, 54'h0780f44dcb1884, 54'h001e137a0d7958, 54'h0562f885aa6b2f, 54'h190e74944fe31b, 54'h27abeabdc12028}
  };
  localparam divisor_t VEC_SUM [NVEC] = '{
    '{54'h20e2bbfc92a7f8, 54'h1d05b16511047f, 54'h25aaa284bbdbfa, 54'h00cfa64428dadb, 54'h1a63a45bde0c07, 54'h2e47e04d17fffa},
    '{54'h2a7f16b869a0c9, 54'h37f7aadfea4515, 54'h157c3e4b1e8a23, 54'h1fde305a4279d4, 54'h025ddaff704b73, 54'h0072669d325ed6},
    '{54'h30a03adf99b74f, 54'h3e02514080021a, 54'h35e6e90ed053d6, 54'h3dc06aafeb5e69, 54'h242fe6406bd46d, 54'h1824a3d5dc8e63},
    '{54'h041691b053c7c9, 54'h1570de9c42829f, 54'h26bdb519e3258b, 54'h2651769a29d928, 54'h039fed22dc05d6, 54'h3dc7857d52a233}
  };
  localparam divisor_t VEC_DBL [NVEC] = '{
    '{54'h29f8aa737a2380, 54'h31c5e23034682d, 54'h116281914c05c4, 54'h2a40c9fc1094de, 54'h0eff730bbd281e, 54'h019ee5cfaba291},
    '{54'h1994d2fcd217ea, 54'h0da50fe90163c9, 54'h3120b82810be9d, 54'h2c91df8bb042fe, 54'h1ee8e5abd95719, 54'h00f111a1a0ebe2},
    '{54'h2ea55fe4332a5a, 54'h0476cef687149d, 54'h322ff2ddc610e5, 54'h0a3128a1a8b951, 54'h15007a281e9826, 54'h31068c9d18d7ee},
    '{54'h15e39a19a4ba39, 54'h224b8f717cb743, 54'h03d301961a323d, 54'h3daf44d02dba5d, 54'h05a83ad58bbf0b, 54'h003fce12bb6789}
  };
  localparam divisor_t VEC_DBL_Q [NVEC] = '{
    '{54'h1076a2f86ae823, 54'h3ae0303ce26dae, 54'h1805a121e6f38c, 54'h2c7d4250f5a323, 54'h00b31eb0d416e3, 54'h2d712efc4b9565},
    '{54'h2fb27e9c3be0c3, 54'h02514625339170, 54'h159c7d461d3472, 54'h07cf7079e32e2f, 54'h393a0b8c8bca8c, 54'h16cdb85dede797},
    '{54'h0b124eb62dd390, 54'h2436864a946f43, 54'h04a4aa26c2e699, 54'h3a62cac4f8feb1, 54'h0bc3d5f59d53df, 54'h253977e2b182e6},
    '{54'h29039edf89cf11, 54'h2735bcfbfe7336, 54'h211df3a577e82e, 54'h1fe62614f29356, 54'h3a1eaf953b69b1, 54'h2ef6751e0c2a2e}
  };
  localparam divisor_t VEC_DBL_SUM [NVEC] = '{
    '{54'h2b7dc436f16967, 54'h2360b053913e83, 54'h2bc167cdb821fa, 54'h01f6f26958f213, 54'h16a5d419a96d70, 54'h2fc3b4c4362e24},
    '{54'h27593c2a1ad030, 54'h2483b252c865fd, 54'h0ae5c30a1404bb, 54'h0970a0bb652f76, 54'h29f5464b5200b8, 54'h1f9165612249f6},
    '{54'h137691a5fef947, 54'h2b12527b9a8ce7, 54'h0f3cb593893d19, 54'h29857481c89d91, 54'h39d2162d4bb59a, 54'h03cd70d1b6b466},
    '{54'h111ac61b494781, 54'h0204e0931c5269, 54'h0e9b797550dcef, 54'h00d7ef4347b8a4, 54'h01d1c20c7c6411, 54'h0b184540800da8}
  };
  localparam logic [KBITS-1:0] K_SMALL = 162'h2f3b;
  localparam divisor_t KP_SMALL = '{54'h1934ac40070216, 54'h0d19859acc5ffe, 54'h19ec595c7f94e4, 54'h2f242b110d9c1c, 54'h19e1c1a2839a07, 54'h12eaca22554d70};
  localparam logic [KBITS-1:0] K_BIG = 162'h23b08c157c7c64d559b509fbea7193cf4d9f181ea;
  localparam divisor_t KP_BIG = '{54'h112024b68f5e6d, 54'h02555f299ec6a8, 54'h303d9224eba2d8, 54'h0406f4b7dc4aba, 54'h0a13369fbda17d, 54'h391205158b117d};
endpackage
