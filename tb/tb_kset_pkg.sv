// tb_kset_pkg -- a set of random 162-bit scalars (top bit set) and their
// multiples k*P of the base divisor VEC_P[0] of tb_vectors_pkg, computed
// with Cantor's general divisor-addition algorithm.
// Interface: constants NK, KSET and KSET_P, no timing. The scalars are
// random choices of this testbench suite.
package tb_kset_pkg;
  import hecc_pkg::*;
  localparam int NK = 6;
  localparam logic [KBITS-1:0] KSET [NK] = '{
    162'h25e5c7474fdec65fe721297377222d7283ab5a383,
    162'h2c097ce1389a5b1d8560d8297d4d495104513e9a4,
    162'h29f4b56d2ab00ca3ee9896e777218d06eec35bea1,
    162'h2fe3f7f14e06fc89649f9b43a99fb6ec663bc45c1,
    162'h3e35fed0d13f6a1e7b1243c1b1d3f578cede15ff1,
    162'h3eefe4237fe0733f5bd72f56ddb589bdd1a845f0d
  };
  localparam divisor_t KSET_P [NK] = '{
    '{54'h2ff48a47d5e09f, 54'h1ac215836b0d8f, 54'h1fed935d190de8, 54'h3c5ad04428308d, 54'h136a6e3d6a27a1, 54'h28b178b74b833c},
    '{54'h2d01ab9247e184, 54'h2737ca1408ecb1, 54'h0629a9273ec71f, 54'h0b17af61ccb7ed, 54'h1db40eb164642c, 54'h0f6d162329e8a7},
    '{54'h092e582312e2a2, 54'h3416af13fed1f1, 54'h3b65c92503b4b3, 54'h2db15823fed19b, 54'h0bc3675ab21e51, 54'h3f46dfe00c9d25},
    '{54'h163d3a98db62fc, 54'h3bd908a835d304, 54'h05a1f0eb1351db, 54'h1849434df5650e, 54'h0279f1d79fe981, 54'h2eb85a86b42e95},
    '{54'h364c63f6c7f97f, 54'h12855a1f415dc7, 54'h13c8844dbb481d, 54'h129efeaa21e5da, 54'h01eb74e80965b1, 54'h249fc8967bf8d9},
    '{54'h1930717f30a58a, 54'h3781dc6ede1734, 54'h26bf5bff3b7d21, 54'h26726aff1f46f5, 54'h00e6a15859ec82, 54'h05a0aee1c352c2}
  };
endpackage
