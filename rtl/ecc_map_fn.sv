// ecc_map_fn: the ECC-Map family of mapping functions f_i, forward and
// inverse, for a device of N = 2^M physical lines.
//
// The code is the cyclic code of length n = 2^M-1 with redundancy r = M
// generated by a primitive polynomial (a primitive BCH / cyclic Hamming
// code, k = n - M >= 2M). A codeword is laid out as [LLA | index | PLA]:
//   forward : encoder input [LLA | index], encoder parity = PLA
//   inverse : encoder input [index | PLA], encoder parity = LLA
// The inverse layout is the forward one rotated left by M positions, so the
// same encoder serves both directions. The index field is k-M bits wide;
// its low M bits carry the mapping number (the LFSR output) and its upper
// k-2M bits are held at zero. Each f_i is injective (one code word per
// message), and for mapping numbers 0 < i < j < N f_i(LLA) != f_j(LLA).
// Both directions are purely combinational. The layout and the code family
// follow the published architecture; holding the upper index bits at zero and the choice
// of generator polynomial are this design's choices.
module ecc_map_fn
  import ecc_map_pkg::*;
#(
  parameter int unsigned M = 10                    // log2 of the number of PLAs
) (
  input  logic [M-1:0] fwd_lla,   // forward: logical line address
  input  logic [M-1:0] fwd_num,   // forward: mapping number
  output logic [M-1:0] fwd_pla,   // forward: physical line address
  input  logic [M-1:0] inv_pla,   // inverse: physical line address
  input  logic [M-1:0] inv_num,   // inverse: mapping number
  output logic [M-1:0] inv_lla    // inverse: logical line address
);

  localparam int unsigned N_CODE = (1 << M) - 1;   // code length
  localparam int unsigned K_CODE = N_CODE - M;     // information bits
  localparam int unsigned IDX_W  = K_CODE - M;     // index field width
  localparam logic [M-1:0] GEN   = M'(prim_poly(M));

  logic [IDX_W-1:0] fwd_index, inv_index;
  assign fwd_index = IDX_W'(fwd_num);
  assign inv_index = IDX_W'(inv_num);

  cyclic_encoder #(.K(K_CODE), .R(M), .G(GEN)) u_fwd (
    .msg    ({fwd_lla, fwd_index}),
    .parity (fwd_pla)
  );

  cyclic_encoder #(.K(K_CODE), .R(M), .G(GEN)) u_inv (
    .msg    ({inv_index, inv_pla}),
    .parity (inv_lla)
  );

endmodule
