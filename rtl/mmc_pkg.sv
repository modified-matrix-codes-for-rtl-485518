// mmc_pkg - constants and helper functions shared by the modified matrix code
// (MMC) encoder, decoders and memory.
//
// A K-bit data word is viewed as a two-row matrix: the lower row holds
// D[K/2-1:0], the upper row D[K-1:K/2]. Each row is protected by a Hamming code
// (M check bits R) and by one extended-Hamming bit H, the parity of the row's
// data. Each column i is protected by a vertical parity bit V[i] = D[i] ^ D[i+K/2].
//
// Stored codeword layout (bit 0 = position 1), following the 8-bit position
// table of the method:
//   row 0 block : Hamming codeword of the lower row (check bits at power-of-two
//                 positions, data bits in the other positions in ascending
//                 order), then H[0]
//   row 1 block : the same for the upper row, then H[1]
//   V field     : V[K/2-1:0] in the top K/2 bits
// With WITH_R = 0 (the "encoder without Hamming bits") each row block is just the
// row's data bits followed by H; this packing is this design's own choice.
// For K = 8 the Hamming layout gives the 20-bit word
//   V3 V2 V1 V0 H1 D7 D6 D5 R5 D4 R4 R3 H0 D3 D2 D1 R2 D0 R1 R0.
package mmc_pkg;

  // Number of Hamming check bits needed for KH data bits: smallest M with
  // 2**M >= KH + M + 1 (3 for 4 bits, 4 for 8, 5 for 16, 6 for 32).
  function automatic int unsigned ham_bits(input int unsigned kh);
    int unsigned m;
    m = 0;
    for (int unsigned t = 1; t < 32; t++)
      if (m == 0 && (1 << t) >= (kh + t + 1)) m = t;
    return m;
  endfunction

  // Width of one row block in the codeword.
  function automatic int unsigned row_len(input int unsigned kh, input bit with_r);
    return with_r ? (kh + ham_bits(kh) + 1) : (kh + 1);
  endfunction

  // Width of the whole codeword for K data bits.
  function automatic int unsigned cw_len(input int unsigned k, input bit with_r);
    return 2 * row_len(k / 2, with_r) + k / 2;
  endfunction

  // 1-based Hamming position of data bit i of a row: the (i+1)-th position that
  // is not a power of two (3, 5, 6, 7, 9, ...).
  function automatic int unsigned data_pos(input int unsigned i);
    // Start from i + 1 and step over every power of two at or below the
    // running position.
    int unsigned p;
    p = i + 1;
    for (int unsigned t = 0; t < 20; t++)
      if ((1 << t) <= p) p++;
    return p;
  endfunction

  // Bit offset, inside a row block, of data bit i of that row.
  function automatic int unsigned data_off(input int unsigned i, input bit with_r);
    return with_r ? (data_pos(i) - 1) : i;
  endfunction

  // Bit offset, inside a row block, of Hamming check bit j of that row.
  function automatic int unsigned chk_off(input int unsigned j);
    return (1 << j) - 1;
  endfunction

  // Decoding methods.
  typedef enum logic [1:0] {
    METHOD_1 = 2'd1,  // dH and dV only, Hamming bits unused
    METHOD_2 = 2'd2,  // dH, dV and dR, even errors decoded from dR xor dV
    METHOD_3 = 2'd3   // dH, dV and dR, flagged halves corrected with dV
  } method_e;

endpackage
