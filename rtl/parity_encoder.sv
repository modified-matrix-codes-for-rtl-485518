// parity_encoder - Hamming / extended-Hamming / vertical parity generator of the
// modified matrix code.
//
// The K-bit data word is split into two rows of K/2 bits (lower row D[K/2-1:0],
// upper row D[K-1:K/2]). The encoder produces, purely combinationally:
//   v[i]          = d[i] ^ d[i+K/2]        vertical (column) parity, K/2 bits
//   h[row]        = ^(row data)            extended-Hamming bit of each row
//   r[row*M + j]  = xor of the row's data bits whose Hamming position has bit j
//                   set                    M Hamming check bits per row
// For K = 8 this is exactly
//   R0 = D0^D1^D3, R1 = D0^D2^D3, R2 = D1^D2^D3, R3..R5 likewise on D7..D4,
//   H0 = D0^D1^D2^D3, H1 = D4^D5^D6^D7, V[i] = D[i]^D[i+4].
// Wider words use the same positional Hamming rule, which gives the parity-bit
// counts 18/28/46 listed for 16/32/64-bit data. The same block also serves as
// the parity recomputation inside the decoder.
module parity_encoder
  import mmc_pkg::*;
#(
  parameter int unsigned K = 8,             // data bits (even)
  localparam int unsigned KH = K / 2,       // bits per row
  localparam int unsigned M  = ham_bits(KH) // Hamming bits per row
) (
  input  logic [K-1:0]    d,
  output logic [1:0]      h,
  output logic [KH-1:0]   v,
  output logic [2*M-1:0]  r
);

  always_comb begin
    h = '0;
    r = '0;
    for (int row = 0; row < 2; row++) begin
      for (int i = 0; i < KH; i++) begin
        h[row] ^= d[row*KH + i];
        for (int j = 0; j < M; j++)
          if (((data_pos(i) >> j) & 1) == 1) r[row*M + j] ^= d[row*KH + i];
      end
    end
  end

  assign v = d[KH-1:0] ^ d[K-1:KH];

endmodule
