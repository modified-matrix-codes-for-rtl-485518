// mmc_encoder - encoder of the modified matrix code: parity generation followed
// by the horizontal vector Hamming (HVHC) placement of the codeword.
//
// The parity_encoder computes H, V and R from the data word; the placement
// stage then writes each row as an extended Hamming codeword (Hamming check bits
// at the power-of-two positions, data in the remaining positions, H on top),
// the upper row above the lower row, and the K/2 vertical bits at the top.
// For K = 8 the 20-bit result is
//   c[19:0] = V3 V2 V1 V0 H1 D7 D6 D5 R5 D4 R4 R3 H0 D3 D2 D1 R2 D0 R1 R0.
// WITH_R = 1 is the encoder with Hamming bits (used by decoding methods 2 and
// 3, and by method 1, which simply ignores R). WITH_R = 0 is the encoder
// without Hamming bits (14 bits for K = 8); how its bits are packed is this
// design's choice (each row: data then H). Purely combinational.
module mmc_encoder
  import mmc_pkg::*;
#(
  parameter int unsigned K     = 8,
  parameter bit          WITH_R = 1'b1,
  localparam int unsigned KH = K / 2,
  localparam int unsigned M  = ham_bits(KH),
  localparam int unsigned L  = row_len(KH, WITH_R),
  localparam int unsigned N  = cw_len(K, WITH_R)
) (
  input  logic [K-1:0] d,
  output logic [N-1:0] c
);

  logic [1:0]     h;
  logic [KH-1:0]  v;
  logic [2*M-1:0] r;

  parity_encoder #(.K(K)) u_parity (.d(d), .h(h), .v(v), .r(r));

  always_comb begin
    c = '0;
    for (int row = 0; row < 2; row++) begin
      for (int i = 0; i < KH; i++)
        c[row*L + data_off(i, WITH_R)] = d[row*KH + i];
      if (WITH_R)
        for (int j = 0; j < M; j++)
          c[row*L + chk_off(j)] = r[row*M + j];
      c[row*L + L - 1] = h[row];
    end
    c[2*L +: KH] = v;
  end

endmodule
