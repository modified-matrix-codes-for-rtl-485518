// hvhc_decoder - horizontal vector Hamming decoder of the modified matrix code.
//
// Takes a codeword read from memory and separates it into the read data word
// and the stored parity fields H, V and R (the inverse of the placement done by
// mmc_encoder). It then recomputes H', V' and R' from the read data with a
// parity_encoder, so that the following XOR block can form the syndromes.
// With WITH_R = 0 the codeword carries no Hamming bits; r_s and r_c are then
// zero. Purely combinational.
module hvhc_decoder
  import mmc_pkg::*;
#(
  parameter int unsigned K      = 8,
  parameter bit          WITH_R = 1'b1,
  localparam int unsigned KH = K / 2,
  localparam int unsigned M  = ham_bits(KH),
  localparam int unsigned L  = row_len(KH, WITH_R),
  localparam int unsigned N  = cw_len(K, WITH_R)
) (
  input  logic [N-1:0]   c,     // codeword as read from memory
  output logic [K-1:0]   d,     // read data
  output logic [1:0]     h_s,   // stored extended-Hamming bits
  output logic [KH-1:0]  v_s,   // stored vertical bits
  output logic [2*M-1:0] r_s,   // stored Hamming bits
  output logic [1:0]     h_c,   // H' recomputed from d
  output logic [KH-1:0]  v_c,   // V' recomputed from d
  output logic [2*M-1:0] r_c    // R' recomputed from d
);

  logic [2*M-1:0] r_re;

  always_comb begin
    d   = '0;
    h_s = '0;
    r_s = '0;
    for (int row = 0; row < 2; row++) begin
      for (int i = 0; i < KH; i++)
        d[row*KH + i] = c[row*L + data_off(i, WITH_R)];
      if (WITH_R)
        for (int j = 0; j < M; j++)
          r_s[row*M + j] = c[row*L + chk_off(j)];
      h_s[row] = c[row*L + L - 1];
    end
    v_s = c[2*L +: KH];
  end

  parity_encoder #(.K(K)) u_recompute (.d(d), .h(h_c), .v(v_c), .r(r_re));

  assign r_c = WITH_R ? r_re : '0;

endmodule
