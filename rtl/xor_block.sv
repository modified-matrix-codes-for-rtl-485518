// xor_block - syndrome generator of the modified matrix code decoder.
//
// Compares the parity stored in the codeword with the parity recomputed from
// the read data, bit by bit:  dH = H ^ H',  dV = V ^ V',  dR = R ^ R'.
// A set bit of dH marks a row whose data parity changed, a set bit of dV a
// column whose two data bits disagree with the stored column parity, and a
// non-zero M-bit slice of dR a row whose Hamming check failed.
// Purely combinational.
module xor_block #(
  parameter int unsigned KH = 4,   // bits per row (K/2)
  parameter int unsigned M  = 3    // Hamming bits per row
) (
  input  logic [1:0]     h_s,
  input  logic [KH-1:0]  v_s,
  input  logic [2*M-1:0] r_s,
  input  logic [1:0]     h_c,
  input  logic [KH-1:0]  v_c,
  input  logic [2*M-1:0] r_c,
  output logic [1:0]     dh,
  output logic [KH-1:0]  dv,
  output logic [2*M-1:0] dr
);

  assign dh = h_s ^ h_c;
  assign dv = v_s ^ v_c;
  assign dr = r_s ^ r_c;

endmodule
