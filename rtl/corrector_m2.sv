// corrector_m2 - error location and correction of decoding method 2.
//
// Method 2 adds the Hamming syndrome dR (M bits per row) to dH and dV. Each row
// is handled on its own:
//   dH[row] = 1 (odd number of errors in the row):   row ^= dV
//   else dR[row] != 0 (even number of errors seen by the row's Hamming check):
//       every bit of the row is set to  ^dR[row] ^ ^dV
//   else:                                            row unchanged
// The even-error rule is the method's "dR xor dV" correction: it writes the
// same bit to the whole row, so it restores a row whose original contents were
// all zeros (or all ones when the xor comes out 1), which is the case worked
// through for this method; it is not a general correction for arbitrary data.
// Single errors and odd bursts in one row are corrected for any data.
// Purely combinational.
module corrector_m2 #(
  parameter int unsigned KH = 4,   // bits per row (K/2)
  parameter int unsigned M  = 3    // Hamming bits per row
) (
  input  logic [2*KH-1:0] d,
  input  logic [1:0]      dh,
  input  logic [KH-1:0]   dv,
  input  logic [2*M-1:0]  dr,
  output logic [2*KH-1:0] dout
);

  always_comb begin
    for (int row = 0; row < 2; row++) begin
      if (dh[row])
        dout[row*KH +: KH] = d[row*KH +: KH] ^ dv;
      else if (dr[row*M +: M] != '0)
        dout[row*KH +: KH] = {KH{^dr[row*M +: M] ^ ^dv}};
      else
        dout[row*KH +: KH] = d[row*KH +: KH];
    end
  end

endmodule
