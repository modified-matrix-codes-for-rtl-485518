// corrector_m3 - error location and correction of decoding method 3.
//
// Method 3 uses dH, dV and dR to decide which row is in error and corrects the
// flagged row(s) with the vertical syndrome:
//   row is flagged when dH[row] = 1 (odd error count) or dR[row] != 0
//   (the row's Hamming check failed, which catches the even counts dH misses);
//   a flagged row is corrected as row ^= dV, an unflagged row is passed on.
// Any burst of errors, up to the full K/2 bits, that stays inside one row is
// corrected for arbitrary data, as long as the Hamming check of that row sees
// it (dR != 0) or its length is odd (dH = 1). Errors that fall only in parity
// bits leave dV = 0 and so leave the data unchanged. Purely combinational.
module corrector_m3 #(
  parameter int unsigned KH = 4,
  parameter int unsigned M  = 3
) (
  input  logic [2*KH-1:0] d,
  input  logic [1:0]      dh,
  input  logic [KH-1:0]   dv,
  input  logic [2*M-1:0]  dr,
  output logic [2*KH-1:0] dout
);

  logic [1:0] flag;

  always_comb begin
    for (int row = 0; row < 2; row++) begin
      flag[row] = dh[row] | (dr[row*M +: M] != '0);
      dout[row*KH +: KH] = flag[row] ? (d[row*KH +: KH] ^ dv) : d[row*KH +: KH];
    end
  end

endmodule
