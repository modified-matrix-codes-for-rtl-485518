// corrector_m1 - error location and correction of decoding method 1.
//
// Method 1 uses only the row-parity syndrome dH and the vertical syndrome dV;
// the Hamming bits are not looked at. The rows are corrected with dV:
//   dH = 01 (odd number of errors in the lower row): lower row ^= dV,
//                                                    upper row unchanged
//   dH = 10 (odd number of errors in the upper row): upper row ^= dV,
//                                                    lower row unchanged
//   dH = 00 (even number, row unknown):              both rows ^= dV
// This corrects a single error or an odd-length burst of up to K/2 - 1
// adjacent errors inside one row; even bursts are copied into the other row.
// The case dH = 11 is not specified by the method; this design treats it like
// dH = 00 (both rows ^= dV), i.e. a row is left alone only when the other row
// alone is flagged. Purely combinational.
module corrector_m1 #(
  parameter int unsigned KH = 4    // bits per row (K/2)
) (
  input  logic [2*KH-1:0] d,       // read data
  input  logic [1:0]      dh,
  input  logic [KH-1:0]   dv,
  output logic [2*KH-1:0] dout     // corrected data
);

  logic fix_lo, fix_hi;

  assign fix_lo = (dh != 2'b10);
  assign fix_hi = (dh != 2'b01);

  assign dout[KH-1:0]    = fix_lo ? (d[KH-1:0]    ^ dv) : d[KH-1:0];
  assign dout[2*KH-1:KH] = fix_hi ? (d[2*KH-1:KH] ^ dv) : d[2*KH-1:KH];

endmodule
