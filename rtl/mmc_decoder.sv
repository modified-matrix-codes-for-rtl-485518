// mmc_decoder - complete decoder of the modified matrix code for one decoding
// method: HVHC decoder -> XOR block -> method-specific corrector.
//
// The codeword read from memory is split into data and stored parity, the
// parity is recomputed from the read data, the XOR block forms the syndromes
// dH, dV and dR, and the corrector of the chosen METHOD (1, 2 or 3) produces
// the corrected data. Method 1 ignores dR; methods 2 and 3 need the Hamming
// bits, so they require WITH_R = 1. Two status outputs, this design's own
// addition, report whether any syndrome bit was set (err) and whether the
// corrector changed the data (fixed). Purely combinational.
module mmc_decoder
  import mmc_pkg::*;
#(
  parameter int unsigned K      = 8,
  parameter method_e     METHOD = METHOD_3,
  parameter bit          WITH_R = 1'b1,
  localparam int unsigned KH = K / 2,
  localparam int unsigned M  = ham_bits(KH),
  localparam int unsigned N  = cw_len(K, WITH_R)
) (
  input  logic [N-1:0]   c,      // codeword read from memory
  output logic [K-1:0]   dout,   // corrected data
  output logic [1:0]     dh,     // syndromes
  output logic [KH-1:0]  dv,
  output logic [2*M-1:0] dr,
  output logic           err,    // some syndrome bit set
  output logic           fixed   // corrector changed the read data
);

  logic [K-1:0]   d;
  logic [1:0]     h_s, h_c;
  logic [KH-1:0]  v_s, v_c;
  logic [2*M-1:0] r_s, r_c;

  hvhc_decoder #(.K(K), .WITH_R(WITH_R)) u_hvhc (
    .c(c), .d(d), .h_s(h_s), .v_s(v_s), .r_s(r_s),
    .h_c(h_c), .v_c(v_c), .r_c(r_c)
  );

  xor_block #(.KH(KH), .M(M)) u_xor (
    .h_s(h_s), .v_s(v_s), .r_s(r_s), .h_c(h_c), .v_c(v_c), .r_c(r_c),
    .dh(dh), .dv(dv), .dr(dr)
  );

  generate
    if (METHOD == METHOD_1) begin : g_m1
      corrector_m1 #(.KH(KH)) u_corr (.d(d), .dh(dh), .dv(dv), .dout(dout));
    end else if (METHOD == METHOD_2) begin : g_m2
      if (!WITH_R) begin : g_bad
        $error("mmc_decoder: method 2 needs WITH_R = 1");
      end
      corrector_m2 #(.KH(KH), .M(M)) u_corr (.d(d), .dh(dh), .dv(dv), .dr(dr), .dout(dout));
    end else begin : g_m3
      if (!WITH_R) begin : g_bad
        $error("mmc_decoder: method 3 needs WITH_R = 1");
      end
      corrector_m3 #(.KH(KH), .M(M)) u_corr (.d(d), .dh(dh), .dv(dv), .dr(dr), .dout(dout));
    end
  endgenerate

  assign err   = (dh != '0) || (dv != '0) || (dr != '0);
  assign fixed = (dout != d);

endmodule
