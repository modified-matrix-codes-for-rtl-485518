// mmc_top - memory protected by the modified matrix code, with the three
// decoding methods side by side.
//
// Write path: wdata (K bits) -> mmc_encoder (parity encoder + HVHC placement,
// with Hamming bits) -> ecc_memory. Every word is stored as the full codeword
// (20 bits for K = 8), so all three decoders can read the same word; method 1
// simply ignores the Hamming bits.
// Read path: ecc_memory -> three mmc_decoder instances (methods 1, 2, 3) in
// parallel. The method input selects which one drives dout; the per-method
// results are also brought out. Any other method value selects method 3, the
// recommended one.
// Timing: a write is taken at the clock edge with we = 1. A read issued with
// re = 1 returns its word one cycle later with rvalid = 1; dout is
// combinational from the registered word, so it follows the method input in
// that cycle. upset_en XORs upset_mask into a stored word (bit flips, for
// exercising the decoders). Memory depth, the read latency, the method select
// and the upset port are this design's choices; the data width and the
// encoding/decoding follow the method.
module mmc_top
  import mmc_pkg::*;
#(
  parameter int unsigned K     = 8,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned KH = K / 2,
  localparam int unsigned M  = ham_bits(KH),
  localparam int unsigned N  = cw_len(K, 1'b1),
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [K-1:0]  wdata,
  // read port
  input  logic          re,
  input  logic [AW-1:0] raddr,
  input  logic [1:0]    method,      // 1, 2 or 3
  output logic          rvalid,
  output logic [K-1:0]  dout,        // data corrected by the selected method
  output logic          err,         // selected decoder saw a non-zero syndrome
  output logic          fixed,       // selected decoder changed the data
  output logic [K-1:0]  dout_m1,     // result of each method
  output logic [K-1:0]  dout_m2,
  output logic [K-1:0]  dout_m3,
  output logic [N-1:0]  rcode,       // codeword as read
  output logic [1:0]    dh,          // syndromes seen by the selected decoder
  output logic [KH-1:0] dv,
  output logic [2*M-1:0] dr,
  // bit-flip injection into a stored word
  input  logic          upset_en,
  input  logic [AW-1:0] upset_addr,
  input  logic [N-1:0]  upset_mask
);

  logic [N-1:0] wcode;
  logic [2:0]   err_m, fixed_m;

  mmc_encoder #(.K(K), .WITH_R(1'b1)) u_enc (.d(wdata), .c(wcode));

  ecc_memory #(.W(N), .DEPTH(DEPTH)) u_mem (
    .clk(clk), .rst_n(rst_n),
    .we(we), .waddr(waddr), .wdata(wcode),
    .re(re), .raddr(raddr), .rdata(rcode),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= re;
  end

  logic [1:0]     dh1, dh2, dh3;
  logic [KH-1:0]  dv1, dv2, dv3;
  logic [2*M-1:0] dr1, dr2, dr3;

  mmc_decoder #(.K(K), .METHOD(METHOD_1), .WITH_R(1'b1)) u_dec1 (
    .c(rcode), .dout(dout_m1), .dh(dh1), .dv(dv1), .dr(dr1),
    .err(err_m[0]), .fixed(fixed_m[0]));
  mmc_decoder #(.K(K), .METHOD(METHOD_2), .WITH_R(1'b1)) u_dec2 (
    .c(rcode), .dout(dout_m2), .dh(dh2), .dv(dv2), .dr(dr2),
    .err(err_m[1]), .fixed(fixed_m[1]));
  mmc_decoder #(.K(K), .METHOD(METHOD_3), .WITH_R(1'b1)) u_dec3 (
    .c(rcode), .dout(dout_m3), .dh(dh3), .dv(dv3), .dr(dr3),
    .err(err_m[2]), .fixed(fixed_m[2]));

  always_comb begin
    unique case (method)
      2'd1: begin
        dout = dout_m1; err = err_m[0]; fixed = fixed_m[0];
        dh = dh1; dv = dv1; dr = dr1;
      end
      2'd2: begin
        dout = dout_m2; err = err_m[1]; fixed = fixed_m[1];
        dh = dh2; dv = dv2; dr = dr2;
      end
      default: begin
        dout = dout_m3; err = err_m[2]; fixed = fixed_m[2];
        dh = dh3; dv = dv3; dr = dr3;
      end
    endcase
  end

endmodule
