// tb_mmc_encoder - self-checking test of mmc_encoder (and of the mmc_pkg
// layout functions it uses).
// K = 8 with Hamming bits: all 256 words against the published 20-bit position
// table  V3 V2 V1 V0 H1 D7 D6 D5 R5 D4 R4 R3 H0 D3 D2 D1 R2 D0 R1 R0, plus the
// published codeword of data 00000001 (00010000000010000111).
// K = 8 without Hamming bits: 14-bit width and its contents.
// K = 16, 32, 64 with Hamming bits: random words against the reference model,
// and the codeword widths 34, 60, 110.
module tb_mmc_encoder;
  import mmc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  d8;   logic [19:0]  c8;
  logic [7:0]  d8n;  logic [13:0]  c8n;
  logic [15:0] d16;  logic [33:0]  c16;
  logic [31:0] d32;  logic [59:0]  c32;
  logic [63:0] d64;  logic [109:0] c64;

  mmc_encoder #(.K(8))                 u8  (.d(d8),  .c(c8));
  mmc_encoder #(.K(8), .WITH_R(1'b0))  u8n (.d(d8n), .c(c8n));
  mmc_encoder #(.K(16))                u16 (.d(d16), .c(c16));
  mmc_encoder #(.K(32))                u32 (.d(d32), .c(c32));
  mmc_encoder #(.K(64))                u64 (.d(d64), .c(c64));

  task automatic chk(input string what, input vec_t got, input vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk("width K8",  vec_t'($bits(c8)),  vec_t'(mmc_pkg::cw_len(8, 1'b1)));
    chk("width K16", vec_t'(34), vec_t'(mmc_pkg::cw_len(16, 1'b1)));
    chk("width K32", vec_t'(60), vec_t'(mmc_pkg::cw_len(32, 1'b1)));
    chk("width K64", vec_t'(110), vec_t'(mmc_pkg::cw_len(64, 1'b1)));
    chk("width K8 no R", vec_t'(14), vec_t'(mmc_pkg::cw_len(8, 1'b0)));

    d8 = 8'b0000_0001;
    #1;
    chk("example codeword of 00000001", vec_t'(c8), vec_t'(20'b00010000000010000111));

    for (int x = 0; x < 256; x++) begin
      logic [7:0]  D;
      logic [5:0]  R;
      logic [1:0]  H;
      logic [3:0]  V;
      logic [19:0] C;
      D = 8'(x);
      d8 = D; d8n = D;
      #1;
      R[0] = D[0]^D[1]^D[3]; R[1] = D[0]^D[2]^D[3]; R[2] = D[1]^D[2]^D[3];
      R[3] = D[4]^D[5]^D[7]; R[4] = D[4]^D[6]^D[7]; R[5] = D[5]^D[6]^D[7];
      H = {^D[7:4], ^D[3:0]};
      V = D[3:0] ^ D[7:4];
      C = {V[3], V[2], V[1], V[0], H[1], D[7], D[6], D[5], R[5], D[4], R[4], R[3],
           H[0], D[3], D[2], D[1], R[2], D[0], R[1], R[0]};
      chk("K8 codeword", vec_t'(c8), vec_t'(C));
      chk("K8 no-R codeword", vec_t'(c8n), vec_t'({V, H[1], D[7:4], H[0], D[3:0]}));
    end

    for (int n = 0; n < 300; n++) begin
      d16 = 16'($urandom);
      d32 = $urandom;
      d64 = {$urandom, $urandom};
      #1;
      chk("K16 codeword", vec_t'(c16), ref_cw(16, 1'b1, vec_t'(d16)));
      chk("K32 codeword", vec_t'(c32), ref_cw(32, 1'b1, vec_t'(d32)));
      chk("K64 codeword", vec_t'(c64), ref_cw(64, 1'b1, vec_t'(d64)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
