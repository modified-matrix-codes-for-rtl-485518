// tb_parity_encoder - self-checking test of parity_encoder.
// K = 8: all 256 data words against the published parity equations
//   R0 = D0^D1^D3, R1 = D0^D2^D3, R2 = D1^D2^D3, R3 = D4^D5^D7, R4 = D4^D6^D7,
//   R5 = D5^D6^D7, H0 = ^D[3:0], H1 = ^D[7:4], V[i] = D[i]^D[i+4].
// K = 16, 32, 64: random words against the reference model.
module tb_parity_encoder;
  import mmc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  d8;  logic [1:0] h8;  logic [3:0]  v8;  logic [5:0]  r8;
  logic [15:0] d16; logic [1:0] h16; logic [7:0]  v16; logic [7:0]  r16;
  logic [31:0] d32; logic [1:0] h32; logic [15:0] v32; logic [9:0]  r32;
  logic [63:0] d64; logic [1:0] h64; logic [31:0] v64; logic [11:0] r64;

  parity_encoder #(.K(8))  u8  (.d(d8),  .h(h8),  .v(v8),  .r(r8));
  parity_encoder #(.K(16)) u16 (.d(d16), .h(h16), .v(v16), .r(r16));
  parity_encoder #(.K(32)) u32 (.d(d32), .h(h32), .v(v32), .r(r32));
  parity_encoder #(.K(64)) u64 (.d(d64), .h(h64), .v(v64), .r(r64));

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
    vec_t eh, ev, er;
    for (int x = 0; x < 256; x++) begin
      logic [7:0] D;
      logic [5:0] R;
      D = 8'(x);
      d8 = D;
      #1;
      R[0] = D[0]^D[1]^D[3]; R[1] = D[0]^D[2]^D[3]; R[2] = D[1]^D[2]^D[3];
      R[3] = D[4]^D[5]^D[7]; R[4] = D[4]^D[6]^D[7]; R[5] = D[5]^D[6]^D[7];
      chk("K8 R", vec_t'(r8), vec_t'(R));
      chk("K8 H", vec_t'(h8), vec_t'({^D[7:4], ^D[3:0]}));
      chk("K8 V", vec_t'(v8), vec_t'(4'(D[3:0] ^ D[7:4])));
    end
    for (int n = 0; n < 300; n++) begin
      d16 = 16'($urandom);
      d32 = $urandom;
      d64 = {$urandom, $urandom};
      #1;
      ref_fields(16, vec_t'(d16), eh, ev, er);
      chk("K16 H", vec_t'(h16), eh); chk("K16 V", vec_t'(v16), ev); chk("K16 R", vec_t'(r16), er);
      ref_fields(32, vec_t'(d32), eh, ev, er);
      chk("K32 H", vec_t'(h32), eh); chk("K32 V", vec_t'(v32), ev); chk("K32 R", vec_t'(r32), er);
      ref_fields(64, vec_t'(d64), eh, ev, er);
      chk("K64 H", vec_t'(h64), eh); chk("K64 V", vec_t'(v64), ev); chk("K64 R", vec_t'(r64), er);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
