// tb_hvhc_decoder - self-checking test of hvhc_decoder.
// Random codewords (not necessarily valid) at K = 8 and K = 32 with Hamming
// bits, and K = 8 without: the separated data and stored fields, and the
// recomputed H', V', R', are compared with the reference model.
module tb_hvhc_decoder;
  import mmc_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [19:0] c8;  logic [7:0]  d8;  logic [1:0] hs8, hc8;  logic [3:0]  vs8, vc8;  logic [5:0] rs8, rc8;
  logic [13:0] c8n; logic [7:0]  d8n; logic [1:0] hs8n, hc8n; logic [3:0] vs8n, vc8n; logic [5:0] rs8n, rc8n;
  logic [59:0] c32; logic [31:0] d32; logic [1:0] hs32, hc32; logic [15:0] vs32, vc32; logic [9:0] rs32, rc32;

  hvhc_decoder #(.K(8)) u8 (.c(c8), .d(d8), .h_s(hs8), .v_s(vs8), .r_s(rs8),
                            .h_c(hc8), .v_c(vc8), .r_c(rc8));
  hvhc_decoder #(.K(8), .WITH_R(1'b0)) u8n (.c(c8n), .d(d8n), .h_s(hs8n), .v_s(vs8n), .r_s(rs8n),
                            .h_c(hc8n), .v_c(vc8n), .r_c(rc8n));
  hvhc_decoder #(.K(32)) u32 (.c(c32), .d(d32), .h_s(hs32), .v_s(vs32), .r_s(rs32),
                              .h_c(hc32), .v_c(vc32), .r_c(rc32));

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
    vec_t d, h, v, r, hc, vc, rc;
    // published 8-bit example: data 00000001 stored as 00010000000010000111
    c8 = 20'b00010000000010000111;
    #1;
    chk("example data", vec_t'(d8), vec_t'(8'b00000001));
    chk("example H", vec_t'(hs8), vec_t'(2'b01));
    chk("example V", vec_t'(vs8), vec_t'(4'b0001));
    chk("example R", vec_t'(rs8), vec_t'(6'b000011));
    for (int n = 0; n < 1000; n++) begin
      c8  = 20'($urandom);
      c8n = 14'($urandom);
      c32 = {28'($urandom), $urandom};
      #1;
      ref_split(8, 1'b1, vec_t'(c8), d, h, v, r);
      ref_fields(8, d, hc, vc, rc);
      chk("K8 d", vec_t'(d8), d);     chk("K8 h", vec_t'(hs8), h);
      chk("K8 v", vec_t'(vs8), v);    chk("K8 r", vec_t'(rs8), r);
      chk("K8 h'", vec_t'(hc8), hc);  chk("K8 v'", vec_t'(vc8), vc);
      chk("K8 r'", vec_t'(rc8), rc);
      ref_split(8, 1'b0, vec_t'(c8n), d, h, v, r);
      ref_fields(8, d, hc, vc, rc);
      chk("K8n d", vec_t'(d8n), d);   chk("K8n h", vec_t'(hs8n), h);
      chk("K8n v", vec_t'(vs8n), v);  chk("K8n r", vec_t'(rs8n), '0);
      chk("K8n h'", vec_t'(hc8n), hc); chk("K8n v'", vec_t'(vc8n), vc);
      chk("K8n r'", vec_t'(rc8n), '0);
      ref_split(32, 1'b1, vec_t'(c32), d, h, v, r);
      ref_fields(32, d, hc, vc, rc);
      chk("K32 d", vec_t'(d32), d);   chk("K32 h", vec_t'(hs32), h);
      chk("K32 v", vec_t'(vs32), v);  chk("K32 r", vec_t'(rs32), r);
      chk("K32 h'", vec_t'(hc32), hc); chk("K32 v'", vec_t'(vc32), vc);
      chk("K32 r'", vec_t'(rc32), rc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
