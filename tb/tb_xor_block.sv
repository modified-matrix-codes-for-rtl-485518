// tb_xor_block - self-checking test of xor_block: random stored and
// recomputed parity at KH = 4, M = 3 and KH = 32, M = 6; each syndrome must be
// the bitwise difference of the two.
module tb_xor_block;
  int checks = 0, failures = 0;

  logic [1:0] hs, hc, dh;   logic [3:0] vs, vc, dv;   logic [5:0] rs, rc, dr;
  logic [1:0] hs2, hc2, dh2; logic [31:0] vs2, vc2, dv2; logic [11:0] rs2, rc2, dr2;

  xor_block #(.KH(4), .M(3)) u_a (.h_s(hs), .v_s(vs), .r_s(rs), .h_c(hc), .v_c(vc), .r_c(rc),
                                  .dh(dh), .dv(dv), .dr(dr));
  xor_block #(.KH(32), .M(6)) u_b (.h_s(hs2), .v_s(vs2), .r_s(rs2), .h_c(hc2), .v_c(vc2), .r_c(rc2),
                                   .dh(dh2), .dv(dv2), .dr(dr2));

  task automatic chk(input string what, input logic [63:0] got, input logic [63:0] exp);
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
    for (int n = 0; n < 1000; n++) begin
      {hs, hc, vs, vc, rs, rc} = 24'($urandom);
      {hs2, hc2} = 4'($urandom); vs2 = $urandom; vc2 = $urandom; {rs2, rc2} = 24'($urandom);
      if (n % 5 == 0) begin hc = hs; vc = vs; rc = rs; end
      #1;
      // reference: a bit of a syndrome is set exactly where the two inputs differ
      for (int i = 0; i < 2; i++) chk("dh", 64'(dh[i]), 64'(hs[i] != hc[i]));
      for (int i = 0; i < 4; i++) chk("dv", 64'(dv[i]), 64'(vs[i] != vc[i]));
      for (int i = 0; i < 6; i++) chk("dr", 64'(dr[i]), 64'(rs[i] != rc[i]));
      for (int i = 0; i < 2; i++) chk("dh2", 64'(dh2[i]), 64'(hs2[i] != hc2[i]));
      for (int i = 0; i < 32; i++) chk("dv2", 64'(dv2[i]), 64'(vs2[i] != vc2[i]));
      for (int i = 0; i < 12; i++) chk("dr2", 64'(dr2[i]), 64'(rs2[i] != rc2[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
