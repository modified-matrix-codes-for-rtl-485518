// tb_corrector_m3 - self-checking test of corrector_m3.
// K = 8: the ten worked cases (read data and syndromes in, corrected data out).
// K = 16: random read data and random syndromes against the reference rule.
module tb_corrector_m3;
  import mmc_ref_pkg::*;
  import mmc_vectors_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0]  d8,  o8;   logic [1:0] dh8;  logic [3:0] dv8; logic [5:0] dr8;
  logic [15:0] d16, o16;  logic [1:0] dh16; logic [7:0] dv16; logic [7:0] dr16;

  corrector_m3 #(.KH(4), .M(3)) u8 (.d(d8), .dh(dh8), .dv(dv8), .dr(dr8), .dout(o8));
  corrector_m3 #(.KH(8), .M(4)) u16 (.d(d16), .dh(dh16), .dv(dv16), .dr(dr16), .dout(o16));

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
    for (int i = 0; i < NCASES; i++) begin
      d8 = CASES[i].dread; dh8 = CASES[i].dh; dv8 = CASES[i].dv; dr8 = CASES[i].dr;
      #1;
      chk($sformatf("case %0d (read %b)", i, CASES[i].dread), vec_t'(o8),
          vec_t'(CASES[i].dout_m3));
    end
    for (int n = 0; n < 2000; n++) begin
      d16 = 16'($urandom); dh16 = 2'($urandom); dv16 = 8'($urandom); dr16 = 8'($urandom);
      if (n % 4 == 0) dr16 = '0;
      #1;
      chk("K16 random", vec_t'(o16),
          ref_correct(16, 3, vec_t'(d16), vec_t'(dh16), vec_t'(dv16), vec_t'(dr16)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
