// mmc_width_runner - testbench helper: runs one data width of mmc_top
// (K data bits, 4 words) through the code-size and burst-capability checks
// of the evaluation, and reports its own check and failure counts.
//   - codeword width must be the listed n = k + r (20, 34, 60, 110 for
//     k = 8, 16, 32, 64; r = 2 + k/2 + 2*M)
//   - every burst of 1..K/2 adjacent data errors, at every start inside the
//     lower and upper row, on a stored all-zero word and on a random word, is
//     decoded by all three methods and compared with the reference model
//   - on the all-zero word with the burst starting at the row's first bit
//     (the way the methods are evaluated), the longest burst each method
//     still corrects is measured and printed; for method 1 the odd lengths up
//     to K/2 - 1 and for method 3 all lengths up to K/2 are required to be
//     corrected at K = 8 and 16
module mmc_width_runner
  import mmc_ref_pkg::*;
#(
  parameter int K = 8
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int DEPTH = 4, AW = 2;
  localparam int N = mmc_pkg::cw_len(K, 1'b1);
  localparam int KH = K / 2;

  logic rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0, upset_addr = '0;
  logic [K-1:0]  wdata = '0;
  logic [N-1:0]  upset_mask = '0;
  logic [1:0]    method = 2'd3;
  logic          rvalid, err, fixed;
  logic [K-1:0]  dout, dout_m1, dout_m2, dout_m3;
  logic [N-1:0]  rcode;
  logic [1:0]    dh;
  logic [KH-1:0] dv;
  logic [2*mmc_pkg::ham_bits(KH)-1:0] dr;

  mmc_top #(.K(K), .DEPTH(DEPTH)) dut (.*);

  task automatic chk(input string what, input vec_t got, input vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL K=%0d %s: got %h expected %h", K, what, got, exp);
    end
  endtask

  function automatic logic [N-1:0] data_mask(input int first, input int len);
    vec_t m = '0;
    for (int i = first; i < first + len; i++) m |= ref_cw(K, 1'b1, vec_t'(1) << i, 1'b1);
    return N'(m);
  endfunction

  initial begin
    int exp_n, best [3];
    bit odd_ok;
    checks = 0; failures = 0; done = 1'b0;
    wait (start);
    @(negedge clk); rst_n = 1'b1;
    exp_n = (K == 8) ? 20 : (K == 16) ? 34 : (K == 32) ? 60 : 110;
    chk("codeword width n", vec_t'($bits(rcode)), vec_t'(exp_n));
    best = '{0, 0, 0};
    odd_ok = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int row = 0; row < 2; row++) begin
        for (int len = 1; len <= KH; len++) begin
          for (int st = 0; st + len <= KH; st++) begin
            automatic logic [K-1:0] d = (pass != 0) ? K'({$urandom, $urandom}) : '0;
            automatic logic [N-1:0] mask = data_mask(row * KH + st, len);
            automatic vec_t cw = ref_cw(K, 1'b1, vec_t'(d));
            logic [K-1:0] o [3];
            @(negedge clk); we = 1'b1; waddr = 2'd1; wdata = d;
            @(negedge clk); we = 1'b0; upset_en = 1'b1; upset_addr = 2'd1; upset_mask = mask;
            @(negedge clk); upset_en = 1'b0; re = 1'b1; raddr = 2'd1;
            @(negedge clk); re = 1'b0;
            o = '{dout_m1, dout_m2, dout_m3};
            for (int m = 1; m <= 3; m++)
              chk($sformatf("burst row %0d start %0d len %0d method %0d", row, st, len, m),
                  vec_t'(o[m-1]), ref_decode(K, m, cw ^ vec_t'(mask)));
            if (pass == 0 && row == 0 && st == 0) begin
              for (int m = 0; m < 3; m++)
                if (o[m] == '0 && best[m] == len - 1) best[m] = len;
              if (len % 2 == 1 && o[0] != '0) odd_ok = 1'b0;
            end
          end
        end
      end
    end
    $display("K=%0d n=%0d: longest burst from bit 0 corrected: method1=%0d method2=%0d method3=%0d, method1 odd bursts %0s",
             K, $bits(rcode), best[0], best[1], best[2], odd_ok ? "all corrected" : "not all corrected");
    chk("method 1 corrects every odd burst up to K/2-1", vec_t'(odd_ok), 1);
    if (K <= 16) chk("method 3 corrects bursts up to K/2", vec_t'(best[2]), vec_t'(KH));
    done = 1'b1;
  end
endmodule
