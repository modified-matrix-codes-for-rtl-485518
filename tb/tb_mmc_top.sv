// tb_mmc_top - end-to-end test of mmc_top at its default size (K = 8 data
// bits, 16 words), with no parameter overrides.
// 1. Every word is written with random data and read back clean through all
//    three methods (no syndrome, no change, data intact).
// 2. The worked cases: word 0 holds 00000000, bursts of 0..8 adjacent errors
//    starting at D0 are flipped into it, and each method must return the
//    published corrected data.
// 3. Random soft errors on random data: single flips anywhere in the
//    codeword, odd and even bursts of adjacent data errors inside one row.
//    Each read is decoded by all three methods (the method input is switched
//    while the read word is held) and compared with the reference model;
//    method 3 must also return the written data for every one of these.
// 4. A write and an upset to the same word in the same cycle.
// Each mechanism (clean read, single-error correction, odd-burst and
// even-burst correction, method-1 miscorrection of an even burst, error in
// parity bits only, method switch, write/upset collision) is counted, and one
// that never happened counts as a failure. Read latency is checked: rvalid
// and the data arrive exactly one cycle after re.
module tb_mmc_top;
  import mmc_ref_pkg::*;
  import mmc_vectors_pkg::*;

  localparam int K = 8, DEPTH = 16, AW = 4;
  localparam int N = mmc_pkg::cw_len(K, 1'b1);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we = 1'b0, re = 1'b0, upset_en = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0, upset_addr = '0;
  logic [K-1:0]  wdata = '0;
  logic [N-1:0]  upset_mask = '0;
  logic [1:0]    method = 2'd3;
  logic          rvalid, err, fixed;
  logic [K-1:0]  dout, dout_m1, dout_m2, dout_m3;
  logic [N-1:0]  rcode;
  logic [1:0]    dh;
  logic [3:0]    dv;
  logic [5:0]    dr;

  logic [K-1:0]  shadow [DEPTH];

  int n_clean, n_single, n_odd, n_even, n_m1_miscorrect, n_parity_only, n_switch, n_collision;

  mmc_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input vec_t got, input vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input logic [AW-1:0] a, input logic [K-1:0] d);
    @(negedge clk); we = 1'b1; waddr = a; wdata = d; shadow[a] = d;
    @(negedge clk); we = 1'b0;
  endtask

  task automatic upset(input logic [AW-1:0] a, input logic [N-1:0] m);
    @(negedge clk); upset_en = 1'b1; upset_addr = a; upset_mask = m;
    @(negedge clk); upset_en = 1'b0;
  endtask

  // issue a read and check the one-cycle latency
  task automatic read_word(input logic [AW-1:0] a);
    @(negedge clk); re = 1'b1; raddr = a;
    chk("rvalid low before the edge", vec_t'(rvalid), 0);
    @(negedge clk); re = 1'b0;
    chk("rvalid one cycle after re", vec_t'(rvalid), 1);
  endtask

  // select a method and return dout / err / fixed for it
  task automatic use_method(input int m, output logic [K-1:0] o,
                            output logic e, output logic f);
    if (method != 2'(m)) n_switch++;
    method = 2'(m);
    #1;
    o = dout; e = err; f = fixed;
  endtask

  function automatic logic [N-1:0] data_mask(input int first, input int len);
    vec_t m = '0;
    for (int i = first; i < first + len; i++) m |= ref_cw(K, 1'b1, vec_t'(1) << i, 1'b1);
    return N'(m);
  endfunction

  initial begin
    logic [K-1:0] o;
    logic e, f;
    {n_clean, n_single, n_odd, n_even, n_m1_miscorrect, n_parity_only, n_switch, n_collision} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1: clean write / read
    for (int a = 0; a < DEPTH; a++) write_word(AW'(a), K'($urandom));
    for (int a = 0; a < DEPTH; a++) begin
      read_word(AW'(a));
      chk("stored codeword", vec_t'(rcode), ref_cw(K, 1'b1, vec_t'(shadow[a])));
      for (int m = 1; m <= 3; m++) begin
        use_method(m, o, e, f);
        chk($sformatf("clean read method %0d", m), vec_t'(o), vec_t'(shadow[a]));
        chk("clean read no error", vec_t'({e, f}), 0);
      end
      n_clean++;
    end

    // 2: worked cases on a stored zero word
    for (int len = 0; len <= 8; len++) begin
      logic [7:0] exp [3];
      write_word(4'd0, 8'h00);
      if (len > 0) upset(4'd0, data_mask(0, len));
      read_word(4'd0);
      exp = '{CASES[len].dout_m1, CASES[len].dout_m2, CASES[len].dout_m3};
      for (int m = 1; m <= 3; m++) begin
        use_method(m, o, e, f);
        chk($sformatf("burst of %0d on 00000000, method %0d", len, m), vec_t'(o), vec_t'(exp[m-1]));
      end
      chk("dH of worked case", vec_t'(dh), vec_t'(CASES[len].dh));
      chk("dV of worked case", vec_t'(dv), vec_t'(CASES[len].dv));
      chk("dR of worked case", vec_t'(dr), vec_t'(CASES[len].dr));
      if (len % 2 == 0 && len > 0 && len <= 4 && dout_m1 != 8'h00) n_m1_miscorrect++;
    end

    // 3: random soft errors
    for (int n = 0; n < 600; n++) begin
      automatic logic [AW-1:0] a = AW'($urandom);
      automatic int kind = $urandom % 3;
      automatic int row = $urandom % 2;
      automatic int len, start;
      automatic logic [N-1:0] mask;
      automatic vec_t cw;
      write_word(a, K'($urandom));
      cw = ref_cw(K, 1'b1, vec_t'(shadow[a]));
      case (kind)
        0: begin
          mask = N'(1) << ($urandom % N);
          if ((data_mask(0, K) & mask) == '0) n_parity_only++;
          n_single++;
        end
        1: begin
          len = ($urandom % 2) ? 3 : 1;
          start = $urandom % (K / 2 - len + 1);
          mask = data_mask(row * K / 2 + start, len);
          n_odd++;
        end
        default: begin
          len = ($urandom % 2) ? 4 : 2;
          start = $urandom % (K / 2 - len + 1);
          mask = data_mask(row * K / 2 + start, len);
          n_even++;
        end
      endcase
      upset(a, mask);
      read_word(a);
      for (int m = 1; m <= 3; m++) begin
        use_method(m, o, e, f);
        chk($sformatf("random error kind %0d method %0d", kind, m), vec_t'(o),
            ref_decode(K, m, cw ^ vec_t'(mask)));
        chk("error is flagged", vec_t'(e), 1);
        if (m == 1 && kind == 2 && o != shadow[a]) n_m1_miscorrect++;
      end
      chk($sformatf("method 3 recovers kind %0d", kind), vec_t'(dout_m3), vec_t'(shadow[a]));
      if (kind == 1) begin
        chk("method 1 recovers odd burst", vec_t'(dout_m1), vec_t'(shadow[a]));
        chk("method 2 recovers odd burst", vec_t'(dout_m2), vec_t'(shadow[a]));
      end
    end

    // 4: write and upset to the same word in one cycle
    @(negedge clk);
    we = 1'b1; waddr = 4'd5; wdata = 8'hC3; shadow[5] = 8'hC3;
    upset_en = 1'b1; upset_addr = 4'd5; upset_mask = data_mask(0, 1);
    @(negedge clk); we = 1'b0; upset_en = 1'b0;
    read_word(4'd5);
    use_method(3, o, e, f);
    chk("write wins over upset", vec_t'({o, e}), vec_t'({8'hC3, 1'b0}));
    n_collision++;

    $display("mechanisms: clean=%0d single=%0d odd_burst=%0d even_burst=%0d m1_miscorrect=%0d parity_only=%0d method_switch=%0d collision=%0d",
             n_clean, n_single, n_odd, n_even, n_m1_miscorrect, n_parity_only, n_switch, n_collision);
    if (n_clean == 0 || n_single == 0 || n_odd == 0 || n_even == 0 || n_m1_miscorrect == 0 ||
        n_parity_only == 0 || n_switch == 0 || n_collision == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
