// tb_mmc_decoder - self-checking test of mmc_decoder for all three methods.
// K = 8: the ten worked cases, fed as read codewords of a stored all-zero word,
// must give the published corrected data of each method. Then, on random data
// at K = 8 and K = 16:
//   - random error patterns on the whole codeword against the reference decode
//   - method 3: a single error anywhere in the codeword is always removed
//   - methods 1, 2, 3: a single data-bit error, or an odd-length burst of
//     adjacent data errors inside one row, is removed
//   - method 3: an even-length burst inside one row is removed whenever the
//     row's Hamming check sees it (always true at K = 8 and K = 16)
//   - method 1 without Hamming bits (14-bit codeword): single data errors
// The err and fixed flags are checked against the syndromes and the data.
module tb_mmc_decoder;
  import mmc_pkg::*;
  import mmc_ref_pkg::*;
  import mmc_vectors_pkg::*;

  int checks = 0, failures = 0;

  logic [19:0] c8;   logic [7:0]  o8  [3];
  logic [33:0] c16;  logic [15:0] o16 [3];
  logic [13:0] c8n;  logic [7:0]  o8n;
  logic [2:0]  err8, fix8, err16, fix16;
  logic [1:0]  dh8  [3], dh16 [3];
  logic [3:0]  dv8  [3];
  logic [7:0]  dv16 [3];
  logic [5:0]  dr8  [3];
  logic [7:0]  dr16 [3];
  logic [1:0]  dhn;  logic [3:0] dvn; logic [5:0] drn; logic errn, fixn;

  localparam method_e METH [3] = '{METHOD_1, METHOD_2, METHOD_3};

  for (genvar g = 0; g < 3; g++) begin : g_dec
    mmc_decoder #(.K(8), .METHOD(METH[g])) u8 (
      .c(c8), .dout(o8[g]), .dh(dh8[g]), .dv(dv8[g]), .dr(dr8[g]),
      .err(err8[g]), .fixed(fix8[g]));
    mmc_decoder #(.K(16), .METHOD(METH[g])) u16 (
      .c(c16), .dout(o16[g]), .dh(dh16[g]), .dv(dv16[g]), .dr(dr16[g]),
      .err(err16[g]), .fixed(fix16[g]));
  end
  mmc_decoder #(.K(8), .METHOD(METHOD_1), .WITH_R(1'b0)) u8n (
    .c(c8n), .dout(o8n), .dh(dhn), .dv(dvn), .dr(drn), .err(errn), .fixed(fixn));

  task automatic chk(input string what, input vec_t got, input vec_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // data-bit position of bit i of the data word inside the codeword
  function automatic int cw_bit(input int k, input int i);
    automatic vec_t c = ref_cw(k, 1'b1, vec_t'(1) << i, 1'b1);
    for (int b = 0; b < 128; b++) if (c[b]) return b;
    return -1;
  endfunction

  initial begin
    int n_even_seen;
    n_even_seen = 0;
    // worked cases
    for (int i = 0; i < NCASES; i++) begin
      logic [7:0] exp [3];
      exp = '{CASES[i].dout_m1, CASES[i].dout_m2, CASES[i].dout_m3};
      c8 = 20'(ref_cw(8, 1'b1, vec_t'(CASES[i].dread), 1'b1));
      #1;
      for (int g = 0; g < 3; g++) begin
        chk($sformatf("case %0d method %0d", i, g + 1), vec_t'(o8[g]), vec_t'(exp[g]));
        chk($sformatf("case %0d dh", i), vec_t'(dh8[g]), vec_t'(CASES[i].dh));
        chk($sformatf("case %0d dv", i), vec_t'(dv8[g]), vec_t'(CASES[i].dv));
        chk($sformatf("case %0d dr", i), vec_t'(dr8[g]), vec_t'(CASES[i].dr));
      end
    end

    for (int n = 0; n < 3000; n++) begin
      vec_t d8v, d16v, e8, e16, cc8, cc16;
      int kh, len, start, row;
      d8v  = vec_t'(8'($urandom));
      d16v = vec_t'(16'($urandom));
      cc8  = ref_cw(8, 1'b1, d8v);
      cc16 = ref_cw(16, 1'b1, d16v);

      // 1: random error pattern, compared with the reference decoder
      e8  = vec_t'(20'($urandom) & 20'($urandom));
      e16 = vec_t'({2'($urandom), $urandom} & {2'($urandom), $urandom});
      c8 = 20'(cc8 ^ e8); c16 = 34'(cc16 ^ e16);
      #1;
      for (int g = 0; g < 3; g++) begin
        chk("K8 random errors",  vec_t'(o8[g]),  ref_decode(8,  g + 1, cc8 ^ e8));
        chk("K16 random errors", vec_t'(o16[g]), ref_decode(16, g + 1, cc16 ^ e16));
        chk("K8 err flag", vec_t'(err8[g]), vec_t'((dh8[g] != 0) || (dv8[g] != 0) || (dr8[g] != 0)));
        chk("K16 fixed flag", vec_t'(fix16[g]),
            vec_t'(vec_t'(o16[g]) != data_of(16, cc16 ^ e16)));
      end

      // 2: one error anywhere in the codeword, method 3 removes it
      c8  = 20'(cc8  ^ (vec_t'(1) << ($urandom % 20)));
      c16 = 34'(cc16 ^ (vec_t'(1) << ($urandom % 34)));
      #1;
      chk("K8 m3 single error",  vec_t'(o8[2]),  d8v);
      chk("K16 m3 single error", vec_t'(o16[2]), d16v);
      chk("K8 m3 single error flagged", vec_t'(err8[2]), vec_t'(1));

      // 3: odd burst of adjacent data errors inside one row, all methods
      for (int kk = 0; kk < 2; kk++) begin
        automatic int k = kk ? 16 : 8;
        automatic vec_t cc = kk ? cc16 : cc8;
        automatic vec_t dd = kk ? d16v : d8v;
        vec_t ce;
        kh = k / 2;
        row = $urandom % 2;
        len = 1 + 2 * ($urandom % (kh / 2));         // 1, 3, ..., kh-1
        start = $urandom % (kh - len + 1);
        ce = cc;
        for (int b = start; b < start + len; b++) ce[cw_bit(k, row * kh + b)] ^= 1'b1;
        if (kk) c16 = 34'(ce); else c8 = 20'(ce);
        #1;
        for (int g = 0; g < 3; g++)
          chk($sformatf("K%0d method %0d odd burst len %0d", k, g + 1, len),
              kk ? vec_t'(o16[g]) : vec_t'(o8[g]), dd);

        // 4: even burst inside one row, method 3
        len = 2 * (1 + $urandom % (kh / 2));         // 2, 4, ..., kh
        start = $urandom % (kh - len + 1);
        ce = cc;
        for (int b = start; b < start + len; b++) ce[cw_bit(k, row * kh + b)] ^= 1'b1;
        if (kk) c16 = 34'(ce); else c8 = 20'(ce);
        #1;
        n_even_seen++;
        chk($sformatf("K%0d method 3 even burst len %0d", k, len),
            kk ? vec_t'(o16[2]) : vec_t'(o8[2]), dd);
      end

      // 5: encoder without Hamming bits, method 1, single data error
      begin
        automatic vec_t cn = ref_cw(8, 1'b0, d8v);
        automatic int bit_i = $urandom % 8;
        cn[(bit_i / 4) * 5 + bit_i % 4] ^= 1'b1;
        c8n = 14'(cn);
        #1;
        chk("K8 no-R method 1 single error", vec_t'(o8n), d8v);
      end
    end
    if (n_even_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic vec_t data_of(input int k, input vec_t c);
    vec_t d, h, v, r;
    ref_split(k, 1'b1, c, d, h, v, r);
    return d;
  endfunction
endmodule
