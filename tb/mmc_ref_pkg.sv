// mmc_ref_pkg - reference model of the modified matrix code, used only by the
// testbenches. It is written independently of the RTL: the codeword is built
// by walking the Hamming positions 1, 2, 3, ... of each row, and each check
// bit j is the xor of every data position whose index has bit j set.
// All vectors are 128 bits wide; k is the data width (8, 16, 32 or 64).
package mmc_ref_pkg;

  typedef logic [127:0] vec_t;

  function automatic int ref_m(input int kh);
    int m = 1;
    while ((1 << m) < kh + m + 1) m++;
    return m;
  endfunction

  function automatic int ref_n(input int k, input bit with_r);
    int kh = k / 2;
    return with_r ? 2 * (kh + ref_m(kh) + 1) + kh : 2 * (kh + 1) + kh;
  endfunction

  // Parity fields of a data word: h[1:0], v[kh-1:0], r[2m-1:0] (row 1 above row 0).
  function automatic void ref_fields(input int k, input vec_t d,
                                     output vec_t h, output vec_t v, output vec_t r);
    int kh = k / 2;
    int m  = ref_m(kh);
    h = '0; v = '0; r = '0;
    for (int row = 0; row < 2; row++) begin
      int di = 0;
      for (int pos = 1; di < kh; pos++) begin
        if ((pos & (pos - 1)) != 0) begin
          logic b = d[row*kh + di];
          h[row] ^= b;
          for (int j = 0; j < m; j++) if (pos[j]) r[row*m + j] ^= b;
          di++;
        end
      end
    end
    for (int i = 0; i < kh; i++) v[i] = d[i] ^ d[i + kh];
  endfunction

  // Codeword of a data word. With data_only set, every parity bit is left at
  // zero (the word as read after the data bits of an all-zero word flipped).
  function automatic vec_t ref_cw(input int k, input bit with_r, input vec_t d,
                                  input bit data_only = 1'b0);
    int kh = k / 2;
    int m  = ref_m(kh);
    int l  = with_r ? kh + m + 1 : kh + 1;
    vec_t h, v, r, c;
    ref_fields(k, d, h, v, r);
    if (data_only) begin h = '0; v = '0; r = '0; end
    c = '0;
    for (int row = 0; row < 2; row++) begin
      if (with_r) begin
        int di = 0, cj = 0;
        for (int pos = 1; pos <= kh + m; pos++) begin
          if ((pos & (pos - 1)) == 0) begin c[row*l + pos - 1] = r[row*m + cj]; cj++; end
          else begin c[row*l + pos - 1] = d[row*kh + di]; di++; end
        end
      end else begin
        for (int i = 0; i < kh; i++) c[row*l + i] = d[row*kh + i];
      end
      c[row*l + l - 1] = h[row];
    end
    for (int i = 0; i < kh; i++) c[2*l + i] = v[i];
    return c;
  endfunction

  // Split a codeword into data and stored fields.
  function automatic void ref_split(input int k, input bit with_r, input vec_t c,
                                    output vec_t d, output vec_t h,
                                    output vec_t v, output vec_t r);
    int kh = k / 2;
    int m  = ref_m(kh);
    int l  = with_r ? kh + m + 1 : kh + 1;
    d = '0; h = '0; v = '0; r = '0;
    for (int row = 0; row < 2; row++) begin
      if (with_r) begin
        int di = 0, cj = 0;
        for (int pos = 1; pos <= kh + m; pos++) begin
          if ((pos & (pos - 1)) == 0) begin r[row*m + cj] = c[row*l + pos - 1]; cj++; end
          else begin d[row*kh + di] = c[row*l + pos - 1]; di++; end
        end
      end else begin
        for (int i = 0; i < kh; i++) d[row*kh + i] = c[row*l + i];
      end
      h[row] = c[row*l + l - 1];
    end
    for (int i = 0; i < kh; i++) v[i] = c[2*l + i];
  endfunction

  // Correction rule of each method, from read data and syndromes.
  function automatic vec_t ref_correct(input int k, input int method, input vec_t d,
                                       input vec_t dh, input vec_t dv, input vec_t dr);
    int kh = k / 2;
    int m  = ref_m(kh);
    vec_t o = d;
    for (int row = 0; row < 2; row++) begin
      logic rflag = 1'b0, rpar = 1'b0, vpar = 1'b0, use_dv, const_fill;
      for (int j = 0; j < m; j++) begin rflag |= dr[row*m + j]; rpar ^= dr[row*m + j]; end
      for (int i = 0; i < kh; i++) vpar ^= dv[i];
      const_fill = 1'b0;
      case (method)
        1: use_dv = !(dh[1:0] == (row == 0 ? 2'b10 : 2'b01));
        2: begin use_dv = dh[row]; const_fill = !dh[row] && rflag; end
        default: use_dv = dh[row] || rflag;
      endcase
      for (int i = 0; i < kh; i++) begin
        if (use_dv)          o[row*kh + i] = d[row*kh + i] ^ dv[i];
        else if (const_fill) o[row*kh + i] = rpar ^ vpar;
      end
    end
    return o;
  endfunction

  // Full decode of a codeword.
  function automatic vec_t ref_decode(input int k, input int method, input vec_t c);
    vec_t d, hs, vs, rs, hc, vc, rc;
    ref_split(k, 1'b1, c, d, hs, vs, rs);
    ref_fields(k, d, hc, vc, rc);
    return ref_correct(k, method, d, hs ^ hc, vs ^ vc, rs ^ rc);
  endfunction

endpackage
