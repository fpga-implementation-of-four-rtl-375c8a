// ica_ref_pkg: bit-true reference model of the ICA arithmetic for the
// testbenches, written directly from the number formats (see ica_pkg):
// sigmoid table, one training pass, learning rate and output encoding.
package ica_ref_pkg;

  typedef longint lvec4_t [4];
  typedef longint lmat_t  [16];

  function automatic longint asr(input longint v, input int s);
    return v >>> s;
  endfunction

  function automatic longint sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // y = g(u), u with 14 fraction bits, y with 10 fraction bits
  function automatic longint sigmoid_ref(input longint u);
    longint a, k, t;
    a = (u < 0) ? -u : u;
    if (a >= (longint'(8) << 14)) t = 1024;
    else begin
      k = a >> 8;
      t = longint'($floor(1024.0 / (1.0 + $exp(-(real'(k) + 0.5) / 64.0)) + 0.5));
    end
    return (u < 0) ? 1024 - t : t;
  endfunction

  function automatic longint lrate_ref(input int pass);
    return 4096 / (pass + 1);
  endfunction

  // One training pass over nsamp samples. x[s*4 + c] raw 8-bit samples.
  function automatic void train_pass(ref lmat_t w, ref lvec4_t b,
                                     ref longint x [], input int nsamp,
                                     input lvec4_t mean, input longint lrate,
                                     input int log2t);
    longint s [16];
    longint sb [4];
    longint xc [4], u [4], phi [4];
    lmat_t  wn;
    foreach (s[e]) s[e] = 0;
    foreach (sb[i]) sb[i] = 0;
    for (int n = 0; n < nsamp; n++) begin
      for (int c = 0; c < 4; c++) xc[c] = x[n*4 + c] - mean[c];
      for (int i = 0; i < 4; i++) begin
        longint d = 0;
        for (int j = 0; j < 4; j++) d += w[4*i+j] * xc[j];
        u[i] = asr(d, 7) + b[i];
      end
      for (int i = 0; i < 4; i++) phi[i] = 1024 - 2 * sigmoid_ref(u[i]);
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) s[4*i+j] += phi[i] * u[j];
        sb[i] += phi[i];
      end
    end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        longint acc = 0;
        for (int k = 0; k < 4; k++) begin
          longint m, a;
          m = asr(s[4*i+k], 10 + log2t) + ((i == k) ? 16384 : 0);
          a = asr(m * lrate, 20);
          acc += a * w[4*k+j];
        end
        wn[4*i+j] = sat16(w[4*i+j] + asr(acc, 14));
      end
    for (int i = 0; i < 4; i++) b[i] = sat16(b[i] + asr(sb[i] * lrate, 20 + log2t - 4));
    w = wn;
  endfunction

  // sum |w_new - w_old|
  function automatic longint wdist(input lmat_t a, input lmat_t b);
    longint d = 0;
    for (int e = 0; e < 16; e++) d += (a[e] > b[e]) ? a[e] - b[e] : b[e] - a[e];
    return d;
  endfunction

  // output byte of one channel: y = W (x - mean) on the sample scale
  function automatic int encode_ref(input longint y);
    longint r;
    r = asr(y + 8192, 14) + 128;
    if (r < 0) return 0;
    if (r > 254) return 254;
    return int'(r);
  endfunction

endpackage
