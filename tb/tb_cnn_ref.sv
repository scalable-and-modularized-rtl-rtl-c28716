// tb_cnn_ref: reference models used by the testbenches.
//
// Feature maps are held as flat int arrays, index (m * Y + y) * X + x. The
// functions compute each layer type directly from its definition (nested loops
// over maps, pixels and kernel taps), independently of the hardware schedule, and
// apply the same fixed-point rules as the hardware: arithmetic right shift,
// optional ReLU, saturation to FEAT_W bits. They also pack weights into the word
// order the CONV weight buffer and the FC weight stream expect.
package tb_cnn_ref;
  import cnn_pkg::*;

  function automatic int sat(input longint v);
    longint mx = (1 <<< (FEAT_W - 1)) - 1;
    longint mn = -(1 <<< (FEAT_W - 1));
    if (v > mx) return int'(mx);
    if (v < mn) return int'(mn);
    return int'(v);
  endfunction

  function automatic int requant(input longint acc, input int shift, input bit relu);
    longint s = acc >>> shift;
    if (relu && s < 0) s = 0;
    return sat(s);
  endfunction

  function automatic int groups(input int n);
    return (n + LANES - 1) / LANES;
  endfunction

  // convolution; w index ((o*nif + i)*k + ky)*k + kx
  function automatic void conv_ref(input layer_cfg_t c, ref int fin[], ref int w[], ref int fout[]);
    int k = int'(c.k), nif = int'(c.nif), nof = int'(c.nof);
    int xi = int'(c.xin), yi = int'(c.yin), xo = int'(c.xout), yo = int'(c.yout);
    fout = new[nof * xo * yo];
    for (int o = 0; o < nof; o++)
      for (int y = 0; y < yo; y++)
        for (int x = 0; x < xo; x++) begin
          longint acc = 0;
          for (int i = 0; i < nif; i++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy = y * int'(c.stride) + ky - int'(c.pad);
                int ix = x * int'(c.stride) + kx - int'(c.pad);
                if (iy >= 0 && ix >= 0 && iy < yi && ix < xi)
                  acc += longint'(fin[(i * yi + iy) * xi + ix]) * w[((o * nif + i) * k + ky) * k + kx];
              end
          fout[(o * yo + y) * xo + x] = requant(acc, int'(c.shift), c.relu);
        end
  endfunction

  // fan-in and output maps per group of the CONV engine that runs layer c
  function automatic int conv_nif(input layer_cfg_t c);
    return c.conv_small ? int'(SMALL_NIF) : int'(LANES);
  endfunction
  function automatic int conv_nout(input layer_cfg_t c);
    return int'(NM) / conv_nif(c);
  endfunction

  // CONV weight word `addr`, lane p*F+j (F = engine fan-in)
  function automatic int conv_wword(input layer_cfg_t c, ref int w[], input int addr, input int lane);
    int k = int'(c.k), nif = int'(c.nif), nof = int'(c.nof);
    int f = conv_nif(c), g = conv_nout(c);
    int kk = addr % k, t = addr / k;
    int ky = t % k; t = t / k;
    begin
      int ngi = (nif + f - 1) / f;
      int ig = t % ngi, og = t / ngi;
      int o = og * g + lane / f, i = ig * f + lane % f;
      if (o >= nof || i >= nif) return 0;
      return w[((o * nif + i) * k + ky) * k + kk];
    end
  endfunction

  function automatic void pool_ref(input layer_cfg_t c, ref int fin[], ref int fout[]);
    int k = int'(c.k), n = int'(c.nif);
    int xi = int'(c.xin), yi = int'(c.yin), xo = int'(c.xout), yo = int'(c.yout);
    fout = new[n * xo * yo];
    for (int m = 0; m < n; m++)
      for (int y = 0; y < yo; y++)
        for (int x = 0; x < xo; x++) begin
          longint sum = 0;
          int mx = 0;
          bit seen = 0;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++) begin
              int iy = y * int'(c.stride) + ky - int'(c.pad);
              int ix = x * int'(c.stride) + kx - int'(c.pad);
              if (iy >= 0 && ix >= 0 && iy < yi && ix < xi) begin
                int v = fin[(m * yi + iy) * xi + ix];
                sum += v;
                if (!seen || v > mx) mx = v;
                seen = 1;
              end
            end
          fout[(m * yo + y) * xo + x] = c.pool_avg ? sat((sum * longint'(c.avg_recip)) >>> 16) : mx;
        end
  endfunction

  // LRN with the scale table `lut` (Q1.15), local size c.k, index shift c.shift
  function automatic void norm_ref(input layer_cfg_t c, ref int fin[], ref int lut[], ref int fout[]);
    int n = int'(c.nif), xy = int'(c.xin) * int'(c.yin), ls = int'(c.k);
    fout = new[n * xy];
    for (int m = 0; m < n; m++)
      for (int p = 0; p < xy; p++) begin
        longint sq = 0;
        longint idx;
        for (int jj = m - (ls - 1) / 2; jj <= m - (ls - 1) / 2 + ls - 1; jj++)
          if (jj >= 0 && jj < n) sq += longint'(fin[jj * xy + p]) * fin[jj * xy + p];
        idx = sq >>> c.shift;
        if (idx > LUT_N - 1) idx = LUT_N - 1;
        fout[m * xy + p] = sat((longint'(fin[m * xy + p]) * lut[idx]) >>> 15);
      end
  endfunction

  // fully connected: input = nif maps of xin*yin, w index o*(nif*xy) + i*xy + pix
  function automatic void fc_ref(input layer_cfg_t c, ref int fin[], ref int w[], ref int fout[]);
    int nin = int'(c.nif) * int'(c.xin) * int'(c.yin), nof = int'(c.nof);
    fout = new[nof];
    for (int o = 0; o < nof; o++) begin
      longint acc = 0;
      for (int i = 0; i < nin; i++) acc += longint'(fin[i]) * w[o * nin + i];
      fout[o] = requant(acc, int'(c.shift), c.relu);
    end
  endfunction

  // FC weight word `n` of the stream, lane p*LANES+j
  function automatic int fc_wword(input layer_cfg_t c, ref int w[], input int n, input int lane);
    int xy = int'(c.xin) * int'(c.yin), nif = int'(c.nif), nof = int'(c.nof);
    int pix = n % xy, t = n / xy;
    int ig = t % groups(nif), og = t / groups(nif);
    int o = og * LANES + lane / LANES, i = ig * LANES + lane % LANES;
    if (o >= nof || i >= nif) return 0;
    return w[o * nif * xy + i * xy + pix];
  endfunction

  // number of weight words a layer takes from the stream
  function automatic int wwords(input layer_cfg_t c);
    if (c.kind == L_CONV)
      return ((int'(c.nof) + conv_nout(c) - 1) / conv_nout(c)) *
             ((int'(c.nif) + conv_nif(c) - 1) / conv_nif(c)) * int'(c.k) * int'(c.k);
    if (c.kind == L_FC)   return groups(int'(c.nof)) * groups(int'(c.nif)) * int'(c.xin) * int'(c.yin);
    return 0;
  endfunction

  // feature placement: map m in bank m % LANES, word (m / LANES) * X * Y + pixel
  function automatic int fb_bank(input int m);
    return m % LANES;
  endfunction
  function automatic int fb_addr(input int m, input int pix, input int xy);
    return (m / LANES) * xy + pix;
  endfunction

  function automatic layer_cfg_t mk(input layer_kind_e kind, input int k, input int stride,
                                    input int pad, input int xin, input int yin, input int xout,
                                    input int yout, input int nif, input int nof, input int shift,
                                    input bit relu, input bit avg);
    layer_cfg_t c;
    c = '0;
    c.kind = kind; c.k = 4'(k); c.stride = 3'(stride); c.pad = 2'(pad);
    c.xin = DIM_W'(xin); c.yin = DIM_W'(yin); c.xout = DIM_W'(xout); c.yout = DIM_W'(yout);
    c.nif = MAPS_W'(nif); c.nof = MAPS_W'(nof); c.shift = 5'(shift); c.relu = relu;
    c.pool_avg = avg; c.avg_recip = 17'((65536 + (k * k) / 2) / (k * k));
    return c;
  endfunction

endpackage
