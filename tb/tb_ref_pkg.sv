`timescale 1ps/1ps
// tb_ref_pkg: reference model of the network arithmetic used by the
// testbenches, written directly from the layer definitions (no RTL reuse).
// Maps are dynamic arrays in channel-major order, index (c*H + y)*W + x;
// values are raw Q8.8 integers. The weight store holds words of LANES
// weights grouped by LANES output channels (see zfnet_pkg).
package tb_ref_pkg;

  // Deterministic weight store contents: small signed values so that the
  // activations stay inside the 16-bit range over many layers.
  function automatic int w_hash(int unsigned addr);
    int unsigned v;
    v = addr * 32'h9E3779B1;
    v = v ^ (v >> 15);
    v = v * 32'h85EBCA77;
    v = v ^ (v >> 13);
    return int'(v % 33) - 16;
  endfunction

  localparam int L = zfnet_pkg::LANES;

  // Word w, lane l of the weight store.
  function automatic int w_lane(int unsigned word, int l);
    return w_hash(word * L + l);
  endfunction

  // Weight of output channel co at (ci, ky, kx) of a layer whose weights start
  // at word wbase: words are grouped by L output channels.
  function automatic int w_of(int wbase, int cin, int k, int co, int ci, int ky, int kx);
    return w_lane(wbase + (co / L) * cin*k*k + (ci*k + ky)*k + kx, co % L);
  endfunction

  function automatic int b_of(int wbase, int cin, int k, int cout, int co);
    return w_lane(wbase + ((cout + L - 1) / L) * cin*k*k + co / L, co % L);
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767)  return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic void ref_conv(ref int in_map[], input int cin, input int h, input int w,
                                   input int k, input int s, input int p, input int cout,
                                   input bit relu_en, input int wbase,
                                   ref int out_map[], output int oh, output int ow);
    oh = (h + 2*p - k) / s + 1;
    ow = (w + 2*p - k) / s + 1;
    out_map = new[cout*oh*ow];
    for (int co = 0; co < cout; co++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          longint acc;
          int r;
          acc = longint'(b_of(wbase, cin, k, cout, co)) * 256;
          for (int ci = 0; ci < cin; ci++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy, ix;
                iy = oy*s + ky - p;
                ix = ox*s + kx - p;
                if (iy >= 0 && iy < h && ix >= 0 && ix < w)
                  acc += longint'(in_map[(ci*h + iy)*w + ix]) *
                         longint'(w_of(wbase, cin, k, co, ci, ky, kx));
              end
          r = sat16(acc >>> 8);
          if (relu_en && r < 0) r = 0;
          out_map[(co*oh + oy)*ow + ox] = r;
        end
  endfunction

  function automatic void ref_pool(ref int in_map[], input int c, input int h, input int w,
                                   ref int out_map[], output int oh, output int ow);
    oh = (h - 2) / 2 + 1;
    ow = (w - 2) / 2 + 1;
    out_map = new[c*oh*ow];
    for (int ch = 0; ch < c; ch++)
      for (int oy = 0; oy < oh; oy++)
        for (int ox = 0; ox < ow; ox++) begin
          int m;
          m = -32768;
          for (int y = 2*oy; y < 2*oy + 3 && y < h; y++)
            for (int x = 2*ox; x < 2*ox + 3 && x < w; x++)
              if (in_map[(ch*h + y)*w + x] > m) m = in_map[(ch*h + y)*w + x];
          out_map[(ch*oh + oy)*ow + ox] = m;
        end
  endfunction

  // a / (2 + sum of squares over 5 neighbouring maps * 2^-16), Q8.8.
  function automatic void ref_lrn(ref int in_map[], input int c, input int h, input int w,
                                  ref int out_map[]);
    out_map = new[c*h*w];
    for (int ch = 0; ch < c; ch++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          longint sq, den, num;
          sq = 0;
          for (int cc = ch - 2; cc <= ch + 2; cc++)
            if (cc >= 0 && cc < c)
              sq += longint'(in_map[(cc*h + y)*w + x]) * longint'(in_map[(cc*h + y)*w + x]);
          den = 512 + (sq >> 24);
          num = longint'(in_map[(ch*h + y)*w + x]) * 256;
          out_map[(ch*h + y)*w + x] = sat16(num / den);
        end
  endfunction

  function automatic void ref_argmax(ref int scores[], input int n, output int idx,
                                     output int best);
    idx = 0;
    best = scores[0];
    for (int i = 1; i < n; i++)
      if (scores[i] > best) begin
        best = scores[i];
        idx = i;
      end
  endfunction

  // Soft-max of n Q8.8 scores as Q1.15 probabilities (round(2^15 p),
  // at most 0x7FFF), computed in floating point.
  function automatic void ref_softmax(ref int scores[], input int n, ref int probs[]);
    real m, s, p;
    m = scores[0];
    for (int i = 1; i < n; i++) if (scores[i] > m) m = scores[i];
    s = 0.0;
    for (int i = 0; i < n; i++) s += $exp((scores[i] - m) / 256.0);
    probs = new[n];
    for (int i = 0; i < n; i++) begin
      p = $exp((scores[i] - m) / 256.0) / s * 32768.0;
      probs[i] = (p >= 32767.0) ? 32767 : int'(p);
    end
  endfunction

  // Fixed-point soft-max tolerance: 4 LSB plus 1 % of the value.
  function automatic bit prob_close(int got, int expected);
    int diff;
    diff = got - expected;
    if (diff < 0) diff = -diff;
    return diff <= 4 + expected / 100;
  endfunction

  // Clocks the convolution engine takes, start to done: each position of
  // each group of L channels takes taps + 3 clocks, or as long as the writer
  // needs for the previous position's results; then the last results drain.
  function automatic longint conv_cycles(int taps, int positions, int cout);
    longint t;
    int n_prev, ngroups;
    t = 0;
    n_prev = 0;
    ngroups = (cout + L - 1) / L;
    for (int gi = 0; gi < ngroups; gi++) begin
      int n;
      n = (gi == ngroups - 1) ? cout - gi*L : L;
      for (int pi = 0; pi < positions; pi++) begin
        t += (n_prev > taps + 3) ? n_prev : taps + 3;
        n_prev = n;
      end
    end
    return t + n_prev + 1;
  endfunction

endpackage
