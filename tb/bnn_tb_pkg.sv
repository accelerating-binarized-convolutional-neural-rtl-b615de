// Testbench support for the binarized CNN accelerator: deterministic pseudo-random
// weights, batch-norm parameters and images, the weight-stream format, buffer
// layout conversion and a bit-level reference model of every layer kind.
//
// The reference works on flat activation arrays (index m*W*W + y*W + x) in the
// +1/-1 domain and pools the binarized values (max of +1/-1), so it does not share
// the hardware's integer min/max pooling or its word and line-buffer structure.
package bnn_tb_pkg;
  import bnn_pkg::*;

  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  function automatic int unsigned h4(int a, int b, int c, int d);
    return mix(32'(a) * 32'h9E3779B1 ^ mix(32'(b) + mix(32'(c) * 32'h85ebca6b ^ mix(32'(d)))));
  endfunction

  // kernel / weight bit of layer li, output o, input i, tap t (1 means -1)
  function automatic bit wbit(int li, int o, int i, int t);
    return h4(li, o, i, t)[9];
  endfunction

  function automatic int isqrt(int v);
    int r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic bn_t bnp(int li, int o, layer_t l);
    bn_t b;
    int r, v;
    int unsigned h;
    case (l.kind)
      L_FPCONV:  r = 150;
      L_BINCONV: r = isqrt(int'(l.cin) * 9) / 2;
      default:   r = isqrt(int'(l.cin)) / 2;
    endcase
    h = h4(li + 100, o, 7, 3);
    v = int'(h % (2 * r + 1)) - r;
    b.thr  = SUM_W'(v);
    b.flip = h[28];
    return b;
  endfunction

  function automatic logic [WORD-1:0] bn_word(bn_t b);
    logic [WORD-1:0] w = '0;
    w[SUM_W-1:0] = b.thr;
    w[16]        = b.flip;
    return w;
  endfunction

  function automatic logic signed [PIX_W-1:0] pix(int img, int c, int y, int x);
    return PIX_W'(h4(1000 + img, c, y, x));
  endfunction

  // Weight-stream words for output map / neuron o of layer li.
  function automatic void stream_for(int li, layer_t l, int o, int f_in,
                                     ref logic [WORD-1:0] q[$]);
    q.push_back(bn_word(bnp(li, o, l)));
    case (l.kind)
      L_FPCONV: begin
        logic [WORD-1:0] w = '0;
        for (int c = 0; c < IMG_C; c++)
          for (int t = 0; t < 9; t++) w[c*9 + t] = wbit(li, o, c, t);
        q.push_back(w);
      end
      L_BINCONV: begin
        int kw = (f_in * 9 + WORD - 1) / WORD;
        for (int g = 0; g < int'(l.cin) / f_in; g++) begin
          logic [WORD-1:0] beat [$];
          bit bits [$];
          for (int ln = 0; ln < f_in; ln++)
            for (int t = 0; t < 9; t++) bits.push_back(wbit(li, o, g * f_in + ln, t));
          while (bits.size() < kw * WORD) bits.push_back(1'b0);
          for (int b = 0; b < kw; b++) begin
            logic [WORD-1:0] w;
            for (int j = 0; j < WORD; j++) w[j] = bits[b * WORD + j];
            q.push_back(w);
          end
        end
      end
      default: begin
        for (int f = 0; f < int'(l.cin) / WORD; f++) begin
          logic [WORD-1:0] w;
          for (int j = 0; j < WORD; j++) w[j] = wbit(li, o, f * WORD + j, 0);
          q.push_back(w);
        end
      end
    endcase
  endfunction

  function automatic void layer_stream(int li, layer_t l, int f_in, ref logic [WORD-1:0] q[$]);
    for (int o = 0; o < int'(l.cout); o++) stream_for(li, l, o, f_in, q);
  endfunction

  // Buffer word index (row * f_in + lane) of activation bit a of a stack of maps
  // of width w (conv layout when a map fills whole words, flat otherwise).
  function automatic int word_of(int a, int w, int f_in, output int bitpos);
    int wpm, m, p, k;
    if (w * w >= WORD) begin
      wpm = w * w / WORD;
      m = a / (w * w);
      p = a % (w * w);
      k = p / WORD;
      bitpos = p % WORD;
      return ((m / f_in) * wpm + k) * f_in + m % f_in;
    end
    bitpos = a % WORD;
    return a / WORD;
  endfunction

  function automatic void image(int img, ref logic signed [PIX_W-1:0] im[]);
    im = new[IMG_C * IMG_W * IMG_W];
    for (int c = 0; c < IMG_C; c++)
      for (int y = 0; y < IMG_W; y++)
        for (int x = 0; x < IMG_W; x++) im[(c * IMG_W + y) * IMG_W + x] = pix(img, c, y, x);
  endfunction

  function automatic bit bin_of(int s, bn_t b);
    bit pos = b.flip ? (s <= int'(b.thr)) : (s >= int'(b.thr));
    return !pos;
  endfunction

  function automatic void ref_fpconv(int li, layer_t l, ref logic signed [PIX_W-1:0] im[],
                                     ref bit out[]);
    int w = IMG_W;
    out = new[int'(l.cout) * w * w];
    for (int o = 0; o < int'(l.cout); o++) begin
      bn_t b = bnp(li, o, l);
      for (int y = 0; y < w; y++)
        for (int x = 0; x < w; x++) begin
          int s = 0;
          for (int c = 0; c < IMG_C; c++)
            for (int t = 0; t < 9; t++) begin
              int yy = y + t / 3 - 1, xx = x + t % 3 - 1;
              if (yy >= 0 && yy < w && xx >= 0 && xx < w) begin
                int v = int'(im[(c * w + yy) * w + xx]);
                s += wbit(li, o, c, t) ? -v : v;
              end
            end
          out[(o * w + y) * w + x] = bin_of(s, b);
        end
    end
  endfunction

  function automatic void ref_binconv(int li, layer_t l, ref bit in[], ref bit out[]);
    int w = int'(l.width);
    int wo = l.pool ? w / 2 : w;
    bit ob [];
    int s [];
    ob  = new[w * w];
    s   = new[w * w];
    out = new[int'(l.cout) * wo * wo];
    for (int o = 0; o < int'(l.cout); o++) begin
      bn_t b = bnp(li, o, l);
      foreach (s[p]) s[p] = 0;
      for (int i = 0; i < int'(l.cin); i++) begin
        bit k [9];
        for (int t = 0; t < 9; t++) k[t] = wbit(li, o, i, t);
        for (int y = 0; y < w; y++)
          for (int x = 0; x < w; x++)
            for (int t = 0; t < 9; t++) begin
              int yy = y + t / 3 - 1, xx = x + t % 3 - 1;
              if (yy >= 0 && yy < w && xx >= 0 && xx < w)
                s[y * w + x] += (in[(i * w + yy) * w + xx] ^ k[t]) ? -1 : 1;
            end
      end
      foreach (s[p]) ob[p] = bin_of(s[p], b);
      for (int y = 0; y < wo; y++)
        for (int x = 0; x < wo; x++) begin
          bit v;
          if (l.pool)  // max of +1/-1 values: +1 (bit 0) if any is +1
            v = ob[(2*y) * w + 2*x] & ob[(2*y) * w + 2*x + 1] &
                ob[(2*y+1) * w + 2*x] & ob[(2*y+1) * w + 2*x + 1];
          else
            v = ob[y * w + x];
          out[(o * wo + y) * wo + x] = v;
        end
    end
  endfunction

  function automatic void ref_fc(int li, layer_t l, ref bit in[], ref bit out[], ref int score[]);
    out   = new[int'(l.cout)];
    score = new[int'(l.cout)];
    for (int o = 0; o < int'(l.cout); o++) begin
      bn_t b = bnp(li, o, l);
      int s = 0;
      for (int j = 0; j < int'(l.cin); j++) s += (in[j] ^ wbit(li, o, j, 0)) ? -1 : 1;
      out[o]   = bin_of(s, b);
      score[o] = b.flip ? int'(b.thr) - s : s - int'(b.thr);
    end
  endfunction

endpackage
