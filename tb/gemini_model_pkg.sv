// gemini_model_pkg: reference model and network builder for the accelerator's testbenches.
//
// gemini_net lays a small network out the way the accelerator expects it: layer descriptors
// and weights in a weights RAM image, the input tensor in an fmaps RAM image, and every
// layer's output in its own fmaps region. While doing so it computes each layer's expected
// output with a plain loop-over-outputs model (zero padding, stride, quantization
// sat8(round(acc*scale/2^shift)), optional ReLU) that shares nothing with the RTL's loop
// nest, and the number of PE-array steps the layer should take according to the latency
// formula  ceil(M/MPAR) * rows * ceil(W/WPAR) * S*R*C  (convolution-like layers, C = 1 for
// depthwise and pooling) or  ceil(Nout/NPE) * Nin  (fully connected layers).
package gemini_model_pkg;
  import gemini_pkg::*;

  typedef struct {
    int c, h, w;   // dimensions
    int base;      // word address in every fmaps bank
  } tensor_t;

  typedef byte bytes_t[];

  class gemini_net;
    int wpar, mpar, npe, fdepth, wdepth;
    byte wmem[];        // weights RAM image: word a, byte j at a*npe + j
    byte fmem[];        // fmaps RAM image: ((bank*fdepth + addr)*mpar + lane)
    int  whead;         // next free weights word
    int  prev_hdr;      // header whose "next" field still has to be filled
    int  fhead;         // next free fmaps word
    longint exp_steps;  // sum of expected PE-array steps
    int  nlayers;
    int  n_sat, n_relu; // quantization events seen by the model

    function new(int wpar_, int mpar_, int fdepth_, int wdepth_);
      wpar = wpar_; mpar = mpar_; npe = wpar_ * mpar_;
      fdepth = fdepth_; wdepth = wdepth_;
      wmem = new[wdepth * npe];
      fmem = new[wpar * fdepth * mpar];
      foreach (wmem[i]) wmem[i] = 0;
      foreach (fmem[i]) fmem[i] = 0;
      whead = 0; prev_hdr = -1; fhead = 0; exp_steps = 0; nlayers = 0;
      n_sat = 0; n_relu = 0;
    endfunction

    static function int cdiv(int a, int b);
      return (a + b - 1) / b;
    endfunction

    function int words(tensor_t t);
      return cdiv(t.c, mpar) * t.h * cdiv(t.w, wpar);
    endfunction

    function int fm_bank(tensor_t t, int x);
      return x % wpar;
    endfunction

    function int fm_addr(tensor_t t, int c, int y, int x);
      return t.base + ((c / mpar) * t.h + y) * cdiv(t.w, wpar) + x / wpar;
    endfunction

    function int fm_index(tensor_t t, int c, int y, int x);
      return (fm_bank(t, x) * fdepth + fm_addr(t, c, y, x)) * mpar + c % mpar;
    endfunction

    function tensor_t new_tensor(int c, int h, int w);
      tensor_t t;
      t.c = c; t.h = h; t.w = w; t.base = fhead;
      fhead += words(t);
      if (fhead > fdepth) $fatal(1, "fmaps RAM too small for the network");
      return t;
    endfunction

    // Random input tensor placed in the fmaps image.
    function bytes_t input_tensor(tensor_t t);
      bytes_t d = new[t.c * t.h * t.w];
      for (int c = 0; c < t.c; c++)
        for (int y = 0; y < t.h; y++)
          for (int x = 0; x < t.w; x++) begin
            d[(c * t.h + y) * t.w + x] = byte'($urandom);
            fmem[fm_index(t, c, y, x)] = d[(c * t.h + y) * t.w + x];
          end
      return d;
    endfunction

    function void set_field(int hdr, int f, int v);
      for (int j = 0; j < 4; j++) wmem[(hdr + f) * npe + j] = byte'(v >> (8 * j));
    endfunction

    function int open_layer();
      int hdr = whead;
      if (prev_hdr >= 0) set_field(prev_hdr, F_NEXT, hdr);
      prev_hdr = hdr;
      whead += HDR_WORDS;
      set_field(hdr, F_WBASE, whead);
      nlayers++;
      return hdr;
    endfunction

    function void finish();
      int hdr = open_layer();
      set_field(hdr, F_CTRL, int'(L_END));
      nlayers--;
      if (whead > wdepth) $fatal(1, "weights RAM too small for the network");
    endfunction

    function byte quant(longint acc, int scale, int shift, bit relu);
      longint v = acc * scale;
      if (shift > 0) v = (v + (longint'(1) << (shift - 1))) >>> shift;
      if (v > 127) begin v = 127; n_sat++; end
      if (v < -128) begin v = -128; n_sat++; end
      if (relu && v < 0) begin v = 0; n_relu++; end
      return byte'(v);
    endfunction

    // Convolution, depthwise convolution or max pooling (ltype), stride 2**slog.
    function tensor_t add_conv(layer_type_e ltype, tensor_t in, bytes_t din, int m, int r,
                               int s, bit padv, bit padh, int slog, bit relu, int scale,
                               int shift, output bytes_t dout);
      int hdr, rows, ptop, pleft, lastcol, step, oh, ow, kc, kw, cin;
      tensor_t o;
      byte wt[];
      if (ltype != L_CONV) m = in.c;
      cin   = (ltype == L_CONV) ? in.c : 1;
      rows  = padv ? in.h : in.h - r + 1;
      ptop  = padv ? (r - 1) / 2 : 0;
      pleft = padh ? (s - 1) / 2 : 0;
      lastcol = padh ? in.w - 1 : in.w - s;
      step  = 1 << slog;
      oh    = (rows - 1) / step + 1;
      ow    = lastcol / step + 1;
      kc    = s * r * cin;
      kw    = cdiv(kc, wpar);
      o     = new_tensor(m, oh, ow);
      hdr   = open_layer();
      set_field(hdr, F_CTRL, int'(ltype) | (int'(relu) << 3) | (int'(padv) << 4) |
                             (int'(padh) << 5) | (slog << 6));
      set_field(hdr, F_C, in.c);  set_field(hdr, F_H, in.h);  set_field(hdr, F_W, in.w);
      set_field(hdr, F_M, m);     set_field(hdr, F_R, r);     set_field(hdr, F_S, s);
      set_field(hdr, F_IN_BASE, in.base); set_field(hdr, F_OUT_BASE, o.base);
      set_field(hdr, F_NIN, 0);   set_field(hdr, F_SCALE, scale); set_field(hdr, F_SHIFT, shift);
      set_field(hdr, F_OH, oh);   set_field(hdr, F_OW, ow);
      // weights: wt[(f*kc) + k], k = (c*r + rr)*s + ss
      wt = new[m * kc];
      if (ltype != L_POOL) begin
        foreach (wt[i]) wt[i] = byte'($signed($urandom_range(0, 14)) - 7);
        for (int f = 0; f < m; f++)
          for (int k = 0; k < kc; k++)
            wmem[(whead + (f / mpar) * kw + k / wpar) * npe + (k % wpar) * mpar + f % mpar] =
              wt[f * kc + k];
        whead += cdiv(m, mpar) * kw;
      end
      exp_steps += longint'(cdiv(m, mpar)) * rows * cdiv(in.w, wpar) * kc;
      // reference output
      dout = new[m * oh * ow];
      for (int f = 0; f < m; f++)
        for (int oy = 0; oy < oh; oy++)
          for (int ox = 0; ox < ow; ox++) begin
            longint acc = (ltype == L_POOL) ? -1000 : 0;
            for (int c = 0; c < cin; c++)
              for (int rr = 0; rr < r; rr++)
                for (int ss = 0; ss < s; ss++) begin
                  int iy = oy * step + rr - ptop;
                  int ix = ox * step + ss - pleft;
                  int ch = (ltype == L_CONV) ? c : f;
                  longint px;
                  if (iy >= 0 && iy < in.h && ix >= 0 && ix < in.w)
                    px = din[(ch * in.h + iy) * in.w + ix];
                  else
                    px = (ltype == L_POOL) ? -128 : 0;
                  if (ltype == L_POOL) acc = (px > acc) ? px : acc;
                  else acc += px * wt[f * kc + (c * r + rr) * s + ss];
                end
            dout[(f * oh + oy) * ow + ox] = quant(acc, scale, shift, relu);
          end
      return o;
    endfunction

    // Fully connected layer on all of `in` (read in word order: lane, x, y, channel group).
    function tensor_t add_fc(tensor_t in, bytes_t din, int nout, bit relu, int scale,
                             int shift, output bytes_t dout);
      int hdr, nin, ow, oc;
      tensor_t o;
      longint flat[$];
      byte wt[];
      for (int cg = 0; cg < cdiv(in.c, mpar); cg++)
        for (int y = 0; y < in.h; y++)
          for (int x = 0; x < in.w; x++)
            for (int l = 0; l < mpar && cg * mpar + l < in.c; l++)
              flat.push_back(din[((cg * mpar + l) * in.h + y) * in.w + x]);
      nin = flat.size();
      ow  = cdiv(nout, mpar);
      oc  = (nout < mpar) ? nout : mpar;
      o   = new_tensor(oc, 1, ow);
      hdr = open_layer();
      set_field(hdr, F_CTRL, int'(L_FC) | (int'(relu) << 3));
      set_field(hdr, F_C, in.c);  set_field(hdr, F_H, in.h);  set_field(hdr, F_W, in.w);
      set_field(hdr, F_M, nout);  set_field(hdr, F_R, 1);     set_field(hdr, F_S, 1);
      set_field(hdr, F_IN_BASE, in.base); set_field(hdr, F_OUT_BASE, o.base);
      set_field(hdr, F_NIN, nin); set_field(hdr, F_SCALE, scale); set_field(hdr, F_SHIFT, shift);
      set_field(hdr, F_OH, 1);    set_field(hdr, F_OW, ow);
      wt = new[nout * nin];
      foreach (wt[i]) wt[i] = byte'($signed($urandom_range(0, 14)) - 7);
      for (int n = 0; n < nout; n++)
        for (int i = 0; i < nin; i++)
          wmem[(whead + (n / npe) * nin + i) * npe + n % npe] = wt[n * nin + i];
      whead += cdiv(nout, npe) * nin;
      exp_steps += longint'(cdiv(nout, npe)) * nin;
      dout = new[oc * ow];
      foreach (dout[i]) dout[i] = 0;
      for (int n = 0; n < nout; n++) begin
        longint acc = 0;
        for (int i = 0; i < nin; i++) acc += flat[i] * wt[n * nin + i];
        dout[(n % mpar) * ow + n / mpar] = quant(acc, scale, shift, relu);
      end
      return o;
    endfunction

  endclass

endpackage
