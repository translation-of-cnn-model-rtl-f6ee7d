// cnn_ref_pkg: reference model and host-side stream builder for the layer
// accelerator testbenches.
//
// The functions here recompute each layer with plain integer arithmetic, written
// separately from the RTL: a convolution with zero padding, bias, scaling by
// 2^shift with round-to-nearest (ties up), leaky slope 13/128 rounded down and
// saturation to [-128, 127]; a 2x2/2 max-pool; a global average rounded to
// nearest with ties away from zero; a softmax in floating point, given as an
// unsigned probability in 1/256 units (out_ok allows the fixed-point unit a
// difference of two units there). Maps are flat byte arrays in channel, row,
// column order. build_stream packs a layer into the 32-bit words the host sends:
// two header words, the map, then bias and weights per filter for a convolution.
package cnn_ref_pkg;

  typedef byte          bytes_t[];
  typedef int unsigned  words_t[$];

  typedef struct {
    int kind;     // 0 conv, 1 max, 2 avg, 3 softmax
    int k;        // 1 or 3
    int leaky;
    int shift;
    int cin, cout, h, w;
  } layer_t;

  function automatic longint floor_div(longint a, longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic int clip8(longint v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return int'(v);
  endfunction

  function automatic int out_size(layer_t L);
    if (L.kind == 0) return L.cout * L.h * L.w;
    if (L.kind == 1) return L.cin * (L.h / 2) * (L.w / 2);
    return L.cin;   // average pool and softmax
  endfunction

  // wts: cout x cin x k x k bytes; bias: cout ints
  function automatic bytes_t ref_layer(layer_t L, bytes_t in, bytes_t wts, int bias[]);
    bytes_t o;
    int p;
    o = new[out_size(L)];
    if (L.kind == 0) begin
      p = (L.k == 3) ? 1 : 0;
      for (int oc = 0; oc < L.cout; oc++)
        for (int x = 0; x < L.h; x++)
          for (int y = 0; y < L.w; y++) begin
            longint s, v;
            s = 0;
            for (int i = 0; i < L.cin; i++)
              for (int u = 0; u < L.k; u++)
                for (int vv = 0; vv < L.k; vv++) begin
                  int r, c;
                  r = x + u - p; c = y + vv - p;
                  if (r >= 0 && r < L.h && c >= 0 && c < L.w)
                    s += longint'(in[(i*L.h + r)*L.w + c]) *
                         longint'(wts[((oc*L.cin + i)*L.k + u)*L.k + vv]);
                end
            v = s + bias[oc];
            if (L.shift > 0) v = floor_div(v + (longint'(1) << (L.shift-1)), longint'(1) << L.shift);
            if (L.leaky != 0 && v < 0) v = floor_div(v * 13, 128);
            o[(oc*L.h + x)*L.w + y] = byte'(clip8(v));
          end
    end else if (L.kind == 1) begin
      for (int ch = 0; ch < L.cin; ch++)
        for (int x = 0; x < L.h/2; x++)
          for (int y = 0; y < L.w/2; y++) begin
            int m;
            m = -1000;
            for (int u = 0; u < 2; u++)
              for (int vv = 0; vv < 2; vv++)
                if (int'(in[(ch*L.h + 2*x+u)*L.w + 2*y+vv]) > m)
                  m = int'(in[(ch*L.h + 2*x+u)*L.w + 2*y+vv]);
            o[(ch*(L.h/2) + x)*(L.w/2) + y] = byte'(m);
          end
    end else if (L.kind == 3) begin
      real mx, tot;
      mx = -1.0e9; tot = 0.0;
      for (int j = 0; j < L.cin; j++) if (real'(in[j]) > mx) mx = real'(in[j]);
      for (int j = 0; j < L.cin; j++) tot += $exp((real'(in[j]) - mx) / real'(1 << L.shift));
      for (int j = 0; j < L.cin; j++) begin
        int pr;
        pr = $rtoi(256.0 * $exp((real'(in[j]) - mx) / real'(1 << L.shift)) / tot + 0.5);
        o[j] = byte'((pr > 255) ? 255 : pr);
      end
    end else begin
      for (int ch = 0; ch < L.cin; ch++) begin
        longint s, n, a;
        s = 0;
        n = L.h * L.w;
        for (int j = 0; j < L.h*L.w; j++) s += in[ch*L.h*L.w + j];
        a = (s < 0) ? -s : s;
        a = (a + n/2) / n;
        o[ch] = byte'(clip8((s < 0) ? -a : a));
      end
    end
    return o;
  endfunction

  function automatic void pack_bytes(ref words_t q, input bytes_t b, input int first, input int n);
    for (int j = 0; j < n; j += 4) begin
      int unsigned wd;
      wd = 0;
      for (int k = 0; k < 4; k++)
        if (j + k < n) wd |= 32'(8'(unsigned'(b[first + j + k]))) << (8*k);
      q.push_back(wd);
    end
  endfunction

  function automatic words_t build_stream(layer_t L, bytes_t in, bytes_t wts, int bias[]);
    words_t q;
    int unsigned h0, h1;
    int kk;
    h0 = (L.kind & 3) | ((L.k == 3 ? 1 : 0) << 2) | ((L.leaky & 1) << 3) |
         ((L.shift & 31) << 4) | ((L.cin & 2047) << 9) | ((L.cout & 2047) << 20);
    h1 = (L.h & 511) | ((L.w & 511) << 9);
    q.push_back(h0);
    q.push_back(h1);
    pack_bytes(q, in, 0, L.cin * L.h * L.w);
    if (L.kind == 0) begin
      kk = L.k * L.k;
      for (int oc = 0; oc < L.cout; oc++) begin
        q.push_back(32'(bias[oc]));
        pack_bytes(q, wts, oc * L.cin * kk, L.cin * kk);
      end
    end
    return q;
  endfunction

  // the fixed-point softmax may differ from the floating-point one by 2 units
  function automatic bit out_ok(layer_t L, byte got, byte exp);
    int d;
    if (L.kind != 3) return got == exp;
    d = int'(8'(got)) - int'(8'(exp));
    return (d >= -2) && (d <= 2);
  endfunction

  function automatic bytes_t rand_bytes(int n, int lo, int hi);
    bytes_t b;
    b = new[n];
    foreach (b[j]) b[j] = byte'(lo + int'($urandom_range(hi - lo)));
    return b;
  endfunction

endpackage
