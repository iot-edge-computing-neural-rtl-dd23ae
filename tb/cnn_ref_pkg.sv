// cnn_ref_pkg: straightforward reference model of the network for the
// testbenches. It computes whole feature maps with nested loops over stored
// arrays, directly from the arithmetic definition (scaled integer weights,
// bias at product scale, shift back by BITWIDTH-1, piecewise-linear tanh,
// 2x2 max pooling), independently of the streaming hardware.
package cnn_ref_pkg;
  import cnn_pkg::*;

  localparam int MAXC = 10;
  typedef int fmap_t [MAXC][IMG_H][IMG_W];

  function automatic int clamp_bias(int layer, int o);
    int b = bias_raw(layer, o);
    if (b > SCALE) return SCALE;
    if (b < -SCALE) return -SCALE;
    return b;
  endfunction

  function automatic int tanh_ref(longint s);
    longint x, ax, y;
    longint half = SCALE / 2;
    x  = s >>> (BITWIDTH - 1);            // floor division by 2**(N-1)
    ax = (x < 0) ? -x : x;
    if (ax <= half)                 y = ax;
    else if (ax < half + 2 * SCALE) y = half + (ax - half) / 4;
    else                            y = SCALE;
    return int'((x < 0) ? -y : y);
  endfunction

  function automatic longint dot_ref(int layer, int o, int cin, int k, int y, int x,
                                     const ref fmap_t in);
    longint acc = 0;
    for (int c = 0; c < cin; c++)
      for (int ky = 0; ky < k; ky++)
        for (int kx = 0; kx < k; kx++)
          acc += longint'(in[c][y+ky][x+kx]) * weight(layer, o, c, ky, kx);
    acc += longint'(clamp_bias(layer, o)) * (longint'(1) << (BITWIDTH - 1));
    return acc;
  endfunction

  function automatic void conv_ref(int layer, int cin, int cout, int iw, int ih, int k,
                                   const ref fmap_t in, ref fmap_t out);
    for (int o = 0; o < cout; o++)
      for (int y = 0; y <= ih - k; y++)
        for (int x = 0; x <= iw - k; x++)
          out[o][y][x] = tanh_ref(dot_ref(layer, o, cin, k, y, x, in));
  endfunction

  function automatic void pool_ref(int c_n, int iw, int ih, const ref fmap_t in, ref fmap_t out);
    for (int c = 0; c < c_n; c++)
      for (int y = 0; y < ih / 2; y++)
        for (int x = 0; x < iw / 2; x++) begin
          int m = in[c][2*y][2*x];
          if (in[c][2*y][2*x+1] > m)   m = in[c][2*y][2*x+1];
          if (in[c][2*y+1][2*x] > m)   m = in[c][2*y+1][2*x];
          if (in[c][2*y+1][2*x+1] > m) m = in[c][2*y+1][2*x+1];
          out[c][y][x] = m;
        end
  endfunction

  // Whole network; img holds raw pixels in channel 0. Result in out[c][y][x].
  function automatic void cnn_ref(int iw, int ih, int k, int c1, int c2,
                                  const ref fmap_t img, ref fmap_t out);
    fmap_t a, b;
    for (int y = 0; y < ih; y++)
      for (int x = 0; x < iw; x++)
        a[0][y][x] = img[0][y][x] / 2;      // 8-bit pixel to 0..127
    conv_ref(1, 1, c1, iw, ih, k, a, b);
    pool_ref(c1, iw - k + 1, ih - k + 1, b, a);
    conv_ref(2, c1, c2, (iw - k + 1) / 2, (ih - k + 1) / 2, k, a, b);
    pool_ref(c2, (iw - k + 1) / 2 - k + 1, (ih - k + 1) / 2 - k + 1, b, out);
  endfunction

endpackage
