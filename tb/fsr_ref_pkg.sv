// fsr_ref_pkg: untimed reference model of the FSRCNN-s network used by the
// testbenches. It computes every layer as a plain loop over channels, pixels
// and taps on integer arrays (feature maps flattened as (c*H + y)*W + x), with
// the transposed layer written in scatter form (each low-resolution pixel adds
// its 9x9 kernel around its placed position), independently of the engine's
// tiled gather form. The fixed weights and biases are taken from fsr_pkg,
// which defines them.
package fsr_ref_pkg;
  import fsr_pkg::*;

  function automatic longint ref_post(longint acc, int l, int m, bit act);
    longint v;
    v = acc + longint'(bias_of(3'(l), 7'(m))) * 128;
    v = v >>> 7;
    if (act && v < 0) v = v >>> 2;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    return v;
  endfunction

  // same-size convolution with zero padding
  function automatic void ref_conv(input int l, input int inp[], input int cin, input int cout,
                                   input int k, input int h, input int w, input bit act,
                                   output int out[]);
    int pad;
    pad = (k - 1) / 2;
    out = new[cout * h * w];
    for (int m = 0; m < cout; m++)
      for (int y = 0; y < h; y++)
        for (int x = 0; x < w; x++) begin
          longint acc;
          acc = 0;
          for (int n = 0; n < cin; n++)
            for (int ky = 0; ky < k; ky++)
              for (int kx = 0; kx < k; kx++) begin
                int iy, ix;
                iy = y + ky - pad;
                ix = x + kx - pad;
                if (iy >= 0 && iy < h && ix >= 0 && ix < w)
                  acc += longint'(inp[(n*h + iy)*w + ix]) *
                         longint'(weight_of(3'(l), 7'(m), 7'(n), 4'(ky), 4'(kx)));
              end
          out[(m*h + y)*w + x] = int'(ref_post(acc, l, m, act));
        end
  endfunction

  // 9x9 transposed convolution, stride num/den, scatter form
  function automatic void ref_deconv(input int inp[], input int cin, input int h, input int w,
                                     input int num, input int den, output int out[],
                                     output int ho, output int wo);
    longint acc[];
    ho = (h * num + den - 1) / den;
    wo = (w * num + den - 1) / den;
    acc = new[ho * wo];
    foreach (acc[i]) acc[i] = 0;
    for (int n = 0; n < cin; n++)
      for (int i = 0; i < h; i++)
        for (int j = 0; j < w; j++)
          for (int ky = 0; ky < 9; ky++)
            for (int kx = 0; kx < 9; kx++) begin
              int oy, ox;
              oy = (i * num) / den + ky - 4;
              ox = (j * num) / den + kx - 4;
              if (oy >= 0 && oy < ho && ox >= 0 && ox < wo)
                acc[oy*wo + ox] += longint'(inp[(n*h + i)*w + j]) *
                                   longint'(weight_of(3'd4, 7'd0, 7'(n), 4'(ky), 4'(kx)));
            end
    out = new[ho * wo];
    foreach (out[i]) out[i] = int'(ref_post(acc[i], 4, 0, 1'b0));
  endfunction

  // whole network: 8-bit luma frame in, Q8.8 high-resolution frame out
  function automatic void ref_network(input int pix[], input int h, input int w,
                                      input int num, input int den, output int out[],
                                      output int ho, output int wo);
    int a[], b[];
    ref_conv(0, pix, 1, 35, 5, h, w, 1'b1, a);
    ref_conv(1, a, 35, 5, 1, h, w, 1'b1, b);
    ref_conv(2, b, 5, 5, 3, h, w, 1'b1, a);
    ref_conv(3, a, 5, 35, 1, h, w, 1'b1, b);
    ref_deconv(b, 35, h, w, num, den, out, ho, wo);
  endfunction
endpackage
