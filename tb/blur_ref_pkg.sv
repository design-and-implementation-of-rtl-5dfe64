// Reference model of the separable Gaussian blur for the testbenches.
// Direct convolution on flattened images (index y*W + x) with a reflect-101
// border. Row pass: sum of pixel * weight, rounded to GUARD extra fraction
// bits and saturated to 16+GUARD bits. Column pass: sum of row results *
// weight, rounded to an integer and saturated to 16 bits. wt[j] is the
// weight at distance j from the centre (wt[0] = centre), WFRAC fraction bits.
// The reference follows the same border rule and rounding as the hardware by
// construction, but is written as a plain direct convolution.
package blur_ref_pkg;
  import nuc_pkg::*;

  function automatic int mir(int i, int n);
    if (i < 0) return -i;
    if (i > n - 1) return 2 * (n - 1) - i;
    return i;
  endfunction

  function automatic void row_pass(ref int img[], ref int o[], input int W, input int H,
                                   input int R, ref int wt[]);
    longint s;
    o = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        s = 0;
        for (int d = -R; d <= R; d++)
          s += longint'(img[y * W + mir(x + d, W)]) * longint'(wt[d < 0 ? -d : d]);
        s = (s + (64'sd1 <<< (WFRAC - GUARD - 1))) >>> (WFRAC - GUARD);
        if (s > (64'sd1 <<< (PIX_W + GUARD)) - 1) s = (64'sd1 <<< (PIX_W + GUARD)) - 1;
        o[y * W + x] = int'(s);
      end
  endfunction

  function automatic void col_pass(ref int img[], ref int o[], input int W, input int H,
                                   input int R, ref int wt[]);
    longint s;
    o = new[W * H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        s = 0;
        for (int d = -R; d <= R; d++)
          s += longint'(img[mir(y + d, H) * W + x]) * longint'(wt[d < 0 ? -d : d]);
        s = (s + (64'sd1 <<< (WFRAC + GUARD - 1))) >>> (WFRAC + GUARD);
        if (s > 65535) s = 65535;
        o[y * W + x] = int'(s);
      end
  endfunction

  function automatic void blur(ref int img[], ref int o[], input int W, input int H,
                               input int R, ref int wt[]);
    int t[];
    row_pass(img, t, W, H, R, wt);
    col_pass(t, o, W, H, R, wt);
  endfunction

  // Sampled Gaussian of standard deviation sigma, normalised so that the
  // taps sum to 1.0 (1 << WFRAC) after rounding; the centre takes the rest.
  function automatic void gauss_weights(ref int wt[], input int R, input real sigma);
    real g[], tot;
    int side;
    g = new[R + 1];
    wt = new[R + 1];
    tot = 0.0;
    for (int j = 0; j <= R; j++) begin
      g[j] = $exp(-(j * j) / (2.0 * sigma * sigma));
      tot += (j == 0) ? g[j] : 2.0 * g[j];
    end
    side = 0;
    for (int j = 1; j <= R; j++) begin
      wt[j] = int'(g[j] / tot * (1 << WFRAC));
      side += 2 * wt[j];
    end
    wt[0] = (1 << WFRAC) - side;
  endfunction
endpackage
