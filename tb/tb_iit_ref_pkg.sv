// tb_iit_ref_pkg - reference model of the HEVC inverse transform for the
// testbenches, written independently of the RTL: the matrices are built
// from the well-known first odd rows of the 4-, 8-, 16- and 32-point HEVC
// matrices with cosine symmetry, and every 1-D pass is a plain matrix-vector
// product followed by rounding, shift and 16-bit clipping.
package tb_iit_ref_pkg;

  localparam int R32 [16] = '{90, 90, 88, 85, 82, 78, 73, 67, 61, 54, 46, 38, 31, 22, 13, 4};
  localparam int R16 [8]  = '{90, 87, 80, 70, 57, 43, 25, 9};
  localparam int R8  [4]  = '{89, 75, 50, 18};
  localparam int R4  [2]  = '{83, 36};

  function automatic int mag(int j);   // j in 1..32, in units of pi/64
    if (j == 32)    return 0;
    if (j == 16)    return 64;
    if (j % 2 == 1) return R32[(j - 1) / 2];
    if (j % 4 == 2) return R16[(j - 2) / 4];
    if (j % 8 == 4) return R8[(j - 4) / 8];
    return R4[(j - 8) / 16];
  endfunction

  // Entry (r, n) of the sz-point inverse-transform matrix.
  function automatic int tmat(int r, int n, int sz);
    int j, s;
    if (r == 0) return 64;
    j = (r * (32 / sz) * (2 * n + 1)) % 128;
    s = 1;
    if (j > 64) j = 128 - j;
    if (j > 32) begin j = 64 - j; s = -1; end
    return s * mag(j);
  endfunction

  int clip_events = 0;

  function automatic int rclip(longint v, int sh);
    longint r;
    r = (v + (longint'(1) << (sh - 1))) >>> sh;
    if (r > 32767)  begin clip_events++; return 32767; end
    if (r < -32768) begin clip_events++; return -32768; end
    return int'(r);
  endfunction

  // One output sample of a 1-D pass: out[k] of the line src[0..sz-1].
  function automatic int pass_sample(int src [32], int k, int sz, int sh);
    longint acc;
    acc = 0;
    for (int m = 0; m < sz; m++) acc += longint'(tmat(m, k, sz)) * src[m];
    return rclip(acc, sh);
  endfunction

endpackage
