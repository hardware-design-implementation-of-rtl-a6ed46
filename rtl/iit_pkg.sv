// iit_pkg - types, constants and arithmetic helpers shared by the HEVC
// inverse integer transform (IIT).
//
// The transform matrix of every size (4, 8, 16, 32) is derived from one
// table of 33 integers, BASE[j] ~ 64*sqrt(2)*cos(j*pi/64), with the sign
// and index folding of a cosine: row r, column n of the 32-point matrix is
// BASE folded at angle j = r*(2n+1) mod 128, and row r of the M-point
// matrix equals row r*(32/M) of the 32-point one. Row 0 is 64 everywhere.
// The integer values are those of the HEVC standard; the document only says
// that they are integer approximations of the DCT basis.
//
// Constant multiplications are written as shift-add sums over the bits of
// the (elaboration-time constant) coefficient, following the document's
// shift-add source variant that removes all multipliers.
package iit_pkg;

  localparam int NMAX = 32;              // largest transform size
  localparam int SW   = 16;              // sample width (coefficients, residuals)
  localparam int AW   = 10;              // address width of a 32x32 block
  localparam int SHIFT_1ST = 7;          // rounding shift after the first pass
  localparam int SHIFT_2ND = 12;         // after the second pass (8-bit video)

  typedef logic signed [SW-1:0] sample_t;
  typedef sample_t [NMAX-1:0]   line_t;  // one row or column of a TU
  typedef sample_t [1:0]        pair_t;  // two samples moved per cycle

  // Size code used by the 2-to-4 decoder and the controller.
  typedef enum logic [1:0] {SZ4 = 2'd0, SZ8 = 2'd1, SZ16 = 2'd2, SZ32 = 2'd3} size_e;

  localparam int BASE [33] = '{
    90, 90, 90, 90, 89, 88, 87, 85, 83, 82, 80, 78, 75, 73, 70, 67,
    64, 61, 57, 54, 50, 46, 43, 38, 36, 31, 25, 22, 18, 13,  9,  4, 0 };

  // Entry (r, n) of the 32-point inverse-transform matrix.
  function automatic int coef32(int r, int n);
    int j;
    if (r == 0) return 64;
    j = (r * (2 * n + 1)) % 128;
    if (j <= 32)      return  BASE[j];
    else if (j < 64)  return -BASE[64 - j];
    else if (j <= 96) return -BASE[j - 64];
    else              return  BASE[128 - j];
  endfunction

  // Entry (r, n) of the M-point matrix, M in {4, 8, 16, 32}.
  function automatic int coef(int r, int n, int m);
    return coef32(r * (NMAX / m), n);
  endfunction

  // x * c as a sum of shifted copies of x, one per set bit of |c| (|c| < 128).
  function automatic int shift_add_mul(int x, int c);
    int acc;
    int a;
    acc = 0;
    a = (c < 0) ? -c : c;
    for (int b = 0; b < 7; b++)
      if (a[b]) acc += x <<< b;
    return (c < 0) ? -acc : acc;
  endfunction

  // Rounding right shift and clipping to the signed 16-bit sample range.
  function automatic sample_t round_clip(int v, int sh);
    int r;
    r = (v + (1 <<< (sh - 1))) >>> sh;
    if (r > 32767)       return sample_t'(32767);
    else if (r < -32768) return sample_t'(-32768);
    else                 return sample_t'(r);
  endfunction

  function automatic int size_of(size_e s);
    return 4 << s;
  endfunction

endpackage
