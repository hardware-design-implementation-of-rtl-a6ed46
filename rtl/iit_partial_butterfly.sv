// iit_partial_butterfly - pipelined N-point 1-D HEVC inverse transform.
//
// One instance per transform size (N = 4, 8, 16, 32) forms the sub-modules
// of the IIT top. A line of N coefficients is turned into N samples with
// the even/odd ("partial butterfly") factorisation of the transform: the
// even-indexed inputs form an N/2-point inverse transform E, the odd-indexed
// ones a dense product O of size N/2 x N/2, and
//   out[k] = E[k] + O[k],  out[N-1-k] = E[k] - O[k],   k < N/2.
// The decomposition is applied down to the 2-point core, so one instance
// holds the whole 4..N cascade.
// Each result is rounded, shifted right by 7 (first pass) or 12 (second
// pass, 8-bit video) and clipped to 16 bits. SHIFT_ADD selects how the
// constant products are written: as shift-add sums (default, the document's
// multiplier-free variant) or as plain multiplications (its reference
// variant); both compute the same values.
//
// Interface: in_valid qualifies in_line, in_tag (line number, carried
// through) and in_pass2 (selects the second-pass shift). A new line may be
// given every cycle. Timing: two register stages, out_valid follows
// in_valid by 2 cycles. The document gives the algorithm family (fast
// factorisation, shift-add constants, a fully pipelined sub-module); the
// register placement and the tag/pass side band are this design's choices.
module iit_partial_butterfly
  import iit_pkg::*;
#(
  parameter int N         = 32,
  parameter bit SHIFT_ADD = 1'b1   // 1: shift-add constants, 0: multipliers
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  sample_t [N-1:0]      in_line,
  input  logic [4:0]           in_tag,
  input  logic                 in_pass2,
  output logic                 out_valid,
  output sample_t [N-1:0]      out_line,
  output logic [4:0]           out_tag,
  output logic                 out_pass2
);

  // Stage 1: input register.
  logic            s1_valid;
  sample_t [N-1:0] s1_line;
  logic [4:0]      s1_tag;
  logic            s1_pass2;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    if (in_valid) begin
      s1_line  <= in_line;
      s1_tag   <= in_tag;
      s1_pass2 <= in_pass2;
    end
  end

  function automatic int cmul(int x, int c);
    return SHIFT_ADD ? shift_add_mul(x, c) : x * c;
  endfunction

  // Butterfly cascade, evaluated on the stage-1 register.
  int res [N];
  int nxt [N];
  int odd [N/2];

  always_comb begin
    for (int k = 0; k < N; k++) begin
      res[k] = 0;
      nxt[k] = 0;
    end
    for (int k = 0; k < N / 2; k++) odd[k] = 0;
    // 2-point core on inputs 0 and N/2.
    res[0] = cmul(int'(s1_line[0]), 64) + cmul(int'(s1_line[N/2]), 64);
    res[1] = cmul(int'(s1_line[0]), 64) - cmul(int'(s1_line[N/2]), 64);
    // Levels of size m = 4 .. N use the inputs at stride N/m.
    for (int m = 4; m <= N; m = m * 2) begin
      for (int k = 0; k < m / 2; k++) begin
        odd[k] = 0;
        for (int r = 1; r < m; r = r + 2)
          odd[k] += cmul(int'(s1_line[r * (N / m)]), coef(r, k, m));
      end
      for (int k = 0; k < m / 2; k++) begin
        nxt[k]       = res[k] + odd[k];
        nxt[m-1-k]   = res[k] - odd[k];
      end
      for (int k = 0; k < m; k++) res[k] = nxt[k];
    end
  end

  // Stage 2: rounding, shift, clip.
  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= s1_valid;
    if (s1_valid) begin
      for (int k = 0; k < N; k++)
        out_line[k] <= round_clip(res[k], s1_pass2 ? SHIFT_2ND : SHIFT_1ST);
      out_tag   <= s1_tag;
      out_pass2 <= s1_pass2;
    end
  end

endmodule
