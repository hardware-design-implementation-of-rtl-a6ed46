// iit_input_mux - source multiplexer and line steering in front of the
// four 1-D sub-modules.
//
// During the first pass the sub-modules read the external coefficient
// input; during the second pass they read the transpose buffer. This
// module selects the sample pair that feeds the shared line gatherer by
// pass, and steers a completed line's valid strobe only to the sub-module
// picked by the one-hot size select, so the other three stay idle.
// Purely combinational. The document shows one multiplexer per sub-module
// with the coefficient input and the transpose-buffer output on its inputs;
// sharing one pair-wide multiplexer ahead of one line gatherer is this
// design's choice and gives the same selection.
module iit_input_mux
  import iit_pkg::*;
(
  input  logic       pass2,       // 0: coefficient input, 1: transpose buffer
  input  pair_t      coef_pair,
  input  pair_t      tbuf_pair,
  output pair_t      pair_out,
  input  logic       line_valid,
  input  logic [3:0] sel,         // one-hot sub-module select
  output logic [3:0] unit_valid
);

  always_comb begin
    pair_out   = pass2 ? tbuf_pair : coef_pair;
    unit_valid = line_valid ? sel : 4'b0000;
  end

endmodule
