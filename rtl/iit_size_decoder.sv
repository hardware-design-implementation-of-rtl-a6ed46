// iit_size_decoder - the 2-to-4 decoder that picks the 1-D sub-module.
//
// The TU width (4, 8, 16 or 32, as an unsigned number) is turned into a
// 2-bit size code and a one-hot select of the four sub-modules. Any other
// width is an invalid request: size_ok is low and no select bit is set,
// which the controller answers by finishing at once (latency 0), as the
// document describes for an invalid transform size. Purely combinational.
// The document names the decoder and the error case; taking the width as a
// plain number is this design's choice.
module iit_size_decoder
  import iit_pkg::*;
(
  input  logic [5:0] tu_size,
  output logic       size_ok,
  output size_e      size_code,
  output logic [3:0] sel
);

  always_comb begin
    size_ok   = 1'b1;
    size_code = SZ4;
    unique case (tu_size)
      6'd4:    size_code = SZ4;
      6'd8:    size_code = SZ8;
      6'd16:   size_code = SZ16;
      6'd32:   size_code = SZ32;
      default: size_ok   = 1'b0;
    endcase
    // 2-to-4 decode of the size code, gated by the validity check.
    sel = size_ok ? (4'b0001 << size_code) : 4'b0000;
  end

endmodule
