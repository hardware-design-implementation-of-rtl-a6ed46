// tb_iit_input_mux - random test of the source multiplexer and the line
// steering: the pair must come from the coefficient input in pass 1 and
// from the transpose buffer in pass 2, and a line strobe must reach only
// the selected sub-module.
`timescale 1ns/1ps
module tb_iit_input_mux;
  import iit_pkg::*;
  logic       pass2, line_valid;
  pair_t      coef_pair, tbuf_pair, pair_out;
  logic [3:0] sel, unit_valid;
  int checks = 0, failures = 0;

  iit_input_mux dut (.pass2, .coef_pair, .tbuf_pair, .pair_out, .line_valid, .sel, .unit_valid);

  initial begin
    for (int i = 0; i < 400; i++) begin
      pair_t      e;
      logic [3:0] ev;
      pass2      = 1'($urandom_range(0, 1));
      line_valid = 1'($urandom_range(0, 1));
      sel        = 4'(1 << $urandom_range(0, 3));
      coef_pair  = pair_t'($urandom);
      tbuf_pair  = pair_t'($urandom);
      #1;
      e  = pass2 ? tbuf_pair : coef_pair;
      ev = line_valid ? sel : 4'b0000;
      checks++;
      if (pair_out !== e || unit_valid !== ev) begin
        failures++;
        $display("pass2=%b valid=%b sel=%b: pair %h exp %h, unit %b exp %b",
                 pass2, line_valid, sel, pair_out, e, unit_valid, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
