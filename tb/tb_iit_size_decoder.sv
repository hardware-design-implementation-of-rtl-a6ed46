// tb_iit_size_decoder - exhaustive test of the 2-to-4 size decoder: all 64
// input values; 4, 8, 16 and 32 must give their size code and a single
// select bit, every other value size_ok = 0 and no select bit.
`timescale 1ns/1ps
module tb_iit_size_decoder;
  import iit_pkg::*;
  logic [5:0] tu_size;
  logic       size_ok;
  size_e      size_code;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  iit_size_decoder dut (.tu_size, .size_ok, .size_code, .sel);

  initial begin
    for (int v = 0; v < 64; v++) begin
      bit         ok;
      int         code;
      logic [3:0] s;
      tu_size = 6'(v);
      #1;
      ok   = (v == 4 || v == 8 || v == 16 || v == 32);
      code = (v == 8) ? 1 : (v == 16) ? 2 : (v == 32) ? 3 : 0;
      s    = ok ? 4'(1 << code) : 4'b0000;
      checks++;
      if (size_ok !== ok || sel !== s || (ok && int'(size_code) != code)) begin
        failures++;
        $display("size %0d: ok=%b code=%0d sel=%b", v, size_ok, size_code, sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
