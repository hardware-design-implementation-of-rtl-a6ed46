// tb_iit_pb16 - self-checking test of the 16-point 1-D inverse transform
// sub-module: random, full-range, single-coefficient and saturating lines
// back to back, both rounding shifts, latency of 2 cycles, one line per
// cycle, for both ways of writing the constant products. The work is
// done by tb_pb_harness.
`timescale 1ns/1ps
module tb_iit_pb16;
  int   checks, failures, checks_m, failures_m;
  logic finished, finished_m;

  // shift-add constants (default) and the multiplier variant
  tb_pb_harness #(.N(16)) h (.checks, .failures, .finished);
  tb_pb_harness #(.N(16), .SHIFT_ADD(1'b0)) hm (.checks(checks_m), .failures(failures_m), .finished(finished_m));

  initial begin
    #1;
    wait (finished === 1'b1 && finished_m === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + checks_m, failures + failures_m);
    $finish;
  end

  initial begin : watchdog
    #100000;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
