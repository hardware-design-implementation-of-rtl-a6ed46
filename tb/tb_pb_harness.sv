// tb_pb_harness - self-checking harness for one N-point 1-D sub-module.
//
// Feeds NLINES lines back to back (a new line every cycle, alternating the
// pass flag so that both rounding shifts are used), with random, full-range
// and single-coefficient lines, and compares every output line with the
// matrix-product reference of tb_iit_ref_pkg. Checks that each result
// appears exactly 2 cycles after its input and that tag and pass flag are
// carried along. Counts checks and failures for the caller to print.
`timescale 1ns/1ps
module tb_pb_harness #(
  parameter int N = 4,
  parameter int NLINES = 200,
  parameter bit SHIFT_ADD = 1'b1
) (
  output int  checks,
  output int  failures,
  output logic finished
);
  import iit_pkg::*;
  import tb_iit_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic            in_valid = 1'b0, in_pass2 = 1'b0;
  sample_t [N-1:0] in_line;
  logic [4:0]      in_tag = '0;
  logic            out_valid, out_pass2;
  sample_t [N-1:0] out_line;
  logic [4:0]      out_tag;

  iit_partial_butterfly #(.N(N), .SHIFT_ADD(SHIFT_ADD)) dut (
    .clk, .rst, .in_valid, .in_line, .in_tag, .in_pass2,
    .out_valid, .out_line, .out_tag, .out_pass2
  );

  int exp_mem [NLINES][32];
  int n_in = 0;
  int n_out = 0;
  int exp_tag [$];
  int exp_pass [$];
  int exp_cyc [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Output checker.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      int e [32];
      checks++;
      if (n_out >= n_in) begin
        failures++;
        $display("N=%0d unexpected output", N);
      end else begin
        int c0, t0, p0;
        for (int k = 0; k < 32; k++) e[k] = exp_mem[n_out][k];
        n_out++;
        c0 = exp_cyc.pop_front();
        t0 = exp_tag.pop_front();
        p0 = exp_pass.pop_front();
        if (cycle - c0 != 2 || int'(out_tag) != t0 || int'(out_pass2) != p0) begin
          failures++;
          $display("N=%0d wrong latency or side band", N);
        end
        for (int k = 0; k < N; k++) begin
          checks++;
          if (int'(out_line[k]) != e[k]) begin
            failures++;
            if (failures < 10) $display("N=%0d k=%0d got=%0d exp=%0d", N, k, int'(out_line[k]), e[k]);
          end
        end
      end
    end
  end

  initial begin
    int src [32];
    int e [32];
    checks = 0;
    failures = 0;
    finished = 1'b0;
    in_line = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int l = 0; l < NLINES; l++) begin
      @(negedge clk);
      for (int m = 0; m < 32; m++) src[m] = 0;
      for (int m = 0; m < N; m++) begin
        unique case (l % 4)
          0: src[m] = int'($urandom_range(0, 1023)) - 512;
          1: src[m] = int'($urandom_range(0, 65535)) - 32768;
          2: src[m] = (m == (l / 4) % N) ? 1000 : 0;
          default: src[m] = ($urandom_range(0, 1) == 0) ? 32767 : -32768;
        endcase
        in_line[m] = sample_t'(src[m]);
      end
      in_valid = 1'b1;
      in_pass2 = l[2];
      in_tag   = 5'(l);
      for (int k = 0; k < 32; k++) e[k] = (k < N) ? pass_sample(src, k, N, l[2] ? 12 : 7) : 0;
      for (int k = 0; k < 32; k++) exp_mem[l][k] = e[k];
      n_in++;
      exp_tag.push_back(l % 32);
      exp_pass.push_back((l / 4) % 2);
      exp_cyc.push_back(cycle);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (n_out != NLINES) begin
      failures++;
      $display("N=%0d only %0d of %0d lines came out", N, n_out, NLINES);
    end
    checks++;
    if (clip_events == 0) begin
      failures++;
      $display("N=%0d clipping never exercised", N);
    end
    finished = 1'b1;
  end

endmodule
