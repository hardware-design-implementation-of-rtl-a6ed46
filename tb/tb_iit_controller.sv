// tb_iit_controller - the block FSM on its own, with the datapath replaced
// by a timing model: a read marked rd_last produces, 5 cycles later, a line
// that is written out over N/2 cycles (the delays of read latency, line
// gather, the two sub-module stages and the scatter). For every size it
// checks each read address of both passes against the coefficient layout
// (row*N + col) and the transpose-buffer layout (row*32 + col), the number
// of reads per pass (N*N/2), that pass 2 starts only after the last
// first-pass write, the handshake (ap_idle, ap_done with ap_ready) and the
// latency of N*N + N + 9 cycles; then an invalid size.
`timescale 1ns/1ps
module tb_iit_controller;
  import iit_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic       ap_start = 1'b0, ap_done, ap_idle, ap_ready;
  logic       size_ok = 1'b1;
  size_e      size_code_in = SZ4, size_code;
  logic [3:0] sel_in = 4'b0001, sel;
  logic       pass2, rd_valid, rd_last;
  logic [3:0] rd_beat;
  logic [4:0] rd_tag;
  logic [1:0][AW-1:0] coef_addr, tbuf_raddr;
  logic       wr_valid = 1'b0, wr_last, wr_pass2 = 1'b0;
  logic [4:0] wr_tag = '0;
  logic [3:0] wr_beat = '0;

  iit_controller dut (.clk, .rst, .ap_start, .ap_done, .ap_idle, .ap_ready,
    .size_ok, .size_code_in, .sel_in, .size_code, .sel, .pass2,
    .rd_valid, .rd_beat, .rd_last, .rd_tag, .coef_addr, .tbuf_raddr,
    .wr_valid, .wr_last, .wr_tag, .wr_pass2);

  int checks = 0, failures = 0;
  int cur_n = 4;
  int cycle = 0;

  // Datapath timing model.
  logic [4:0] d_v;
  logic [4:0][4:0] d_tag;
  logic [4:0] d_pass;
  assign wr_last = wr_valid && (int'(wr_beat) == cur_n / 2 - 1);
  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst) begin
      d_v <= '0;
      wr_valid <= 1'b0;
    end else begin
      d_v    <= {d_v[3:0], rd_valid && rd_last};
      d_tag  <= {d_tag[3:0], rd_tag};
      d_pass <= {d_pass[3:0], pass2};
      if (d_v[3]) begin
        wr_valid <= 1'b1; wr_beat <= '0; wr_tag <= d_tag[3]; wr_pass2 <= d_pass[3];
      end else if (wr_valid) begin
        wr_beat <= wr_beat + 4'd1;
        if (wr_last) wr_valid <= 1'b0;
      end
    end
  end

  // Read-address checker, in the order the reads must come.
  int exp_line, exp_beat, exp_pass, reads [2];
  int p1_writes_done;
  always @(negedge clk) begin
    if (!rst && wr_valid && wr_last && !wr_pass2 && int'(wr_tag) == cur_n - 1) p1_writes_done = 1;
    if (!rst && rd_valid) begin
      int r0;
      r0 = 2 * exp_beat;
      checks++;
      if (int'(pass2) != exp_pass || int'(rd_tag) != exp_line || int'(rd_beat) != exp_beat ||
          (exp_pass == 0 && (int'(coef_addr[0]) != r0 * cur_n + exp_line ||
                             int'(coef_addr[1]) != (r0 + 1) * cur_n + exp_line)) ||
          (exp_pass == 1 && (int'(tbuf_raddr[0]) != r0 * 32 + exp_line ||
                             int'(tbuf_raddr[1]) != (r0 + 1) * 32 + exp_line)) ||
          (exp_pass == 1 && !p1_writes_done)) begin
        failures++;
        if (failures < 6)
          $display("N=%0d read pass %0d line %0d beat %0d: got pass %0d line %0d beat %0d addr %0d/%0d %0d/%0d",
                   cur_n, exp_pass, exp_line, exp_beat, pass2, rd_tag, rd_beat,
                   coef_addr[0], coef_addr[1], tbuf_raddr[0], tbuf_raddr[1]);
      end
      reads[exp_pass]++;
      exp_beat++;
      if (exp_beat == cur_n / 2) begin
        exp_beat = 0;
        exp_line++;
        if (exp_line == cur_n) begin exp_line = 0; exp_pass = 1; end
      end
    end
  end

  initial begin
    int t0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int s = 0; s < 4; s++) begin
      cur_n = 4 << s;
      exp_line = 0; exp_beat = 0; exp_pass = 0; reads[0] = 0; reads[1] = 0;
      p1_writes_done = 0;
      @(negedge clk);
      checks++;
      if (!ap_idle) begin failures++; $display("not idle before start"); end
      size_code_in = size_e'(s);
      sel_in = 4'(1 << s);
      ap_start = 1'b1;
      t0 = cycle;
      do @(negedge clk); while (!ap_done);
      ap_start = 1'b0;
      checks++;
      if (!ap_ready || cycle - t0 != cur_n * cur_n + cur_n + 9 || sel != 4'(1 << s) ||
          int'(size_code) != s) begin
        failures++;
        $display("N=%0d done after %0d cycles (ready=%b sel=%b)", cur_n, cycle - t0, ap_ready, sel);
      end
      checks++;
      if (reads[0] != cur_n * cur_n / 2 || reads[1] != cur_n * cur_n / 2) begin
        failures++;
        $display("N=%0d reads %0d/%0d", cur_n, reads[0], reads[1]);
      end
      @(negedge clk);
      checks++;
      if (!ap_idle || ap_done) begin failures++; $display("N=%0d not back to idle", cur_n); end
    end
    // Invalid size: done in the start cycle, no reads, stays idle.
    @(negedge clk);
    size_ok = 1'b0;
    ap_start = 1'b1;
    reads[0] = 0; reads[1] = 0;
    #1;
    checks++;
    if (!(ap_done && ap_ready && ap_idle)) begin failures++; $display("invalid size not ended at once"); end
    @(negedge clk);
    ap_start = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (reads[0] != 0 || !ap_idle) begin failures++; $display("invalid size started a pass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
