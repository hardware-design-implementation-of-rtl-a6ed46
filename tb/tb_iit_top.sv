// tb_iit_top - end-to-end test of the 2-D inverse transform at full size.
//
// Models the caller's coefficient memory (two read ports, one cycle of
// latency) and residual memory (two write ports), runs TUs of every size
// through the top and compares every residual with a reference computed
// here by plain matrix products (no butterfly), with the HEVC matrices
// built from their well-known first rows and cosine symmetry. It also
// checks the latency (N*N + N + 9 cycles), ap_idle low while busy, the
// output rate of two residuals per cycle during the second pass, the
// invalid-size path (ap_done in the start cycle, no memory access) and
// back-to-back calls with ap_start held high. Each mechanism is counted and
// must occur at least once: every TU size, an invalid size, clipping of an
// intermediate or final value, and a back-to-back start.
`timescale 1ns/1ps
module tb_iit_top;
  import iit_pkg::*;
  import tb_iit_ref_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic            ap_start = 1'b0;
  logic            ap_done, ap_idle, ap_ready;
  logic [5:0]      tu_size = 6'd4;
  logic [1:0][AW-1:0] coef_address, res_address;
  logic [1:0]      coef_ce, res_ce, res_we;
  pair_t           coef_q, res_d;

  iit_top dut (
    .ap_clk (clk), .ap_rst (rst),
    .ap_start, .ap_done, .ap_idle, .ap_ready, .tu_size,
    .coef_address, .coef_ce, .coef_q,
    .res_address, .res_ce, .res_we, .res_d
  );

  int checks = 0;
  int failures = 0;

  // --------------------------------------------------------- memory models
  int coef_mem [1024];
  int res_mem  [1024];
  int res_writes;
  int first_wr_cycle, last_wr_cycle, cycle;
  int coef_reads;

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (coef_ce[p]) coef_q[p] <= sample_t'(coef_mem[coef_address[p]]);
      if (res_ce[p] && res_we[p]) res_mem[res_address[p]] <= int'(res_d[p]);
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (coef_ce != 2'b00) coef_reads <= coef_reads + 1;
    if (res_we != 2'b00) begin
      if (res_writes == 0) first_wr_cycle <= cycle;
      last_wr_cycle <= cycle;
      res_writes <= res_writes + ((res_we == 2'b11) ? 2 : 1);
    end
  end

  // ------------------------------------------------------------ reference
  int ref_tmp [1024];
  int ref_res [1024];
  // First pass on column j of the coefficient block, result stored as
  // row j; the second pass does the same on the intermediate block.
  task automatic reference(int sz);
    int col [32];
    for (int j = 0; j < sz; j++) begin
      for (int m = 0; m < 32; m++) col[m] = (m < sz) ? coef_mem[m * sz + j] : 0;
      for (int k = 0; k < sz; k++) ref_tmp[j * sz + k] = pass_sample(col, k, sz, 7);
    end
    for (int j = 0; j < sz; j++) begin
      for (int m = 0; m < 32; m++) col[m] = (m < sz) ? ref_tmp[m * sz + j] : 0;
      for (int k = 0; k < sz; k++) ref_res[j * sz + k] = pass_sample(col, k, sz, 12);
    end
  endtask

  // ------------------------------------------------------------- stimulus
  // kind 0: DC only, 1: small random, 2: full-range random, 3: sparse
  task automatic fill(int sz, int kind);
    for (int i = 0; i < 1024; i++) coef_mem[i] = 0;
    for (int i = 0; i < sz * sz; i++) begin
      unique case (kind)
        0: coef_mem[i] = (i == 0) ? 1000 : 0;
        1: coef_mem[i] = int'($urandom_range(0, 511)) - 256;
        2: coef_mem[i] = int'($urandom_range(0, 65535)) - 32768;
        default: coef_mem[i] = ($urandom_range(0, 7) == 0) ? int'($urandom_range(0, 4095)) - 2048 : 0;
      endcase
    end
  endtask

  int seen_size [4];
  int seen_invalid, seen_b2b;

  task automatic check_result(int sz, int kind, int lat);
    int bad;
    bad = 0;
    for (int i = 0; i < sz * sz; i++) begin
      checks++;
      if (res_mem[i] !== ref_res[i]) begin
        failures++;
        if (bad < 5)
          $display("MISMATCH N=%0d kind=%0d idx=%0d got=%0d exp=%0d", sz, kind, i, res_mem[i], ref_res[i]);
        bad++;
      end
    end
    checks++;
    if (lat != sz * sz + sz + 9) begin
      failures++;
      $display("LATENCY N=%0d got=%0d exp=%0d", sz, lat, sz * sz + sz + 9);
    end
    checks++;
    if (res_writes != sz * sz || last_wr_cycle - first_wr_cycle != sz * sz / 2 - 1) begin
      failures++;
      $display("RATE N=%0d writes=%0d span=%0d", sz, res_writes, last_wr_cycle - first_wr_cycle);
    end
    checks++;
    if (coef_reads != sz * sz / 2) begin
      failures++;
      $display("READS N=%0d reads=%0d", sz, coef_reads);
    end
  endtask

  int cur_sz, cur_kind;
  task automatic prepare(int sz, int kind);
    fill(sz, kind);
    reference(sz);
    for (int i = 0; i < 1024; i++) res_mem[i] = -99999;
    res_writes = 0;
    coef_reads = 0;
    cur_sz = sz;
    cur_kind = kind;
  endtask

  // Waits for the ap_done cycle; returns with the clock low in that cycle.
  // ap_idle must be low in every cycle after the start cycle t0.
  int idle_bad;
  task automatic wait_done(int t0, output int done_cycle);
    idle_bad = 0;
    do begin
      @(negedge clk);
      if (cycle > t0 && ap_idle) idle_bad++;
    end while (!ap_done);
    done_cycle = cycle;
    checks++;
    if (idle_bad != 0) begin
      failures++;
      $display("IDLE high in %0d busy cycles", idle_bad);
    end
  endtask

  task automatic finish_one(int t0, int done_cycle);
    check_result(cur_sz, cur_kind, done_cycle - t0);
    seen_size[$clog2(cur_sz) - 2]++;
  endtask

  // One call: ap_start is raised in an idle cycle (the start cycle) and
  // dropped in the ap_done cycle, as the block protocol allows.
  task automatic run_one(int sz, int kind);
    int t0, d;
    prepare(sz, kind);
    @(negedge clk);
    tu_size  = 6'(sz);
    ap_start = 1'b1;
    t0 = cycle;
    wait_done(t0, d);
    ap_start = 1'b0;
    finish_one(t0, d);
    @(negedge clk);
  endtask

  localparam logic [5:0] BAD_SIZES [4] = '{6'd0, 6'd5, 6'd12, 6'd63};

  initial begin
    int t0, d;
    cycle = 0;
    res_writes = 0;
    coef_reads = 0;
    first_wr_cycle = 0;
    last_wr_cycle = 0;
    clip_events = 0;
    seen_invalid = 0;
    seen_b2b = 0;
    for (int i = 0; i < 4; i++) seen_size[i] = 0;
    for (int i = 0; i < 1024; i++) coef_mem[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // Every size with every stimulus kind.
    for (int s = 0; s < 4; s++)
      for (int kind = 0; kind < 4; kind++)
        run_one(4 << s, kind);

    // Invalid sizes: ap_done in the start cycle, no memory traffic.
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      tu_size = BAD_SIZES[i];
      ap_start = 1'b1;
      coef_reads = 0;
      res_writes = 0;
      #1;
      checks++;
      if (!(ap_done && ap_ready && ap_idle)) begin
        failures++;
        $display("INVALID size %0d: done=%b", BAD_SIZES[i], ap_done);
      end
      @(negedge clk);
      ap_start = 1'b0;
      repeat (5) @(posedge clk);
      checks++;
      if (coef_reads != 0 || res_writes != 0 || !ap_idle) begin
        failures++;
        $display("INVALID size %0d touched memory", BAD_SIZES[i]);
      end
      seen_invalid++;
    end

    // Back-to-back calls with size switches, ap_start held high across
    // ap_done: each next TU starts in the cycle after ap_done.
    prepare(8, 2);
    @(negedge clk);
    tu_size  = 6'd8;
    ap_start = 1'b1;
    t0 = cycle;
    wait_done(t0, d);
    finish_one(t0, d);
    prepare(32, 1);
    tu_size = 6'd32;
    t0 = cycle + 1;
    wait_done(t0, d);
    finish_one(t0, d);
    prepare(4, 2);
    tu_size = 6'd4;
    t0 = cycle + 1;
    wait_done(t0, d);
    ap_start = 1'b0;
    finish_one(t0, d);
    seen_b2b++;

    // Mechanism coverage.
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen_size[s] == 0) begin failures++; $display("size %0d never run", 4 << s); end
    end
    checks++;
    if (seen_invalid == 0) begin failures++; $display("invalid size never run"); end
    checks++;
    if (clip_events == 0) begin failures++; $display("clipping never happened"); end
    checks++;
    if (seen_b2b == 0) begin failures++; $display("back-to-back never run"); end
    $display("mechanisms: size4=%0d size8=%0d size16=%0d size32=%0d invalid=%0d clip=%0d back_to_back=%0d",
             seen_size[0], seen_size[1], seen_size[2], seen_size[3], seen_invalid, clip_events, seen_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ap_done never without a call in progress or an invalid start.
  a_done_pulse: assert property (@(posedge clk) disable iff (rst)
    ap_done |-> ap_ready);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
