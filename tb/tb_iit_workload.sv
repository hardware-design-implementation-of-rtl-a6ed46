// tb_iit_workload - sustained throughput of the 2-D inverse transform on
// realistic TU-size mixes.
//
// Real bitstreams use the four TU sizes in proportions that depend on the
// resolution and the quantiser: small TUs dominate at low resolution and
// low QP, large ones at high resolution and high QP. For each of eight such
// mixes (240p, 480p, 720p and 1080p, each at QP 22 and QP 37) this bench
// streams 200 TUs, in shuffled order, through iit_top with ap_start held
// high, so that every TU starts in the cycle after the previous ap_done.
// Every residual is compared with the matrix-product reference of
// tb_iit_ref_pkg. The bench checks that the whole sequence takes exactly
// sum(N*N + N + 10) - 1 cycles, and prints the sustained residuals per cycle
// and the clock that 60 frames/s of 4:2:0 video of that resolution would
// need (W*H*60*1.5 samples per second). The design runs at its default
// parameters.
`timescale 1ns/1ps
module tb_iit_workload;
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
  int cycle = 0;

  // ------------------------------------------------------- memory models
  int coef_mem [1024];
  int res_mem  [1024];

  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) begin
      if (coef_ce[p]) coef_q[p] <= sample_t'(coef_mem[coef_address[p]]);
      if (res_ce[p] && res_we[p]) res_mem[res_address[p]] <= int'(res_d[p]);
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  // ----------------------------------------------------------- reference
  int ref_tmp [1024];
  int ref_res [1024];

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

  // Coefficients as a decoder would see them: mostly zero, a few larger
  // low-frequency values, some random small ones.
  task automatic fill(int sz);
    for (int i = 0; i < 1024; i++) coef_mem[i] = 0;
    for (int r = 0; r < sz; r++)
      for (int c = 0; c < sz; c++)
        if (r + c < 3) coef_mem[r * sz + c] = int'($urandom_range(0, 2047)) - 1024;
        else if ($urandom_range(0, 3) == 0) coef_mem[r * sz + c] = int'($urandom_range(0, 127)) - 64;
  endtask

  task automatic check_tu(int sz);
    int bad;
    bad = 0;
    for (int i = 0; i < sz * sz; i++) begin
      checks++;
      if (res_mem[i] !== ref_res[i]) begin
        failures++;
        if (bad < 3) $display("MISMATCH N=%0d idx=%0d got=%0d exp=%0d", sz, i, res_mem[i], ref_res[i]);
        bad++;
      end
    end
  endtask

  // --------------------------------------------------------------- mixes
  // TU-size shares in per mille (4x4, 8x8, 16x16, 32x32).
  localparam int NMIX = 8;
  localparam int NTU  = 200;
  localparam int SHARE [NMIX][4] = '{
    '{705, 240,  45,  10},   // 240p,  QP 22
    '{455, 325, 170,  50},   // 240p,  QP 37
    '{563, 303, 106,  28},   // 480p,  QP 22
    '{200, 400, 276, 124},   // 480p,  QP 37
    '{360, 410, 190,  40},   // 720p,  QP 22
    '{ 40, 330, 390, 240},   // 720p,  QP 37
    '{180, 380, 280, 160},   // 1080p, QP 22
    '{ 80, 270, 370, 280}};  // 1080p, QP 37
  localparam int WIDTH  [NMIX] = '{416, 416, 832, 832, 1280, 1280, 1920, 1920};
  localparam int HEIGHT [NMIX] = '{240, 240, 480, 480, 720, 720, 1080, 1080};
  localparam int QP     [NMIX] = '{22, 37, 22, 37, 22, 37, 22, 37};

  int seq [$];
  int seen_size [4];

  task automatic build_sequence(int mix);
    int cnt;
    seq.delete();
    for (int s = 0; s < 4; s++) begin
      cnt = (SHARE[mix][s] * NTU + 500) / 1000;
      for (int i = 0; i < cnt; i++) seq.push_back(4 << s);
    end
    seq.shuffle();
  endtask

  task automatic run_mix(int mix);
    int t0, expect_cycles, samples, got;
    real spc, need_mhz;
    build_sequence(mix);
    expect_cycles = 0;
    samples = 0;
    foreach (seq[i]) begin
      expect_cycles += seq[i] * seq[i] + seq[i] + 10;
      samples += seq[i] * seq[i];
    end
    expect_cycles -= 1;   // from the first start cycle to the last ap_done cycle
    // First TU: loaded while idle.
    fill(seq[0]);
    reference(seq[0]);
    @(negedge clk);
    tu_size  = 6'(seq[0]);
    ap_start = 1'b1;
    t0 = cycle;
    for (int i = 0; i < seq.size(); i++) begin
      do @(negedge clk); while (!ap_done);
      check_tu(seq[i]);
      seen_size[$clog2(seq[i]) - 2]++;
      if (i + 1 < seq.size()) begin
        // The next TU starts in the next cycle: load its coefficients now.
        fill(seq[i + 1]);
        reference(seq[i + 1]);
        tu_size = 6'(seq[i + 1]);
      end
    end
    got = cycle - t0;
    ap_start = 1'b0;
    checks++;
    if (got != expect_cycles) begin
      failures++;
      $display("CYCLES mix %0d: got %0d expected %0d", mix, got, expect_cycles);
    end
    spc = real'(samples) / real'(got + 1);
    need_mhz = real'(WIDTH[mix]) * real'(HEIGHT[mix]) * 60.0 * 1.5 / 1.0e6 / spc;
    $display("%0dx%0d QP=%0d: %0d TUs, %0d cycles, %.3f residuals/cycle, 60 fps needs %.1f MHz",
             WIDTH[mix], HEIGHT[mix], QP[mix], seq.size(), got + 1, spc, need_mhz);
    @(negedge clk);
  endtask

  initial begin
    for (int s = 0; s < 4; s++) seen_size[s] = 0;
    for (int i = 0; i < 1024; i++) begin
      coef_mem[i] = 0;
      res_mem[i]  = 0;
    end
    clip_events = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int mix = 0; mix < NMIX; mix++) run_mix(mix);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (seen_size[s] == 0) begin failures++; $display("size %0d never run", 4 << s); end
    end
    $display("TUs per size: 4x4=%0d 8x8=%0d 16x16=%0d 32x32=%0d",
             seen_size[0], seen_size[1], seen_size[2], seen_size[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("WATCHDOG timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
