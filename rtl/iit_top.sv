// iit_top - HEVC 2-D inverse integer transform for TUs of 4x4 to 32x32.
//
// A TU of N x N dequantised coefficients is turned into N x N residuals by
// two 1-D inverse transforms with a transposition between them. The TU size
// is decoded into a one-hot select of four pipelined 1-D sub-modules
// (4, 8, 16 and 32 points); the selected one is used twice, first on the
// coefficients (shift 7) and then on the transpose buffer (shift 12).
// Datapath of one pass:
//   read pair (2 samples/cycle) -> line gather -> 1-D sub-module ->
//   line scatter -> write pair (2 samples/cycle)
// so every pass of a TU takes N*N/2 cycles of streaming plus a short fill.
//
// Interface (the block-level and memory ports of the document's HLS flow):
//   ap_start/ap_done/ap_idle/ap_ready - block handshake, see iit_controller.
//   tu_size  - TU width 4, 8, 16 or 32, sampled with ap_start; any other
//              value ends the call at once without touching the memories.
//   coef_*   - two read ports into the caller's coefficient array, N*N
//              words in raster order (index row*N + col), 1-cycle latency.
//   res_*    - two write ports into the caller's residual array, same
//              layout; the residual at (row, col) is written to row*N + col.
// The result is bit-exact with the HEVC reference decoder's inverse DCT
// for 8-bit video: first pass along the columns of the coefficient block
// with rounding shift 7, second pass with shift 12, both clipped to 16 bits.
// Latency: N*N + N + 9 cycles from the start cycle to the ap_done cycle.
// The block structure (decoder, four sub-modules with input multiplexers,
// transpose buffer, FSM) follows the document, and so does the default
// SHIFT_ADD = 1 (constant products as shift-add sums); SHIFT_ADD = 0 gives
// its reference variant with multipliers. The two-samples-per-cycle memory
// ports match its reported interval of N*N/2 cycles per 1-D pass.
module iit_top
  import iit_pkg::*;
#(
  parameter bit SHIFT_ADD = 1'b1   // constant products as shift-add sums
) (
  input  logic                 ap_clk,
  input  logic                 ap_rst,
  input  logic                 ap_start,
  output logic                 ap_done,
  output logic                 ap_idle,
  output logic                 ap_ready,
  input  logic [5:0]           tu_size,
  // coefficient input memory, two read ports
  output logic [1:0][AW-1:0]   coef_address,
  output logic [1:0]           coef_ce,
  input  pair_t                coef_q,
  // residual output memory, two write ports
  output logic [1:0][AW-1:0]   res_address,
  output logic [1:0]           res_ce,
  output logic [1:0]           res_we,
  output pair_t                res_d
);

  // ---------------------------------------------------------------- decoder
  logic       size_ok;
  size_e      size_code_in, size_code;
  logic [3:0] sel_in, sel;

  iit_size_decoder u_dec (
    .tu_size   (tu_size),
    .size_ok   (size_ok),
    .size_code (size_code_in),
    .sel       (sel_in)
  );

  // ------------------------------------------------------------- controller
  logic                 pass2;
  logic                 rd_valid, rd_last;
  logic [3:0]           rd_beat;
  logic [4:0]           rd_tag;
  logic [1:0][AW-1:0]   coef_addr, tbuf_raddr;
  logic                 wr_valid, wr_last, wr_pass2;
  logic [3:0]           wr_beat;
  logic [4:0]           wr_tag;
  pair_t                wr_pair;

  iit_controller u_ctrl (
    .clk          (ap_clk),
    .rst          (ap_rst),
    .ap_start     (ap_start),
    .ap_done      (ap_done),
    .ap_idle      (ap_idle),
    .ap_ready     (ap_ready),
    .size_ok      (size_ok),
    .size_code_in (size_code_in),
    .sel_in       (sel_in),
    .size_code    (size_code),
    .sel          (sel),
    .pass2        (pass2),
    .rd_valid     (rd_valid),
    .rd_beat      (rd_beat),
    .rd_last      (rd_last),
    .rd_tag       (rd_tag),
    .coef_addr    (coef_addr),
    .tbuf_raddr   (tbuf_raddr),
    .wr_valid     (wr_valid),
    .wr_last      (wr_last),
    .wr_tag       (wr_tag),
    .wr_pass2     (wr_pass2)
  );

  // ------------------------------------------------------- memory requests
  logic            tb_wr;           // first-pass write into the transpose buffer
  logic [1:0]      tb_en, tb_we;
  logic [1:0][AW-1:0] tb_addr, tb_waddr;
  pair_t           tb_rdata;

  always_comb begin
    coef_address = coef_addr;
    coef_ce      = {2{rd_valid && !pass2}};
    tb_wr        = wr_valid && !wr_pass2;
    for (int p = 0; p < 2; p++) begin
      // row wr_tag, columns 2*beat and 2*beat+1
      tb_waddr[p] = AW'({wr_tag, wr_beat, 1'(p)});
      tb_en[p]    = tb_wr || (rd_valid && pass2);
      tb_we[p]    = tb_wr;
      tb_addr[p]  = tb_wr ? tb_waddr[p] : tbuf_raddr[p];
      res_address[p] = AW'((AW'(wr_tag) << (2 + size_code)) | AW'({wr_beat, 1'(p)}));
      res_ce[p]      = wr_valid && wr_pass2;
      res_we[p]      = wr_valid && wr_pass2;
    end
    res_d = wr_pair;
  end

  iit_transpose_buffer #(.DEPTH(NMAX * NMAX)) u_tbuf (
    .clk   (ap_clk),
    .en    (tb_en),
    .we    (tb_we),
    .addr  (tb_addr),
    .wdata (wr_pair),
    .rdata (tb_rdata)
  );

  // Read data returns one cycle after the request.
  logic       rq_valid, rq_last, rq_pass2;
  logic [3:0] rq_beat;
  logic [4:0] rq_tag;

  always_ff @(posedge ap_clk) begin
    if (ap_rst) rq_valid <= 1'b0;
    else        rq_valid <= rd_valid;
    rq_last  <= rd_last;
    rq_pass2 <= pass2;
    rq_beat  <= rd_beat;
    rq_tag   <= rd_tag;
  end

  // ------------------------------------------------- input mux and gather
  pair_t      src_pair;
  logic       line_valid, line_pass2;
  line_t      line;
  logic [4:0] line_tag;
  logic [3:0] unit_valid;

  iit_line_gather u_gather (
    .clk        (ap_clk),
    .rst        (ap_rst),
    .in_valid   (rq_valid),
    .in_beat    (rq_beat),
    .in_last    (rq_last),
    .in_tag     (rq_tag),
    .in_pass2   (rq_pass2),
    .in_pair    (src_pair),
    .line_valid (line_valid),
    .line       (line),
    .line_tag   (line_tag),
    .line_pass2 (line_pass2)
  );

  iit_input_mux u_mux (
    .pass2      (rq_pass2),
    .coef_pair  (coef_q),
    .tbuf_pair  (tb_rdata),
    .pair_out   (src_pair),
    .line_valid (line_valid),
    .sel        (sel),
    .unit_valid (unit_valid)
  );

  // ------------------------------------------------------ 1-D sub-modules
  logic [3:0]       u_out_valid;
  line_t            u_out_line [4];
  logic [3:0][4:0]  u_out_tag;
  logic [3:0]       u_out_pass2;

  for (genvar i = 0; i < 4; i++) begin : g_unit
    localparam int NU = 4 << i;
    sample_t [NU-1:0] out_l;

    iit_partial_butterfly #(.N(NU), .SHIFT_ADD(SHIFT_ADD)) u_pb (
      .clk       (ap_clk),
      .rst       (ap_rst),
      .in_valid  (unit_valid[i]),
      .in_line   (line[NU-1:0]),
      .in_tag    (line_tag),
      .in_pass2  (line_pass2),
      .out_valid (u_out_valid[i]),
      .out_line  (out_l),
      .out_tag   (u_out_tag[i]),
      .out_pass2 (u_out_pass2[i])
    );

    always_comb begin
      u_out_line[i] = '0;
      u_out_line[i][NU-1:0] = out_l;
    end
  end

  // Output selection by the latched one-hot select.
  logic       o_valid, o_pass2;
  line_t      o_line;
  logic [4:0] o_tag;

  always_comb begin
    o_valid = 1'b0;
    o_line  = '0;
    o_tag   = '0;
    o_pass2 = 1'b0;
    for (int i = 0; i < 4; i++)
      if (sel[i]) begin
        o_valid = u_out_valid[i];
        o_line  = u_out_line[i];
        o_tag   = u_out_tag[i];
        o_pass2 = u_out_pass2[i];
      end
  end

  iit_line_scatter u_scatter (
    .clk       (ap_clk),
    .rst       (ap_rst),
    .size_code (size_code),
    .in_valid  (o_valid),
    .in_line   (o_line),
    .in_tag    (o_tag),
    .in_pass2  (o_pass2),
    .wr_valid  (wr_valid),
    .wr_beat   (wr_beat),
    .wr_last   (wr_last),
    .wr_tag    (wr_tag),
    .wr_pass2  (wr_pass2),
    .wr_pair   (wr_pair)
  );

  // ------------------------------------------------------------ assertions
  // Only the selected sub-module ever produces a line.
  a_one_unit: assert property (@(posedge ap_clk) disable iff (ap_rst)
    $onehot0(u_out_valid));
  // A transpose-buffer port is never asked to read and write at once.
  a_tbuf_port: assert property (@(posedge ap_clk) disable iff (ap_rst)
    !(tb_wr && rd_valid && pass2));
  // Coefficients are only read in the first pass, residuals only written
  // in the second.
  a_pass_order: assert property (@(posedge ap_clk) disable iff (ap_rst)
    !(coef_ce[0] && res_we[0]));

endmodule
