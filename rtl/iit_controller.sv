// iit_controller - block-level FSM of the inverse transform.
//
// Handshake (the block-level protocol of the document's HLS flow):
// ap_start is sampled while ap_idle is high; ap_done and ap_ready pulse
// together for one cycle when the TU has been written out. A new TU is
// accepted only after the previous one is done (initiation interval =
// latency + 1, as in the document's top-level reports). An invalid TU size
// finishes in the start cycle itself (ap_done combinational, latency 0).
//
// Sequencing for a TU of size N (size code latched at start):
//   RD1  - N*N/2 cycles, one read pair per cycle from the coefficient
//          memory: line j = column j of the coefficient block, beat b reads
//          rows 2b and 2b+1 (address row*N + j).
//   WT1  - waits until the last first-pass line is in the transpose buffer.
//   RD2  - N*N/2 cycles of read pairs from the transpose buffer, column j
//          (address row*32 + j), which applies the transposition.
//   WT2  - waits until the last residual pair has been written.
//   DONE - ap_done / ap_ready.
// The read-side signals (rd_*) describe the pair requested this cycle; the
// data returns one cycle later. Total latency from the start cycle to the
// ap_done cycle is N*N + N + 9 cycles (29, 81, 281, 1065 for N = 4..32).
// The document gives the interface signals and a per-size latency held in
// the FSM; the state split and the counters are this design's choices.
module iit_controller
  import iit_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // block-level handshake
  input  logic            ap_start,
  output logic            ap_done,
  output logic            ap_idle,
  output logic            ap_ready,
  // decoded request size
  input  logic            size_ok,
  input  size_e           size_code_in,
  input  logic [3:0]      sel_in,
  // latched size and select for the datapath
  output size_e           size_code,
  output logic [3:0]      sel,
  output logic            pass2,
  // read requests
  output logic            rd_valid,
  output logic [3:0]      rd_beat,
  output logic            rd_last,
  output logic [4:0]      rd_tag,
  output logic [1:0][AW-1:0] coef_addr,
  output logic [1:0][AW-1:0] tbuf_raddr,
  // write-side progress from the line scatter
  input  logic            wr_valid,
  input  logic            wr_last,
  input  logic [4:0]      wr_tag,
  input  logic            wr_pass2
);

  typedef enum logic [2:0] {S_IDLE, S_RD1, S_WT1, S_RD2, S_WT2, S_DONE} state_e;
  state_e state, state_n;

  logic [3:0] beat;
  logic [4:0] line;
  logic [3:0] last_beat;
  logic [4:0] last_line;
  logic       line_end, pass_end, last_write;

  always_comb begin
    last_beat  = 4'((size_of(size_code) / 2) - 1);
    last_line  = 5'(size_of(size_code) - 1);
    line_end   = (beat == last_beat);
    pass_end   = line_end && (line == last_line);
    last_write = wr_valid && wr_last && (wr_tag == last_line);
  end

  always_comb begin
    state_n  = state;
    ap_idle  = (state == S_IDLE);
    ap_done  = 1'b0;
    ap_ready = 1'b0;
    unique case (state)
      S_IDLE: if (ap_start) begin
        if (size_ok) state_n = S_RD1;
        else begin
          ap_done  = 1'b1;        // invalid size: finish at once
          ap_ready = 1'b1;
        end
      end
      S_RD1:  if (pass_end) state_n = S_WT1;
      S_WT1:  if (last_write && !wr_pass2) state_n = S_RD2;
      S_RD2:  if (pass_end) state_n = S_WT2;
      S_WT2:  if (last_write && wr_pass2) state_n = S_DONE;
      S_DONE: begin
        ap_done  = 1'b1;
        ap_ready = 1'b1;
        state_n  = S_IDLE;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      beat      <= '0;
      line      <= '0;
      size_code <= SZ4;
      sel       <= '0;
      pass2     <= 1'b0;
    end else begin
      state <= state_n;
      if (state == S_IDLE && ap_start && size_ok) begin
        size_code <= size_code_in;
        sel       <= sel_in;
        pass2     <= 1'b0;
        beat      <= '0;
        line      <= '0;
      end else if (state == S_RD1 || state == S_RD2) begin
        beat <= line_end ? 4'd0 : beat + 4'd1;
        if (line_end) line <= pass_end ? 5'd0 : line + 5'd1;
      end else if (state == S_WT1 && state_n == S_RD2) begin
        pass2 <= 1'b1;
      end
    end
  end

  // Read addresses of the current beat: rows 2b and 2b+1 of column j.
  logic [AW-1:0] row0;
  always_comb begin
    rd_valid = (state == S_RD1) || (state == S_RD2);
    rd_beat  = beat;
    rd_last  = line_end;
    rd_tag   = line;
    row0     = AW'({beat, 1'b0});
    coef_addr[0]  = AW'((row0        << (2 + size_code)) | AW'(line));
    coef_addr[1]  = AW'(((row0 + AW'(1))  << (2 + size_code)) | AW'(line));
    tbuf_raddr[0] = AW'((row0        << 5) | AW'(line));
    tbuf_raddr[1] = AW'(((row0 + AW'(1))  << 5) | AW'(line));
  end

endmodule
