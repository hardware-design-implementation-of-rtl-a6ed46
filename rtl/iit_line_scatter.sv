// iit_line_scatter - emits a transformed line as two samples per cycle.
//
// A line from the selected sub-module is captured when in_valid is high
// and sent out over the next N/2 cycles as pairs (lanes 2*beat, 2*beat+1),
// with its tag, pass flag, beat number and a last-beat flag, for writing
// into the transpose buffer (pass 1) or the residual output (pass 2).
// Lines arrive at most every N/2 cycles, so capturing a new line in the
// cycle the previous one sends its last pair loses nothing.
module iit_line_scatter
  import iit_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  size_e      size_code,
  input  logic       in_valid,
  input  line_t      in_line,
  input  logic [4:0] in_tag,
  input  logic       in_pass2,
  output logic       wr_valid,
  output logic [3:0] wr_beat,
  output logic       wr_last,
  output logic [4:0] wr_tag,
  output logic       wr_pass2,
  output pair_t      wr_pair
);

  line_t      buf_line;
  logic [3:0] last_beat;

  assign last_beat = 4'((size_of(size_code) / 2) - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_valid <= 1'b0;
      wr_beat  <= '0;
    end else if (in_valid) begin
      wr_valid <= 1'b1;
      wr_beat  <= '0;
    end else if (wr_valid) begin
      wr_beat  <= wr_beat + 4'd1;
      if (wr_beat == last_beat) wr_valid <= 1'b0;
    end
    if (in_valid) begin
      buf_line <= in_line;
      wr_tag   <= in_tag;
      wr_pass2 <= in_pass2;
    end
  end

  always_comb begin
    wr_last    = wr_valid && (wr_beat == last_beat);
    wr_pair[0] = buf_line[{wr_beat, 1'b0}];
    wr_pair[1] = buf_line[{wr_beat, 1'b1}];
  end

endmodule
