// iit_line_gather - collects two samples per cycle into one transform line.
//
// Memory reads deliver a pair of samples per cycle (lanes 2*beat and
// 2*beat+1 of the line being read). After the pair marked in_last has been
// stored, line_valid is high for one cycle with the complete line, its tag
// (line number) and pass flag. A line of N samples therefore takes N/2
// cycles to gather, which sets the rate of two samples per cycle that the
// document reports for every pipelined sub-module. The next line may start
// in the cycle line_valid is high; the consumer samples the line at the
// end of that cycle, before lanes 0 and 1 are overwritten.
module iit_line_gather
  import iit_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [3:0] in_beat,
  input  logic       in_last,
  input  logic [4:0] in_tag,
  input  logic       in_pass2,
  input  pair_t      in_pair,
  output logic       line_valid,
  output line_t      line,
  output logic [4:0] line_tag,
  output logic       line_pass2
);

  always_ff @(posedge clk) begin
    if (rst) line_valid <= 1'b0;
    else     line_valid <= in_valid && in_last;
    if (in_valid) begin
      line[{in_beat, 1'b0}] <= in_pair[0];
      line[{in_beat, 1'b1}] <= in_pair[1];
      if (in_last) begin
        line_tag   <= in_tag;
        line_pass2 <= in_pass2;
      end
    end
  end

endmodule
