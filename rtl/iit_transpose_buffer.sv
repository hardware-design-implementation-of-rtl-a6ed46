// iit_transpose_buffer - 32x32 block of 16-bit samples between the passes.
//
// A true dual-port RAM (two independent ports, each reading or writing one
// word per cycle, synchronous read with one cycle of latency), sized for
// the largest TU: DEPTH = 1024 words, one 18 Kb FPGA block RAM, in line
// with the single BRAM the document's reports list at the top level. The
// first pass writes each output line as a row (address row*32 + col); the
// second pass reads columns, which performs the transposition. No reset:
// every word is written before it is read.
module iit_transpose_buffer
  import iit_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                     clk,
  input  logic [1:0]               en,
  input  logic [1:0]               we,
  input  logic [1:0][$clog2(DEPTH)-1:0] addr,
  input  pair_t                    wdata,
  output pair_t                    rdata
);

  sample_t mem [DEPTH];

  for (genvar p = 0; p < 2; p++) begin : g_port
    always_ff @(posedge clk) begin
      if (en[p]) begin
        if (we[p]) mem[addr[p]] <= wdata[p];
        else       rdata[p]     <= mem[addr[p]];
      end
    end
  end

endmodule
