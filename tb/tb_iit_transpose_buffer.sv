// tb_iit_transpose_buffer - the two ports of the 1024-word buffer: fills it
// with both ports writing in the same cycle (a 32x32 block row by row, two
// columns per cycle, as the first pass does), reads it back column-wise
// two rows per cycle (as the second pass does) and checks every word and
// the one-cycle read latency, then mixes a write on one port with a read on
// the other.
`timescale 1ns/1ps
module tb_iit_transpose_buffer;
  import iit_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0]         en, we;
  logic [1:0][9:0]    addr;
  pair_t              wdata, rdata;
  int checks = 0, failures = 0;
  int model [1024];

  iit_transpose_buffer dut (.clk, .en, .we, .addr, .wdata, .rdata);

  initial begin
    en = '0; we = '0; addr = '0; wdata = '0;
    // row-wise fill, two words per cycle
    for (int a = 0; a < 1024; a += 2) begin
      @(negedge clk);
      en = 2'b11; we = 2'b11;
      addr[0] = 10'(a); addr[1] = 10'(a + 1);
      wdata[0] = sample_t'($urandom); wdata[1] = sample_t'($urandom);
      model[a] = int'(wdata[0]); model[a + 1] = int'(wdata[1]);
    end
    // column-wise read, rows 2b and 2b+1 of column j per cycle
    for (int j = 0; j < 32; j++)
      for (int b = 0; b < 16; b++) begin
        @(negedge clk);
        en = 2'b11; we = 2'b00;
        addr[0] = 10'((2 * b) * 32 + j); addr[1] = 10'((2 * b + 1) * 32 + j);
        @(negedge clk);
        en = 2'b00;
        checks++;
        if (int'(rdata[0]) != model[(2 * b) * 32 + j] || int'(rdata[1]) != model[(2 * b + 1) * 32 + j]) begin
          failures++;
          if (failures < 5) $display("read col %0d beat %0d: %0d %0d", j, b, rdata[0], rdata[1]);
        end
      end
    // port 0 writes while port 1 reads another word
    for (int i = 0; i < 64; i++) begin
      int wa, ra;
      wa = int'($urandom_range(0, 1023));
      ra = (wa + 1 + int'($urandom_range(0, 1000))) % 1024;
      @(negedge clk);
      en = 2'b11; we = 2'b01;
      addr[0] = 10'(wa); addr[1] = 10'(ra);
      wdata[0] = sample_t'($urandom);
      @(negedge clk);
      en = 2'b00;
      checks++;
      if (int'(rdata[1]) != model[ra]) begin
        failures++;
        $display("mixed read %0d: %0d exp %0d", ra, rdata[1], model[ra]);
      end
      model[wa] = int'(wdata[0]);
      // read back what port 0 wrote, through port 1
      @(negedge clk);
      en = 2'b10; we = 2'b00; addr[1] = 10'(wa);
      @(negedge clk);
      en = 2'b00;
      checks++;
      if (int'(rdata[1]) != model[wa]) begin
        failures++;
        $display("read back %0d: %0d exp %0d", wa, rdata[1], model[wa]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
