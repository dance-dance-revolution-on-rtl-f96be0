// Self-checking testbench of clut: all 16 entries against a written-out IRGB
// palette table, with the one-clock latency.
`timescale 1ns/1ps
module tb_clut;
  import ddr_pkg::*;
  logic clk = 0;
  logic [3:0] idx = 0;
  rgb_t rgb;
  clut dut (.clk, .idx, .rgb);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [23:0] table_rgb [16] = '{
    24'h000000, 24'h0000AA, 24'h00AA00, 24'h00AAAA, 24'hAA0000, 24'hAA00AA, 24'hAA5500, 24'hAAAAAA,
    24'h555555, 24'h5555FF, 24'h55FF55, 24'h55FFFF, 24'hFF5555, 24'hFF55FF, 24'hFFFF55, 24'hFFFFFF};
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); idx = 4'(i);
      @(negedge clk);
      checks++;
      if (rgb != table_rgb[i]) begin failures++; $display("FAIL entry %0d: %h", i, rgb); end
      idx = 4'(15 - i);
      #1; checks++;
      if (rgb != table_rgb[i]) begin failures++; $display("FAIL latency at entry %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
