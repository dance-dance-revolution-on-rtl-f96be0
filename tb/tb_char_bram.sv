// Self-checking testbench of char_bram: random writes on port A, reads on both
// ports from unrelated clocks checked against a shadow array, read-old-data on a
// port A read during a write, the one-cycle latency and the cleared start.
`timescale 1ns/1ps
module tb_char_bram;
  localparam int AW = 13, DW = 16;
  logic clka = 0, clkb = 0, wea = 0;
  logic [AW-1:0] addra = 0, addrb = 0;
  logic [DW-1:0] dina = 0, douta, doutb;
  char_bram dut (.*);
  always #5 clka = ~clka;
  always #12.5 clkb = ~clkb;
  int checks = 0, failures = 0;
  logic [DW-1:0] shadow [2**AW];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 2**AW; i++) shadow[i] = '0;
    // cleared start, port B
    for (int i = 0; i < 50; i++) begin
      @(negedge clkb); addrb = AW'($urandom);
      @(negedge clkb); check(doutb == 16'h0, "cleared at start");
    end
    // random writes
    for (int i = 0; i < 3000; i++) begin
      @(negedge clka); wea = 1; addra = AW'($urandom_range(511)); dina = DW'($urandom);
      shadow[addra] = dina;
    end
    @(negedge clka); wea = 0;
    // port A reads
    for (int i = 0; i < 600; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range(600));
      @(negedge clka); addra = a;
      @(negedge clka); check(douta == shadow[a], "port A read");
    end
    // read during write returns the old word
    @(negedge clka); addra = 13'd7; wea = 1; dina = ~shadow[7];
    @(negedge clka); wea = 0; check(douta == shadow[7], "read old data"); shadow[7] = dina;
    @(negedge clka); check(douta == shadow[7], "new data next cycle");
    // port B reads
    for (int i = 0; i < 600; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom_range(600));
      @(negedge clkb); addrb = a;
      @(negedge clkb); check(doutb == shadow[a], "port B read");
      addrb = a + 1'b1; #1; check(doutb == shadow[a], "port B latency");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
