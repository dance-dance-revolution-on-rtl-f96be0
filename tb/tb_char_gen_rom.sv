// Self-checking testbench of char_gen_rom.
//
// The expected arrow is rebuilt here from its row widths (head rows 1..15 span
// columns 16-v..15+v, shaft rows 16..30 span columns 10..21) and the other
// directions from transposing and mirroring it.  All 4x4 tiles of the four
// filled arrows are compared pixel by pixel; hollow arrows must be a strict
// subset with an empty middle and a set outline.  Digits, the block and the
// blank are checked against hand-written rows, and the one-clock latency too.
`timescale 1ns/1ps
module tb_char_gen_rom;
  logic clk = 0;
  logic [7:0] code = 0;
  logic [2:0] row = 0;
  logic [7:0] bits;
  char_gen_rom dut (.clk, .code, .row, .bits);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  bit up_img [32][32];   // [v][u]

  function automatic bit expect_px(input int dir, input int px, input int py);
    case (dir)
      0: return up_img[px][py];          // left
      1: return up_img[31 - py][px];     // down
      2: return up_img[py][px];          // up
      default: return up_img[31 - px][py];
    endcase
  endfunction

  task automatic read_row(input logic [7:0] c, input int r, output logic [7:0] b);
    @(negedge clk); code = c; row = 3'(r);
    @(negedge clk); b = bits;
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [7:0] b;
    int filled_cnt, hollow_cnt;
    bit subset_ok;
    for (int v = 0; v < 32; v++)
      for (int u = 0; u < 32; u++)
        up_img[v][u] = (v >= 1 && v <= 15 && u >= 16 - v && u <= 15 + v) ||
                       (v >= 16 && v <= 30 && u >= 10 && u <= 21);
    // latency: change code once and look at the output before and after the edge
    @(negedge clk); code = 8'h7F; row = 0;
    @(negedge clk); code = 8'h20;
    check(bits == 8'hFF, "block row after one clock");
    #1; check(bits == 8'hFF, "output held until the next edge");
    @(negedge clk); check(bits == 8'h00, "blank row");
    // filled arrows
    for (int dir = 0; dir < 4; dir++)
      for (int tr = 0; tr < 4; tr++)
        for (int tc = 0; tc < 4; tc++)
          for (int r = 0; r < 8; r++) begin
            logic [7:0] e;
            read_row(8'h80 | 8'(dir << 4) | 8'(tr << 2) | 8'(tc), r, b);
            for (int c = 0; c < 8; c++) e[7 - c] = expect_px(dir, tc * 8 + c, tr * 8 + r);
            check(b == e, $sformatf("arrow dir %0d tile %0d,%0d row %0d: %h vs %h", dir, tr, tc, r, b, e));
          end
    // hollow arrows
    for (int dir = 0; dir < 4; dir++) begin
      filled_cnt = 0; hollow_cnt = 0; subset_ok = 1;
      for (int tr = 0; tr < 4; tr++)
        for (int tc = 0; tc < 4; tc++)
          for (int r = 0; r < 8; r++) begin
            read_row(8'hC0 | 8'(dir << 4) | 8'(tr << 2) | 8'(tc), r, b);
            for (int c = 0; c < 8; c++) begin
              bit f;
              f = expect_px(dir, tc * 8 + c, tr * 8 + r);
              filled_cnt += int'(f);
              hollow_cnt += int'(b[7 - c]);
              if (b[7 - c] && !f) subset_ok = 0;
            end
          end
      check(subset_ok, "hollow inside filled");
      check(hollow_cnt > 60 && hollow_cnt < filled_cnt / 2, $sformatf("hollow count %0d of %0d", hollow_cnt, filled_cnt));
    end
    // up arrow hollow: centre of the shaft (u=16, v=24 -> tile 3,2 row 0 col 0) clear,
    // its edge (u=10) set
    read_row(8'hC0 | 8'(2 << 4) | 8'(3 << 2) | 8'd2, 0, b);
    check(b[7] == 1'b0, "hollow shaft empty");
    read_row(8'hC0 | 8'(2 << 4) | 8'(3 << 2) | 8'd1, 0, b);
    check(b[5] == 1'b1, "hollow shaft edge");
    // digits
    for (int r = 0; r < 8; r++) begin
      read_row(8'h38, r, b);
      check(b == ((r == 0 || r == 3 || r == 6) ? 8'h7C : (r == 7 ? 8'h00 : 8'h44)), "digit 8");
      read_row(8'h31, r, b);
      check(b == (r < 7 ? 8'h04 : 8'h00), "digit 1");
      read_row(8'h37, r, b);
      check(b == (r == 0 ? 8'h7C : (r < 7 ? 8'h04 : 8'h00)), "digit 7");
      read_row(8'h7F, r, b);
      check(b == 8'hFF, "block");
      read_row(8'h41, r, b);
      check(b == 8'h00, "undrawn letter is blank");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
