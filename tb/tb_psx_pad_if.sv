// Self-checking testbench of psx_pad_if with a controller model.
//
// The model answers each poll with 0xFF, the mode byte 0x41, 0x5A and two
// random active-low button bytes, changing DAT after falling CLK edges and
// sampling CMD on rising ones, LSB first.  The testbench checks the command
// bytes (0x01 0x42 0x00 0x00 0x00), the status register after each poll, the
// poll period, the serial clock period and that a poll with a bad header sets
// `error` and leaves the register unchanged.  The clock rates are scaled down
// to keep the run short.
`timescale 1ns/1ps
module tb_psx_pad_if;
  localparam int CLK_HZ = 1_000_000, PSX_HZ = 100_000, POLL_HZ = 200;
  logic clk = 0, rst_n = 0;
  logic att_n, psx_clk, cmd, dat = 1;
  logic [15:0] buttons;
  logic [7:0] pad_id;
  logic update, error;

  psx_pad_if #(.CLK_HZ(CLK_HZ), .PSX_HZ(PSX_HZ), .POLL_HZ(POLL_HZ)) dut (.*);
  always #500 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // controller model
  logic [7:0] reply [5];
  logic [7:0] got_cmd [5];
  int bitn = 0, polls = 0, bad_polls = 0;
  logic [15:0] exp_buttons = 0, prev_buttons = 0;
  bit bad_now = 0;

  always @(negedge att_n) begin
    polls++;
    bad_now = (polls == 4);
    reply[0] = 8'hFF; reply[1] = 8'h41; reply[2] = bad_now ? 8'h00 : 8'h5A;
    reply[3] = 8'($urandom); reply[4] = 8'($urandom);
    bitn = 0;
    dat = 1;
  end
  always @(negedge psx_clk) if (!att_n) dat = reply[bitn / 8][bitn % 8];
  always @(posedge psx_clk) if (!att_n) begin
    got_cmd[bitn / 8][bitn % 8] = cmd;
    bitn++;
  end
  always @(posedge att_n) if (polls > 0) begin
    check(bitn == 40, "40 bits per poll");
    check(got_cmd[0] == 8'h01 && got_cmd[1] == 8'h42 && got_cmd[2] == 8'h00 &&
          got_cmd[3] == 8'h00 && got_cmd[4] == 8'h00, "command bytes");
    prev_buttons = exp_buttons;
    if (!bad_now) exp_buttons = ~{reply[4], reply[3]}; else bad_polls++;
  end

  // register check, a few cycles after ATT goes high
  int updates = 0;
  always @(posedge clk) if (rst_n) begin
    if (update) begin
      updates++;
      #1;
      check(buttons == exp_buttons, "buttons register");
      check(pad_id == 8'h41, "pad id");
      check(!error, "no error on a good poll");
    end
  end
  always @(posedge error) begin
    #1;
    check(buttons == prev_buttons, "register kept on a bad poll");
  end

  // serial clock and poll period
  realtime last_fall = 0, last_att = 0;
  always @(negedge psx_clk) begin
    if (last_fall > 0 && $realtime - last_fall < 20000) check($realtime - last_fall == 10000, "serial clock period");
    last_fall = $realtime;
  end
  always @(negedge att_n) begin
    if (last_att > 0) check($realtime - last_att == 5000000, "poll period");
    last_att = $realtime;
  end

  initial begin #100ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (polls == 8);
    @(posedge att_n);
    repeat (5) @(negedge clk);
    check(updates == 7, "updates on good polls");
    check(bad_polls == 1, "one bad poll");
    $display("polls=%0d updates=%0d", polls, updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
