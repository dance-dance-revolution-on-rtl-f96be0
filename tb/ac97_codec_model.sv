// Behavioural model of the AC-link as the recording side of an AC'97 codec and
// the SYNC output of an AC'97 controller produce it (testbench use only).
//
// On every rising edge of bit_clk the model drives one bit of a 256-bit frame:
// slot 0 with the codec-ready bit and the slot-valid tags, slots 1 and 2 with
// random status bits, slot 3 with `left` (16 bits, then 4 random low bits) and
// the other slots with random data.  SYNC is high from the last bit of the
// previous frame for 16 bit times.  `left` and `tag_left` are read when a new
// frame is built, one bit time before slot 0, and `frame_start` pulses then.
// `tag_left` low clears the slot-3 valid tag.  A pulse on `slip` inserts one
// extra bit before the next SYNC, so the frame timing jumps once.
module ac97_codec_model (
  input  logic        bit_clk,
  input  logic [15:0] left,
  input  logic        tag_left,
  input  logic        slip,
  output logic        sync,
  output logic        sdata,
  output logic        frame_start
);
  logic [255:0] cur;
  int pos = 200;
  bit slip_pending = 0;

  initial begin
    sync = 0; sdata = 0; frame_start = 0; cur = '0;
  end

  always @(posedge slip) slip_pending = 1;

  always @(posedge bit_clk) begin
    int nxt;
    frame_start <= 0;
    if (pos == 254 && slip_pending) begin
      slip_pending = 0;
      nxt = 254;
    end else begin
      nxt = (pos == 255) ? 0 : pos + 1;
    end
    if (nxt == 0) begin
      for (int i = 0; i < 256; i++) cur[i] = 1'($urandom_range(1));
      cur[0] = 1'b1;                          // codec ready
      for (int s = 1; s <= 15; s++) cur[s] = 1'b0;
      cur[3] = tag_left;                      // slot 3 valid
      cur[4] = 1'b1;                          // slot 4 valid
      for (int i = 0; i < 16; i++) cur[56 + i] = left[15 - i];
    end
    if (nxt == 255) frame_start <= 1;
    pos = nxt;
    sync  <= (pos == 255) || (pos < 15);
    sdata <= cur[pos];
  end
endmodule
