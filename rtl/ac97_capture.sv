// AC'97 left-channel sample extractor ("custom AC'97 FIFO").
//
// The codec sends its recorded audio on the AC-link: a frame of 256 serial bits
// at BIT_CLK = 12.288 MHz, i.e. one frame per 48 kHz sample period.  SYNC,
// driven by the AC'97 controller, rises at the start of each frame.  This block
// only listens to SYNC and SDATA_IN (the controller keeps running the link) and
// pulls the left PCM sample out of every frame, so the beat detector gets a
// steady 48 kHz stream without going through the processor bus.
//
// A small state machine follows the frame: HUNT waits for the first SYNC rise,
// TAG reads slot 0 (bit 0 "codec ready", bit 3 "slot 3 valid"), SKIP passes
// slots 1 and 2, LEFT shifts in slot 3 and keeps its 16 most significant bits,
// REST waits for the next frame.  Every SYNC rise restarts the frame, so the
// block realigns by itself; `locked` says that the last two SYNC rises were
// exactly 256 bits apart.
//
// Clocking: the codec changes SDATA_IN on the rising edge of BIT_CLK, so `clk`
// must be the inverted BIT_CLK: every input is sampled on a falling edge of
// BIT_CLK, as AC'97 controllers do.  The first data bit of a frame is the one
// sampled on the edge after the one that first sees SYNC high.
//
// Outputs: `sample` is updated and `sample_valid` pulses for one cycle at the
// end of slot 3 of each frame whose tag marks the codec ready and slot 3 valid;
// `sample_valid` is the clock enable of the FFT.  `clk_48k` is a 48 kHz square
// wave, high in the first half of each frame, derived from SYNC.
//
// Extracting 16-bit left-channel PCM at 48 kHz with a state machine and a
// SYNC-derived 48 kHz clock follows the design description; the slot decoding
// is the AC'97 standard's.  Sample storage is left to the FFT's input.
module ac97_capture
  import ddr_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sync,
  input  logic             sdata_in,
  output logic [PCM_W-1:0] sample,
  output logic             sample_valid,
  output logic             clk_48k,
  output logic             codec_ready,
  output logic             locked
);

  typedef enum logic [2:0] {S_HUNT, S_TAG, S_SKIP, S_LEFT, S_REST} state_t;

  state_t           state;
  logic [7:0]       bit_idx;     // index of the bit sampled on this edge
  logic             sync_q;
  logic             sync_rise;
  logic             ready_bit, left_tag;
  logic [PCM_W-1:0] shreg;

  assign sync_rise = sync && !sync_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_HUNT;
      bit_idx      <= '0;
      sync_q       <= 1'b1;      // no false rise straight out of reset
      ready_bit    <= 1'b0;
      left_tag     <= 1'b0;
      shreg        <= '0;
      sample       <= '0;
      sample_valid <= 1'b0;
      clk_48k      <= 1'b0;
      codec_ready  <= 1'b0;
      locked       <= 1'b0;
    end else begin
      sync_q       <= sync;
      sample_valid <= 1'b0;
      clk_48k      <= (state != S_HUNT) && !bit_idx[7];
      if (sync_rise) begin
        // the bit on this edge is the last of the previous frame
        locked  <= (state == S_REST) && (bit_idx == 8'(AC_FRAME_BITS - 1));
        state   <= S_TAG;
        bit_idx <= '0;
      end else begin
        if (state != S_HUNT) bit_idx <= bit_idx + 1'b1;
        unique case (state)
          S_HUNT: ;
          S_TAG: begin
            if (bit_idx == 8'd0) ready_bit <= sdata_in;
            if (bit_idx == 8'(AC_LEFT_SLOT)) left_tag <= sdata_in;
            if (bit_idx == 8'(AC_TAG_BITS - 1)) begin
              state       <= S_SKIP;
              codec_ready <= ready_bit;
            end
          end
          S_SKIP: begin
            if (bit_idx == 8'(AC_LEFT_FIRST - 1)) state <= S_LEFT;
          end
          S_LEFT: begin
            if (bit_idx < 8'(AC_LEFT_FIRST + PCM_W)) shreg <= {shreg[PCM_W-2:0], sdata_in};
            if (bit_idx == 8'(AC_LEFT_LAST)) begin
              state <= S_REST;
              if (ready_bit && left_tag) begin
                sample       <= shreg;
                sample_valid <= 1'b1;
              end
            end
          end
          S_REST: begin
            // wait for the next SYNC; past 255 bits the frame is lost
            if (bit_idx == 8'd255) begin
              state  <= S_HUNT;
              locked <= 1'b0;
            end
          end
          default: state <= S_HUNT;
        endcase
      end
    end
  end

endmodule
