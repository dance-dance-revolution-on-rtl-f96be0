// PlayStation 2 controller (dance pad) interface with a button status register.
//
// The controller is a synchronous serial slave.  The host pulls ATT low, then
// exchanges bytes LSB first: it drives CMD and the controller drives DAT after
// each falling edge of CLK, and both sample on the rising edge.  A poll of a
// digital pad is five bytes: the host sends 0x01, 0x42, 0x00, 0x00, 0x00 and
// receives 0xFF, the mode byte (0x41 for a digital pad), 0x5A, then two bytes
// of buttons, active low (byte 3: SELECT, L3, R3, START, UP, RIGHT, DOWN, LEFT
// from bit 0; byte 4: L2, R2, L1, R1, TRIANGLE, CIRCLE, CROSS, SQUARE).  A
// dance pad reports its arrows as the direction buttons.
//
// The block polls the controller POLL_HZ times a second.  After a poll whose
// third byte is 0x5A it copies the inverted button bytes into `buttons` (1 =
// pressed, {byte 4, byte 3}), the mode byte into `pad_id` and pulses `update`;
// otherwise it sets `error` and keeps the old status.  Software reads the
// register through the bus.
//
// Timing: CLK runs at PSX_HZ (half period CLK_HZ/(2*PSX_HZ) system clocks, 200
// at the defaults); ATT is low for ATT_SETUP half periods before the first
// byte and bytes are GAP half periods apart.  The controller's ACK line is not
// used: the fixed gap is longer than the time a pad takes to acknowledge.  DAT
// passes a two-flop synchronizer; it is open drain and needs a pull-up.
// A serial handshake with the controller and a status register of the pressed
// buttons follow the design description; the protocol details, rates and the
// register layout are this design's choices.
module psx_pad_if #(
  parameter int CLK_HZ    = 100_000_000,
  parameter int PSX_HZ    = 250_000,
  parameter int POLL_HZ   = 60,
  parameter int ATT_SETUP = 4,
  parameter int GAP       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        att_n,
  output logic        psx_clk,
  output logic        cmd,
  input  logic        dat,
  output logic [15:0] buttons,
  output logic [7:0]  pad_id,
  output logic        update,
  output logic        error
);
  localparam int HALF      = CLK_HZ / (2 * PSX_HZ);
  localparam int POLL      = CLK_HZ / POLL_HZ;
  localparam int NBYTES    = 5;
  localparam int HW        = $clog2(HALF + 1);
  localparam int PWID      = $clog2(POLL + 1);

  typedef enum logic [2:0] {S_IDLE, S_SETUP, S_LOW, S_HIGH, S_GAP, S_END} state_t;

  state_t           state;
  logic [PWID-1:0]  poll_cnt;
  logic [HW-1:0]    half_cnt;
  logic [4:0]       halves;      // half periods waited in SETUP / GAP
  logic [2:0]       bit_cnt;
  logic [2:0]       byte_cnt;
  logic [7:0]       tx, rx;
  logic [7:0]       rx_id, rx_b3;
  logic             rx_hdr_ok;
  logic [1:0]       dat_sync;
  logic             half_tick;

  function automatic logic [7:0] cmd_byte(input logic [2:0] n);
    unique case (n)
      3'd0:    return 8'h01;
      3'd1:    return 8'h42;
      default: return 8'h00;
    endcase
  endfunction

  logic [7:0] first_tx;
  assign first_tx  = cmd_byte(byte_cnt);
  assign half_tick = half_cnt == HW'(HALF - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) dat_sync <= 2'b11;
    else        dat_sync <= {dat_sync[0], dat};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      poll_cnt <= '0;
      half_cnt <= '0;
      halves <= '0;
      bit_cnt <= '0;
      byte_cnt <= '0;
      tx <= '0;
      rx <= '0;
      rx_id <= '0;
      rx_b3 <= '0;
      rx_hdr_ok <= 1'b0;
      att_n <= 1'b1;
      psx_clk <= 1'b1;
      cmd <= 1'b1;
      buttons <= '0;
      pad_id <= '0;
      update <= 1'b0;
      error <= 1'b0;
    end else begin
      update <= 1'b0;
      poll_cnt <= (poll_cnt == PWID'(POLL - 1)) ? '0 : poll_cnt + 1'b1;
      half_cnt <= (state == S_IDLE || half_tick) ? '0 : half_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (poll_cnt == '0) begin
            state <= S_SETUP;
            att_n <= 1'b0;
            halves <= '0;
            byte_cnt <= '0;
            rx_hdr_ok <= 1'b1;
          end
        end
        S_SETUP, S_GAP: if (half_tick) begin
          halves <= halves + 1'b1;
          if (halves == 5'((state == S_SETUP ? ATT_SETUP : GAP) - 1)) begin
            // first falling edge of the byte: put out bit 0
            state <= S_LOW;
            psx_clk <= 1'b0;
            tx <= first_tx;
            cmd <= first_tx[0];
            bit_cnt <= '0;
          end
        end
        S_LOW: if (half_tick) begin
          // rising edge: sample the controller
          state <= S_HIGH;
          psx_clk <= 1'b1;
          rx <= {dat_sync[1], rx[7:1]};
        end
        S_HIGH: if (half_tick) begin
          if (bit_cnt == 3'd7) begin
            cmd <= 1'b1;
            byte_cnt <= byte_cnt + 1'b1;
            halves <= '0;
            unique case (byte_cnt)
              3'd1: rx_id <= rx;
              3'd2: if (rx != 8'h5A) rx_hdr_ok <= 1'b0;
              3'd3: rx_b3 <= rx;
              default: ;
            endcase
            state <= (byte_cnt == 3'(NBYTES - 1)) ? S_END : S_GAP;
          end else begin
            state <= S_LOW;
            psx_clk <= 1'b0;
            bit_cnt <= bit_cnt + 1'b1;
            cmd <= tx[bit_cnt + 1'b1];
          end
        end
        S_END: begin
          att_n <= 1'b1;
          state <= S_IDLE;
          error <= !rx_hdr_ok;
          if (rx_hdr_ok) begin
            buttons <= ~{rx, rx_b3};
            pad_id <= rx_id;
            update <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
