// SVGA raster timing generator, 800x600 at 60 Hz from a 40 MHz pixel clock.
//
// Two counters run over the full line (1056 clocks) and the full frame (628
// lines).  All outputs are registered and belong to the same pixel: x and y are
// the pixel position (valid while `active`), hsync and vsync are active high,
// as the VESA mode prescribes.  Line order: active, front porch, sync, back
// porch.  The 40 MHz clock and the 800x600 mode follow the design description;
// the porch and sync widths are the VESA values.
module svga_timing
  import ddr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  output logic [10:0] x,
  output logic [9:0]  y,
  output logic       active,
  output logic       hsync,
  output logic       vsync,
  output logic       frame_start   // pulses with pixel (0,0)
);
  logic [10:0] hc;
  logic [9:0]  vc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 11'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 10'(V_TOTAL - 1)) ? '0 : vc + 1'b1;
    end else begin
      hc <= hc + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x <= '0; y <= '0; active <= 1'b0; hsync <= 1'b0; vsync <= 1'b0;
      frame_start <= 1'b0;
    end else begin
      x      <= hc;
      y      <= vc;
      active <= (hc < 11'(H_ACTIVE)) && (vc < 10'(V_ACTIVE));
      hsync  <= (hc >= 11'(H_ACTIVE + H_FP)) && (hc < 11'(H_ACTIVE + H_FP + H_SYNC));
      vsync  <= (vc >= 10'(V_ACTIVE + V_FP)) && (vc < 10'(V_ACTIVE + V_FP + V_SYNC));
      frame_start <= (hc == '0) && (vc == '0);
    end
  end
endmodule
