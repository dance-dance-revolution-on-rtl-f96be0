// Dual-port character memory between the processor bus and the display.
//
// One word per character cell: code in bits 7:0, colour index in bits 15:12
// (see ddr_pkg::char_word_t).  Port A (bus clock) reads and writes; it is meant
// for the processor's BRAM interface controller.  Port B (pixel clock) is read
// only and feeds the SVGA controller.  Both reads are synchronous with one
// cycle of latency; a port A read in the same cycle as a write to that address
// returns the old word.  Simultaneous write on A and read on B of the same
// word returns either value on B.  The memory starts cleared.
// Using both ports of one block RAM this way follows the design description;
// the depth (8192 words for 100x75 cells) is this design's choice.
module char_bram #(
  parameter int AW = 13,
  parameter int DW = 16
) (
  input  logic          clka,
  input  logic          wea,
  input  logic [AW-1:0] addra,
  input  logic [DW-1:0] dina,
  output logic [DW-1:0] douta,
  input  logic          clkb,
  input  logic [AW-1:0] addrb,
  output logic [DW-1:0] doutb
);
  logic [DW-1:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  end

  always_ff @(posedge clka) begin
    if (wea) mem[addra] <= dina;
    douta <= mem[addra];
  end

  always_ff @(posedge clkb) begin
    doutb <= mem[addrb];
  end
endmodule
