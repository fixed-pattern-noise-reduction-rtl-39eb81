// Digital part of the imager row: NPIX pixel ADCs with clock stopping.
//
// All pixels share the pixel clock, digital reset, count direction and the
// clock stopping bus. Their coefficient registers form one chain: the serial
// input enters pixel 0 and each pixel's serial output feeds the next, so a
// word shifted in first ends up in pixel NPIX-1. After a conversion the
// address decoder enables one pixel at a time and its counter state appears
// on `bus_out`.
//
// The sensor's bus is bidirectional (clock stopping input during the
// conversion, data output during readout). Here the two directions are
// separate ports; that split, and the combinational read path, are this
// design's choices.
module pixel_row
  import imager_pkg::*;
#(
  parameter int unsigned NP   = NPIX,
  parameter int unsigned BITS = ADC_BITS,
  localparam int unsigned AW  = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic            pix_clk,
  input  logic            dig_rst,
  input  logic            down,
  input  logic [NP-1:0]   comp,      // comparator output of each pixel
  input  logic [BITS-1:0] bus_in,    // clock stopping bus
  input  logic            coef_clk,
  input  logic            coef_in,   // serial coefficient input (pixel 0 end)
  output logic            coef_out,  // serial output of the last pixel
  input  logic [AW-1:0]   pix_addr,  // pixel address for readout
  output logic [BITS-1:0] bus_out    // counter state of the addressed pixel
);

  logic [BITS-1:0] count [NP];
  logic [BITS-1:0] coef  [NP];
  logic [NP:0]     chain;

  assign chain[0] = coef_in;
  assign coef_out = chain[NP];

  for (genvar i = 0; i < NP; i++) begin : g_pix
    pixel_adc #(.BITS(BITS)) u_pix (
      .pix_clk  (pix_clk),
      .dig_rst  (dig_rst),
      .comp     (comp[i]),
      .bus_in   (bus_in),
      .down     (down),
      .coef_clk (coef_clk),
      .coef_in  (chain[i]),
      .coef_out (chain[i+1]),
      .count    (count[i]),
      .coef     (coef[i])
    );
  end

  // address decoder / output enable
  always_comb begin
    bus_out = '0;
    for (int i = 0; i < NP; i++)
      if (pix_addr == AW'(i)) bus_out = count[i];
  end

endmodule
