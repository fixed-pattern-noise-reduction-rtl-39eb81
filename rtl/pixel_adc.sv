// Digital part of one time-mode pixel ADC with clock-stopping gain and offset
// correction.
//
// Two flip-flops sample, on the falling edge of the pixel clock, the
// comparator output and the clock-enable CE. CE is low when any bus line b(n)
// is high while the pixel's coefficient bit Q(n) is low (gates G3_n, G2): the
// common bus thereby "steals" selected clock pulses from pixels whose
// coefficient bit is cleared. The counter advances on the next rising edge of
// the pixel clock only if the comparator reported Vs at or below V_ramp and CE
// was high (gate G1). The coefficient register is a shift register chained to
// the neighbouring pixels.
//
// Interface: `comp` is high while Vs > V_ramp. `count` is the counter state;
// the row's address decoder puts it on the output bus. `coef` is exposed for
// observation.
//
// Timing: bus and comparator are sampled at the falling edge of `pix_clk` and
// counted at the following rising edge. The structure follows the pixel
// schematic of the sensor. The gated clock of the schematic is written here
// as a counter enable. Clearing the two sampling flip-flops with the digital
// reset is this design's choice, so that the first pixel clock of a frame
// never counts a stale sample.
module pixel_adc
  import imager_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS
) (
  input  logic            pix_clk,   // pixel clock
  input  logic            dig_rst,   // digital reset, active high
  input  logic            comp,      // comparator: 1 while Vs > V_ramp
  input  logic [BITS-1:0] bus_in,    // clock stopping bus b0..b(BITS-1)
  input  logic            down,      // global count direction
  input  logic            coef_clk,  // coefficient clock
  input  logic            coef_in,   // coefficient serial input
  output logic            coef_out,  // coefficient serial output
  output logic [BITS-1:0] count,     // counter state
  output logic [BITS-1:0] coef       // coefficient register
);

  logic ce;        // G2: no enabled bus line stops this pixel
  logic comp_en_q; // sampled: Vs has reached V_ramp
  logic ce_q;      // sampled clock enable

  assign ce = ~|(bus_in & ~coef);

  always_ff @(negedge pix_clk or posedge dig_rst) begin
    if (dig_rst) begin
      comp_en_q <= 1'b0;
      ce_q      <= 1'b0;
    end else begin
      comp_en_q <= ~comp;
      ce_q      <= ce;
    end
  end

  pixel_counter #(.BITS(BITS)) u_cnt (
    .clk  (pix_clk),
    .rst  (dig_rst),
    .en   (comp_en_q & ce_q),
    .down (down),
    .q    (count)
  );

  coef_shift_reg #(.BITS(BITS)) u_coef (
    .clk (coef_clk),
    .d   (coef_in),
    .q   (coef),
    .so  (coef_out)
  );

endmodule
