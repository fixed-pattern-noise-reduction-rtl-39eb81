// Coefficient memory of one pixel: a serial-in, parallel-out shift register.
//
// On each rising edge of the coefficient clock, Q0 takes the serial input and
// every Q(n) takes Q(n-1). Q(BITS-1) is also the serial output that feeds the
// next pixel, so all pixels of the row form one long chain loaded from one
// end. The register has no reset: it keeps its word until it is shifted
// again. Structure and chaining follow the pixel schematic of the sensor.
module coef_shift_reg #(
  parameter int unsigned BITS = 9
) (
  input  logic            clk,  // coefficient clock
  input  logic            d,    // serial input (from the previous pixel)
  output logic [BITS-1:0] q,    // Q0..Q(BITS-1)
  output logic            so    // serial output (to the next pixel)
);

  always_ff @(posedge clk)
    q <= {q[BITS-2:0], d};

  assign so = q[BITS-1];

endmodule
