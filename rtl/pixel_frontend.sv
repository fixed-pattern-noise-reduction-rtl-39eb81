// Behavioural model (not synthesizable in intent: it stands for analog
// circuitry) of the analog front end of one pixel: photodiode, analog reset
// switch and comparator.
//
// While `analog_reset` is high the sense node Vs is held at `vreset`. After
// its release Vs falls by the photocurrent `ip` every model step, which is
// the integration law dVs/dt = -Ip/(Cj+Cs) with the capacitance folded into
// `ip`; it stops at 0. The comparator output `comp` is high while
// Vs > V_ramp. Voltages are in DAC codes; Vs carries FRAC extra fractional
// bits so that small photocurrents can be represented.
//
// Timing: one model step per rising edge of `clk` (the 100 MHz system clock,
// 10 ns). The comparator has no delay or offset in this model.
module pixel_frontend
  import imager_pkg::*;
#(
  parameter int unsigned DW   = DAC_W,
  parameter int unsigned FRAC = 24,
  parameter int unsigned IP_W = 24
) (
  input  logic            clk,
  input  logic            analog_reset,
  input  logic [DW-1:0]   vreset,  // reset level
  input  logic [DW-1:0]   vramp,   // comparator reference
  input  logic [IP_W-1:0] ip,      // photocurrent, DAC LSB / 2^FRAC per step
  output logic            comp     // 1 while Vs > V_ramp
);

  localparam int unsigned VW = DW + FRAC;

  logic [VW-1:0] vs;

  always_ff @(posedge clk) begin
    if (analog_reset)
      vs <= {vreset, FRAC'(0)};
    else if (vs > VW'(ip))
      vs <= vs - VW'(ip);
    else
      vs <= '0;
  end

  assign comp = vs > {vramp, FRAC'(0)};

endmodule
