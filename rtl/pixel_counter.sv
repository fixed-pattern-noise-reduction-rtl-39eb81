// Reversible LFSR counter of one pixel ADC.
//
// The counter advances one LFSR step on each rising clock edge while `en` is
// high: forward when `down` is low, backward when it is high. It has 2^BITS-1
// valid states; read as values 1..2^BITS-1 (see imager_pkg) it rolls over from
// the top value to 1 counting up and from 1 to the top value counting down,
// as the sensor's counters do. The asynchronous digital reset loads the state
// of value 1, the dark level. Reversible counting and the roll-over follow the
// sensor description; the LFSR polynomial is this design's choice.
//
// Timing: state changes on the rising edge of `clk`, one step per edge.
module pixel_counter
  import imager_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS
) (
  input  logic            clk,   // gated pixel clock
  input  logic            rst,   // digital reset, active high, asynchronous
  input  logic            en,    // count enable
  input  logic            down,  // 1: count down
  output logic [BITS-1:0] q      // LFSR state
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)
      q <= BITS'(LFSR_SEED);
    else if (en)
      q <= down ? BITS'(lfsr_prev(32'(q), BITS)) : BITS'(lfsr_next(32'(q), BITS));
  end

endmodule
