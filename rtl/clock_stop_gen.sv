// Clock stopping pulse sequence generator.
//
// Drives the bus shared by all pixels with the pulse trains that steal clock
// pulses from pixels according to their coefficient bits. It advances one
// step per pixel clock period (`tick`).
//
// Gain mode (phases 1a and 1b): a step counter t runs 1..2^BITS-1 and wraps.
// Line n pulses for one period when t has exactly n trailing zeros, so
// Bus(0) pulses every second period, Bus(1) every fourth, and Bus(BITS-1)
// once, in the middle of the 2^BITS-1 period train. The train is symmetric,
// which makes the stolen count independent of whether a pixel starts or stops
// counting at a given time. Lines 0..k-1 are held low in this mode; they
// belong to the offset correction.
//
// Offset mode (phase 2): 2^k-1 periods; Bus(k-1) is high for 2^(k-1)
// periods, then Bus(k-2) for 2^(k-2) periods, down to Bus(0) for one period.
// A pixel whose offset bit n is set counts during line n's interval.
//
// Off mode: all lines low. `restart` (with `tick` or alone) rewinds both
// patterns to their first step; the first pattern step is output on the
// first tick after the restart.
//
// Interface: `bus` changes one system cycle after the rising edge of the
// pixel clock (when `tick` is sampled) and is stable when the pixels sample it
// on the falling edge. The patterns follow the sensor's timing diagrams; the
// order of the offset lines is read from them; the counter implementation is
// this design's own.
module clock_stop_gen
  import imager_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            tick,      // one pulse per pixel clock period
  input  logic            restart,   // rewind the pattern
  input  cs_mode_e        mode,
  input  logic [3:0]      off_bits,  // k, 0..BITS
  output logic [BITS-1:0] bus
);

  logic [BITS-1:0] t;      // gain step, 1..2^BITS-1
  logic [BITS-1:0] r;      // offset steps left, 2^k-1 .. 1
  logic            r_load; // r must be (re)loaded at the next offset step

  // line selected by the gain step: position of the lowest set bit
  function automatic logic [BITS-1:0] gain_lines(input logic [BITS-1:0] tt,
                                                 input logic [3:0] k);
    logic [BITS-1:0] v;
    v = '0;
    for (int unsigned b = 0; b < BITS; b++) begin
      if (tt[b] && ((tt & ((BITS'(1) << b) - BITS'(1))) == '0)) begin
        if (b >= k) v[b] = 1'b1;
      end
    end
    return v;
  endfunction

  // line selected by the offset step: position of the highest set bit
  function automatic logic [BITS-1:0] offset_lines(input logic [BITS-1:0] rr);
    logic [BITS-1:0] v;
    v = '0;
    for (int unsigned b = 0; b < BITS; b++)
      if (rr[b] && ((rr >> b) == BITS'(1))) v[b] = 1'b1;
    return v;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t      <= '0;
      r      <= '0;
      r_load <= 1'b1;
      bus    <= '0;
    end else if (restart) begin
      t      <= '0;
      r      <= '0;
      r_load <= 1'b1;
      bus    <= '0;
    end else if (tick) begin
      unique case (mode)
        CS_GAIN: begin
          logic [BITS-1:0] tn;
          tn  = (t == '1) ? BITS'(1) : t + BITS'(1);
          t   <= tn;
          bus <= gain_lines(tn, off_bits);
        end
        CS_OFFSET: begin
          logic [BITS-1:0] rn;
          if (r_load) rn = (BITS'(1) << off_bits) - BITS'(1);
          else        rn = r - BITS'(1);
          r      <= rn;
          r_load <= 1'b0;
          bus    <= offset_lines(rn);
        end
        default: bus <= '0;
      endcase
    end
  end

endmodule
