// Shared types, constants and helper functions of the time-mode imager with
// in-pixel gain and offset correction by clock stopping.
//
// The pixel ADCs count with maximal-length LFSR counters. A counter state is
// read as a "value" v in 1..2^BITS-1: v - 1 is the number of forward steps
// from the reset state, so value 1 is the dark level and counting past the
// top rolls over to 1 (and below 1 to the top). The polynomials are standard
// maximal-length Fibonacci taps; which polynomial the sensor uses is not
// known, so this is a choice of this design.
//
// The coefficient word of a pixel holds, per bus line n:
//   n <  k (offset lines): bit n of the offset correction (weight 2^n clocks);
//   n >= k (gain lines)  : bit (BITS-1-n) of the gain numerator C, so that
//                          the pixel keeps C of every 2^BITS-1 clocks.
// A cleared bit lets the matching bus line stop the pixel's clock.
package imager_pkg;

  localparam int unsigned ADC_BITS = 9;    // pixel ADC resolution
  localparam int unsigned NPIX     = 128;  // pixels with clock stopping
  localparam int unsigned DAC_W    = 12;   // V_ramp DAC code width
  localparam int unsigned PER_W    = 24;   // pixel clock period width (10 ns units)
  localparam int unsigned IVM_AW   = 9;    // interval memory address width
  localparam int unsigned RAMP_AW  = 5;    // ramp table address width
  localparam int unsigned CNT_W    = 20;   // slot / cycle counters of the sequencer

  // Mode of the clock stopping pulse sequence generator.
  typedef enum logic [1:0] {
    CS_OFF    = 2'd0,  // all bus lines low
    CS_GAIN   = 2'd1,  // gain pattern on Bus(k..BITS-1), phases 1a and 1b
    CS_OFFSET = 2'd2   // offset pattern on Bus(0..k-1), phase 2
  } cs_mode_e;

  // Conversion phases of one frame.
  typedef enum logic [3:0] {
    PH_IDLE    = 4'd0,
    PH_RESET   = 4'd1,   // analog and digital reset asserted
    PH_BLANK   = 4'd2,   // integration, no pixel clock (T_b)
    PH_1A      = 4'd3,   // time mode, variable clock periods, V_ramp = V_ref
    PH_1B      = 4'd4,   // voltage mode, constant period, V_ramp steps up
    PH_2       = 4'd5,   // per-pixel offset correction
    PH_3       = 4'd6,   // global offset correction, no clock stopping
    PH_FLUSH   = 4'd7,   // one last rising edge that counts the final slot
    PH_READOUT = 4'd8,   // DMA readout of all pixels
    PH_COEF    = 4'd9    // shifting a coefficient word into the chain
  } phase_e;

  // Configuration written by the processor.
  typedef struct packed {
    logic [CNT_W-1:0] t_reset;     // reset pulse length, system cycles
    logic [CNT_W-1:0] t_blank;     // blanking time T_b, system cycles
    logic [15:0]      n_1a;        // pixel clocks in phase 1a (interval memory entries)
    logic [15:0]      n_1b;        // pixel clocks in phase 1b
    logic [PER_W-1:0] p_const;     // period in phases 1b, 2 and 3
    logic [3:0]       off_bits;    // k: bus lines used for offset correction
    logic [15:0]      n_global;    // pixel clocks in phase 3
    logic             global_down; // count direction in phase 3
    logic [31:0]      dma_base;    // word address of the frame in memory
  } cfg_t;

  // Maximal-length Fibonacci taps (bit i set = stage i+1 tapped).
  function automatic logic [31:0] lfsr_taps(input int unsigned bits);
    case (bits)
      4:       return 32'h0000_000C;
      5:       return 32'h0000_0014;
      6:       return 32'h0000_0030;
      7:       return 32'h0000_0060;
      8:       return 32'h0000_00B8;
      9:       return 32'h0000_0110;
      10:      return 32'h0000_0240;
      11:      return 32'h0000_0500;
      12:      return 32'h0000_0829;
      default: return 32'h0000_0110;
    endcase
  endfunction

  // Reset state of the counters (value 1).
  localparam logic [31:0] LFSR_SEED = 32'd1;

  // One forward step: shift left, new LSB is the parity of the tapped bits.
  function automatic logic [31:0] lfsr_next(input logic [31:0] s, input int unsigned bits);
    logic [31:0] mask, taps;
    mask = (32'd1 << bits) - 32'd1;
    taps = lfsr_taps(bits);
    return ((s << 1) | 32'(^(s & taps))) & mask;
  endfunction

  // One backward step: the inverse of lfsr_next.
  function automatic logic [31:0] lfsr_prev(input logic [31:0] s, input int unsigned bits);
    logic [31:0] taps, low;
    logic        top;
    taps = lfsr_taps(bits);
    low  = s >> 1;                                 // old stages 1..bits-1
    // parity of the old tapped bits equals s[0]; solve it for the old top bit
    top  = s[0] ^ (^(low & taps & ((32'd1 << (bits - 1)) - 32'd1)));
    return low | (32'(top) << (bits - 1));
  endfunction

  // Coefficient word for gain numerator c (of 2^bits-1), offset off and k offset lines.
  function automatic logic [31:0] coef_word(input int unsigned c, input int unsigned off,
                                            input int unsigned k, input int unsigned bits);
    logic [31:0] w;
    w = '0;
    for (int unsigned n = 0; n < bits; n++) begin
      if (n < k) w[n] = off[n];
      else       w[n] = c[bits-1-n];
    end
    return w;
  endfunction

endpackage
