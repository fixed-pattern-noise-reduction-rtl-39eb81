// Gain-correction linearity bench for one ADC resolution (helper of
// tb_gain_inl).
//
// It drives one clock_stop_gen in gain mode with k = 0 offset lines and feeds
// its bus to 2^BITS pixel_adc instances. Pixel p holds the gain numerator
// C = p, 0..2^BITS-1. The comparators report "counting" from the start, so
// every pixel counts the train from its first step. After every pixel clock
// the bench reads all counters, counts the steps each one took, and tracks the
// worst deviation |out - N*C/M| over all N = 1..M and all C, with M = 2^BITS-1.
// This is the integral non-linearity that clock stealing adds on its own.
// Because the train is symmetric, a pixel that counts from some point to the
// end of the train sees the same errors mirrored.
//
// Interface: `start` (one cycle) runs the bench once. When `done` rises,
// `max_num` holds the worst deviation times M (an integer). `full_ok` is set
// if every pixel kept exactly C of the M clocks over the whole train.
//
// Timing: a 4-cycle pixel clock, high for two cycles. `tick` is asserted in
// the first high cycle. One extra rising edge counts the last step.
// Coefficients are loaded MSB first into each pixel's own serial input.
module inl_bench
  import imager_pkg::*;
#(
  parameter int unsigned BITS = 9
) (
  input  logic        clk,
  input  logic        start,
  output logic        done,
  output longint      max_num,
  output logic        full_ok
);
  localparam int unsigned NP = 1 << BITS;
  localparam int unsigned M  = NP - 1;

  logic            rst_n = 1'b0, tick = 1'b0, restart = 1'b0;
  logic            pix_clk = 1'b0, dig_rst = 1'b0, coef_clk = 1'b0;
  cs_mode_e        mode = CS_GAIN;
  logic [BITS-1:0] bus;
  logic [NP-1:0]   coef_in = '0;
  logic [BITS-1:0] count [NP];

  clock_stop_gen #(.BITS(BITS)) u_cs (
    .clk, .rst_n, .tick, .restart, .mode, .off_bits(4'd0), .bus
  );

  for (genvar p = 0; p < NP; p++) begin : g_pix
    logic            co_unused;
    logic [BITS-1:0] q_unused;
    pixel_adc #(.BITS(BITS)) u_px (
      .pix_clk, .dig_rst, .comp(1'b0), .bus_in(bus), .down(1'b0),
      .coef_clk, .coef_in(coef_in[p]), .coef_out(co_unused),
      .count(count[p]), .coef(q_unused)
    );
  end

  initial begin
    logic [BITS-1:0] prev [NP];
    int unsigned     outc [NP];
    done = 1'b0; max_num = 0; full_ok = 1'b1;
    @(posedge start); @(negedge clk);
    rst_n = 1'b1;
    // coefficient word of pixel p: Q(n) = bit (BITS-1-n) of C = p
    for (int i = 0; i < int'(BITS); i++) begin
      for (int p = 0; p < int'(NP); p++) begin
        logic [31:0] w;
        w = coef_word(p, 0, 0, BITS);
        coef_in[p] = w[BITS-1-i];
      end
      @(negedge clk); coef_clk = 1'b1; @(negedge clk); coef_clk = 1'b0;
    end
    dig_rst = 1'b1; restart = 1'b1; @(negedge clk); dig_rst = 1'b0; restart = 1'b0;
    @(negedge clk);
    for (int p = 0; p < int'(NP); p++) begin prev[p] = count[p]; outc[p] = 0; end
    // edge e counts step e-1 of the train
    for (int e = 1; e <= int'(M) + 1; e++) begin
      pix_clk = 1'b1; tick = 1'b1; @(negedge clk);
      tick = 1'b0; @(negedge clk);
      pix_clk = 1'b0; @(negedge clk);
      @(negedge clk);
      if (e >= 2) begin
        for (int p = 0; p < int'(NP); p++) begin
          longint d;
          if (count[p] != prev[p]) begin
            outc[p]++;
            prev[p] = count[p];
          end
          d = longint'(outc[p]) * M - (longint'(e) - 64'sd1) * longint'(p);
          if (d < 0) d = -d;
          if (d > max_num) max_num = d;
        end
      end
    end
    for (int p = 0; p < int'(NP); p++) if (outc[p] != p) full_ok = 1'b0;
    done = 1'b1;
  end
endmodule
