// Variable-frequency pixel clock generator.
//
// On `start` it emits `n_pulses` pixel clock periods and then pulses `done`.
// Each period's length, in system clock cycles, is read from the interval
// memory (`use_mem`, entries 0, 1, 2, ... in turn) or taken from
// `const_period`. Periods shorter than 4 cycles are stretched to 4. The pixel
// clock is high for the first half of each period (rounded down) and low for
// the rest, so every period begins with a rising edge.
//
// `tick` is high in the first system cycle in which `pix_clk` is high, one
// cycle after its rising edge. Logic that acts on `tick` changes its outputs
// one cycle after the rising edge of the pixel clock, which keeps them away
// from both pixel clock edges.
//
// Memory timing: the address is registered and the memory answers one cycle
// later; the next entry is fetched at the beginning of each period, so it is
// ready long before the period ends. A run from memory begins two cycles
// after `start` and a run with a constant period one cycle after.
//
// Reading successive periods from the interval memory follows the measurement
// system; the waveform shape and the handshake are this design's choice.
module pixel_clock_gen
  import imager_pkg::*;
#(
  parameter int unsigned W  = PER_W,
  parameter int unsigned AW = IVM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [15:0]   n_pulses,
  input  logic          use_mem,
  input  logic [W-1:0]  const_period,
  output logic [AW-1:0] ivm_addr,
  input  logic [W-1:0]  ivm_rdata,
  output logic          pix_clk,
  output logic          tick,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_LOAD, S_RUN} state_e;

  state_e       state;
  logic         src_mem;
  logic [15:0]  left;      // periods still to start after the current one
  logic [W-1:0] per;       // length of the current period
  logic [W-1:0] ph;        // cycle within the current period
  logic [W-1:0] per_next;

  always_comb begin
    per_next = src_mem ? ivm_rdata : const_period;
    if (per_next < W'(4)) per_next = W'(4);
  end

  assign tick = (state == S_RUN) && (ph == '0);
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      src_mem  <= 1'b0;
      left     <= '0;
      per      <= W'(4);
      ph       <= '0;
      pix_clk  <= 1'b0;
      ivm_addr <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          pix_clk <= 1'b0;
          if (start) begin
            src_mem  <= use_mem;
            ivm_addr <= '0;
            if (n_pulses == '0) begin
              done <= 1'b1;
            end else begin
              left  <= n_pulses - 16'd1;
              state <= use_mem ? S_FETCH : S_LOAD;
            end
          end
        end
        S_FETCH: state <= S_LOAD;          // memory output becomes valid
        S_LOAD: begin                      // first period begins
          per      <= per_next;
          ph       <= '0;
          pix_clk  <= 1'b1;
          ivm_addr <= ivm_addr + AW'(1);
          state    <= S_RUN;
        end
        S_RUN: begin
          if (ph == per - W'(1)) begin     // last cycle of this period
            if (left == '0) begin
              pix_clk <= 1'b0;
              done    <= 1'b1;
              state   <= S_IDLE;
            end else begin
              left     <= left - 16'd1;
              per      <= per_next;
              ph       <= '0;
              pix_clk  <= 1'b1;
              ivm_addr <= ivm_addr + AW'(1);
            end
          end else begin
            ph      <= ph + W'(1);
            pix_clk <= (ph + W'(1)) < (per >> 1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
