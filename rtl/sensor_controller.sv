// Image sensor controller: sequences one conversion frame of the time-mode
// pixel ADCs and loads their coefficient chain.
//
// Frame sequence, started by `start`:
//   RESET   analog and digital reset for t_reset cycles; V_ramp = ramp[0].
//   BLANK   integration starts; no pixel clock for t_blank cycles (T_b).
//   1A      n_1a pixel clocks with periods from the interval memory (time
//           mode); V_ramp stays at ramp[0] (V_ref); gain stopping pattern.
//   1B      n_1b pixel clocks of period p_const (voltage mode); in the i-th
//           of them V_ramp = ramp[i]; the gain pattern continues.
//   2       V_ramp jumps to ramp[n_1b+1], which must lie above the reset
//           level so that every counter is enabled; 2^k-1 clocks of the
//           offset pattern on Bus(0..k-1).
//   3       n_global clocks with no clock stopping, counting down when
//           global_down is set (global offset correction).
//   FLUSH   one more pixel clock whose rising edge counts the last slot.
//   READOUT the DMA reads all pixels; then `frame_done` pulses.
// The phases and their order follow the sensor's timing diagrams; the reset
// length, the flush clock and the ramp table layout are this design's.
//
// Coefficient loading (idle only): a write to `coef_we` shifts the 9-bit word
// into the chain, bit BITS-1 first, two system cycles per bit (data, then a
// rising coefficient clock edge); after the word, Q(n) of the first pixel
// holds bit n. Words written while busy are ignored.
//
// Timing: everything that the pixels sample on the falling pixel clock edge
// (ramp, direction) changes on `tick`, one system cycle after a rising edge.
module sensor_controller
  import imager_pkg::*;
#(
  parameter int unsigned BITS = ADC_BITS,
  parameter int unsigned DW   = DAC_W,
  parameter int unsigned RAW  = RAMP_AW
) (
  input  logic            clk,
  input  logic            rst_n,
  input  cfg_t            cfg,
  input  logic            start,
  // ramp table write port
  input  logic            ramp_we,
  input  logic [RAW-1:0]  ramp_waddr,
  input  logic [DW-1:0]   ramp_wdata,
  // coefficient word
  input  logic            coef_we,
  input  logic [BITS-1:0] coef_wdata,
  // pixel clock generator
  output logic            pcg_start,
  output logic [15:0]     pcg_n,
  output logic            pcg_use_mem,
  input  logic            pcg_tick,
  input  logic            pcg_done,
  // clock stopping pulse sequence generator
  output cs_mode_e        cs_mode,
  output logic            cs_restart,
  // readout DMA
  output logic            dma_start,
  input  logic            dma_done,
  // imager pins
  output logic            analog_reset,
  output logic            digital_reset,
  output logic [DW-1:0]   dac_data,
  output logic            down,
  output logic            coef_clk,
  output logic            coef_in,
  // status
  output phase_e          phase,
  output logic            busy,
  output logic            frame_done
);

  localparam int unsigned RDEPTH = 1 << RAW;

  logic [DW-1:0]    ramp [RDEPTH];
  logic [CNT_W-1:0] cnt;
  logic [15:0]      step;        // pixel clocks seen in phase 1b / 3
  logic [BITS-1:0]  coef_sh;
  logic [4:0]       coef_left;

  always_ff @(posedge clk)
    if (ramp_we) ramp[ramp_waddr] <= ramp_wdata;

  // ramp index, saturated at the table end
  function automatic logic [RAW-1:0] ridx(input logic [15:0] i);
    return (i > 16'(RDEPTH - 1)) ? RAW'(RDEPTH - 1) : RAW'(i);
  endfunction

  assign busy        = (phase != PH_IDLE);
  assign pcg_use_mem = (phase == PH_1A);   // only phase 1a reads the interval memory

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase         <= PH_IDLE;
      cnt           <= '0;
      step          <= '0;
      pcg_start     <= 1'b0;
      pcg_n         <= '0;
      cs_mode       <= CS_OFF;
      cs_restart    <= 1'b0;
      dma_start     <= 1'b0;
      analog_reset  <= 1'b0;
      digital_reset <= 1'b0;
      dac_data      <= '0;
      down          <= 1'b0;
      coef_clk      <= 1'b0;
      coef_in       <= 1'b0;
      coef_sh       <= '0;
      coef_left     <= '0;
      frame_done    <= 1'b0;
    end else begin
      pcg_start  <= 1'b0;
      cs_restart <= 1'b0;
      dma_start  <= 1'b0;
      frame_done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          if (start) begin
            phase         <= PH_RESET;
            cnt           <= cfg.t_reset;
            analog_reset  <= 1'b1;
            digital_reset <= 1'b1;
            dac_data      <= ramp[0];
            down          <= 1'b0;
            cs_mode       <= CS_OFF;
            cs_restart    <= 1'b1;
          end else if (coef_we) begin
            phase     <= PH_COEF;
            coef_sh   <= coef_wdata;
            coef_left <= 5'(BITS);
            coef_clk  <= 1'b0;
          end
        end
        PH_COEF: begin
          if (!coef_clk) begin
            if (coef_left == '0) begin
              phase <= PH_IDLE;
            end else begin
              coef_in   <= coef_sh[BITS-1];
              coef_sh   <= coef_sh << 1;
              coef_left <= coef_left - 5'd1;
              coef_clk  <= 1'b1;
            end
          end else begin
            coef_clk <= 1'b0;
          end
        end
        PH_RESET: begin
          if (cnt <= CNT_W'(1)) begin
            analog_reset  <= 1'b0;   // conversion starts
            digital_reset <= 1'b0;
            cnt           <= cfg.t_blank;
            phase         <= PH_BLANK;
          end else begin
            cnt <= cnt - CNT_W'(1);
          end
        end
        PH_BLANK: begin
          if (cnt <= CNT_W'(1)) begin
            pcg_start <= 1'b1;
            pcg_n     <= cfg.n_1a;
            cs_mode   <= CS_GAIN;
            phase     <= PH_1A;
          end else begin
            cnt <= cnt - CNT_W'(1);
          end
        end
        PH_1A: begin
          if (pcg_done) begin
            pcg_start <= 1'b1;
            pcg_n     <= cfg.n_1b;
            step      <= '0;
            phase     <= PH_1B;
          end
        end
        PH_1B: begin
          if (pcg_tick) begin
            step     <= step + 16'd1;
            dac_data <= ramp[ridx(step + 16'd1)];
          end
          if (pcg_done) begin
            dac_data   <= ramp[ridx(cfg.n_1b + 16'd1)];
            pcg_start  <= 1'b1;
            pcg_n      <= 16'((32'd1 << cfg.off_bits) - 32'd1);
            cs_mode    <= CS_OFFSET;
            cs_restart <= 1'b1;
            phase      <= PH_2;
          end
        end
        PH_2: begin
          if (pcg_done) begin
            pcg_start <= 1'b1;
            pcg_n     <= cfg.n_global;
            cs_mode   <= CS_OFF;
            step      <= '0;
            phase     <= PH_3;
          end
        end
        PH_3: begin
          // the first rising edge of phase 3 still counts phase 2's last
          // slot, so the direction changes only after it
          if (pcg_tick) down <= cfg.global_down;
          if (pcg_done) begin
            pcg_start <= 1'b1;
            pcg_n     <= 16'd1;
            phase     <= PH_FLUSH;
          end
        end
        PH_FLUSH: begin
          if (pcg_done) begin
            dma_start <= 1'b1;
            phase     <= PH_READOUT;
          end
        end
        PH_READOUT: begin
          if (dma_done) begin
            down       <= 1'b0;
            frame_done <= 1'b1;
            phase      <= PH_IDLE;
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

endmodule
