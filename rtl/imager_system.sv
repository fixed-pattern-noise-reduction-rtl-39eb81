// Time-mode CMOS imager with in-pixel gain and offset correction by clock
// stopping: the control logic of the measurement system together with the
// 128-pixel row of clock-stopping pixel ADCs and behavioural models of the
// pixels' analog front ends.
//
// Data flow of a frame: the processor programs the configuration, the V_ramp
// table, the interval memory (pixel clock periods of the time-mode phase) and
// the per-pixel coefficient words through the register bus, then writes
// START. The sensor controller resets the pixels, waits the blanking time and
// then runs the pixel clock generator through phases 1a (time mode, periods
// from the interval memory), 1b (voltage mode, ramp steps), 2 (per-pixel
// offset) and 3 (global offset). During these phases the clock stopping pulse
// sequence generator drives the shared bus so that each pixel loses clock
// pulses according to its coefficient word. Finally the readout DMA writes
// every pixel's counter state (an LFSR state, see imager_pkg) to system
// memory and `frame_done` pulses.
//
// The processor, its memory, the V_ramp DAC and the V_reset regulator are
// outside: their connections are the ports below. The pixel front ends
// (photodiode, reset switch, comparator) are behavioural models driven by the
// per-pixel `photo_current` and compare with the DAC code directly. Imager
// pins are brought out for observation.
module imager_system
  import imager_pkg::*;
#(
  parameter int unsigned NP   = NPIX,
  parameter int unsigned IP_W = 24,
  localparam int unsigned AW  = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic                clk,            // 100 MHz system clock
  input  logic                rst_n,
  // processor register bus
  input  logic [11:0]         cpu_addr,
  input  logic [31:0]         cpu_wdata,
  input  logic                cpu_we,
  output logic [31:0]         cpu_rdata,
  // DMA write port to system memory
  output logic                mem_valid,
  input  logic                mem_ready,
  output logic [31:0]         mem_addr,
  output logic [31:0]         mem_wdata,
  // scene and analog supplies
  input  logic [IP_W-1:0]     photo_current [NP],
  input  logic [DAC_W-1:0]    vreset,         // reset level, DAC units
  // imager pins (observation)
  output logic                pix_clk,
  output logic [ADC_BITS-1:0] bus,
  output logic [DAC_W-1:0]    dac_data,
  output logic                analog_reset,
  output logic                digital_reset,
  output logic                down,
  output logic [AW-1:0]       pix_addr,
  output logic [ADC_BITS-1:0] bus_out,
  output logic [NP-1:0]       comp,
  output phase_e              phase,
  output logic                frame_done
);

  cfg_t                cfg;
  logic                start, coef_we, ramp_we, ivm_we;
  logic [ADC_BITS-1:0] coef_wdata;
  logic [RAMP_AW-1:0]  ramp_waddr;
  logic [DAC_W-1:0]    ramp_wdata;
  logic [IVM_AW-1:0]   ivm_waddr, ivm_raddr;
  logic [PER_W-1:0]    ivm_wdata, ivm_rdata;
  logic                ctl_busy;
  logic                pcg_start, pcg_use_mem, pcg_tick, pcg_done, pcg_busy;
  logic [15:0]         pcg_n;
  cs_mode_e            cs_mode;
  logic                cs_restart;
  logic                dma_start, dma_done, dma_busy;
  logic                coef_clk, coef_in, coef_out;

  cfg_regs u_regs (
    .clk, .rst_n, .cpu_addr, .cpu_wdata, .cpu_we, .cpu_rdata,
    .ctl_busy, .frame_done, .phase,
    .cfg, .start, .coef_we, .coef_wdata,
    .ramp_we, .ramp_waddr, .ramp_wdata,
    .ivm_we, .ivm_waddr, .ivm_wdata
  );

  interval_memory #(.DEPTH(1 << IVM_AW), .W(PER_W)) u_ivm (
    .clk, .we(ivm_we), .waddr(ivm_waddr), .wdata(ivm_wdata),
    .raddr(ivm_raddr), .rdata(ivm_rdata)
  );

  pixel_clock_gen #(.W(PER_W), .AW(IVM_AW)) u_pcg (
    .clk, .rst_n, .start(pcg_start), .n_pulses(pcg_n), .use_mem(pcg_use_mem),
    .const_period(cfg.p_const), .ivm_addr(ivm_raddr), .ivm_rdata,
    .pix_clk, .tick(pcg_tick), .busy(pcg_busy), .done(pcg_done)
  );

  sensor_controller #(.BITS(ADC_BITS), .DW(DAC_W), .RAW(RAMP_AW)) u_ctl (
    .clk, .rst_n, .cfg, .start,
    .ramp_we, .ramp_waddr, .ramp_wdata, .coef_we, .coef_wdata,
    .pcg_start, .pcg_n, .pcg_use_mem, .pcg_tick, .pcg_done,
    .cs_mode, .cs_restart, .dma_start, .dma_done,
    .analog_reset, .digital_reset, .dac_data, .down, .coef_clk, .coef_in,
    .phase, .busy(ctl_busy), .frame_done
  );

  clock_stop_gen #(.BITS(ADC_BITS)) u_csg (
    .clk, .rst_n, .tick(pcg_tick), .restart(cs_restart), .mode(cs_mode),
    .off_bits(cfg.off_bits), .bus
  );

  readout_dma #(.NP(NP), .BITS(ADC_BITS)) u_dma (
    .clk, .rst_n, .start(dma_start), .base(cfg.dma_base), .pix_addr, .bus_out,
    .mem_valid, .mem_ready, .mem_addr, .mem_wdata, .busy(dma_busy), .done(dma_done)
  );

  // the imager: analog front ends (behavioural) and the digital pixel row
  for (genvar i = 0; i < NP; i++) begin : g_fe
    pixel_frontend #(.DW(DAC_W), .IP_W(IP_W)) u_fe (
      .clk, .analog_reset, .vreset, .vramp(dac_data), .ip(photo_current[i]), .comp(comp[i])
    );
  end

  pixel_row #(.NP(NP), .BITS(ADC_BITS)) u_row (
    .pix_clk, .dig_rst(digital_reset), .down, .comp, .bus_in(bus),
    .coef_clk, .coef_in, .coef_out, .pix_addr, .bus_out
  );

endmodule
