// Register bank between the configuring processor and the imager control
// logic.
//
// A simple synchronous register bus: a write takes effect at the clock edge
// where `cpu_we` is high; reads are combinational from `cpu_addr`. Word
// addresses:
//   0x000 CTRL        write bit 0 = 1: start one frame (pulse on `start`)
//   0x001 STATUS      read: bit 0 controller busy, bit 1 frame done (sticky,
//                     cleared by a new start), bits 7:4 current phase
//   0x002 T_RESET     reset pulse length, system cycles
//   0x003 T_BLANK     blanking time T_b, system cycles
//   0x004 N_1A        pixel clocks of phase 1a (interval memory entries)
//   0x005 N_1B        pixel clocks of phase 1b
//   0x006 P_CONST     period of phases 1b, 2 and 3, system cycles
//   0x007 OFF_BITS    k, bus lines for the offset correction (0..9)
//   0x008 N_GLOBAL    pixel clocks of phase 3 (global offset)
//   0x009 GLOBAL_DOWN bit 0: count down in phase 3
//   0x00A DMA_BASE    word address of the frame in system memory
//   0x00B COEF_WORD   write: shift this 9-bit word into the coefficient chain
//   0x020-0x03F       V_ramp table (write only)
//   0x200-0x3FF       interval memory (write only)
// Reset values are the sensor's operating point: T_b = 6.6 ms, 495 time-mode
// clocks, 15 voltage-mode clocks of 1.33 us, 3 offset lines. The map, the
// bus and the reset pulse length are this design's choices.
module cfg_regs
  import imager_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [11:0]        cpu_addr,
  input  logic [31:0]        cpu_wdata,
  input  logic               cpu_we,
  output logic [31:0]        cpu_rdata,
  // status from the controller
  input  logic               ctl_busy,
  input  logic               frame_done,   // one-cycle pulse at the end of a frame
  input  phase_e             phase,
  // configuration and commands
  output cfg_t               cfg,
  output logic               start,
  output logic               coef_we,
  output logic [ADC_BITS-1:0] coef_wdata,
  output logic               ramp_we,
  output logic [RAMP_AW-1:0] ramp_waddr,
  output logic [DAC_W-1:0]   ramp_wdata,
  output logic               ivm_we,
  output logic [IVM_AW-1:0]  ivm_waddr,
  output logic [PER_W-1:0]   ivm_wdata
);

  logic done_flag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.t_reset     <= CNT_W'(100);
      cfg.t_blank     <= CNT_W'(660_000);
      cfg.n_1a        <= 16'd495;
      cfg.n_1b        <= 16'd15;
      cfg.p_const     <= PER_W'(133);
      cfg.off_bits    <= 4'd3;
      cfg.n_global    <= 16'd0;
      cfg.global_down <= 1'b0;
      cfg.dma_base    <= '0;
      done_flag       <= 1'b0;
    end else begin
      if (frame_done) done_flag <= 1'b1;
      if (cpu_we) begin
        unique case (cpu_addr)
          12'h000: if (cpu_wdata[0]) done_flag <= 1'b0;
          12'h002: cfg.t_reset     <= cpu_wdata[CNT_W-1:0];
          12'h003: cfg.t_blank     <= cpu_wdata[CNT_W-1:0];
          12'h004: cfg.n_1a        <= cpu_wdata[15:0];
          12'h005: cfg.n_1b        <= cpu_wdata[15:0];
          12'h006: cfg.p_const     <= cpu_wdata[PER_W-1:0];
          12'h007: cfg.off_bits    <= (cpu_wdata[3:0] > 4'(ADC_BITS)) ? 4'(ADC_BITS) : cpu_wdata[3:0];
          12'h008: cfg.n_global    <= cpu_wdata[15:0];
          12'h009: cfg.global_down <= cpu_wdata[0];
          12'h00A: cfg.dma_base    <= cpu_wdata;
          default: ;
        endcase
      end
    end
  end

  // command strobes and memory windows
  always_comb begin
    start      = cpu_we && (cpu_addr == 12'h000) && cpu_wdata[0];
    coef_we    = cpu_we && (cpu_addr == 12'h00B);
    coef_wdata = cpu_wdata[ADC_BITS-1:0];
    ramp_we    = cpu_we && (cpu_addr[11:5] == 7'h01);
    ramp_waddr = cpu_addr[RAMP_AW-1:0];
    ramp_wdata = cpu_wdata[DAC_W-1:0];
    ivm_we     = cpu_we && (cpu_addr[11:9] == 3'b001);
    ivm_waddr  = cpu_addr[IVM_AW-1:0];
    ivm_wdata  = cpu_wdata[PER_W-1:0];
  end

  always_comb begin
    unique case (cpu_addr)
      12'h001: cpu_rdata = {24'd0, phase, 2'd0, done_flag, ctl_busy};
      12'h002: cpu_rdata = 32'(cfg.t_reset);
      12'h003: cpu_rdata = 32'(cfg.t_blank);
      12'h004: cpu_rdata = 32'(cfg.n_1a);
      12'h005: cpu_rdata = 32'(cfg.n_1b);
      12'h006: cpu_rdata = 32'(cfg.p_const);
      12'h007: cpu_rdata = 32'(cfg.off_bits);
      12'h008: cpu_rdata = 32'(cfg.n_global);
      12'h009: cpu_rdata = 32'(cfg.global_down);
      12'h00A: cpu_rdata = cfg.dma_base;
      default: cpu_rdata = '0;
    endcase
  end

endmodule
