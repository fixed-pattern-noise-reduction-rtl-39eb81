// Testbench of cfg_regs: reset values, write and read-back of every
// configuration register, clamping of the offset line count, the command
// strobes and memory windows, and the sticky frame-done status bit.
module tb_cfg_regs;
  import imager_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] cpu_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic cpu_we = 1'b0, ctl_busy = 1'b0, frame_done = 1'b0;
  phase_e phase = PH_1B;
  cfg_t cfg;
  logic start, coef_we, ramp_we, ivm_we;
  logic [ADC_BITS-1:0] coef_wdata;
  logic [RAMP_AW-1:0] ramp_waddr;
  logic [DAC_W-1:0] ramp_wdata;
  logic [IVM_AW-1:0] ivm_waddr;
  logic [PER_W-1:0] ivm_wdata;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    cpu_addr = a; #1 d = cpu_rdata;
  endtask

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = 1'b1; #1;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    check(cfg.t_blank == 660000 && cfg.n_1a == 495 && cfg.n_1b == 15 && cfg.p_const == 133 && cfg.off_bits == 3,
          "reset values");
    rd(12'h004, d); check(d == 495, "read N_1A");
    wr(12'h002, 32'd77);   check(start == 1'b0 && coef_we == 1'b0 && ramp_we == 1'b0 && ivm_we == 1'b0, "no strobe");
    wr(12'h003, 32'd1234);
    wr(12'h004, 32'd40);
    wr(12'h005, 32'd9);
    wr(12'h006, 32'd21);
    wr(12'h007, 32'd15);
    wr(12'h008, 32'd6);
    wr(12'h009, 32'd1);
    wr(12'h00A, 32'h1000);
    @(negedge clk); cpu_we = 1'b0;
    check(cfg.t_reset == 77 && cfg.t_blank == 1234 && cfg.n_1a == 40 && cfg.n_1b == 9, "written timing");
    check(cfg.p_const == 21 && cfg.n_global == 6 && cfg.global_down && cfg.dma_base == 32'h1000, "written phases");
    check(cfg.off_bits == 9, "offset lines clamped to 9");
    rd(12'h006, d); check(d == 21, "read P_CONST");
    rd(12'h00A, d); check(d == 32'h1000, "read DMA_BASE");
    // strobes
    wr(12'h000, 32'd1); check(start, "start strobe");
    wr(12'h00B, 32'h1A5); check(coef_we && coef_wdata == 9'h1A5, "coefficient strobe");
    wr(12'h025, 32'd3000); check(ramp_we && ramp_waddr == 5 && ramp_wdata == 3000, "ramp window");
    wr(12'h3FF, 32'd999); check(ivm_we && ivm_waddr == 9'h1FF && ivm_wdata == 999, "interval window");
    wr(12'h200, 32'd5); check(ivm_we && ivm_waddr == 0, "interval window base");
    @(negedge clk); cpu_we = 1'b0;
    // status
    ctl_busy = 1'b1; rd(12'h001, d); check(d[0] && !d[1] && d[7:4] == 4'(PH_1B), "status busy");
    frame_done = 1'b1; @(negedge clk); frame_done = 1'b0; ctl_busy = 1'b0;
    rd(12'h001, d); check(d[1] && !d[0], "done flag set");
    @(negedge clk); rd(12'h001, d); check(d[1], "done flag sticky");
    wr(12'h000, 32'd1); @(negedge clk); cpu_we = 1'b0;
    rd(12'h001, d); check(!d[1], "done flag cleared by start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
