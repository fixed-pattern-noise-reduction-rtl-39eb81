// Testbench of sensor_controller with simple models of the pixel clock
// generator (n ticks, then done) and of the readout DMA. It follows one frame
// and checks the reset and blanking lengths, the pixel clock runs requested
// for each phase (count, memory or constant period), the clock stopping mode
// of each phase, the V_ramp value in every phase-1b period and after phase
// 1b, the moment the count direction changes in phase 3, the flush clock, the
// readout and frame_done. It also shifts a coefficient word and checks the
// serial bits and clock edges.
module tb_sensor_controller;
  import imager_pkg::*;
  localparam int BITS = 9, DW = 12, RAW = 5;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  cfg_t cfg;
  logic ramp_we = 1'b0; logic [RAW-1:0] ramp_waddr = '0; logic [DW-1:0] ramp_wdata = '0;
  logic coef_we = 1'b0; logic [BITS-1:0] coef_wdata = '0;
  logic pcg_start, pcg_use_mem, pcg_tick = 1'b0, pcg_done = 1'b0;
  logic [15:0] pcg_n;
  cs_mode_e cs_mode; logic cs_restart;
  logic dma_start, dma_done = 1'b0;
  logic analog_reset, digital_reset, down, coef_clk, coef_in, busy, frame_done;
  logic [DW-1:0] dac_data;
  phase_e phase;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sensor_controller #(.BITS(BITS), .DW(DW), .RAW(RAW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // pixel clock generator model: records each run, ticks every 6 cycles
  int runs_n [$]; bit runs_mem [$]; cs_mode_e runs_mode [$];
  int tick_no = 0;
  always @(posedge clk) begin
    if (pcg_start) begin
      runs_n.push_back(int'(pcg_n)); runs_mem.push_back(pcg_use_mem);
      fork
        begin
          automatic int n = int'(pcg_n);
          for (int i = 0; i < n; i++) begin
            repeat (2) @(negedge clk);
            pcg_tick = 1'b1; @(negedge clk); pcg_tick = 1'b0;
            repeat (3) @(negedge clk);
          end
          @(negedge clk) pcg_done = 1'b1; @(negedge clk) pcg_done = 1'b0;
        end
      join_none
    end
  end

  // DMA model
  always @(posedge clk) if (dma_start) fork begin repeat (20) @(negedge clk); dma_done = 1'b1; @(negedge clk); dma_done = 1'b0; end join_none

  logic [DW-1:0] ramp_vals [32];

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t_rs, t_bl;
    cfg = '0;
    cfg.t_reset = 20'd12; cfg.t_blank = 20'd50; cfg.n_1a = 16'd20; cfg.n_1b = 16'd6;
    cfg.p_const = 24'd8; cfg.off_bits = 4'd3; cfg.n_global = 16'd4; cfg.global_down = 1'b1;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    // ramp table
    for (int i = 0; i < 32; i++) begin
      ramp_vals[i] = DW'(1000 + 97 * i);
      @(negedge clk); ramp_we = 1'b1; ramp_waddr = RAW'(i); ramp_wdata = ramp_vals[i];
    end
    @(negedge clk); ramp_we = 1'b0;
    // coefficient word
    begin
      logic [BITS-1:0] got = '0; int edges = 0;
      @(negedge clk); coef_we = 1'b1; coef_wdata = 9'h16B; @(negedge clk); coef_we = 1'b0;
      while (busy || edges == 0) begin
        @(posedge coef_clk or negedge busy);
        if (coef_clk) begin got = {got[BITS-2:0], coef_in}; edges++; end
        if (edges > 20) break;
      end
      check(edges == BITS, $sformatf("%0d coefficient clock edges", edges));
      check(got == 9'h16B, "coefficient bits, MSB first");
    end
    // frame
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    check(analog_reset && digital_reset && dac_data == ramp_vals[0], "reset asserted, V_ramp = ramp[0]");
    t_rs = cyc;
    wait (!analog_reset); t_rs = cyc - t_rs;
    check(t_rs == 12, $sformatf("reset length %0d", t_rs));
    t_bl = cyc;
    wait (phase == PH_1A); t_bl = cyc - t_bl;
    check(t_bl == 50, $sformatf("blanking %0d", t_bl));
    check(cs_mode == CS_GAIN, "gain stopping in 1a");
    wait (phase == PH_1B);
    check(dac_data == ramp_vals[0], "V_ref throughout 1a");
    // each phase-1b period: ramp[i] after the i-th tick
    for (int i = 1; i <= 6; i++) begin
      @(negedge clk iff pcg_tick); @(negedge clk);
      check(dac_data == ramp_vals[i], $sformatf("ramp step %0d", i));
      check(cs_mode == CS_GAIN, "gain stopping in 1b");
    end
    wait (phase == PH_2); @(negedge clk);
    check(dac_data == ramp_vals[7], "final ramp step");
    check(cs_mode == CS_OFFSET, "offset stopping in phase 2");
    wait (phase == PH_3); @(negedge clk);
    check(cs_mode == CS_OFF, "no stopping in phase 3");
    begin
      bit early = 1'b0;
      // sample on rising clock edges, where the tick model is stable
      forever begin
        @(posedge clk);
        if (down) early = 1'b1;
        if (pcg_tick) break;
      end
      check(!early, "direction unchanged before the first phase-3 edge");
    end
    @(negedge clk);
    check(down, "counting down after the first phase-3 edge");
    wait (phase == PH_FLUSH);
    wait (phase == PH_READOUT);
    @(posedge frame_done); @(negedge clk);
    check(phase == PH_IDLE && !down, "idle after readout");
    check(runs_n.size() == 5, $sformatf("%0d clock runs", runs_n.size()));
    if (runs_n.size() == 5) begin
      check(runs_n[0] == 20 && runs_mem[0], "1a: 20 periods from memory");
      check(runs_n[1] == 6 && !runs_mem[1], "1b: 6 constant periods");
      check(runs_n[2] == 7 && !runs_mem[2], "phase 2: 2^3-1 periods");
      check(runs_n[3] == 4, "phase 3: 4 periods");
      check(runs_n[4] == 1, "flush: 1 period");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
