// End-to-end testbench of imager_system at its default size (128 pixels,
// 9-bit ADCs) and at the sensor's real timing: blanking of 6.6 ms, 495
// time-mode pixel clocks whose periods grow from about 13 us to 14 ms, 15
// voltage-mode clocks of 1.33 us, about 225 ms from reset to the end of phase 1a.
//
// The processor side is played by this testbench: it fills the interval
// memory with periods that make the time-mode code proportional to the
// photocurrent (rising edge j at K/(511-j)), the V_ramp table with a linear
// ramp that continues the time-mode scale into the voltage mode plus a final
// step above the reset level, and the coefficient chain with a gain numerator
// and an offset per pixel. Pixels are lit so that some convert in time mode,
// some in voltage mode and some stay dark.
//
// Two frames run: k = 3 offset lines with a global offset of +4 counted up,
// then k = 2 with a global offset counted down past value 1 (roll-over).
// A reference model written here follows the imager pins (pixel clock, bus,
// comparators, direction, digital reset) and predicts every pixel's value;
// the values the DMA writes to memory, decoded from LFSR states, must match
// it exactly. Ungained pixels must also lie within 1.5 codes of the ideal
// linear response, and gain-corrected ones within 2.5. Phase lengths and
// clock periods are checked, and each mechanism (clock stealing in the gain
// phases, per-pixel offset counting and blocking, global offset up and down,
// time-mode, voltage-mode and dark pixels, roll-over, DMA back-pressure, bus
// re-partitioning) must occur.
module tb_imager_system;
  import imager_pkg::*;

  localparam int    NP     = 128;
  localparam int    FRAC   = 24;           // front-end model default
  localparam real   KCYC   = 336.6e6;      // rising edge j of phase 1a at KCYC/(511-j) cycles
  localparam int    VRESET = 3000;
  localparam int    VREF   = 800;
  localparam int    NSLOT  = 510;          // 495 time-mode + 15 voltage-mode clocks

  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] cpu_addr = '0;
  logic [31:0] cpu_wdata = '0, cpu_rdata;
  logic cpu_we = 1'b0;
  logic mem_valid, mem_ready = 1'b1;
  logic [31:0] mem_addr, mem_wdata;
  logic [23:0] photo_current [NP];
  logic [DAC_W-1:0] vreset = DAC_W'(VRESET);
  logic pix_clk, analog_reset, digital_reset, down, frame_done;
  logic [ADC_BITS-1:0] bus, bus_out;
  logic [DAC_W-1:0] dac_data;
  logic [6:0] pix_addr;
  logic [NP-1:0] comp;
  phase_e phase;

  imager_system dut (.*);

  always #5 clk = ~clk;   // 10 ns

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL: %s", what); end
  endtask

  // ---------------- LFSR decoding (x^9 + x^5 + 1, reset state = value 1)
  int decode [512];
  initial begin
    logic [8:0] x = 9'd1;
    for (int s = 0; s < 512; s++) decode[s] = 0;
    for (int v = 1; v < 512; v++) begin decode[x] = v; x = {x[7:0], x[8] ^ x[4]}; end
  end

  // ---------------- processor bus
  task automatic cpu_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = 1'b1;
    @(negedge clk); cpu_we = 1'b0;
  endtask

  task automatic cpu_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); cpu_addr = a; #1 d = cpu_rdata;
  endtask

  // ---------------- system memory model with random back-pressure
  int frame_mem [NP];
  int dma_writes = 0, n_backpressure = 0;
  bit bp_on = 1'b0;
  always @(posedge clk) begin
    if (mem_valid && mem_ready) begin
      if (mem_addr >= 32'h100 && mem_addr < 32'h100 + NP) frame_mem[mem_addr - 32'h100] = int'(mem_wdata);
      dma_writes++;
    end
    if (mem_valid && !mem_ready) n_backpressure++;
    mem_ready <= bp_on ? 1'($urandom_range(0, 3) != 0) : 1'b1;
  end

  // ---------------- reference model of the pixel row
  logic [8:0] words [NP];
  int  val [NP];
  bit  en_q [NP], ce_q [NP];
  phase_e ph_q;
  int  first_phase [NP];      // phase in which the comparator was first seen switched
  int  n_steal = 0, n_off_count = 0, n_off_block = 0, n_glob_up = 0, n_glob_down = 0, n_roll = 0;

  always @(posedge digital_reset) begin
    for (int p = 0; p < NP; p++) begin val[p] = 1; en_q[p] = 0; ce_q[p] = 0; first_phase[p] = -1; end
  end

  always @(negedge pix_clk) begin
    ph_q = phase;
    for (int p = 0; p < NP; p++) begin
      en_q[p] = !comp[p];
      ce_q[p] = ((bus & ~words[p]) == '0);
      if (en_q[p] && first_phase[p] < 0) first_phase[p] = int'(phase);
      if (en_q[p] && !ce_q[p] && (phase == PH_1A || phase == PH_1B)) n_steal++;
      if (en_q[p] && !ce_q[p] && phase == PH_2) n_off_block++;
    end
  end

  always @(posedge pix_clk) begin
    if (!digital_reset)
      for (int p = 0; p < NP; p++) begin
        if (en_q[p] && ce_q[p]) begin
          if (down) begin
            if (val[p] == 1) begin val[p] = 511; n_roll++; end else val[p]--;
          end else begin
            if (val[p] == 511) begin val[p] = 1; n_roll++; end else val[p]++;
          end
          if (ph_q == PH_2) n_off_count++;
          if (ph_q == PH_3 || ph_q == PH_FLUSH) begin if (down) n_glob_down++; else n_glob_up++; end
        end
      end
  end

  // ---------------- pixel clock period measurement per phase
  longint last_rise = 0;
  int n_rise_ph [16];
  int bad_1b_period = 0;
  phase_e rise_ph;
  always @(posedge pix_clk) begin
    if (phase == PH_1B && rise_ph == PH_1B && (cyc - last_rise) != 133) bad_1b_period++;
    n_rise_ph[int'(phase)]++;
    rise_ph = phase;
    last_rise = cyc;
  end

  // ---------------- scene and coefficients
  int gain [NP], offs [NP];
  real code_ideal [NP];

  function automatic real ip_for_code(input real c);
    // time-mode code c <=> crossing of V_ref at KCYC/c cycles
    return c * real'(VRESET - VREF) * (2.0 ** FRAC) / KCYC;
  endfunction

  task automatic setup_scene();
    for (int p = 0; p < NP; p++) begin
      real c;
      if (p % 16 == 15)      c = 0.0;                                    // dark
      else if (p % 16 >= 12) c = 2.0 + real'($urandom_range(0, 1300)) / 100.0;  // voltage mode
      else                   c = 18.0 + real'($urandom_range(0, 48000)) / 100.0; // time mode
      photo_current[p] = 24'($rtoi(ip_for_code(c) + 0.5));
      // ideal code from the photocurrent actually applied
      code_ideal[p] = real'(photo_current[p]) * KCYC / (real'(VRESET - VREF) * (2.0 ** FRAC));
    end
  endtask

  task automatic load_coefficients(input int k);
    logic [31:0] st;
    for (int p = NP - 1; p >= 0; p--) begin          // farthest pixel first
      cpu_write(12'h00B, 32'(words[p]));
      do cpu_read(12'h001, st); while (st[0]);
    end
  endtask

  // ---------------- one frame
  task automatic run_frame(input int k, input int n_glob, input bit glob_down, input string name);
    logic [31:0] st;
    longint t0, t_1b, t_2, t_3;
    int ph2_rises;
    for (int p = 0; p < NP; p++) begin
      gain[p] = (p % 4 == 0) ? 511 : int'($urandom_range(511 - (1 << (9 - k)) + 1, 511));
      offs[p] = (p % 16 == 15 && glob_down) ? 0 : int'($urandom_range(0, (1 << k) - 1));
      words[p] = 9'(coef_word(gain[p], offs[p], k, ADC_BITS));
    end
    load_coefficients(k);
    cpu_write(12'h007, 32'(k));
    cpu_write(12'h008, 32'(n_glob));
    cpu_write(12'h009, 32'(glob_down));
    for (int i = 0; i < 16; i++) n_rise_ph[i] = 0;
    bp_on = glob_down;
    dma_writes = 0;
    cpu_write(12'h000, 32'd1);
    t0 = cyc;
    wait (phase == PH_1B); t_1b = cyc;
    wait (phase == PH_2);  t_2 = cyc;
    wait (phase == PH_3);  t_3 = cyc;
    do cpu_read(12'h001, st); while (!st[1]);
    $display("%s: integration to end of 1a %0d cycles, 1b %0d cycles, frame %0d cycles",
             name, t_1b - t0, t_2 - t_1b, cyc - t0);
    // phase structure
    check(n_rise_ph[int'(PH_1A)] == 495, $sformatf("%s: %0d phase-1a clocks", name, n_rise_ph[int'(PH_1A)]));
    check(n_rise_ph[int'(PH_1B)] == 15, $sformatf("%s: %0d phase-1b clocks", name, n_rise_ph[int'(PH_1B)]));
    check(n_rise_ph[int'(PH_2)] == (1 << k) - 1, $sformatf("%s: %0d phase-2 clocks", name, n_rise_ph[int'(PH_2)]));
    check(n_rise_ph[int'(PH_3)] == n_glob, $sformatf("%s: %0d phase-3 clocks", name, n_rise_ph[int'(PH_3)]));
    check(bad_1b_period == 0, "phase-1b clock period is 1.33 us");
    check(t_1b - t0 > 22_300_000 && t_1b - t0 < 22_600_000, "blanking and phase 1a take about 225 ms");
    check(dma_writes == NP, "one memory write per pixel");
    // pixel values
    for (int p = 0; p < NP; p++) begin
      int got;
      got = decode[frame_mem[p] & 511];
      check(got == val[p], $sformatf("%s pixel %0d: read %0d, model %0d", name, p, got, val[p]));
      if (!glob_down) begin
        real ideal, err;
        ideal = 1.0 + code_ideal[p] * real'(gain[p]) / 511.0 + real'(offs[p]) + real'(n_glob);
        err = real'(got) - ideal;
        if (err < 0) err = -err;
        check(err <= ((gain[p] == 511) ? 1.5 : 2.5),
              $sformatf("%s pixel %0d: code %0d, ideal %0.2f", name, p, got, ideal));
      end
    end
  endtask

  int n_time = 0, n_volt = 0, n_dark = 0;

  initial begin
    #(600_000_000);   // 60 M system cycles, well beyond two frames
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    setup_scene();
    repeat (3) @(negedge clk); rst_n = 1'b1;
    // interval memory: period j = K/(510-j) - K/(511-j), j = 1..495
    for (int j = 1; j <= 495; j++) begin
      real pj;
      pj = KCYC / real'(510 - j) - KCYC / real'(511 - j);
      cpu_write(12'h200 + 12'(j - 1), 32'($rtoi(pj + 0.5)));
    end
    // blanking T_b = K/510 after the reset, less the fixed start latency
    cpu_write(12'h003, 32'($rtoi(KCYC / 510.0 + 0.5) - 2));
    // V_ramp: V_ref, then 15 steps continuing the code scale, then above V_reset
    cpu_write(12'h020, 32'(VREF));
    for (int i = 1; i <= 15; i++)
      cpu_write(12'h020 + 12'(i), 32'($rtoi(real'(VREF) + real'(i) * real'(VRESET - VREF) / 16.0 + 0.5)));
    cpu_write(12'h020 + 12'd16, 32'(VRESET + 100));
    cpu_write(12'h00A, 32'h100);

    // frame 1: the operating point of the timing diagram (k = 3, global +4)
    run_frame(3, 4, 1'b0, "frame1");
    for (int p = 0; p < NP; p++) begin
      if (first_phase[p] == int'(PH_1A)) n_time++;
      else if (first_phase[p] == int'(PH_1B)) n_volt++;
      else n_dark++;
    end
    // frame 2: bus re-partitioned (k = 2), global offset counted down past 1
    run_frame(2, 3, 1'b1, "frame2");

    $display("mechanisms: steal=%0d off_count=%0d off_block=%0d glob_up=%0d glob_down=%0d roll=%0d",
             n_steal, n_off_count, n_off_block, n_glob_up, n_glob_down, n_roll);
    $display("pixels: time-mode=%0d voltage-mode=%0d dark=%0d, DMA back-pressure cycles=%0d",
             n_time, n_volt, n_dark, n_backpressure);
    check(n_steal > 0, "gain clock stealing happened");
    check(n_off_count > 0, "offset counting happened");
    check(n_off_block > 0, "offset blocking happened");
    check(n_glob_up > 0, "global offset up happened");
    check(n_glob_down > 0, "global offset down happened");
    check(n_roll > 0, "counter roll-over happened");
    check(n_time > 0 && n_volt > 0 && n_dark > 0, "time-mode, voltage-mode and dark pixels");
    check(n_backpressure > 0, "DMA back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
