// Flat-field calibration of the full imager_system (128 pixels, 9 bits, all
// parameters at their defaults) as it would be done in use.
//
// The scene model gives every pixel its own responsivity (0.88 to 1.0) and
// its own dark current (0 to 7 codes, one pixel at the top of the range).
// These are the two kinds of fixed-pattern noise the clock stealing removes.
// The testbench plays the processor:
//   1. a dark frame without correction gives each pixel's dark value D;
//   2. a uniformly lit frame without correction gives its bright value B;
//   3. offsets are set so that every dark value is lifted to the largest one,
//      off = max(D) - D (k = 3 offset lines, 0..7). Gains are set so that
//      every pixel's light response B - D is scaled down to the weakest one,
//      C = round(511 * min(B - D) / (B - D)), kept within the 448..511 range
//      of the 6 gain lines. Phase 3 then counts all pixels down by
//      max(D) - 2, so that dark reads 2 rather than 1 and cannot roll over;
//   4. a dark frame and a lit frame are taken with these coefficients.
// It checks that the spread (largest minus smallest value) and the standard
// deviation of both corrected frames fall well below the uncorrected ones. In
// numbers: dark spread at most 2 with mean near 2; lit standard deviation at
// most 1 code, against about 13 before.
//
// To keep the run short, the time-mode clock schedule is compressed 20 times
// through the registers: rising edge j of phase 1a at K/(511-j) cycles with
// K = 16.83 M, blanking K/510. This changes register contents only. The
// photocurrents are scaled to match, so codes are as at full timing.
module tb_flat_field;
  import imager_pkg::*;

  localparam int  NP     = 128;
  localparam int  FRAC   = 24;
  localparam real KCYC   = 16.83e6;
  localparam int  VRESET = 3000;
  localparam int  VREF   = 800;
  localparam real LIGHT  = 380.0;     // code of a pixel with responsivity 1

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

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // LFSR state -> value (x^9 + x^5 + 1, state 1 = value 1)
  int decode [512];
  initial begin
    logic [8:0] x;
    x = 9'd1;
    for (int s = 0; s < 512; s++) decode[s] = 0;
    for (int v = 1; v < 512; v++) begin decode[x] = v; x = {x[7:0], x[8] ^ x[4]}; end
  end

  task automatic cpu_write(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d; cpu_we = 1'b1;
    @(negedge clk); cpu_we = 1'b0;
  endtask

  task automatic cpu_read(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk); cpu_addr = a; #1 d = cpu_rdata;
  endtask

  int frame_mem [NP];
  always @(posedge clk)
    if (mem_valid && mem_ready && mem_addr < 32'(NP)) frame_mem[mem_addr] = int'(mem_wdata);

  // scene
  real resp [NP], dark [NP];

  function automatic logic [23:0] ip_for_code(input real c);
    return 24'($rtoi(c * real'(VRESET - VREF) * (2.0 ** FRAC) / KCYC + 0.5));
  endfunction

  task automatic light(input real level);
    for (int p = 0; p < NP; p++) photo_current[p] = ip_for_code(resp[p] * level + dark[p]);
  endtask

  logic [8:0] words [NP];

  task automatic load_words(input int k, input int n_glob);
    logic [31:0] st;
    for (int p = NP - 1; p >= 0; p--) begin
      cpu_write(12'h00B, 32'(words[p]));
      do cpu_read(12'h001, st); while (st[0]);
    end
    cpu_write(12'h007, 32'(k));
    cpu_write(12'h008, 32'(n_glob));
    cpu_write(12'h009, 32'(n_glob > 0));
  endtask

  task automatic take_frame(output int v [NP]);
    logic [31:0] st;
    cpu_write(12'h000, 32'd1);
    do cpu_read(12'h001, st); while (!st[1]);
    for (int p = 0; p < NP; p++) v[p] = decode[frame_mem[p] & 511];
  endtask

  task automatic stats(input int v [NP], input string name, output int spread, output real mean, output real sd);
    int lo, hi;
    real s, s2;
    lo = 1000; hi = -1; s = 0.0; s2 = 0.0;
    for (int p = 0; p < NP; p++) begin
      if (v[p] < lo) lo = v[p];
      if (v[p] > hi) hi = v[p];
      s += real'(v[p]); s2 += real'(v[p]) * real'(v[p]);
    end
    mean = s / NP;
    sd = $sqrt(s2 / NP - mean * mean);
    spread = hi - lo;
    $display("%-14s min %3d max %3d mean %7.2f sd %6.3f", name, lo, hi, mean, sd);
  endtask

  initial begin
    #(300_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d0 [NP], b0 [NP], d1 [NP], b1 [NP];
    int sp_d0, sp_b0, sp_d1, sp_b1, maxd, mins, nglob;
    real m_d0, m_b0, m_d1, m_b1, sd_d0, sd_b0, sd_d1, sd_b1;
    for (int p = 0; p < NP; p++) begin
      resp[p] = 0.88 + real'($urandom_range(0, 1200)) / 10000.0;
      dark[p] = (p == 77) ? 7.0 : real'($urandom_range(0, 400)) / 100.0;
    end
    repeat (3) @(negedge clk); rst_n = 1'b1;
    for (int j = 1; j <= 495; j++) begin
      real pj;
      pj = KCYC / real'(510 - j) - KCYC / real'(511 - j);
      cpu_write(12'h200 + 12'(j - 1), 32'($rtoi(pj + 0.5)));
    end
    cpu_write(12'h003, 32'($rtoi(KCYC / 510.0 + 0.5) - 2));
    cpu_write(12'h020, 32'(VREF));
    for (int i = 1; i <= 15; i++)
      cpu_write(12'h020 + 12'(i), 32'($rtoi(real'(VREF) + real'(i) * real'(VRESET - VREF) / 16.0 + 0.5)));
    cpu_write(12'h020 + 12'd16, 32'(VRESET + 100));
    cpu_write(12'h00A, 32'h0);

    // 1, 2: uncorrected frames
    for (int p = 0; p < NP; p++) words[p] = 9'(coef_word(511, 0, 0, ADC_BITS));
    load_words(0, 0);
    light(0.0);   take_frame(d0);
    light(LIGHT); take_frame(b0);
    stats(d0, "dark, raw", sp_d0, m_d0, sd_d0);
    stats(b0, "lit, raw", sp_b0, m_b0, sd_b0);

    // 3: coefficients
    maxd = 0; mins = 1000;
    for (int p = 0; p < NP; p++) begin
      if (d0[p] > maxd) maxd = d0[p];
      if (b0[p] - d0[p] < mins) mins = b0[p] - d0[p];
    end
    nglob = (maxd > 2) ? maxd - 2 : 0;
    check(maxd - 1 <= 7, "dark spread fits the 3 offset lines");
    for (int p = 0; p < NP; p++) begin
      int c;
      c = $rtoi(511.0 * real'(mins) / real'(b0[p] - d0[p]) + 0.5);
      if (c < 448) c = 448;
      if (c > 511) c = 511;
      words[p] = 9'(coef_word(c, maxd - d0[p], 3, ADC_BITS));
    end
    load_words(3, nglob);

    // 4: corrected frames
    light(0.0);   take_frame(d1);
    light(LIGHT); take_frame(b1);
    stats(d1, "dark, corr.", sp_d1, m_d1, sd_d1);
    stats(b1, "lit, corr.", sp_b1, m_b1, sd_b1);

    check(sp_d0 >= 5, "the scene has dark-signal non-uniformity");
    check(sp_b0 >= 30, "the scene has photo-response non-uniformity");
    check(sp_d1 <= 2, $sformatf("dark spread after correction %0d", sp_d1));
    check(m_d1 > 1.5 && m_d1 < 3.0, $sformatf("dark level after correction %0.2f", m_d1));
    check(sd_d1 < sd_d0 / 2.0, "dark FPN reduced");
    check(sd_b1 <= 1.0, $sformatf("lit FPN after correction %0.3f", sd_b1));
    check(sd_b1 < sd_b0 / 5.0, "lit FPN reduced");
    for (int p = 0; p < NP; p++)
      check(d1[p] >= 1 && d1[p] < 100, $sformatf("pixel %0d dark value %0d: no roll-over", p, d1[p]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
