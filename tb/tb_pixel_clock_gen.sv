// Testbench of pixel_clock_gen with a memory model. Checks that a run from
// memory produces exactly n rising edges spaced by the stored periods, a high
// phase of half the period, `tick` in the first high cycle, `done` after the
// last period, and that constant-period runs and the minimum period of 4
// cycles work. Latency from start to the first rising edge is checked too.
module tb_pixel_clock_gen;
  localparam int W = 24, AW = 9;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, use_mem = 1'b0;
  logic [15:0] n_pulses = '0;
  logic [W-1:0] const_period = '0;
  logic [AW-1:0] ivm_addr;
  logic [W-1:0] ivm_rdata;
  logic pix_clk, tick, busy, done;
  logic [W-1:0] mem [512];
  int checks = 0, failures = 0;
  longint cyc = 0;

  pixel_clock_gen #(.W(W), .AW(AW)) dut (.clk, .rst_n, .start, .n_pulses, .use_mem, .const_period,
                                         .ivm_addr, .ivm_rdata, .pix_clk, .tick, .busy, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk) ivm_rdata <= mem[ivm_addr];
  always_ff @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run and record rising edges, high lengths and ticks
  task automatic run(input int n, input bit mem_mode, input int cp, input int exp_per [$], input int lat);
    longint rise [$]; int high [$]; int ticks = 0, h = 0; logic prev = 1'b0; longint t0;
    @(negedge clk);
    n_pulses = 16'(n); use_mem = mem_mode; const_period = W'(cp); start = 1'b1;
    t0 = cyc;
    @(negedge clk); start = 1'b0;
    while (!done) begin
      if (pix_clk && !prev) begin rise.push_back(cyc); check(tick, "tick in the first high cycle"); end
      if (tick) ticks++;
      if (pix_clk) h++;
      if (!pix_clk && prev) begin high.push_back(h); h = 0; end
      prev = pix_clk;
      @(negedge clk);
      if (cyc - t0 > 100000) break;
    end
    if (h > 0) high.push_back(h);
    check(rise.size() == n, $sformatf("%0d rising edges, expected %0d", rise.size(), n));
    check(ticks == n, "one tick per period");
    if (rise.size() > 0) check(rise[0] - t0 == lat, $sformatf("latency %0d", rise[0] - t0));
    for (int i = 1; i < rise.size(); i++)
      check(rise[i] - rise[i-1] == exp_per[i-1], $sformatf("period %0d = %0d, expected %0d", i-1, rise[i]-rise[i-1], exp_per[i-1]));
    for (int i = 0; i < high.size() && i < exp_per.size(); i++)
      check(high[i] == exp_per[i] / 2, $sformatf("high %0d = %0d", i, high[i]));
    // the last period ends exactly when done rises
    if (rise.size() == n && n > 0) check(cyc - rise[n-1] == exp_per[n-1], $sformatf("done %0d after the last rise", cyc - rise[n-1]));
  endtask

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int per [$];
    for (int i = 0; i < 512; i++) mem[i] = W'(4 + $urandom_range(0, 40));
    mem[3] = W'(2);                      // below the minimum: stretched to 4
    repeat (3) @(negedge clk); rst_n = 1'b1;
    per = {};
    for (int i = 0; i < 50; i++) per.push_back((mem[i] < 4) ? 4 : int'(mem[i]));
    run(50, 1'b1, 0, per, 3);
    per = {};
    for (int i = 0; i < 15; i++) per.push_back(133);
    run(15, 1'b0, 133, per, 2);
    per = {7};
    run(1, 1'b0, 7, per, 2);
    // zero pulses: done at once, no edge
    @(negedge clk); n_pulses = '0; start = 1'b1; @(negedge clk); start = 1'b0;
    check(done && !pix_clk, "zero-length run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
