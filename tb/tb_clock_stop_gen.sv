// Testbench of clock_stop_gen. Gain mode: over one 511-tick train, line n
// must pulse 2^(8-n) times, exactly one line per tick, the train must be
// mirror-symmetric and Bus(8) must pulse in the middle; lines below k stay
// low. Offset mode: Bus(k-1) for 2^(k-1) ticks down to Bus(0) for one tick.
// Off mode: all lines low. The bus must change only after a tick.
module tb_clock_stop_gen;
  import imager_pkg::*;
  localparam int BITS = 9;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, restart = 1'b0;
  cs_mode_e mode = CS_OFF;
  logic [3:0] off_bits = '0;
  logic [BITS-1:0] bus;
  int checks = 0, failures = 0;

  clock_stop_gen #(.BITS(BITS)) dut (.clk, .rst_n, .tick, .restart, .mode, .off_bits, .bus);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one tick, then the bus value it produced
  task automatic do_tick(output logic [BITS-1:0] b);
    tick = 1'b1; @(negedge clk); tick = 1'b0;
    b = bus;
    @(negedge clk);
    check(bus == b, "bus holds between ticks");
  endtask

  task automatic do_restart();
    restart = 1'b1; @(negedge clk); restart = 1'b0;
  endtask

  logic [BITS-1:0] train [512];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // gain mode with k = 0 and k = 3
    for (int kk = 0; kk <= 3; kk += 3) begin
      int cnt [BITS];
      off_bits = 4'(kk); mode = CS_GAIN; do_restart();
      for (int n = 0; n < BITS; n++) cnt[n] = 0;
      for (int t = 1; t <= 511; t++) begin
        do_tick(train[t]);
        for (int n = 0; n < BITS; n++) if (train[t][n]) cnt[n]++;
        check($countones(train[t]) <= 1, "at most one line per tick");
      end
      for (int n = 0; n < BITS; n++)
        check(cnt[n] == ((n < kk) ? 0 : (1 << (8 - n))), $sformatf("k=%0d line %0d pulses %0d", kk, n, cnt[n]));
      for (int t = 1; t < 256; t++)
        check(train[t] == train[512 - t], "symmetric train");
      check(train[256] == 9'h100, "Bus(8) in the middle");
      // wraps: the next train starts like the first
      begin logic [BITS-1:0] b; do_tick(b); check(b == train[1], "train repeats"); end
    end
    // offset mode, k = 3: Bus(2) x4, Bus(1) x2, Bus(0) x1
    begin
      logic [BITS-1:0] exp [7] = '{9'h004, 9'h004, 9'h004, 9'h004, 9'h002, 9'h002, 9'h001};
      off_bits = 4'd3; mode = CS_OFFSET; do_restart();
      for (int i = 0; i < 7; i++) begin
        logic [BITS-1:0] b; do_tick(b);
        check(b == exp[i], $sformatf("offset step %0d: %h", i, b));
      end
    end
    // offset mode, k = 5: 31 ticks, line n high for 2^n ticks
    begin
      int cnt [BITS];
      off_bits = 4'd5; mode = CS_OFFSET; do_restart();
      for (int n = 0; n < BITS; n++) cnt[n] = 0;
      for (int i = 0; i < 31; i++) begin
        logic [BITS-1:0] b; do_tick(b);
        for (int n = 0; n < BITS; n++) if (b[n]) cnt[n]++;
      end
      for (int n = 0; n < BITS; n++) check(cnt[n] == ((n < 5) ? (1 << n) : 0), $sformatf("offset k=5 line %0d", n));
    end
    // off mode
    mode = CS_OFF;
    for (int i = 0; i < 5; i++) begin logic [BITS-1:0] b; do_tick(b); check(b == '0, "off mode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
