// Testbench of pixel_adc. A coefficient word is shifted in; then a full
// gain train (independently generated here: Bus(n) pulses when the step has
// n trailing zeros), an offset phase and a global phase are clocked with the
// comparator already switched, and the decoded counter value must equal
// 1 + gain numerator + offset + global clocks. Further cases: comparator
// still high (no counting), comparator switching half-way (time mode),
// counting down with roll-over, and the one-period lag between sampling at
// the falling edge and counting at the rising edge.
module tb_pixel_adc;
  import imager_pkg::*;
  localparam int BITS = 9;
  logic pix_clk = 1'b0, dig_rst = 1'b0, comp = 1'b1, down = 1'b0;
  logic [BITS-1:0] bus_in = '0;
  logic coef_clk = 1'b0, coef_in = 1'b0, coef_out;
  logic [BITS-1:0] count, coef;
  int checks = 0, failures = 0;

  pixel_adc #(.BITS(BITS)) dut (.pix_clk, .dig_rst, .comp, .bus_in, .down, .coef_clk, .coef_in,
                                .coef_out, .count, .coef);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // value of an LFSR state: 1 + forward steps from the reset state
  function automatic int value_of(input logic [8:0] s);
    logic [8:0] x = 9'd1;
    for (int v = 1; v < 512; v++) begin
      if (x == s) return v;
      x = {x[7:0], x[8] ^ x[4]};
    end
    return 0;
  endfunction

  task automatic load_coef(input logic [8:0] w);
    for (int i = BITS - 1; i >= 0; i--) begin
      coef_in = w[i]; #2 coef_clk = 1'b1; #2 coef_clk = 1'b0;
    end
  endtask

  // one pixel clock period: bus set after the rising edge, sampled at the fall
  task automatic slot(input logic [8:0] b);
    pix_clk = 1'b1; #2 bus_in = b; #3 pix_clk = 1'b0; #5;
  endtask

  function automatic logic [8:0] gain_bus(input int t, input int k);
    for (int n = 0; n < BITS; n++) if (((t >> n) & 1) != 0) return (n >= k) ? 9'(1 << n) : '0;
    return '0;
  endfunction

  task automatic frame(input int c, input int off, input int k, input int glob, input bit glob_down,
                       input int comp_off_at);
    dig_rst = 1'b1; comp = 1'b1; down = 1'b0; #3 dig_rst = 1'b0;
    load_coef(9'(coef_word(c, off, k, BITS)));
    for (int t = 1; t <= 511; t++) begin
      if (t == comp_off_at) comp = 1'b0;
      slot(gain_bus(t, k));
    end
    comp = 1'b0;                                   // final ramp step
    for (int n = k - 1; n >= 0; n--)
      for (int i = 0; i < (1 << n); i++) slot(9'(1 << n));
    for (int i = 0; i < glob; i++) begin
      slot('0);
      if (i == 0) down = glob_down;                // after the first rising edge
    end
    slot('0);                                      // flush edge
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 dig_rst = 1'b1; #2 dig_rst = 1'b0;
    check(value_of(count) == 1, "reset value 1");
    // coefficient register and serial output
    load_coef(9'h1A5);
    check(coef == 9'h1A5, "coefficient loaded");
    check(coef_out == 1'b1, "serial out is Q8");
    // gain 459/511 (k = 3) + offset 3 + global +4, comparator low from the start
    frame(459, 3, 3, 4, 1'b0, 1);
    check(value_of(count) == 1 + 459 + 3 + 4, $sformatf("459/511 +3 +4 -> %0d", value_of(count)));
    // full gain, k = 0, no offset
    frame(510, 0, 0, 0, 1'b0, 1);
    check(value_of(count) == 511, $sformatf("full scale -> %0d", value_of(count)));
    // dark pixel: only offset and global phases count
    frame(300, 5, 3, 2, 1'b0, 100000);
    check(value_of(count) == 1 + 5 + 2, $sformatf("dark -> %0d", value_of(count)));
    // dark pixel, global offset down past 1 rolls over to the top
    frame(300, 1, 3, 3, 1'b1, 100000);
    check(value_of(count) == 510, $sformatf("roll over -> %0d", value_of(count)));
    // time mode: comparator switches at step 300 of 511, no gain correction
    frame(511, 0, 0, 0, 1'b0, 300);
    check(value_of(count) == 1 + 212, $sformatf("time mode -> %0d", value_of(count)));
    // gain 256/511 with k = 0, comparator on from the start: 256 kept
    frame(256, 0, 0, 0, 1'b0, 1);
    check(value_of(count) == 257, $sformatf("gain 256 -> %0d", value_of(count)));
    // sampling lag: a single enabled slot counts only at the next rising edge
    dig_rst = 1'b1; comp = 1'b1; #3 dig_rst = 1'b0;
    load_coef(9'h1FF);
    comp = 1'b0; pix_clk = 1'b1; #5 pix_clk = 1'b0; #5;
    check(value_of(count) == 1, "no count before the next rising edge");
    comp = 1'b1; pix_clk = 1'b1; #1;
    check(value_of(count) == 2, "counted at the next rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
