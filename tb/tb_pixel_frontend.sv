// Testbench of the pixel_frontend model: after the reset is released the
// comparator must switch at the step where the linearly falling sense node
// crosses V_ramp, for several photocurrents; a raised V_ramp above the reset
// level must switch it at once.
module tb_pixel_frontend;
  localparam int DW = 12, FRAC = 16, IP_W = 24;
  logic clk = 1'b0, analog_reset = 1'b1;
  logic [DW-1:0] vreset = 12'd3000, vramp = 12'd1000;
  logic [IP_W-1:0] ip = '0;
  logic comp;
  int checks = 0, failures = 0;

  pixel_frontend #(.DW(DW), .FRAC(FRAC), .IP_W(IP_W)) dut (.clk, .analog_reset, .vreset, .vramp, .ip, .comp);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ips [4] = '{65536, 100000, 654321, 3000000};
    foreach (ips[i]) begin
      longint drop, steps, n;
      analog_reset = 1'b1; ip = IP_W'(ips[i]);
      repeat (3) @(negedge clk);
      checks++; if (comp !== 1'b1) begin failures++; $display("FAIL comp not high in reset"); end
      // steps needed: smallest s with 3000*2^16 - s*ip <= 1000*2^16
      drop  = longint'(2000) << FRAC;
      steps = (drop + ips[i] - 1) / ips[i];
      analog_reset = 1'b0;
      n = 0;
      while (comp && n < 100000) begin @(negedge clk); n++; end
      checks++;
      if (n != steps) begin failures++; $display("FAIL ip=%0d crossing after %0d steps, expected %0d", ips[i], n, steps); end
    end
    // ramp above reset level: comparator low immediately
    analog_reset = 1'b1; ip = '0; repeat (2) @(negedge clk);
    analog_reset = 1'b0; @(negedge clk);
    checks++; if (comp !== 1'b1) begin failures++; $display("FAIL dark pixel should stay high"); end
    vramp = 12'd3100; #1;
    checks++; if (comp !== 1'b0) begin failures++; $display("FAIL ramp above reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
