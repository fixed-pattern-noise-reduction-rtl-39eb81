// Linearity of clock-stealing gain correction for ADC resolutions of 6 to 11
// bits.
//
// For each resolution, an inl_bench runs the gain pulse train of
// clock_stop_gen through one pixel ADC per gain numerator. It reports the
// worst integral non-linearity over all output codes and all numerators. The
// expected values below are the published maxima for this technique. Matching
// them to 1e-5 LSB shows that the bus pattern and the coefficient bit mapping
// steal the same clocks as the original sensor. Each bench must also keep
// exactly C of 2^BITS-1 clocks in every pixel over a full train.
//
// The benches run in sequence; the largest (2048 pixels, 2047 clocks) takes
// the most time. The 12-bit case is left out only to keep the build short;
// inl_bench accepts it. A watchdog ends the run if a bench never finishes.
module tb_gain_inl;
  localparam int NB = 6;               // resolutions 6..11
  localparam real EXPECT [NB] = '{1.000000, 1.110236, 1.333333, 1.444227,
                                  1.666667, 1.777724};
  logic clk = 1'b0;
  logic [NB-1:0] start = '0, done, full_ok;
  longint        max_num [NB];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar b = 0; b < NB; b++) begin : g_res
    inl_bench #(.BITS(6 + b)) u_bench (
      .clk, .start(start[b]), .done(done[b]), .max_num(max_num[b]), .full_ok(full_ok[b])
    );
  end

  initial begin
    #(400_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      real m, inl;
      m = real'((1 << (6 + b)) - 1);
      @(negedge clk); start[b] = 1'b1; @(negedge clk); start[b] = 1'b0;
      wait (done[b]);
      inl = real'(max_num[b]) / m;
      checks++;
      if (inl - EXPECT[b] > 1.0e-5 || EXPECT[b] - inl > 1.0e-5) begin
        failures++;
        $display("FAIL %0d bits: max INL %f LSB, expected %f", 6 + b, inl, EXPECT[b]);
      end else begin
        $display("%0d bits: max INL %f LSB (%f %% of full scale)", 6 + b, inl, 100.0 * inl / m);
      end
      checks++;
      if (!full_ok[b]) begin
        failures++;
        $display("FAIL %0d bits: a pixel did not keep C of M clocks", 6 + b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
