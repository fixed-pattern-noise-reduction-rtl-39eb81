// Testbench of pixel_row with 8 pixels. Different coefficient words are
// shifted through the chain (last pixel first); each pixel's comparator
// switches at a different step of a 511-step gain train. The counters are
// then read through the address decoder and decoded; each must equal the
// count worked out here from the coefficient and the switching step.
module tb_pixel_row;
  import imager_pkg::*;
  localparam int NP = 8, BITS = 9, K = 2;
  logic pix_clk = 1'b0, dig_rst = 1'b0, down = 1'b0;
  logic [NP-1:0] comp = '1;
  logic [BITS-1:0] bus_in = '0;
  logic coef_clk = 1'b0, coef_in = 1'b0, coef_out;
  logic [2:0] pix_addr = '0;
  logic [BITS-1:0] bus_out;
  int checks = 0, failures = 0;

  pixel_row #(.NP(NP), .BITS(BITS)) dut (.pix_clk, .dig_rst, .down, .comp, .bus_in, .coef_clk,
                                         .coef_in, .coef_out, .pix_addr, .bus_out);

  function automatic int value_of(input logic [8:0] s);
    logic [8:0] x = 9'd1;
    for (int v = 1; v < 512; v++) begin
      if (x == s) return v;
      x = {x[7:0], x[8] ^ x[4]};
    end
    return 0;
  endfunction

  function automatic int ctz(input int t);
    for (int n = 0; n < BITS; n++) if (((t >> n) & 1) != 0) return n;
    return BITS;
  endfunction

  task automatic slot(input logic [8:0] b);
    pix_clk = 1'b1; #2 bus_in = b; #3 pix_clk = 1'b0; #5;
  endtask

  int gain [NP], offs [NP], on_at [NP], expv [NP];
  logic [8:0] words [NP];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 dig_rst = 1'b1; #2 dig_rst = 1'b0;
    for (int p = 0; p < NP; p++) begin
      gain[p]  = 384 + int'($urandom_range(0, 127));
      offs[p]  = int'($urandom_range(0, 3));
      on_at[p] = (p == 0) ? 1000 : int'($urandom_range(1, 511));
      words[p] = 9'(coef_word(gain[p], offs[p], K, BITS));
    end
    // chain: the word for the last pixel goes in first
    for (int p = NP - 1; p >= 0; p--)
      for (int i = BITS - 1; i >= 0; i--) begin
        coef_in = words[p][i]; #2 coef_clk = 1'b1; #2 coef_clk = 1'b0;
      end
    // expected counts, worked out from the coefficient bits
    for (int p = 0; p < NP; p++) begin
      expv[p] = 1;
      for (int t = 1; t <= 511; t++) begin
        int n;
        bit stolen;
        n = ctz(t);
        stolen = (n >= K) && !words[p][n];
        if (t >= on_at[p] && !stolen) expv[p]++;
      end
      expv[p] += offs[p];
    end
    // conversion
    for (int t = 1; t <= 511; t++) begin
      for (int p = 0; p < NP; p++) if (t == on_at[p]) comp[p] = 1'b0;
      slot((ctz(t) >= K) ? 9'(1 << ctz(t)) : '0);
    end
    comp = '0;
    for (int n = K - 1; n >= 0; n--)
      for (int i = 0; i < (1 << n); i++) slot(9'(1 << n));
    slot('0);
    // readout
    for (int p = 0; p < NP; p++) begin
      pix_addr = 3'(p); #1;
      checks++;
      if (value_of(bus_out) != expv[p]) begin
        failures++;
        $display("FAIL pixel %0d: %0d expected %0d", p, value_of(bus_out), expv[p]);
      end
    end
    // the whole chain was shifted through: the serial output is pixel 7's Q8
    checks++; if (coef_out !== words[NP-1][8]) begin failures++; $display("FAIL chain out"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
