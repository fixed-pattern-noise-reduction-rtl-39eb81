// Testbench of coef_shift_reg: shifts random bits through two chained
// registers and checks the parallel outputs and the serial output against a
// queue model of the chain.
module tb_coef_shift_reg;
  localparam int BITS = 9;
  logic clk = 1'b0, d = 1'b0;
  logic [BITS-1:0] q0, q1;
  logic so0, so1;
  int checks = 0, failures = 0;
  bit hist [$];

  coef_shift_reg #(.BITS(BITS)) dut0 (.clk, .d, .q(q0), .so(so0));
  coef_shift_reg #(.BITS(BITS)) dut1 (.clk, .d(so0), .q(q1), .so(so1));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 60; i++) begin
      d = 1'($urandom);
      hist.push_front(d);
      #5 clk = 1'b1; #5 clk = 1'b0;
      if (hist.size() >= 2 * BITS) begin
        logic [BITS-1:0] e0, e1;
        for (int n = 0; n < BITS; n++) begin
          e0[n] = hist[n];
          e1[n] = hist[BITS + n];
        end
        checks++; if (q0 !== e0) begin failures++; $display("FAIL q0 %h exp %h", q0, e0); end
        checks++; if (q1 !== e1) begin failures++; $display("FAIL q1 %h exp %h", q1, e1); end
        checks++; if (so1 !== hist[2*BITS-1]) begin failures++; $display("FAIL so"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
