// Testbench of interval_memory: random writes, then reads of every written
// address, checking the data and the one-cycle read latency.
module tb_interval_memory;
  localparam int DEPTH = 512, W = 24;
  logic clk = 1'b0, we = 1'b0;
  logic [8:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEPTH];
  bit valid [DEPTH];
  int checks = 0, failures = 0;

  interval_memory #(.DEPTH(DEPTH), .W(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      waddr = 9'($urandom); wdata = W'($urandom); we = 1'b1;
      model[waddr] = wdata; valid[waddr] = 1'b1;
      @(negedge clk);
    end
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      if (!valid[a]) continue;
      raddr = 9'(a);
      @(negedge clk);
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL addr %0d: %h exp %h", a, rdata, model[a]); end
      // latency: changing the address does not change the output before the edge
      raddr = 9'(a + 1); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL latency at %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
