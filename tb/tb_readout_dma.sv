// Testbench of readout_dma with 16 pixels whose outputs are modelled here as
// a function of the pixel address. Checks every memory write (address and
// data), the hold of a request while the memory is not ready, the write
// count, `done`, and the cycle count of one pixel per SETTLE + 1 cycles with a
// memory that is always ready.
module tb_readout_dma;
  localparam int NP = 16, BITS = 9, SETTLE = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, mem_ready = 1'b1;
  logic [31:0] base = 32'h0000_0400;
  logic [3:0] pix_addr;
  logic [BITS-1:0] bus_out;
  logic mem_valid, busy, done;
  logic [31:0] mem_addr, mem_wdata;
  int checks = 0, failures = 0, writes = 0;
  bit random_ready = 1'b0;

  readout_dma #(.NP(NP), .BITS(BITS), .SETTLE(SETTLE)) dut (.clk, .rst_n, .start, .base, .pix_addr, .bus_out,
    .mem_valid, .mem_ready, .mem_addr, .mem_wdata, .busy, .done);

  always #5 clk = ~clk;
  assign bus_out = 9'((pix_addr * 37 + 5) % 511 + 1);

  always @(posedge clk) begin
    if (mem_valid && mem_ready) begin
      int i;
      i = writes;
      checks++;
      if (mem_addr != base + 32'(i) || mem_wdata != 32'((i * 37 + 5) % 511 + 1)) begin
        failures++; $display("FAIL write %0d: addr %h data %0d", i, mem_addr, mem_wdata);
      end
      writes++;
    end
    if (random_ready) mem_ready <= 1'($urandom_range(0, 1));
  end

  task automatic run_frame(output longint cycles);
    longint n = 0;
    writes = 0;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    while (!done && n < 10000) begin @(negedge clk); n++; end
    cycles = n;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c;
    repeat (2) @(negedge clk); rst_n = 1'b1;
    run_frame(c);
    checks++; if (writes != NP) begin failures++; $display("FAIL %0d writes", writes); end
    checks++; if (c != NP * (SETTLE + 1)) begin failures++; $display("FAIL %0d cycles, expected %0d", c, NP * (SETTLE + 1)); end
    random_ready = 1'b1;
    run_frame(c);
    checks++; if (writes != NP) begin failures++; $display("FAIL %0d writes with back-pressure", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
