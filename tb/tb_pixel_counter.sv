// Testbench of pixel_counter: checks the reset state, the full 511-state
// cycle of the 9-bit LFSR against an independently written x^9 + x^5 + 1
// model, the hold when disabled, counting down and the roll-over in both
// directions.
module tb_pixel_counter;
  localparam int BITS = 9;
  logic clk = 1'b0, rst = 1'b0, en = 1'b0, down = 1'b0;
  logic [BITS-1:0] q;
  int checks = 0, failures = 0;

  pixel_counter #(.BITS(BITS)) dut (.clk, .rst, .en, .down, .q);

  function automatic logic [8:0] ref_next(input logic [8:0] s);
    return {s[7:0], s[8] ^ s[4]};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse();
    #5 clk = 1'b1; #5 clk = 1'b0;
  endtask

  logic [8:0] seq [511];
  bit seen [512];

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 rst = 1'b1; #2 rst = 1'b0;
    check(q == 9'd1, "reset state is value 1");
    // hold when disabled
    pulse(); pulse();
    check(q == 9'd1, "no count without enable");
    // full cycle forward
    en = 1'b1;
    seq[0] = 9'd1;
    for (int i = 1; i < 511; i++) seq[i] = ref_next(seq[i-1]);
    for (int i = 1; i < 511; i++) begin
      pulse();
      check(q == seq[i], $sformatf("up step %0d", i));
      check(q != 0, "never the invalid zero state");
      seen[q] = 1'b1;
    end
    pulse();
    check(q == 9'd1, "roll over from 511 to value 1");
    // all 511 non-zero states visited
    begin int n = 0; for (int s = 1; s < 512; s++) if (seen[s] || s == 1) n++; check(n == 511, "511 distinct states"); end
    // count down: value 1 -> 511 -> 510 ...
    down = 1'b1;
    pulse();
    check(q == seq[510], "roll over from value 1 down to 511");
    for (int i = 509; i >= 400; i--) begin
      pulse();
      check(q == seq[i], $sformatf("down step to %0d", i + 1));
    end
    // direction change mid-way
    down = 1'b0;
    pulse();
    check(q == seq[401], "up again");
    en = 1'b0; pulse();
    check(q == seq[401], "hold");
    // asynchronous reset
    #2 rst = 1'b1; #1;
    check(q == 9'd1, "asynchronous reset");
    rst = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
