// Interval memory of the variable-frequency pixel clock.
//
// Holds the successive pixel clock periods of the time-mode phase 1a, in
// system clock cycles (10 ns each), as written by the configuring processor.
// Correcting these periods is how the ADC's linearity is tuned. One write
// port, one read port with a registered output (block RAM style): data for
// `raddr` appears one cycle after it is presented. Depth and word width are
// this design's choice: 512 words cover the 495 time-mode codes, and 24 bits
// reach 167 ms, more than the longest period of 14 ms.
module interval_memory
  import imager_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned W     = PER_W,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
