// Image readout DMA controller.
//
// On `start` it reads every pixel of the row in address order: it puts the
// pixel address on `pix_addr`, waits SETTLE cycles for the pixel's output to
// reach the bus, and writes the bus value, zero-extended, as one 32-bit word
// to system memory at word address `base + i`. Memory writes use a
// valid/ready handshake: `mem_valid` stays high with stable address and data
// until `mem_ready` is seen. `done` pulses for one cycle after the last write.
//
// Timing: one pixel every SETTLE + 1 cycles with a memory that is always
// ready. Reading by pixel address straight into memory follows the
// measurement system; the word format, the settling wait and the handshake
// are this design's choices.
module readout_dma
  import imager_pkg::*;
#(
  parameter int unsigned NP     = NPIX,
  parameter int unsigned BITS   = ADC_BITS,
  parameter int unsigned SETTLE = 4,
  localparam int unsigned AW    = (NP > 1) ? $clog2(NP) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [31:0]     base,
  output logic [AW-1:0]   pix_addr,
  input  logic [BITS-1:0] bus_out,
  output logic            mem_valid,
  input  logic            mem_ready,
  output logic [31:0]     mem_addr,
  output logic [31:0]     mem_wdata,
  output logic            busy,
  output logic            done
);

  typedef enum logic [1:0] {D_IDLE, D_SETTLE, D_WRITE} state_e;

  state_e      state;
  logic [7:0]  wait_cnt;
  logic [31:0] base_q;

  assign busy = (state != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= D_IDLE;
      wait_cnt  <= '0;
      base_q    <= '0;
      pix_addr  <= '0;
      mem_valid <= 1'b0;
      mem_addr  <= '0;
      mem_wdata <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        D_IDLE: if (start) begin
          base_q   <= base;
          pix_addr <= '0;
          wait_cnt <= 8'(SETTLE);
          state    <= D_SETTLE;
        end
        D_SETTLE: begin
          if (wait_cnt <= 8'd1) begin
            mem_valid <= 1'b1;
            mem_addr  <= base_q + 32'(pix_addr);
            mem_wdata <= 32'(bus_out);
            state     <= D_WRITE;
          end else begin
            wait_cnt <= wait_cnt - 8'd1;
          end
        end
        D_WRITE: if (mem_ready) begin
          mem_valid <= 1'b0;
          if (pix_addr == AW'(NP - 1)) begin
            done  <= 1'b1;
            state <= D_IDLE;
          end else begin
            pix_addr <= pix_addr + AW'(1);
            wait_cnt <= 8'(SETTLE);
            state    <= D_SETTLE;
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  // a write request is held until it is accepted
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_valid && !mem_ready |=> mem_valid && $stable(mem_addr) && $stable(mem_wdata));

endmodule
