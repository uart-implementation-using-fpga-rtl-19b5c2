// uart_baud_gen: baud rate generator.
//
// Divides the system clock into a one-cycle sample tick at OVERSAMPLE times
// the baud rate.  The receiver uses every tick (8 looks per bit); the
// transmitter counts OVERSAMPLE ticks per bit, so one generator serves both
// directions.  The divisor is round(CLK_FREQ_HZ / (BAUD * OVERSAMPLE)),
// 651 for the 50 MHz / 9600 baud defaults (5208 cycles per bit).
//
// Interface: div_i selects another rate at run time, in clock cycles per
// tick; 0 selects the default divisor above.  tick_o is high for one cycle
// every divisor cycles.  A changed divisor takes effect at the next tick, or
// at once if the running count already exceeds it.
//
// The baud rate, clock frequency and x8 sampling follow the reference design;
// the down-counter implementation and the run-time divisor are this design's.
module uart_baud_gen
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = CLK_FREQ_HZ_DEFAULT,
  parameter int unsigned BAUD        = BAUD_DEFAULT,
  parameter int unsigned OVERSAMPLE  = OVERSAMPLE_DEFAULT,
  parameter int unsigned DIV_W       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div_i,
  output logic             tick_o
);

  localparam int unsigned DEFAULT_DIV = baud_divisor(CLK_FREQ_HZ, BAUD, OVERSAMPLE);

  initial begin
    assert (DEFAULT_DIV >= 1 && 64'(DEFAULT_DIV) < (64'd1 << DIV_W))
      else $error("uart_baud_gen: divisor %0d does not fit DIV_W=%0d", DEFAULT_DIV, DIV_W);
  end

  logic [DIV_W-1:0] div;
  logic [DIV_W-1:0] cnt;

  always_comb begin
    div = (div_i == '0) ? DIV_W'(DEFAULT_DIV) : div_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      tick_o <= 1'b0;
    end else if (cnt >= div - 1'b1) begin
      cnt    <= '0;
      tick_o <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      tick_o <= 1'b0;
    end
  end

endmodule
