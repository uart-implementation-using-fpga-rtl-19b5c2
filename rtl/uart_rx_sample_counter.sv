// uart_rx_sample_counter: the receiver's sampling counter (counterSampling).
//
// Counts sample ticks 0..OVERSAMPLE-1 within one bit time and wraps.  half_o
// (halfCount) pulses on the tick that takes the count past OVERSAMPLE/2-1,
// the middle of a start bit measured from its falling edge; full_o
// (fullCount) pulses on the tick that takes it past OVERSAMPLE-1, one whole
// bit later.  clear_i (resetSampling) forces the count to 0 and wins over a
// tick in the same cycle.
//
// Timing: the pulses are combinational from the registered count and tick_i,
// so the control unit sees them in the cycle of the tick.  The counter range
// 0..7 and the decoded counts 3 and 7 follow the reference design; advancing
// on a sample tick instead of every clock is this design's choice.
module uart_rx_sample_counter
  import uart_pkg::*;
#(
  parameter int unsigned OVERSAMPLE = OVERSAMPLE_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick_i,
  input  logic clear_i,
  output logic half_o,
  output logic full_o
);

  localparam int unsigned CW = (OVERSAMPLE > 2) ? $clog2(OVERSAMPLE) : 1;

  initial begin
    assert (OVERSAMPLE >= 4 && OVERSAMPLE % 2 == 0)
      else $error("uart_rx_sample_counter: OVERSAMPLE must be even and at least 4");
  end

  logic [CW-1:0] cnt;

  assign half_o = tick_i && (cnt == CW'(OVERSAMPLE / 2 - 1));
  assign full_o = tick_i && (cnt == CW'(OVERSAMPLE - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear_i) begin
      cnt <= '0;
    end else if (tick_i) begin
      cnt <= full_o ? '0 : cnt + 1'b1;
    end
  end

endmodule
