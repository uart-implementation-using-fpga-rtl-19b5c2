// uart_rx_bit_counter: the receiver's data-bit counter (sevenCounter).
//
// Counts the data bits shifted in.  shift_en_i (shiftEn) advances the count,
// clear_i (resetSeven) returns it to 0 and wins over a shift.  last_bit_o
// (sevenBits) is high while the count is DATA_BITS-1 (7 by default): the bit
// the control unit is about to sample is the last data bit of the frame.
//
// Timing: last_bit_o is decoded from the registered count.  The counter range
// 0..7 and the signal names follow the reference design; the exact meaning of
// the sevenBits flag is this design's reading.
module uart_rx_bit_counter
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS = DATA_BITS_DEFAULT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear_i,
  input  logic shift_en_i,
  output logic last_bit_o
);

  localparam int unsigned CW = $clog2(DATA_BITS);

  logic [CW-1:0] cnt;

  assign last_bit_o = (cnt == CW'(DATA_BITS - 1));

  always_ff @(posedge clk) begin
    if (!rst_n || clear_i) begin
      cnt <= '0;
    end else if (shift_en_i && !last_bit_o) begin
      cnt <= cnt + 1'b1;
    end
  end

endmodule
