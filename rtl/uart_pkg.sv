// uart_pkg: types and constants shared by the UART blocks.
//
// The defaults are the link settings of the reference design: a 50 MHz system
// clock, 9600 baud, 8 data bits, 1 stop bit and no parity.  The receiver
// looks at the line 8 times per bit (a 3-bit sample counter that runs 0..7 and
// flags the half-way count 3 and the full count 7), so the baud rate generator
// produces a tick at 8 x the baud rate.  Parity is optional: the reference
// design runs without it, but its control unit is said to generate and check
// a parity bit, so even and odd parity are offered as parameter values.
package uart_pkg;

  // Parity mode of a frame.
  typedef enum logic [1:0] {
    PARITY_NONE = 2'd0,
    PARITY_EVEN = 2'd1,
    PARITY_ODD  = 2'd2
  } parity_e;

  localparam int unsigned CLK_FREQ_HZ_DEFAULT = 50_000_000;
  localparam int unsigned BAUD_DEFAULT        = 9600;
  localparam int unsigned DATA_BITS_DEFAULT   = 8;
  localparam int unsigned STOP_BITS_DEFAULT   = 1;
  localparam int unsigned OVERSAMPLE_DEFAULT  = 8;

  // Clock cycles per sample tick, rounded to the nearest integer:
  // round(clk_hz / (baud * oversample)).  50 MHz, 9600 baud, x8 -> 651,
  // which gives 651 * 8 = 5208 cycles per bit (9600.6 baud, +0.006 %).
  function automatic int unsigned baud_divisor(int unsigned clk_hz,
                                               int unsigned baud,
                                               int unsigned oversample);
    int unsigned rate;
    rate = baud * oversample;
    return (clk_hz + rate / 2) / rate;
  endfunction

  // Sticky error flags kept by the control logic.
  typedef struct packed {
    logic overrun;   // a received character found the receive FIFO full
    logic framing;   // a stop bit was sampled low
    logic parity;    // a received parity bit did not match
  } uart_err_t;

endpackage
