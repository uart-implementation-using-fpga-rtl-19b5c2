// uart_rx: UART receiver.
//
// Recovers characters from the serial input using 8 looks per bit.  It is
// built as in the reference design's receiver diagram: a control unit
// (uart_rx_control) drives a shift register (uart_rx_shift_reg), a data-bit
// counter (uart_rx_bit_counter, "sevenCounter") and a sampling counter
// (uart_rx_sample_counter, "counterSampling"), and raises dataReady when a
// character is complete.  A start bit is confirmed in its middle; each later
// bit is sampled one bit time (OVERSAMPLE ticks) after the previous one, i.e.
// near its middle.  A two-flip-flop synchroniser in front of the control unit
// and shift register takes the asynchronous line into the clock domain.
//
// Interface: tick_i is the sample tick (8 x baud).  data_o is valid when
// data_ready_o pulses (one cycle, in the middle of the stop bit) and stays
// valid until the next frame's first data bit is sampled.  parity_err_o
// pulses together with data_ready_o; framing_err_o pulses instead of it when
// the stop bit is low, and that character is discarded.  With PARITY_NONE,
// parity_err_o is constant 0.
// Latency: data_ready_o follows the end of the last data bit by half a bit
// plus up to one tick and two synchroniser cycles.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = DATA_BITS_DEFAULT,
  parameter parity_e     PARITY     = PARITY_NONE,
  parameter int unsigned OVERSAMPLE = OVERSAMPLE_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick_i,
  input  logic                 rxd_i,
  output logic [DATA_BITS-1:0] data_o,
  output logic                 data_ready_o,
  output logic                 framing_err_o,
  output logic                 parity_err_o
);

  logic [1:0] rx_sync;
  logic       rx;
  logic       shift_en, clear_bits, clear_samples;
  logic       half_count, full_count, last_bit;

  always_ff @(posedge clk) begin
    if (!rst_n) rx_sync <= 2'b11;
    else        rx_sync <= {rx_sync[0], rxd_i};
  end
  assign rx = rx_sync[1];

  // A frame ends either with a character or with a framing error, never both.
  assert property (@(posedge clk) disable iff (!rst_n) !(data_ready_o && framing_err_o));

  uart_rx_control #(.PARITY(PARITY)) u_control (
    .clk             (clk),
    .rst_n           (rst_n),
    .tick_i          (tick_i),
    .rx_i            (rx),
    .half_i          (half_count),
    .full_i          (full_count),
    .last_bit_i      (last_bit),
    .shift_en_o      (shift_en),
    .clear_bits_o    (clear_bits),
    .clear_samples_o (clear_samples),
    .data_ready_o    (data_ready_o),
    .framing_err_o   (framing_err_o),
    .parity_err_o    (parity_err_o)
  );

  uart_rx_shift_reg #(.DATA_BITS(DATA_BITS)) u_shift_reg (
    .clk        (clk),
    .rst_n      (rst_n),
    .shift_en_i (shift_en),
    .rx_i       (rx),
    .data_o     (data_o)
  );

  uart_rx_bit_counter #(.DATA_BITS(DATA_BITS)) u_bit_counter (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear_i    (clear_bits),
    .shift_en_i (shift_en),
    .last_bit_o (last_bit)
  );

  uart_rx_sample_counter #(.OVERSAMPLE(OVERSAMPLE)) u_sample_counter (
    .clk     (clk),
    .rst_n   (rst_n),
    .tick_i  (tick_i),
    .clear_i (clear_samples),
    .half_o  (half_count),
    .full_o  (full_count)
  );

endmodule
