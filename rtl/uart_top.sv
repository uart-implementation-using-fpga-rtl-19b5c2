// uart_top: complete UART with transmit and receive FIFOs.
//
// A full-duplex asynchronous serial port for an FPGA.  The host side is a
// byte-wide valid/ready interface; the line side is one serial output
// (TXD) and one serial input (RXD).  Characters written by the host wait in a
// transmit FIFO until the transmitter sends them; characters recovered by
// the receiver wait in a receive FIFO until the host reads them.  The
// control logic moves the characters and keeps sticky error flags.  One baud
// rate generator gives the 8 x baud sample tick used by both directions.
//
//   host --wr--> [control] --> tx FIFO --> transmitter --> txd_o
//   host <--rd-- [control] <-- rx FIFO <-- receiver    <-- rxd_i
//                          baud rate generator (tick to both)
//
// Defaults are the reference link: 50 MHz clock, 9600 baud, 8 data bits,
// 1 stop bit, no parity (8N1), one bit = 5208 clock cycles, one frame =
// 52080 cycles.  baud_div_i selects another baud rate at run time, as clock
// cycles per sample tick (cycles per bit / 8); 0 keeps the default.
// err_o holds {overrun, framing, parity} until clear_err_i.  tx_busy_o is
// high while a character is queued or on the line.  err_o.parity is constant
// 0 with PARITY_NONE.  txd_o is the logic-level line (idle high); an
// external RS-232 driver inverts it and shifts its levels.
//
// The division into baud rate generator, transmitter, receiver, FIFO buffers
// and control logic follows the reference design; the host interface, the
// FIFO depth and the run-time divisor are this design's choices.  The RS-232
// level shifter and the PC terminal connect outside, to txd_o and rxd_i.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_FREQ_HZ = CLK_FREQ_HZ_DEFAULT,
  parameter int unsigned BAUD        = BAUD_DEFAULT,
  parameter int unsigned DATA_BITS   = DATA_BITS_DEFAULT,
  parameter int unsigned STOP_BITS   = STOP_BITS_DEFAULT,
  parameter parity_e     PARITY      = PARITY_NONE,
  parameter int unsigned OVERSAMPLE  = OVERSAMPLE_DEFAULT,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned DIV_W       = 16
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [DIV_W-1:0]                baud_div_i,
  // host write side
  input  logic                            wr_valid_i,
  input  logic [DATA_BITS-1:0]            wr_data_i,
  output logic                            wr_ready_o,
  // host read side
  output logic                            rd_valid_o,
  output logic [DATA_BITS-1:0]            rd_data_o,
  input  logic                            rd_ready_i,
  // status
  output uart_err_t                       err_o,
  input  logic                            clear_err_i,
  output logic                            tx_busy_o,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] tx_level_o,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] rx_level_o,
  // serial line
  input  logic                            rxd_i,
  output logic                            txd_o
);

  logic                 tick;
  logic                 txf_push, txf_full, txf_pop, txf_empty;
  logic [DATA_BITS-1:0] txf_wdata, txf_rdata;
  logic                 rxf_push, rxf_full, rxf_pop, rxf_empty;
  logic [DATA_BITS-1:0] rxf_wdata, rxf_rdata;
  logic                 tx_valid, tx_ready, tx_busy;
  logic [DATA_BITS-1:0] tx_data;
  logic [DATA_BITS-1:0] rx_data;
  logic                 rx_ready, rx_framing_err, rx_parity_err;

  assign tx_busy_o = tx_busy || !txf_empty;

  uart_baud_gen #(
    .CLK_FREQ_HZ (CLK_FREQ_HZ),
    .BAUD        (BAUD),
    .OVERSAMPLE  (OVERSAMPLE),
    .DIV_W       (DIV_W)
  ) u_baud_gen (
    .clk    (clk),
    .rst_n  (rst_n),
    .div_i  (baud_div_i),
    .tick_o (tick)
  );

  uart_control #(.WIDTH(DATA_BITS)) u_control (
    .clk              (clk),
    .rst_n            (rst_n),
    .wr_valid_i       (wr_valid_i),
    .wr_data_i        (wr_data_i),
    .wr_ready_o       (wr_ready_o),
    .rd_valid_o       (rd_valid_o),
    .rd_data_o        (rd_data_o),
    .rd_ready_i       (rd_ready_i),
    .clear_i          (clear_err_i),
    .err_o            (err_o),
    .txf_push_o       (txf_push),
    .txf_wdata_o      (txf_wdata),
    .txf_full_i       (txf_full),
    .txf_pop_o        (txf_pop),
    .txf_rdata_i      (txf_rdata),
    .txf_empty_i      (txf_empty),
    .tx_valid_o       (tx_valid),
    .tx_data_o        (tx_data),
    .tx_ready_i       (tx_ready),
    .rx_data_i        (rx_data),
    .rx_ready_i       (rx_ready),
    .rx_framing_err_i (rx_framing_err),
    .rx_parity_err_i  (rx_parity_err),
    .rxf_push_o       (rxf_push),
    .rxf_wdata_o      (rxf_wdata),
    .rxf_full_i       (rxf_full),
    .rxf_pop_o        (rxf_pop),
    .rxf_rdata_i      (rxf_rdata),
    .rxf_empty_i      (rxf_empty)
  );

  uart_fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_tx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push_i  (txf_push),
    .wdata_i (txf_wdata),
    .full_o  (txf_full),
    .pop_i   (txf_pop),
    .rdata_o (txf_rdata),
    .empty_o (txf_empty),
    .count_o (tx_level_o)
  );

  uart_tx #(
    .DATA_BITS  (DATA_BITS),
    .STOP_BITS  (STOP_BITS),
    .PARITY     (PARITY),
    .OVERSAMPLE (OVERSAMPLE)
  ) u_tx (
    .clk     (clk),
    .rst_n   (rst_n),
    .tick_i  (tick),
    .valid_i (tx_valid),
    .data_i  (tx_data),
    .ready_o (tx_ready),
    .busy_o  (tx_busy),
    .txd_o   (txd_o)
  );

  uart_rx #(
    .DATA_BITS  (DATA_BITS),
    .PARITY     (PARITY),
    .OVERSAMPLE (OVERSAMPLE)
  ) u_rx (
    .clk           (clk),
    .rst_n         (rst_n),
    .tick_i        (tick),
    .rxd_i         (rxd_i),
    .data_o        (rx_data),
    .data_ready_o  (rx_ready),
    .framing_err_o (rx_framing_err),
    .parity_err_o  (rx_parity_err)
  );

  uart_fifo #(.WIDTH(DATA_BITS), .DEPTH(FIFO_DEPTH)) u_rx_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .push_i  (rxf_push),
    .wdata_i (rxf_wdata),
    .full_o  (rxf_full),
    .pop_i   (rxf_pop),
    .rdata_o (rxf_rdata),
    .empty_o (rxf_empty),
    .count_o (rx_level_o)
  );

endmodule
