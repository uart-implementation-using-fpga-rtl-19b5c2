// uart_control: control logic of the UART.
//
// Manages the flow of characters between the host, the two FIFO buffers, the
// transmitter and the receiver:
//   - host writes (wr_valid_i/wr_ready_o) go into the transmit FIFO; the
//     FIFO's full flag is the back-pressure;
//   - whenever the transmit FIFO holds a character it is offered to the
//     transmitter, and popped in the cycle the transmitter accepts it;
//   - a character the receiver completes (dataReady) is pushed into the
//     receive FIFO; if that FIFO is full the character is lost and the
//     overrun flag is set;
//   - the receive FIFO's oldest character is offered to the host
//     (rd_valid_o/rd_ready_i).
// Overrun, framing and parity errors are kept in sticky flags until
// clear_i.  Everything is combinational except the flags, so a character
// moves from FIFO to transmitter without a wait cycle.
//
// That this block steers data between FIFOs, transmitter and receiver is the
// reference design's; the handshakes and error flags are this design's.
module uart_control
  import uart_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_BITS_DEFAULT
) (
  input  logic             clk,
  input  logic             rst_n,
  // host side
  input  logic             wr_valid_i,
  input  logic [WIDTH-1:0] wr_data_i,
  output logic             wr_ready_o,
  output logic             rd_valid_o,
  output logic [WIDTH-1:0] rd_data_o,
  input  logic             rd_ready_i,
  input  logic             clear_i,
  output uart_err_t        err_o,
  // transmit FIFO
  output logic             txf_push_o,
  output logic [WIDTH-1:0] txf_wdata_o,
  input  logic             txf_full_i,
  output logic             txf_pop_o,
  input  logic [WIDTH-1:0] txf_rdata_i,
  input  logic             txf_empty_i,
  // transmitter
  output logic             tx_valid_o,
  output logic [WIDTH-1:0] tx_data_o,
  input  logic             tx_ready_i,
  // receiver
  input  logic [WIDTH-1:0] rx_data_i,
  input  logic             rx_ready_i,
  input  logic             rx_framing_err_i,
  input  logic             rx_parity_err_i,
  // receive FIFO
  output logic             rxf_push_o,
  output logic [WIDTH-1:0] rxf_wdata_o,
  input  logic             rxf_full_i,
  output logic             rxf_pop_o,
  input  logic [WIDTH-1:0] rxf_rdata_i,
  input  logic             rxf_empty_i
);

  // Host -> transmit FIFO -> transmitter.
  assign wr_ready_o  = !txf_full_i;
  assign txf_push_o  = wr_valid_i && !txf_full_i;
  assign txf_wdata_o = wr_data_i;
  assign tx_valid_o  = !txf_empty_i;
  assign tx_data_o   = txf_rdata_i;
  assign txf_pop_o   = tx_valid_o && tx_ready_i;

  // Receiver -> receive FIFO -> host.
  assign rxf_push_o  = rx_ready_i && !rxf_full_i;
  assign rxf_wdata_o = rx_data_i;
  assign rd_valid_o  = !rxf_empty_i;
  assign rd_data_o   = rxf_rdata_i;
  assign rxf_pop_o   = rd_valid_o && rd_ready_i;

  // Handshake rules: an offered character stays offered, unchanged, until
  // the transmitter takes it; the host sees the same for received ones.
  assert property (@(posedge clk) disable iff (!rst_n)
                   tx_valid_o && !tx_ready_i |=> tx_valid_o && $stable(tx_data_o));
  assert property (@(posedge clk) disable iff (!rst_n)
                   rd_valid_o && !rd_ready_i |=> rd_valid_o && $stable(rd_data_o));

  always_ff @(posedge clk) begin
    if (!rst_n || clear_i) begin
      err_o <= '0;
    end else begin
      if (rx_ready_i && rxf_full_i) err_o.overrun <= 1'b1;
      if (rx_framing_err_i)         err_o.framing <= 1'b1;
      if (rx_parity_err_i)          err_o.parity  <= 1'b1;
    end
  end

endmodule
