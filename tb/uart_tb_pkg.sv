// uart_tb_pkg: reference model of a UART frame for the testbenches.
//
// frame_bits() lists the line levels of one frame in time order: start bit
// (0), the data bits least significant first, the parity bit if enabled, and
// the stop bits (1).  It is written from the frame definition, independently
// of the transmitter and receiver it is used to check.
package uart_tb_pkg;
  import uart_pkg::*;

  typedef logic bitq_t[$];

  function automatic bitq_t frame_bits(logic [8:0] data, int data_bits,
                                       parity_e parity, int stop_bits);
    bitq_t q;
    logic  p;
    p = 1'b0;
    q.push_back(1'b0);
    for (int i = 0; i < data_bits; i++) begin
      q.push_back(data[i]);
      p ^= data[i];
    end
    if (parity == PARITY_EVEN) q.push_back(p);
    if (parity == PARITY_ODD)  q.push_back(~p);
    for (int i = 0; i < stop_bits; i++) q.push_back(1'b1);
    return q;
  endfunction

endpackage
