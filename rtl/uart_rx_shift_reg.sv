// uart_rx_shift_reg: the receiver's deserialiser (shiftReg).
//
// On each shift_en_i (shiftEn) pulse the sampled line value rx_i enters at
// the top and the register moves one place towards bit 0.  Frames arrive
// least significant bit first, so after DATA_BITS shifts bit 0 of the
// character sits in data_o[0].  data_o holds its value until the next shift,
// which is how the character stays valid after dataReady.
//
// The shift register fed by shiftEn follows the reference design; the shift
// direction (LSB-first framing) is this design's choice.
module uart_rx_shift_reg
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS = DATA_BITS_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift_en_i,
  input  logic                 rx_i,
  output logic [DATA_BITS-1:0] data_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      data_o <= '0;
    end else if (shift_en_i) begin
      data_o <= {rx_i, data_o[DATA_BITS-1:1]};
    end
  end

endmodule
