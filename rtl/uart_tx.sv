// uart_tx: UART transmitter.
//
// Sends one character per frame: a start bit (0), DATA_BITS data bits least
// significant first, an optional parity bit and STOP_BITS stop bits (1).  The
// line idles high.  Every bit lasts OVERSAMPLE sample ticks from the baud rate
// generator, i.e. 8 x 651 = 5208 clock cycles at the defaults.
//
// Interface: valid_i/data_i offer a character (the transmit enable); it is
// taken in a cycle where ready_o is high.  ready_o is high when idle and also
// in the cycle that ends the last stop bit, so a character that is waiting
// then follows with no idle gap and the line carries the full 9600 bit/s.
// From idle, the start bit begins at the next sample tick, so every bit of
// the frame is exactly OVERSAMPLE ticks long.  txd_o is registered and lags
// the internal state by one clock cycle.
//
// The frame format (start, data, stop; 8N1 by default) follows the reference
// design.  LSB-first order, the handshake and parity as an option (the
// reference link runs without it) are this design's choices.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned DATA_BITS  = DATA_BITS_DEFAULT,
  parameter int unsigned STOP_BITS  = STOP_BITS_DEFAULT,
  parameter parity_e     PARITY     = PARITY_NONE,
  parameter int unsigned OVERSAMPLE = OVERSAMPLE_DEFAULT
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 tick_i,
  input  logic                 valid_i,
  input  logic [DATA_BITS-1:0] data_i,
  output logic                 ready_o,
  output logic                 busy_o,
  output logic                 txd_o
);

  typedef enum logic [2:0] {
    S_IDLE, S_ARM, S_START, S_DATA, S_PARITY, S_STOP
  } state_e;

  localparam int unsigned TW = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam int unsigned BW = (DATA_BITS > 1) ? $clog2(DATA_BITS) : 1;
  localparam int unsigned SW = (STOP_BITS > 1) ? $clog2(STOP_BITS) : 1;

  initial begin
    assert (DATA_BITS >= 5 && DATA_BITS <= 9) else $error("uart_tx: DATA_BITS must be 5..9");
    assert (STOP_BITS == 1 || STOP_BITS == 2) else $error("uart_tx: STOP_BITS must be 1 or 2");
  end

  state_e               state;
  logic [TW-1:0]        tick_cnt;
  logic [BW-1:0]        bit_idx;
  logic [SW-1:0]        stop_idx;
  logic [DATA_BITS-1:0] shreg;
  logic                 par_bit;
  logic                 bit_done;
  logic                 frame_end;

  // Parity bit that goes with a character.
  function automatic logic parity_of(logic [DATA_BITS-1:0] d);
    return (^d) ^ (PARITY == PARITY_ODD);
  endfunction

  assign bit_done  = tick_i && (tick_cnt == TW'(OVERSAMPLE - 1));
  assign frame_end = (state == S_STOP) && bit_done && (stop_idx == SW'(STOP_BITS - 1));
  assign ready_o   = (state == S_IDLE) || frame_end;
  assign busy_o    = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tick_cnt <= '0;
      bit_idx  <= '0;
      stop_idx <= '0;
      shreg    <= '0;
      par_bit  <= 1'b0;
    end else begin
      if (tick_i) tick_cnt <= bit_done ? '0 : tick_cnt + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (valid_i) begin
            shreg   <= data_i;
            par_bit <= parity_of(data_i);
            state   <= S_ARM;
          end
        end
        S_ARM: begin
          // The start bit begins at this tick; count the next OVERSAMPLE.
          if (tick_i) begin
            tick_cnt <= '0;
            state    <= S_START;
          end
        end
        S_START: begin
          if (bit_done) begin
            bit_idx <= '0;
            state   <= S_DATA;
          end
        end
        S_DATA: begin
          if (bit_done) begin
            shreg <= shreg >> 1;
            if (bit_idx == BW'(DATA_BITS - 1)) begin
              stop_idx <= '0;
              state    <= (PARITY == PARITY_NONE) ? S_STOP : S_PARITY;
            end else begin
              bit_idx <= bit_idx + 1'b1;
            end
          end
        end
        S_PARITY: begin
          if (bit_done) begin
            stop_idx <= '0;
            state    <= S_STOP;
          end
        end
        S_STOP: begin
          if (bit_done) begin
            if (stop_idx == SW'(STOP_BITS - 1)) begin
              if (valid_i) begin
                // Back to back: this tick begins the next start bit.
                shreg   <= data_i;
                par_bit <= parity_of(data_i);
                state   <= S_START;
              end else begin
                state <= S_IDLE;
              end
            end else begin
              stop_idx <= stop_idx + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Registered line driver.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      txd_o <= 1'b1;
    end else begin
      unique case (state)
        S_START:  txd_o <= 1'b0;
        S_DATA:   txd_o <= shreg[0];
        S_PARITY: txd_o <= par_bit;
        default:  txd_o <= 1'b1;
      endcase
    end
  end

endmodule
