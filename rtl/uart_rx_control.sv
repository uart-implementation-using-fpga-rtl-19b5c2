// uart_rx_control: the receiver's control unit (controlUnit).
//
// A state machine that frames one character from the synchronised line rx_i,
// using the sampling counter's halfCount/fullCount pulses and the bit
// counter's sevenBits flag:
//   IDLE   - holds both counters cleared; a low line at a sample tick is a
//            possible start bit.
//   START  - at halfCount (middle of the start bit) the line must still be
//            low; then the sampling counter is cleared so that every later
//            fullCount falls in the middle of a bit.  A high line means a
//            glitch and the machine returns to IDLE.
//   DATA   - at each fullCount shiftEn samples one data bit; the bit sampled
//            while sevenBits is high is the last.
//   PARITY - (only with parity) samples and checks the parity bit.
//   STOP   - at fullCount the stop bit must be high: dataReady pulses, with
//            parity_err_o if the parity bit was wrong.  A low stop bit gives
//            framing_err_o instead and the machine waits in BREAK until the
//            line is high again.
// All outputs are one-cycle pulses or levels decoded from the state and the
// counter pulses.  dataReady comes at the middle of the stop bit, half a bit
// after the last data bit has ended.
//
// The signal set of the reference design's receiver diagram (shiftEn, resetSeven,
// resetSampling, halfCount, fullCount, sevenBits, dataReady) and the
// half/full sampling scheme are the reference's; the states, the glitch
// filter, the break wait and the parity check are this design's.  The
// reference calls its controllers micro-programmed but gives no microcode,
// so this is a plain hard-wired state machine.  With PARITY_NONE,
// parity_err_o is constant 0.
module uart_rx_control
  import uart_pkg::*;
#(
  parameter parity_e PARITY = PARITY_NONE
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tick_i,
  input  logic rx_i,
  input  logic half_i,
  input  logic full_i,
  input  logic last_bit_i,
  output logic shift_en_o,
  output logic clear_bits_o,
  output logic clear_samples_o,
  output logic data_ready_o,
  output logic framing_err_o,
  output logic parity_err_o
);

  typedef enum logic [2:0] {
    S_IDLE, S_START, S_DATA, S_PARITY, S_STOP, S_BREAK
  } state_e;

  state_e state, state_d;
  logic   par_acc, par_acc_d;   // running XOR of data bits, then error flag
  logic   par_bad, par_bad_d;

  always_comb begin
    state_d         = state;
    par_acc_d       = par_acc;
    par_bad_d       = par_bad;
    shift_en_o      = 1'b0;
    clear_bits_o    = 1'b0;
    clear_samples_o = 1'b0;
    data_ready_o    = 1'b0;
    framing_err_o   = 1'b0;
    parity_err_o    = 1'b0;
    unique case (state)
      S_IDLE: begin
        clear_bits_o    = 1'b1;
        clear_samples_o = 1'b1;
        par_acc_d       = 1'b0;
        par_bad_d       = 1'b0;
        if (tick_i && !rx_i) state_d = S_START;
      end
      S_START: begin
        clear_bits_o = 1'b1;
        if (half_i) begin
          if (!rx_i) begin
            clear_samples_o = 1'b1;
            state_d         = S_DATA;
          end else begin
            state_d = S_IDLE;
          end
        end
      end
      S_DATA: begin
        if (full_i) begin
          shift_en_o = 1'b1;
          par_acc_d  = par_acc ^ rx_i;
          if (last_bit_i) state_d = (PARITY == PARITY_NONE) ? S_STOP : S_PARITY;
        end
      end
      S_PARITY: begin
        if (full_i) begin
          par_bad_d = par_acc ^ rx_i ^ (PARITY == PARITY_ODD);
          state_d   = S_STOP;
        end
      end
      S_STOP: begin
        if (full_i) begin
          if (rx_i) begin
            data_ready_o = 1'b1;
            parity_err_o = par_bad;
            state_d      = S_IDLE;
          end else begin
            framing_err_o = 1'b1;
            state_d       = S_BREAK;
          end
        end
      end
      S_BREAK: begin
        clear_bits_o    = 1'b1;
        clear_samples_o = 1'b1;
        if (rx_i) state_d = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      par_acc <= 1'b0;
      par_bad <= 1'b0;
    end else begin
      state   <= state_d;
      par_acc <= par_acc_d;
      par_bad <= par_bad_d;
    end
  end

endmodule
