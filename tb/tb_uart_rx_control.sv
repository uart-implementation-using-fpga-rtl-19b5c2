// tb_uart_rx_control: directed test of the receiver's control unit.
//
// The testbench plays the part of the sampling counter, bit counter and
// line, and checks every output in every cycle against the behaviour the
// control unit must have: counters held cleared while idle, resetSampling at
// the confirmed start bit, one shiftEn per data bit at fullCount, dataReady
// at a high stop bit, a framing error (and a wait for the line to go high)
// at a low one, glitch rejection, and, in the even-parity instance, the
// parity check.
module tb_uart_rx_control;
  import uart_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] tick, rx, half, full, last;
  logic [1:0] shift, clr_bits, clr_smp, ready, ferr, perr;
  int         checks = 0;
  int         failures = 0;

  uart_rx_control u_none (.clk, .rst_n, .tick_i(tick[0]), .rx_i(rx[0]), .half_i(half[0]),
    .full_i(full[0]), .last_bit_i(last[0]), .shift_en_o(shift[0]), .clear_bits_o(clr_bits[0]),
    .clear_samples_o(clr_smp[0]), .data_ready_o(ready[0]), .framing_err_o(ferr[0]),
    .parity_err_o(perr[0]));
  uart_rx_control #(.PARITY(PARITY_EVEN)) u_even (.clk, .rst_n, .tick_i(tick[1]), .rx_i(rx[1]),
    .half_i(half[1]), .full_i(full[1]), .last_bit_i(last[1]), .shift_en_o(shift[1]),
    .clear_bits_o(clr_bits[1]), .clear_samples_o(clr_smp[1]), .data_ready_o(ready[1]),
    .framing_err_o(ferr[1]), .parity_err_o(perr[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one cycle of inputs to instance k and check its outputs, given as
  // {shift, clear_bits, clear_samples, ready, framing, parity}.
  task automatic step(input int k, input logic t, input logic r, input logic h,
                      input logic f, input logic l, input logic [5:0] exp, input string what);
    logic [5:0] got;
    tick[k] = t; rx[k] = r; half[k] = h; full[k] = f; last[k] = l;
    #1;
    got = {shift[k], clr_bits[k], clr_smp[k], ready[k], ferr[k], perr[k]};
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: unit %0d %s: outputs %b expected %b", k, what, got, exp);
    end
    @(posedge clk); #1;
    tick[k] = 1'b0; half[k] = 1'b0; full[k] = 1'b0;
  endtask

  // Take instance k through one frame.
  task automatic frame(input int k, input logic [7:0] d, input bit bad_par, input bit bad_stop);
    logic p;
    p = ^d;
    step(k, 1, 1, 0, 0, 0, 6'b011000, "idle");
    step(k, 1, 0, 0, 0, 0, 6'b011000, "start edge");
    step(k, 1, 0, 0, 0, 0, 6'b010000, "start bit");
    step(k, 1, 0, 1, 0, 0, 6'b011000, "half count");
    for (int i = 0; i < 8; i++) begin
      repeat (2) step(k, 1, ~d[i], 0, 0, i == 7, 6'b000000, "between samples");
      step(k, 1, d[i], 0, 1, i == 7, 6'b100000, "data sample");
    end
    if (k == 1) step(k, 1, p ^ bad_par, 0, 1, 1, 6'b000000, "parity sample");
    step(k, 1, 1, 0, 0, 1, 6'b000000, "before stop");
    step(k, 1, !bad_stop, 0, 1, 1,
         bad_stop ? 6'b000010 : {5'b00010, bad_par}, "stop sample");
  endtask

  initial begin
    rst_n = 1'b0; tick = '0; rx = '1; half = '0; full = '0; last = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 2; k++) begin
      frame(k, 8'hA5, 0, 0);
      frame(k, 8'h3C, 0, 0);
      // Glitch: line high again at the half count.
      step(k, 1, 0, 0, 0, 0, 6'b011000, "glitch edge");
      step(k, 1, 1, 1, 0, 0, 6'b010000, "glitch at half count");
      step(k, 0, 1, 0, 0, 0, 6'b011000, "idle after glitch");
      // Framing error, then the line stays low: no new start bit.
      frame(k, 8'h0F, 0, 1);
      step(k, 1, 0, 0, 0, 0, 6'b011000, "break");
      step(k, 1, 0, 0, 0, 0, 6'b011000, "break, no start");
      step(k, 1, 0, 1, 0, 0, 6'b011000, "break, no start");
      step(k, 0, 1, 0, 0, 0, 6'b011000, "line high again");
      frame(k, 8'h81, 0, 0);
    end
    frame(1, 8'h77, 1, 0);
    frame(1, 8'h01, 1, 0);
    frame(1, 8'h01, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
