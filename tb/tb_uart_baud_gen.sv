// tb_uart_baud_gen: checks the baud rate generator's tick period.
//
// With the default parameters (50 MHz, 9600 baud, x8) the tick must come
// every round(50e6 / 76800) = 651 cycles, i.e. 5208 cycles per bit.  Then
// run-time divisors 10, 1 and 37 are selected and the period re-measured,
// and 0 must bring back the default.
module tb_uart_baud_gen;
  import uart_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] div;
  logic        tick;
  int          checks = 0;
  int          failures = 0;
  longint      cycle = 0;

  uart_baud_gen dut (.clk(clk), .rst_n(rst_n), .div_i(div), .tick_o(tick));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure n tick periods and compare each with the expected value.
  task automatic measure(input int expected, input int n);
    longint last;
    @(posedge clk iff tick);
    last = cycle;
    repeat (n) begin
      @(posedge clk iff tick);
      checks++;
      if (cycle - last != expected) begin
        failures++;
        $display("FAIL: tick period %0d, expected %0d (div=%0d)", cycle - last, expected, div);
      end
      last = cycle;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    div   = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    measure(651, 10);
    // Eight ticks make one bit of 5208 cycles at 9600 baud.
    checks++;
    if (651 * 8 != 5208) failures++;
    div = 16'd10;  measure(10, 20);
    div = 16'd1;   measure(1, 20);
    div = 16'd37;  measure(37, 10);
    div = 16'd0;   measure(651, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
