// tb_uart_rx_bit_counter: checks sevenCounter against a count model.
//
// Random shiftEn and resetSeven pulses; sevenBits must be high exactly when
// 7 (DATA_BITS-1) shifts have happened since the last clear, and stay high
// while further shifts arrive.
module tb_uart_rx_bit_counter;
  logic clk = 1'b0;
  logic rst_n, clear, shift, last;
  int   checks = 0;
  int   failures = 0;
  int   model;
  int   n_last = 0;

  uart_rx_bit_counter dut (.clk, .rst_n, .clear_i(clear), .shift_en_i(shift), .last_bit_o(last));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; shift = 1'b0; model = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 10000; i++) begin
      shift = ($urandom_range(0, 1) == 0);
      clear = ($urandom_range(0, 20) == 0);
      #1;
      checks++;
      if (last !== (model >= 7)) begin
        failures++;
        $display("FAIL: %0d shifts since clear, sevenBits %b", model, last);
      end
      if (last) n_last++;
      @(posedge clk);
      if (clear)      model = 0;
      else if (shift) model++;
      #1;
    end
    checks++;
    if (n_last < 100) begin failures++; $display("FAIL: sevenBits seen %0d times", n_last); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
