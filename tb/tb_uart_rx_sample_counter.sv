// tb_uart_rx_sample_counter: checks counterSampling against a count model.
//
// Random ticks and clears drive the counter; a model counts ticks since the
// last clear, and halfCount must pulse exactly on the 4th, 12th, ... tick
// and fullCount on the 8th, 16th, ... tick after a clear (counts 3 and 7).
module tb_uart_rx_sample_counter;
  logic clk = 1'b0;
  logic rst_n, tick, clear, half, full;
  int   checks = 0;
  int   failures = 0;
  int   model;      // ticks since the last clear
  int   n_half = 0, n_full = 0;

  uart_rx_sample_counter dut (.clk, .rst_n, .tick_i(tick), .clear_i(clear),
                              .half_o(half), .full_o(full));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; tick = 1'b0; clear = 1'b0; model = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      tick  = ($urandom_range(0, 2) == 0);
      clear = ($urandom_range(0, 60) == 0);
      #1;
      checks++;
      if (half !== (tick && (model % 8) == 3) || full !== (tick && (model % 8) == 7)) begin
        failures++;
        $display("FAIL: model %0d tick %b: half %b full %b", model, tick, half, full);
      end
      if (half) n_half++;
      if (full) n_full++;
      @(posedge clk);
      if (clear)     model = 0;
      else if (tick) model++;
      #1;
    end
    checks++;
    if (n_half < 100 || n_full < 50) begin
      failures++;
      $display("FAIL: too few pulses %0d %0d", n_half, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
