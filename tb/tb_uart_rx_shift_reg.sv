// tb_uart_rx_shift_reg: checks shiftReg assembles LSB-first characters.
//
// Random characters are shifted in bit 0 first, with random idle cycles
// between shifts; after 8 shifts the register must hold the character, and
// it must not change on cycles without shiftEn.
module tb_uart_rx_shift_reg;
  logic       clk = 1'b0;
  logic       rst_n, shift, rx;
  logic [7:0] data;
  int         checks = 0;
  int         failures = 0;

  uart_rx_shift_reg dut (.clk, .rst_n, .shift_en_i(shift), .rx_i(rx), .data_o(data));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] c, held;
    rst_n = 1'b0; shift = 1'b0; rx = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (data !== 8'h00) begin failures++; $display("FAIL: not cleared by reset"); end
    for (int n = 0; n < 300; n++) begin
      c = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        // Idle cycles with a random line value must not disturb the register.
        repeat ($urandom_range(0, 3)) begin
          held = data; shift = 1'b0; rx = 1'($urandom);
          @(posedge clk); #1;
          checks++;
          if (data !== held) begin failures++; $display("FAIL: changed without shiftEn"); end
        end
        shift = 1'b1; rx = c[i];
        @(posedge clk); #1;
        shift = 1'b0;
      end
      checks++;
      if (data !== c) begin
        failures++;
        $display("FAIL: got %h expected %h", data, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
