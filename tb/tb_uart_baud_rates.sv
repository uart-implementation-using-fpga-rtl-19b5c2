// tb_uart_baud_rates: two default UARTs (50 MHz clock) run a short exchange
// at each of the standard rates 9600, 19200, 38400, 57600 and 115200 baud.
//
// The rate is chosen with baud_div_i: 0 for the default 9600 baud, otherwise
// round(50e6 / (8 * baud)) = 326, 163, 109 and 54.  At each rate A sends a
// short text to B and B answers, both at once.  Checked: every character
// arrives intact and in order, no error flag is raised, and each bit on A's
// line lasts exactly 8 x divisor cycles (measured on the alternating 0x55).
module tb_uart_baud_rates;
  import uart_pkg::*;

  localparam int NRATES = 5;
  localparam int BAUDS [NRATES] = '{9600, 19200, 38400, 57600, 115200};

  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] div;
  logic        wr_valid [2];
  logic [7:0]  wr_data [2];
  logic [1:0]  wr_ready, rd_valid, busy;
  logic [7:0]  rd_data [2];
  uart_err_t   err [2];
  logic [4:0]  tx_level [2], rx_level [2];
  logic        txd_a, txd_b;
  logic [7:0]  expq [2][$];
  int          checks = 0;
  int          failures = 0;
  longint      cycle = 0;
  int          n_rates = 0;

  uart_top u_a (.clk, .rst_n, .baud_div_i(div),
    .wr_valid_i(wr_valid[0]), .wr_data_i(wr_data[0]), .wr_ready_o(wr_ready[0]),
    .rd_valid_o(rd_valid[0]), .rd_data_o(rd_data[0]), .rd_ready_i(1'b1),
    .err_o(err[0]), .clear_err_i(1'b0), .tx_busy_o(busy[0]),
    .tx_level_o(tx_level[0]), .rx_level_o(rx_level[0]), .rxd_i(txd_b), .txd_o(txd_a));
  uart_top u_b (.clk, .rst_n, .baud_div_i(div),
    .wr_valid_i(wr_valid[1]), .wr_data_i(wr_data[1]), .wr_ready_o(wr_ready[1]),
    .rd_valid_o(rd_valid[1]), .rd_data_o(rd_data[1]), .rd_ready_i(1'b1),
    .err_o(err[1]), .clear_err_i(1'b0), .tx_busy_o(busy[1]),
    .tx_level_o(tx_level[1]), .rx_level_o(rx_level[1]), .rxd_i(txd_a), .txd_o(txd_b));

  always #10 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar k = 0; k < 2; k++) begin : g_reader
    always @(negedge clk) begin
      if (rst_n && rd_valid[k]) begin
        checks++;
        if (expq[1 - k].size() == 0 || rd_data[k] !== expq[1 - k][0]) begin
          failures++;
          $display("FAIL: side %0d read %h at divisor %0d", k, rd_data[k], div);
        end
        if (expq[1 - k].size() != 0) void'(expq[1 - k].pop_front());
      end
    end
  end

  // Write a string on side k, one character per cycle while there is room.
  task automatic send(input int k, input string s);
    for (int i = 0; i < s.len(); i++) begin
      @(negedge clk);
      while (!wr_ready[k]) @(negedge clk);
      wr_valid[k] = 1'b1;
      wr_data[k]  = s[i];
      expq[k].push_back(s[i]);
      @(negedge clk);
      wr_valid[k] = 1'b0;
    end
  endtask

  initial begin
    rst_n = 1'b0;
    div = '0;
    wr_valid = '{1'b0, 1'b0};
    wr_data  = '{8'h00, 8'h00};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NRATES; r++) begin
      int unsigned d;
      int          bit_cycles;
      longint      t0;
      d = (r == 0) ? 0 : baud_divisor(50_000_000, BAUDS[r], 8);
      bit_cycles = 8 * ((d == 0) ? 651 : int'(d));
      @(negedge clk);
      div = 16'(d);
      repeat (20) @(negedge clk);
      fork
        send(0, "U?");       // 'U' is 0x55: alternating bits
        send(1, "ok");
        begin
          @(posedge clk iff txd_a == 1'b0); t0 = cycle;
          @(posedge clk iff txd_a == 1'b1);
          checks++;
          if (cycle - t0 != longint'(bit_cycles)) begin
            failures++;
            $display("FAIL: %0d baud: bit %0d cycles, expected %0d", BAUDS[r], cycle - t0, bit_cycles);
          end
        end
      join
      @(posedge clk iff (!busy[0] && !busy[1]));
      repeat (bit_cycles) @(posedge clk);
      checks++;
      if (expq[0].size() != 0 || expq[1].size() != 0 || err[0] != '0 || err[1] != '0) begin
        failures++;
        $display("FAIL: %0d baud: %0d / %0d undelivered, errors %b %b", BAUDS[r],
                 expq[0].size(), expq[1].size(), err[0], err[1]);
      end else begin
        n_rates++;
      end
      $display("%0d baud: divisor %0d, bit %0d cycles, actual %0d baud", BAUDS[r],
               (d == 0) ? 651 : d, bit_cycles, 50_000_000 / bit_cycles);
    end
    checks++;
    if (n_rates != NRATES) begin failures++; $display("FAIL: %0d rates passed", n_rates); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
