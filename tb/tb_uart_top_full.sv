// tb_uart_top_full: two default UARTs (50 MHz, 9600 baud, 8N1, 16-entry
// FIFOs) exchanging characters in both directions at once.
//
// Every parameter is at its default and baud_div_i is 0, so the link runs at
// the reference rate.  Checked: each character arrives intact and in order;
// on A's line every bit of the 0x55 frame (alternating levels) lasts exactly
// 5208 cycles; characters written together leave back to back, one frame
// every 52080 cycles (10 bits at 9600.6 baud); dataReady falls within one
// bit time after the last data bit (a character is readable by the far host
// before the line could carry the next data bit).
module tb_uart_top_full;
  import uart_pkg::*;

  localparam longint BIT   = 5208;
  localparam longint FRAME = 10 * BIT;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        wr_valid [2];
  logic [7:0]  wr_data [2];
  logic [1:0]  wr_ready, rd_valid, busy;
  logic [7:0]  rd_data [2];
  uart_err_t   err [2];
  logic [4:0]  tx_level [2], rx_level [2];
  logic        txd_a, txd_b;
  logic [7:0]  expq [2][$];
  longint      rd_time [2][$];
  int          checks = 0;
  int          failures = 0;
  longint      cycle = 0;

  uart_top u_a (.clk, .rst_n, .baud_div_i(16'd0),
    .wr_valid_i(wr_valid[0]), .wr_data_i(wr_data[0]), .wr_ready_o(wr_ready[0]),
    .rd_valid_o(rd_valid[0]), .rd_data_o(rd_data[0]), .rd_ready_i(1'b1),
    .err_o(err[0]), .clear_err_i(1'b0), .tx_busy_o(busy[0]),
    .tx_level_o(tx_level[0]), .rx_level_o(rx_level[0]), .rxd_i(txd_b), .txd_o(txd_a));
  uart_top u_b (.clk, .rst_n, .baud_div_i(16'd0),
    .wr_valid_i(wr_valid[1]), .wr_data_i(wr_data[1]), .wr_ready_o(wr_ready[1]),
    .rd_valid_o(rd_valid[1]), .rd_data_o(rd_data[1]), .rd_ready_i(1'b1),
    .err_o(err[1]), .clear_err_i(1'b0), .tx_busy_o(busy[1]),
    .tx_level_o(tx_level[1]), .rx_level_o(rx_level[1]), .rxd_i(txd_a), .txd_o(txd_b));

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
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
          $display("FAIL: side %0d read %h", k, rd_data[k]);
        end
        if (expq[1 - k].size() != 0) void'(expq[1 - k].pop_front());
        rd_time[k].push_back(cycle);
      end
    end
  end

  // Edge times on A's line.
  longint edges [$];
  logic   txd_q = 1'b1;
  always @(posedge clk) begin
    txd_q <= txd_a;
    if (rst_n && txd_q != txd_a) edges.push_back(cycle);
  end

  initial begin
    static logic [7:0] a_chars [4] = '{8'h55, 8'h0D, 8'hC3, 8'h7E};
    static logic [7:0] b_chars [3] = '{8'h48, 8'h69, 8'h21};
    rst_n = 1'b0;
    wr_valid = '{1'b0, 1'b0};
    wr_data  = '{8'h00, 8'h00};
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    // Both hosts write their characters in consecutive cycles.
    @(negedge clk);
    for (int i = 0; i < 4; i++) begin
      wr_valid[0] = 1'b1; wr_data[0] = a_chars[i];
      wr_valid[1] = (i < 3); wr_data[1] = (i < 3) ? b_chars[i] : 8'h00;
      checks++;
      if (!wr_ready[0] || !wr_ready[1]) begin failures++; $display("FAIL: FIFO not ready"); end
      expq[0].push_back(a_chars[i]);
      if (i < 3) expq[1].push_back(b_chars[i]);
      @(negedge clk);
    end
    wr_valid = '{1'b0, 1'b0};
    @(posedge clk iff (!busy[0] && !busy[1]));
    repeat (int'(BIT)) @(posedge clk);

    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0 || err[0] != '0 || err[1] != '0) begin
      failures++;
      $display("FAIL: %0d / %0d undelivered, errors %b %b", expq[0].size(), expq[1].size(), err[0], err[1]);
    end
    // 0x55: start + 8 alternating data bits + stop give 10 edges one bit apart.
    for (int i = 1; i < 10; i++) begin
      checks++;
      if (edges[i] - edges[i - 1] != BIT) begin
        failures++;
        $display("FAIL: bit %0d lasts %0d cycles", i - 1, edges[i] - edges[i - 1]);
      end
    end
    // Frames back to back: B received A's characters one frame apart.
    for (int i = 1; i < 4; i++) begin
      checks++;
      if (rd_time[1][i] - rd_time[1][i - 1] != FRAME) begin
        failures++;
        $display("FAIL: characters %0d cycles apart, expected %0d", rd_time[1][i] - rd_time[1][i - 1], FRAME);
      end
    end
    // Latency: first character readable within 9..10 bits of its start bit.
    checks++;
    if (rd_time[1][0] - edges[0] < 9 * BIT || rd_time[1][0] - edges[0] >= 10 * BIT) begin
      failures++;
      $display("FAIL: first character readable %0d cycles after its start bit", rd_time[1][0] - edges[0]);
    end
    $display("bit %0d cycles, frame %0d cycles, start-to-readable %0d cycles",
             edges[1] - edges[0], rd_time[1][1] - rd_time[1][0], rd_time[1][0] - edges[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
