// tb_uart_top: end-to-end test of two UARTs wired to each other.
//
// Two uart_top instances, A and B, are connected TX to RX in both
// directions, as two devices on a UART link.  They use even parity and
// 4-entry FIFOs so every mechanism can be reached quickly; the testbench
// acts as both hosts and can take over B's receive line to inject bad
// frames.  Phases:
//   1. full-duplex traffic at a fast divisor (2 cycles per tick): A's host
//      writes faster than the line drains, so the transmit FIFO fills and
//      back-pressures (wr_ready low) and frames go out back to back;
//   2. B's host stops reading: the receive FIFO fills, later characters are
//      lost and B reports overrun; the sticky flag is then cleared;
//   3. injected frames on B's line: a glitch (ignored), a bad parity bit
//      (character kept, parity flag) and a low stop bit (framing flag);
//   4. baud rate switch to divisor 5, then to the default 9600 baud, whose
//      bit time (5208 cycles) is measured on A's line.
// Every character must arrive once, in order, at the other side.  Each
// mechanism is counted, and one that never happens counts as a failure.
module tb_uart_top;
  import uart_pkg::*;
  import uart_tb_pkg::*;

  localparam int DEPTH = 4;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] div;
  logic        wr_valid [2];
  logic [1:0]  wr_ready, rd_valid, rd_ready, clear, busy;
  logic [7:0]  wr_data [2];
  logic [7:0]  rd_data [2];
  uart_err_t   err [2];
  logic [2:0]  tx_level [2], rx_level [2];
  logic        txd_a, txd_b, rxd_b;
  logic        inj_en, inj_line;
  logic [1:0]  rd_en;
  logic [7:0]  expq [2][$];      // [0]: A -> B, [1]: B -> A
  int          checks = 0;
  int          failures = 0;
  longint      cycle = 0;

  // Mechanism counters.
  int n_delivered [2] = '{0, 0};
  int n_backpressure = 0, n_back_to_back = 0, n_overrun = 0, n_framing = 0;
  int n_parity = 0, n_glitch = 0, n_baud_switch = 0, n_clear = 0, n_default_bit = 0;

  assign rxd_b = inj_en ? inj_line : txd_a;

  uart_top #(.PARITY(PARITY_EVEN), .FIFO_DEPTH(DEPTH)) u_a (
    .clk, .rst_n, .baud_div_i(div),
    .wr_valid_i(wr_valid[0]), .wr_data_i(wr_data[0]), .wr_ready_o(wr_ready[0]),
    .rd_valid_o(rd_valid[0]), .rd_data_o(rd_data[0]), .rd_ready_i(rd_ready[0]),
    .err_o(err[0]), .clear_err_i(clear[0]), .tx_busy_o(busy[0]),
    .tx_level_o(tx_level[0]), .rx_level_o(rx_level[0]), .rxd_i(txd_b), .txd_o(txd_a));
  uart_top #(.PARITY(PARITY_EVEN), .FIFO_DEPTH(DEPTH)) u_b (
    .clk, .rst_n, .baud_div_i(div),
    .wr_valid_i(wr_valid[1]), .wr_data_i(wr_data[1]), .wr_ready_o(wr_ready[1]),
    .rd_valid_o(rd_valid[1]), .rd_data_o(rd_data[1]), .rd_ready_i(rd_ready[1]),
    .err_o(err[1]), .clear_err_i(clear[1]), .tx_busy_o(busy[1]),
    .tx_level_o(tx_level[1]), .rx_level_o(rx_level[1]), .rxd_i(rxd_b), .txd_o(txd_b));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host readers: side k reads what the other side sent.
  assign rd_ready = rd_en;
  for (genvar k = 0; k < 2; k++) begin : g_reader
    always @(negedge clk) begin
      if (rst_n && rd_valid[k] && rd_ready[k]) begin
        checks++;
        if (expq[1 - k].size() == 0) begin
          failures++;
          $display("FAIL: side %0d read unexpected %h", k, rd_data[k]);
        end else begin
          logic [7:0] e;
          e = expq[1 - k].pop_front();
          if (rd_data[k] !== e) begin
            failures++;
            $display("FAIL: side %0d read %h expected %h", k, rd_data[k], e);
          end
        end
        n_delivered[k]++;
      end
    end
  end

  // Back-to-back frames on A's line: a start bit right at the end of a frame.
  // Falling edges inside a frame (data bits) are skipped.
  longint frame_start = -1;
  logic   txd_a_q = 1'b1;
  always @(posedge clk) begin
    longint fl;
    fl = 11 * 8 * ((div == 0) ? 651 : longint'(div));
    txd_a_q <= txd_a;
    if (rst_n && txd_a_q && !txd_a && (frame_start < 0 || cycle >= frame_start + fl)) begin
      if (frame_start >= 0 && cycle == frame_start + fl) n_back_to_back++;
      frame_start <= cycle;
    end
  end

  // Host write, driven and sampled at the falling clock edge: the character
  // is taken at a rising edge where wr_ready was high.
  task automatic host_write(input int k, input logic [7:0] d);
    bit taken;
    @(negedge clk);
    wr_valid[k] = 1'b1;
    wr_data[k]  = d;
    do begin
      taken = wr_ready[k];
      if (!taken) n_backpressure++;
      @(negedge clk);
    end while (!taken);
    expq[k].push_back(d);
    wr_valid[k] = 1'b0;
  endtask

  task automatic wait_idle();
    @(posedge clk iff (!busy[0] && !busy[1]));
    repeat (40 * 8 * (div == 0 ? 651 : int'(div)) / 10) @(posedge clk);
  endtask

  // Injected frame on B's line, 8E1, with optional faults.
  task automatic inject(input logic [7:0] d, input bit bad_par, input bit bad_stop);
    bitq_t bits;
    bits = frame_bits({1'b0, d}, 8, PARITY_EVEN, 1);
    if (bad_par)  bits[9]  = ~bits[9];
    if (bad_stop) bits[10] = 1'b0;
    foreach (bits[i]) begin
      inj_line <= bits[i];
      repeat (8 * div) @(posedge clk);
    end
    inj_line <= 1'b1;
    repeat (3 * 8 * div) @(posedge clk);
  endtask

  task automatic expect_flags(input int k, input uart_err_t e, input string what);
    checks++;
    if (err[k] !== e) begin
      failures++;
      $display("FAIL: %s: side %0d flags %b expected %b", what, k, err[k], e);
    end
  endtask

  initial begin
    rst_n = 1'b0; div = 16'd2; wr_valid = '{1'b0, 1'b0}; wr_data = '{default: '0};
    clear = '0; rd_en = '1; inj_en = 1'b0; inj_line = 1'b1;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (10) @(posedge clk);

    // 1. Full duplex with back-pressure.
    fork
      for (int i = 0; i < 12; i++) host_write(0, 8'($urandom));
      for (int i = 0; i < 8; i++)  host_write(1, 8'($urandom));
    join
    wait_idle();
    checks++;
    if (n_delivered[1] != 12 || n_delivered[0] != 8) begin
      failures++;
      $display("FAIL: phase 1 delivered %0d / %0d", n_delivered[1], n_delivered[0]);
    end
    expect_flags(0, '0, "phase 1"); expect_flags(1, '0, "phase 1");

    // 2. Overrun at B.
    @(negedge clk);
    rd_en[1] = 1'b0;
    for (int i = 0; i < DEPTH + 2; i++) host_write(0, 8'hC0 + 8'(i));
    wait_idle();
    checks++;
    if (rx_level[1] != 3'(DEPTH) || !err[1].overrun) begin
      failures++;
      $display("FAIL: overrun: level %0d flags %b", rx_level[1], err[1]);
    end
    if (err[1].overrun) n_overrun++;
    // The last two characters found the FIFO full and were lost.
    void'(expq[0].pop_back()); void'(expq[0].pop_back());
    @(negedge clk);
    rd_en[1] = 1'b1;
    repeat (10) @(posedge clk);
    @(negedge clk); clear[1] = 1'b1; @(negedge clk); clear[1] = 1'b0; @(posedge clk);
    expect_flags(1, '0, "after clear");
    if (err[1] == '0) n_clear++;
    checks++;
    if (expq[0].size() != 0) begin failures++; $display("FAIL: overrun: %0d not read", expq[0].size()); end

    // 3. Injected frames on B's line.
    inj_en = 1'b1;
    repeat (8 * div) @(posedge clk);
    begin
      int n_prev;
      n_prev = n_delivered[1];
      inj_line <= 1'b0; repeat (2 * div) @(posedge clk); inj_line <= 1'b1;
      repeat (3 * 8 * div * 11) @(posedge clk);
      checks++;
      if (n_delivered[1] != n_prev || err[1] != '0) begin
        failures++; $display("FAIL: glitch produced a character or error");
      end else n_glitch++;
    end
    expq[0].push_back(8'h5A);
    inject(8'h5A, 1, 0);
    expect_flags(1, '{overrun: 1'b0, framing: 1'b0, parity: 1'b1}, "bad parity");
    if (err[1].parity) n_parity++;
    inject(8'hA5, 0, 1);
    expect_flags(1, '{overrun: 1'b0, framing: 1'b1, parity: 1'b1}, "bad stop");
    if (err[1].framing) n_framing++;
    inj_line <= 1'b1;
    repeat (8 * div) @(posedge clk);
    expq[0].push_back(8'h3C);
    inject(8'h3C, 0, 0);
    @(negedge clk); clear[1] = 1'b1; @(negedge clk); clear[1] = 1'b0;
    inj_en = 1'b0;
    repeat (20) @(posedge clk);
    expect_flags(1, '0, "after injection");
    checks++;
    if (expq[0].size() != 0) begin failures++; $display("FAIL: injected characters not read"); end

    // 4. Baud rate switch: divisor 5, then the default 9600 baud.
    @(negedge clk);
    div = 16'd5;
    n_baud_switch++;
    fork
      for (int i = 0; i < 3; i++) host_write(0, 8'($urandom));
      for (int i = 0; i < 3; i++) host_write(1, 8'($urandom));
    join
    wait_idle();
    @(negedge clk);
    div = 16'd0;
    n_baud_switch++;
    repeat (2000) @(posedge clk);
    fork
      host_write(0, 8'h55);
      host_write(1, 8'hA7);
      begin
        // 0x55 alternates from the start bit on: first edge pair is one bit.
        longint t0;
        @(posedge clk iff txd_a == 1'b0); t0 = cycle;
        @(posedge clk iff txd_a == 1'b1);
        checks++;
        if (cycle - t0 != 5208) begin
          failures++; $display("FAIL: default bit time %0d cycles, expected 5208", cycle - t0);
        end else n_default_bit++;
      end
    join
    @(posedge clk iff (!busy[0] && !busy[1]));
    repeat (6000) @(posedge clk);
    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin
      failures++; $display("FAIL: %0d / %0d characters not delivered", expq[0].size(), expq[1].size());
    end

    $display("delivered A->B %0d, B->A %0d", n_delivered[1], n_delivered[0]);
    $display("back-pressure cycles %0d, back-to-back frames %0d, overruns %0d, clears %0d",
             n_backpressure, n_back_to_back, n_overrun, n_clear);
    $display("glitches rejected %0d, parity errors %0d, framing errors %0d, baud switches %0d, default bit %0d",
             n_glitch, n_parity, n_framing, n_baud_switch, n_default_bit);
    begin
      int m [9];
      m = '{n_backpressure, n_back_to_back, n_overrun, n_clear, n_glitch, n_parity,
            n_framing, n_baud_switch, n_default_bit};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
