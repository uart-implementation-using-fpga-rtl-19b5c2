// tb_uart_rx: checks the receiver against a bit-banged serial line.
//
// The testbench drives two lines with frames built by uart_tb_pkg, at a bit
// period of BP = 8 * TDIV cycles, with the receivers' sample tick running
// free (no phase relation to the frames).  u_8n1 uses the default 8N1
// format, u_8e1 even parity.  Checked:
//   - every character arrives intact, with one dataReady pulse each;
//   - dataReady comes during the stop bit, i.e. within one bit time of the
//     end of the last data bit (the 1-bit latency of the reference link);
//   - frames sent back to back and frames whose bit period is 3 % off;
//   - a short low glitch is not taken for a start bit;
//   - a low stop bit gives a framing error and no character, and a held-low
//     line (break) gives only one error;
//   - a wrong parity bit gives a parity error with the character.
module tb_uart_rx;
  import uart_pkg::*;
  import uart_tb_pkg::*;

  localparam int TDIV = 8;
  localparam int BP   = 8 * TDIV;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       tick;
  int         tcnt;
  logic [1:0] line;
  logic [7:0] rdata [2];
  logic [1:0] rdy, ferr, perr;
  int         checks = 0;
  int         failures = 0;
  longint     cycle = 0;
  logic [7:0] expq [2][$];
  logic       exp_perr [2][$];
  longint     stop_start [2];
  int         n_ready [2] = '{0, 0};
  int         n_ferr  [2] = '{0, 0};
  int         n_perr  [2] = '{0, 0};

  uart_rx u_8n1 (.clk, .rst_n, .tick_i(tick), .rxd_i(line[0]), .data_o(rdata[0]),
                 .data_ready_o(rdy[0]), .framing_err_o(ferr[0]), .parity_err_o(perr[0]));
  uart_rx #(.PARITY(PARITY_EVEN)) u_8e1 (
                 .clk, .rst_n, .tick_i(tick), .rxd_i(line[1]), .data_o(rdata[1]),
                 .data_ready_o(rdy[1]), .framing_err_o(ferr[1]), .parity_err_o(perr[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst_n) begin
      tcnt <= 3; tick <= 1'b0;
    end else begin
      tcnt <= (tcnt == TDIV - 1) ? 0 : tcnt + 1;
      tick <= (tcnt == TDIV - 1);
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitors.
  for (genvar k = 0; k < 2; k++) begin : g_mon
    always @(posedge clk) begin
      if (rst_n && rdy[k]) begin
        n_ready[k]++;
        checks++;
        if (expq[k].size() == 0) begin
          failures++;
          $display("FAIL: rx %0d unexpected character %h", k, rdata[k]);
        end else begin
          logic [7:0] e;
          logic       ep;
          e  = expq[k].pop_front();
          ep = exp_perr[k].pop_front();
          if (rdata[k] !== e) begin
            failures++;
            $display("FAIL: rx %0d got %h expected %h", k, rdata[k], e);
          end
          checks++;
          if (perr[k] !== ep) begin
            failures++;
            $display("FAIL: rx %0d parity error flag %b expected %b", k, perr[k], ep);
          end
        end
        // Latency: inside the stop bit, i.e. within one bit of the data's end.
        checks++;
        if (cycle < stop_start[k] || cycle >= stop_start[k] + longint'(BP)) begin
          failures++;
          $display("FAIL: rx %0d dataReady at %0d, stop bit %0d..%0d",
                   k, cycle, stop_start[k], stop_start[k] + longint'(BP));
        end
      end
      if (rst_n && ferr[k]) n_ferr[k]++;
      if (rst_n && perr[k]) n_perr[k]++;
      if (rst_n && !rdy[k] && perr[k]) begin
        failures++;
        $display("FAIL: rx %0d parity error without dataReady", k);
      end
    end
  end

  // Drive one frame on line k with bit period bp; corrupt parity or stop bit
  // on request.  The character is expected unless the stop bit is bad.
  task automatic drive(input int k, input logic [7:0] d, input int bp,
                       input bit bad_parity, input bit bad_stop);
    bitq_t bits;
    bits = frame_bits({1'b0, d}, 8, (k == 1) ? PARITY_EVEN : PARITY_NONE, 1);
    if (bad_parity) bits[9] = ~bits[9];
    if (bad_stop)   bits[bits.size() - 1] = 1'b0;
    if (!bad_stop) begin
      expq[k].push_back(d);
      exp_perr[k].push_back(bad_parity);
    end
    for (int i = 0; i < bits.size(); i++) begin
      // Synchroniser delay: the receiver sees the line two cycles later.
      if (i == bits.size() - 1) stop_start[k] = cycle + 2;
      line[k] <= bits[i];
      repeat (bp) @(posedge clk);
    end
  endtask

  initial begin
    line  = '1;
    rst_n = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    repeat (3 * BP) @(posedge clk);

    // Plain characters, back to back, on both lines at once.
    fork
      begin
        drive(0, 8'h55, BP, 0, 0); drive(0, 8'hA3, BP, 0, 0);
        drive(0, 8'h00, BP, 0, 0); drive(0, 8'hFF, BP, 0, 0);
        for (int i = 0; i < 12; i++) drive(0, 8'($urandom), BP, 0, 0);
      end
      begin
        for (int i = 0; i < 12; i++) drive(1, 8'($urandom), BP, 0, 0);
      end
    join
    // Bit period 3 % long and 3 % short.
    for (int i = 0; i < 4; i++) drive(0, 8'($urandom), BP + BP * 3 / 100, 0, 0);
    for (int i = 0; i < 4; i++) drive(0, 8'($urandom), BP - BP * 3 / 100, 0, 0);
    repeat (2 * BP) @(posedge clk);

    // Glitch: a low pulse of a quarter bit is no start bit.
    line[0] <= 1'b0; repeat (BP / 4) @(posedge clk); line[0] <= 1'b1;
    repeat (3 * BP) @(posedge clk);
    checks++;
    if (n_ready[0] != 24 || n_ferr[0] != 0) begin
      failures++;
      $display("FAIL: after glitch %0d characters, %0d framing errors", n_ready[0], n_ferr[0]);
    end

    // Framing error, then a break (line held low), then a good character.
    drive(0, 8'h3C, BP, 0, 1);
    line[0] <= 1'b0; repeat (30 * BP) @(posedge clk);
    line[0] <= 1'b1; repeat (2 * BP) @(posedge clk);
    drive(0, 8'hC3, BP, 0, 0);
    repeat (2 * BP) @(posedge clk);
    checks++;
    if (n_ferr[0] != 1 || n_ready[0] != 25) begin
      failures++;
      $display("FAIL: framing: %0d errors, %0d characters", n_ferr[0], n_ready[0]);
    end

    // Parity errors on the even-parity receiver.
    drive(1, 8'h01, BP, 1, 0);
    drive(1, 8'h02, BP, 0, 0);
    drive(1, 8'hF7, BP, 1, 0);
    drive(1, 8'h3C, BP, 0, 1);
    repeat (2 * BP) @(posedge clk);
    checks++;
    if (n_perr[1] != 2 || n_ready[1] != 15 || n_ferr[1] != 1) begin
      failures++;
      $display("FAIL: parity: %0d parity errors, %0d characters, %0d framing errors",
               n_perr[1], n_ready[1], n_ferr[1]);
    end

    checks++;
    if (expq[0].size() != 0 || expq[1].size() != 0) begin
      failures++;
      $display("FAIL: characters not received: %0d %0d", expq[0].size(), expq[1].size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
