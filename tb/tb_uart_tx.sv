// tb_uart_tx: checks the transmitter's line waveform cycle by cycle.
//
// Two transmitters share one sample tick (every TDIV cycles, so a bit is
// 8 * TDIV cycles): u_8n1 with the default 8N1 format and u_8e2 with even
// parity and two stop bits.  A monitor per line waits for each start bit and
// compares every following cycle against the frame built by uart_tb_pkg.
// Bit length must be exact, and characters offered back to back must follow
// each other with no idle cycle (full line rate).  Odd parity and 7 data bits
// are checked with a third instance.
module tb_uart_tx;
  import uart_pkg::*;
  import uart_tb_pkg::*;

  localparam int TDIV = 4;
  localparam int BP   = 8 * TDIV;
  localparam int N    = 3;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       tick;
  int         tcnt;
  logic [N-1:0]       valid, ready, busy, txd;
  logic [7:0]         data [N];
  int         checks = 0;
  int         failures = 0;
  longint     cycle = 0;

  // Per-instance configuration and expected characters.
  int         dbits [N] = '{8, 8, 7};
  parity_e    pmode [N] = '{PARITY_NONE, PARITY_EVEN, PARITY_ODD};
  int         sbits [N] = '{1, 2, 1};
  logic [7:0] expq [N][$];
  longint     last_end [N];
  int         frames [N];
  int         back_to_back = 0;

  uart_tx u_8n1 (.clk, .rst_n, .tick_i(tick), .valid_i(valid[0]), .data_i(data[0]),
                 .ready_o(ready[0]), .busy_o(busy[0]), .txd_o(txd[0]));
  uart_tx #(.PARITY(PARITY_EVEN), .STOP_BITS(2)) u_8e2 (
                 .clk, .rst_n, .tick_i(tick), .valid_i(valid[1]), .data_i(data[1]),
                 .ready_o(ready[1]), .busy_o(busy[1]), .txd_o(txd[1]));
  uart_tx #(.PARITY(PARITY_ODD), .DATA_BITS(7)) u_7o1 (
                 .clk, .rst_n, .tick_i(tick), .valid_i(valid[2]), .data_i(data[2][6:0]),
                 .ready_o(ready[2]), .busy_o(busy[2]), .txd_o(txd[2]));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (!rst_n) begin
      tcnt <= 0; tick <= 1'b0;
    end else begin
      tcnt <= (tcnt == TDIV - 1) ? 0 : tcnt + 1;
      tick <= (tcnt == TDIV - 1);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line monitor for instance k.
  task automatic monitor(input int k);
    bitq_t  bits;
    logic [7:0] d;
    longint t0;
    forever begin
      @(posedge clk iff (rst_n && txd[k] == 1'b0));
      t0 = cycle;
      if (expq[k].size() == 0) begin
        failures++;
        $display("FAIL: line %0d started an unexpected frame", k);
        d = '0;
      end else begin
        d = expq[k].pop_front();
      end
      // A frame starting exactly where the previous one ended is back to back.
      if (frames[k] > 0 && t0 == last_end[k]) back_to_back++;
      bits = frame_bits({1'b0, d}, dbits[k], pmode[k], sbits[k]);
      for (int c = 0; c < bits.size() * BP; c++) begin
        checks++;
        if (txd[k] !== bits[c / BP]) begin
          failures++;
          $display("FAIL: line %0d char %h cycle %0d of frame: %b, expected %b",
                   k, d, c, txd[k], bits[c / BP]);
          break;
        end
        if (c != bits.size() * BP - 1) @(posedge clk);
      end
      last_end[k] = t0 + bits.size() * BP;
      frames[k]++;
    end
  endtask

  // Offer characters to instance k; hold valid so they go back to back.
  task automatic send(input int k, input logic [7:0] c);
    valid[k] <= 1'b1;
    data[k]  <= c;
    expq[k].push_back(dbits[k] == 7 ? {1'b0, c[6:0]} : c);
    @(posedge clk iff ready[k]);
  endtask

  initial begin
    rst_n = 1'b0;
    valid = '0;
    data  = '{default: '0};
    frames = '{default: 0};
    repeat (4) @(posedge clk);
    checks++;
    if (txd !== '1) begin failures++; $display("FAIL: line not idle high after reset"); end
    rst_n = 1'b1;
    fork
      monitor(0); monitor(1); monitor(2);
    join_none
    fork
      begin
        send(0, 8'h55); send(0, 8'hA3); send(0, 8'h00); send(0, 8'hFF);
        valid[0] <= 1'b0;
        repeat (3 * BP) @(posedge clk);
        for (int i = 0; i < 6; i++) send(0, 8'($urandom));
        valid[0] <= 1'b0;
      end
      begin
        send(1, 8'h01); send(1, 8'h80); send(1, 8'h7E);
        valid[1] <= 1'b0;
        repeat (BP / 2 + 3) @(posedge clk);
        for (int i = 0; i < 4; i++) send(1, 8'($urandom));
        valid[1] <= 1'b0;
      end
      begin
        send(2, 8'h41); send(2, 8'h7F); send(2, 8'h00);
        valid[2] <= 1'b0;
      end
    join
    // Let the last frames finish.
    repeat (14 * BP) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (expq[k].size() != 0 || busy[k]) begin
        failures++;
        $display("FAIL: line %0d left %0d characters unsent", k, expq[k].size());
      end
    end
    checks++;
    if (frames[0] != 10 || frames[1] != 7 || frames[2] != 3) begin
      failures++;
      $display("FAIL: frame counts %0d %0d %0d", frames[0], frames[1], frames[2]);
    end
    // Held valid must give gap-free frames (full 9600 bit/s at the defaults).
    checks++;
    if (back_to_back < 10) begin
      failures++;
      $display("FAIL: only %0d back-to-back frames", back_to_back);
    end
    $display("back-to-back frames: %0d", back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
