// tb_uart_fifo: checks the FIFO against a queue model.
//
// Random pushes and pops in phases that fill the FIFO to full (so pushes are
// dropped), drain it to empty (so pops are ignored) and mix the two.  Every
// cycle the head, full, empty and fill level are compared with the model.
module tb_uart_fifo;
  localparam int DEPTH = 16;

  logic       clk = 1'b0;
  logic       rst_n, push, pop, full, empty;
  logic [7:0] wdata, rdata;
  logic [4:0] count;
  logic [7:0] model [$];
  int         checks = 0;
  int         failures = 0;
  int         n_full = 0, n_drop = 0, n_empty_pop = 0;

  uart_fifo dut (.clk, .rst_n, .push_i(push), .wdata_i(wdata), .full_o(full),
                 .pop_i(pop), .rdata_o(rdata), .empty_o(empty), .count_o(count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pp, pq;
    rst_n = 1'b0; push = 1'b0; pop = 1'b0; wdata = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 6000; i++) begin
      // Phases: mostly push, mostly pop, balanced.
      case ((i / 500) % 3)
        0: begin pp = 80; pq = 20; end
        1: begin pp = 20; pq = 80; end
        default: begin pp = 50; pq = 50; end
      endcase
      push  = ($urandom_range(0, 99) < pp);
      pop   = ($urandom_range(0, 99) < pq);
      wdata = 8'($urandom);
      #1;
      checks++;
      if (full !== (model.size() == DEPTH) || empty !== (model.size() == 0) ||
          count !== 5'(model.size()) || (model.size() > 0 && rdata !== model[0])) begin
        failures++;
        $display("FAIL: size %0d: full %b empty %b count %0d head %h", model.size(),
                 full, empty, count, rdata);
      end
      if (full) n_full++;
      if (push && full && !pop) n_drop++;
      if (pop && empty) n_empty_pop++;
      @(posedge clk);
      begin
        bit do_pop, do_push;
        do_pop  = pop && model.size() > 0;
        do_push = push && model.size() < DEPTH;
        if (do_pop) void'(model.pop_front());
        if (do_push) model.push_back(wdata);
      end
      #1;
    end
    checks++;
    if (n_full == 0 || n_drop == 0 || n_empty_pop == 0) begin
      failures++;
      $display("FAIL: corner cases not reached: full %0d drop %0d empty pop %0d",
               n_full, n_drop, n_empty_pop);
    end
    $display("full cycles %0d, dropped pushes %0d, pops when empty %0d", n_full, n_drop, n_empty_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
