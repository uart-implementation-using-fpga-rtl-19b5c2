// tb_uart_control: checks the control logic with real FIFOs around it.
//
// The control logic is wired to two 4-entry uart_fifo instances, as in the
// UART; the testbench plays host, transmitter and receiver with random
// timing.  Checked: characters written by the host reach the transmitter in
// order and each exactly once; characters from the receiver reach the host in
// order; a character arriving while the receive FIFO is full is dropped and
// sets the overrun flag; framing and parity pulses set their sticky flags;
// clear resets all three.
module tb_uart_control;
  import uart_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       wr_valid, wr_ready, rd_valid, rd_ready, clear;
  logic [7:0] wr_data, rd_data;
  uart_err_t  err;
  logic       txf_push, txf_full, txf_pop, txf_empty;
  logic [7:0] txf_wdata, txf_rdata;
  logic       tx_valid, tx_ready;
  logic [7:0] tx_data;
  logic [7:0] rx_data;
  logic       rx_ready, rx_ferr, rx_perr;
  logic       rxf_push, rxf_full, rxf_pop, rxf_empty;
  logic [7:0] rxf_wdata, rxf_rdata;
  logic [2:0] txf_count, rxf_count;

  int         checks = 0;
  int         failures = 0;
  logic [7:0] txq [$];
  logic [7:0] rxq [$];
  int         n_sent = 0, n_recv = 0, n_overrun = 0;
  bit         exp_ovr, exp_fe, exp_pe;
  bit         tx_full_before, rx_full_before;

  uart_control dut (
    .clk, .rst_n, .wr_valid_i(wr_valid), .wr_data_i(wr_data), .wr_ready_o(wr_ready),
    .rd_valid_o(rd_valid), .rd_data_o(rd_data), .rd_ready_i(rd_ready), .clear_i(clear),
    .err_o(err), .txf_push_o(txf_push), .txf_wdata_o(txf_wdata), .txf_full_i(txf_full),
    .txf_pop_o(txf_pop), .txf_rdata_i(txf_rdata), .txf_empty_i(txf_empty),
    .tx_valid_o(tx_valid), .tx_data_o(tx_data), .tx_ready_i(tx_ready),
    .rx_data_i(rx_data), .rx_ready_i(rx_ready), .rx_framing_err_i(rx_ferr),
    .rx_parity_err_i(rx_perr), .rxf_push_o(rxf_push), .rxf_wdata_o(rxf_wdata),
    .rxf_full_i(rxf_full), .rxf_pop_o(rxf_pop), .rxf_rdata_i(rxf_rdata),
    .rxf_empty_i(rxf_empty));

  uart_fifo #(.DEPTH(4)) u_txf (.clk, .rst_n, .push_i(txf_push), .wdata_i(txf_wdata),
    .full_o(txf_full), .pop_i(txf_pop), .rdata_o(txf_rdata), .empty_o(txf_empty), .count_o(txf_count));
  uart_fifo #(.DEPTH(4)) u_rxf (.clk, .rst_n, .push_i(rxf_push), .wdata_i(rxf_wdata),
    .full_o(rxf_full), .pop_i(rxf_pop), .rdata_o(rxf_rdata), .empty_o(rxf_empty), .count_o(rxf_count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; wr_valid = 0; wr_data = 0; rd_ready = 0; clear = 0;
    tx_ready = 0; rx_data = 0; rx_ready = 0; rx_ferr = 0; rx_perr = 0;
    exp_ovr = 0; exp_fe = 0; exp_pe = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 8000; i++) begin
      bit slow_host;
      slow_host = ((i / 1000) % 2) == 1;   // phases where the host hardly reads
      wr_valid = ($urandom_range(0, 2) == 0);
      wr_data  = 8'($urandom);
      tx_ready = ($urandom_range(0, 3) == 0);
      rx_ready = ($urandom_range(0, 3) == 0);
      rx_data  = 8'($urandom);
      rx_ferr  = !rx_ready && ($urandom_range(0, 200) == 0);
      rx_perr  = rx_ready && ($urandom_range(0, 100) == 0);
      rd_ready = slow_host ? ($urandom_range(0, 20) == 0) : ($urandom_range(0, 1) == 0);
      clear    = ($urandom_range(0, 400) == 0);
      #1;
      tx_full_before = (txq.size() == 4);
      rx_full_before = (rxq.size() == 4);
      // Transmitter side: a character is taken when tx_valid and tx_ready.
      checks++;
      if (tx_valid !== (txq.size() > 0) || wr_ready !== !tx_full_before) begin
        failures++;
        $display("FAIL: tx_valid %b wr_ready %b with %0d queued", tx_valid, wr_ready, txq.size());
      end
      if (tx_valid && tx_ready) begin
        checks++;
        if (txq.size() == 0 || tx_data !== txq[0]) begin
          failures++;
          $display("FAIL: transmitter got %h expected %h", tx_data, (txq.size() != 0) ? txq[0] : 8'h00);
        end
        if (txq.size() != 0) void'(txq.pop_front());
        n_sent++;
      end
      // Host read side.
      checks++;
      if (rd_valid !== (rxq.size() > 0) || (rd_valid && rd_data !== rxq[0])) begin
        failures++;
        $display("FAIL: host read %b %h, model %0d entries", rd_valid, rd_data, rxq.size());
      end
      @(posedge clk);
      // FIFO rule: a push is taken if the FIFO was not full before the edge.
      if (wr_valid && !tx_full_before) txq.push_back(wr_data);
      if (rd_ready && rxq.size() > 0) begin void'(rxq.pop_front()); n_recv++; end
      if (rx_ready) begin
        if (rx_full_before) begin
          exp_ovr = 1; n_overrun++;
        end else begin
          rxq.push_back(rx_data);
        end
      end
      if (rx_ferr) exp_fe = 1;
      if (rx_perr) exp_pe = 1;
      if (clear) begin exp_ovr = 0; exp_fe = 0; exp_pe = 0; end
      #1;
      checks++;
      if (err !== {exp_ovr, exp_fe, exp_pe}) begin
        failures++;
        $display("FAIL: error flags %b expected %b%b%b", err, exp_ovr, exp_fe, exp_pe);
      end
    end
    checks++;
    if (n_sent < 500 || n_recv < 300 || n_overrun < 10) begin
      failures++;
      $display("FAIL: coverage sent %0d received %0d overruns %0d", n_sent, n_recv, n_overrun);
    end
    $display("sent %0d received %0d overruns %0d", n_sent, n_recv, n_overrun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
