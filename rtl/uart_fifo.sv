// uart_fifo: synchronous first-in first-out character buffer.
//
// Holds up to DEPTH characters between the host and the transmitter, or
// between the receiver and the host, so that no character is lost while the
// other side is busy.  Storage is a DEPTH x WIDTH register array addressed by
// a write and a read pointer; a separate occupancy counter gives full, empty
// and the fill level.
//
// Interface: push_i writes wdata_i at the next clock edge unless the FIFO is
// full, in which case the character is dropped (the caller sees full_o and
// reports the loss).  rdata_o always shows the oldest entry (first-word
// fall-through); pop_i removes it unless the FIFO is empty.  Push and pop may
// happen in the same cycle.  DEPTH must be a power of two.
//
// The buffer itself is named by the reference design; its depth (16) and
// this organisation are this design's choices.
module uart_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push_i,
  input  logic [WIDTH-1:0]           wdata_i,
  output logic                       full_o,
  input  logic                       pop_i,
  output logic [WIDTH-1:0]           rdata_o,
  output logic                       empty_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("uart_fifo: DEPTH must be a power of two, at least 2");
  end

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    count;
  logic             do_push, do_pop;

  assign full_o  = (count == CW'(DEPTH));
  assign empty_o = (count == '0);
  assign count_o = count;
  assign rdata_o = mem[rd_ptr];
  assign do_push = push_i && !full_o;
  assign do_pop  = pop_i && !empty_o;

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wdata_i;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
      unique case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The occupancy counter never leaves 0..DEPTH.
  assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
