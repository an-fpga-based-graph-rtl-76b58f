// sync_fifo: single-clock first-in first-out buffer.
//
// An edge controller receives at most one word per cycle from each of its
// buses but may have to send several (a fill packet is up to M colours plus
// an end word), so it queues what it sends in FIFOs like this one.  The
// description only mentions latency in "the edge controller FIFO"; depth,
// interface and overflow handling are this design's choices.
//
// Interface: push/din write a word at the clock edge, pop removes the word
// shown on dout (first-word fall-through, valid while !empty).  A push into
// a full FIFO is dropped and sets the sticky overflow flag; a pop of an
// empty FIFO is ignored.  Push and pop in the same cycle are allowed.
// Timing: a word pushed into an empty FIFO appears on dout one cycle later.
module sync_fifo #(
  parameter int WIDTH = 8,
  parameter int DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic             full,
  output logic             overflow
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic [AW:0]      count;

  logic do_push, do_pop;
  assign empty   = (count == 0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign dout    = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
      if (push && !do_push) overflow <= 1'b1;
    end
  end

endmodule
