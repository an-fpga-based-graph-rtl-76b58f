// color_stack: the edge controller's LIFO of previous free-colour lists.
//
// Each edge controller keeps an N-bit list of the colours still free in its
// row or column.  When a guess is made the current list is pushed; when the
// guess is undone (backtrack or regression) the list is popped and becomes
// the current list again, so the edge steps back to the state before the
// guess.  That behaviour follows the design description; the depth (one
// entry per possible guess, N*N) and the interface are this design's choice.
//
// Interface: push stores din; pop presents the top entry on dout in the same
// cycle (combinational read) and removes it at the clock edge.  depth gives
// the number of stored lists.  Pushing a full stack or popping an empty one
// sets the sticky err flag and leaves the stack unchanged.
module color_stack #(
  parameter int N     = 6,
  parameter int DEPTH = N * N
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  logic                       pop,
  input  logic [N-1:0]               din,
  output logic [N-1:0]               dout,
  output logic [$clog2(DEPTH+1)-1:0] depth,
  output logic                       err
);
  localparam int PW = $clog2(DEPTH + 1);

  logic [N-1:0] mem [DEPTH];
  logic [PW-1:0] sp;

  assign depth = sp;
  assign dout  = (sp != '0) ? mem[sp - 1'b1] : '0;

  always_ff @(posedge clk) begin
    if (push && !pop && sp != PW'(DEPTH)) mem[sp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp  <= '0;
      err <= 1'b0;
    end else if (push && !pop) begin
      if (sp == PW'(DEPTH)) err <= 1'b1;
      else                  sp  <= sp + 1'b1;
    end else if (pop && !push) begin
      if (sp == '0) err <= 1'b1;
      else          sp  <= sp - 1'b1;
    end
  end

endmodule
