// implicate_ctrl: the node processor's implicate/backtrack controller.
//
// It looks at the node's M colour bins (each a colour and a valid bit) and
// the complete-list flag and decides what the node must do next, as the
// design describes:
//   * count the valid bins;
//   * complete list and exactly one valid colour  -> implicate to that colour;
//   * complete list and no valid colour           -> backtrack (contradiction);
//   * partial list and no valid colour            -> ask for a memory fill.
// It also names the valid bin in the lowest position (bins are filled in
// ascending colour order, so this is the smallest colour held), which the
// node uses both as the implied colour and as its guess.
//
// Purely combinational; enable gates all three requests (the node clears it
// while it is assigned, not yet loaded, or waiting for a fill).
module implicate_ctrl #(
  parameter int N = 6,
  parameter int M = 4
) (
  input  logic                           enable,
  input  logic [M-1:0]                   valid,
  input  logic [M-1:0][gc_pkg::cw(N)-1:0] colors,
  input  logic                           complete,
  output logic [$clog2(M+1)-1:0]          count,
  output logic                           any_valid,
  output logic [gc_pkg::cw(N)-1:0]        sel_color,
  output logic                           implicate,
  output logic                           backtrack,
  output logic                           need_fill
);
  localparam int CNTW = $clog2(M + 1);

  always_comb begin
    count     = '0;
    sel_color = '0;
    any_valid = 1'b0;
    for (int b = M - 1; b >= 0; b--) begin
      if (valid[b]) begin
        count     = count + CNTW'(1);
        sel_color = colors[b];
        any_valid = 1'b1;
      end
    end
  end

  assign implicate = enable &&  complete && (count == CNTW'(1));
  assign backtrack = enable &&  complete && (count == '0);
  assign need_fill = enable && !complete && (count == '0);

endmodule
