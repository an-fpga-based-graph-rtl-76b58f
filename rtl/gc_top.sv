// gc_top: Latin square completion (graph colouring) accelerator, top level.
//
// An order-N Latin square is an N x N grid of N colours in which every colour
// appears once per row and once per column.  Given some cells preset, the
// accelerator either completes the square or proves that no completion
// exists, by a complete depth-first search with guessing, implication and
// backtracking.
//
// Structure (that of the original architecture):
//   * an N x N array of node processors (node_proc), one per cell;
//   * N row edge controllers down the left side and N column edge
//     controllers along the top (edge_ctrl), each owning its line's list of
//     free colours and a LIFO of earlier lists;
//   * one graph master (graph_master) in the corner.
// Node buses form a 2-D torus of unidirectional rings: row edge i -> nodes
// (i,0..N-1) -> back to row edge i, and column edge j -> nodes (0..N-1,j) ->
// back to column edge j.  The edge bus forms two rings through the master:
// master -> row edges 0..N-1 -> master, and master -> column edges 0..N-1
// -> master.  Colours travel on node buses as numbers (log2 N bits), and on
// the edge bus as N-bit one-hot lists.
//
// Host interface: while idle, write the initial conditions with preset_we /
// preset_addr (row*N + col) / preset_val (0 = free, c+1 = colour c), then
// pulse start.  When done rises, solved tells whether a completion exists;
// if it does, res_color gives the colour of cell res_addr.  n_guess,
// n_backtrack and n_cycles count guesses, backtracks and cycles from start
// to done.  err flags an internal FIFO or stack overflow.  A new problem
// needs a reset.
//
// Timing: a word advances one node or one edge every two cycles on both bus
// kinds, as the description gives for data passing through.  Presetting a
// 6x6 array takes about 90 cycles (140 in the description).  Every guess
// costs at least IDLE_WAIT idle cycles before the next order.
//
// Follows the description: the array of nodes, row and column edges and
// master, the torus of node buses, the N-bit edge bus, the defaults N=6 and
// IDLE_WAIT=140.  This design's own: the bin count M=4, the two-ring shape of
// the edge bus, the message encodings and the host interface.
module gc_top
  import gc_pkg::*;
#(
  parameter int N         = 6,
  parameter int M         = 4,
  parameter int IDLE_WAIT = 140
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   preset_we,
  input  logic [$clog2(N*N)-1:0] preset_addr,
  input  logic [cw(N):0]         preset_val,
  input  logic                   start,
  output logic                   done,
  output logic                   solved,
  input  logic [$clog2(N*N)-1:0] res_addr,
  output logic [cw(N)-1:0]       res_color,
  output logic [31:0]            n_guess,
  output logic [31:0]            n_backtrack,
  output logic [31:0]            n_cycles,
  output logic                   err
);
  localparam int NBW = nbw(N);
  localparam int EBW = ebw(N);

  // node bus: hbus[i][j] is the row bus word entering node (i,j); hbus[i][N]
  // is the word leaving the last node of row i.  vbus likewise by column.
  logic [NBW-1:0] hbus [N][N+1];
  logic [NBW-1:0] vbus [N+1][N];
  // edge bus: rring[k] enters row edge k, rring[N] returns to the master
  logic [EBW-1:0] rring [N+1];
  logic [EBW-1:0] cring [N+1];

  logic [N*N-1:0] node_busy;
  logic [N-1:0]   redge_busy, cedge_busy, redge_err, cedge_err;
  logic           net_busy;

  genvar i, j;
  generate
    for (i = 0; i < N; i++) begin : g_row
      for (j = 0; j < N; j++) begin : g_col
        node_proc #(.N(N), .M(M), .ROW(i), .COL(j)) u_node (
          .clk, .rst_n,
          .right_in (hbus[i][j]),   .right_out(hbus[i][j+1]),
          .down_in  (vbus[i][j]),   .down_out (vbus[i+1][j]),
          .busy     (node_busy[i*N+j]),
          .state_o  (),
          .color_o  ()
        );
      end
    end

    for (i = 0; i < N; i++) begin : g_redge
      edge_ctrl #(.N(N), .M(M), .ROW_EDGE(1'b1), .IDX(i)) u_edge (
        .clk, .rst_n,
        .nb_in (hbus[i][N]), .nb_out(hbus[i][0]),
        .eb_in (rring[i]),   .eb_out(rring[i+1]),
        .busy  (redge_busy[i]), .err(redge_err[i]), .free_o()
      );
    end

    for (j = 0; j < N; j++) begin : g_cedge
      edge_ctrl #(.N(N), .M(M), .ROW_EDGE(1'b0), .IDX(j)) u_edge (
        .clk, .rst_n,
        .nb_in (vbus[N][j]), .nb_out(vbus[0][j]),
        .eb_in (cring[j]),   .eb_out(cring[j+1]),
        .busy  (cedge_busy[j]), .err(cedge_err[j]), .free_o()
      );
    end
  endgenerate

  assign net_busy = |node_busy || |redge_busy || |cedge_busy;
  assign err      = |redge_err || |cedge_err;

  graph_master #(.N(N), .IDLE_WAIT(IDLE_WAIT)) u_master (
    .clk, .rst_n,
    .preset_we, .preset_addr, .preset_val, .start,
    .done, .solved, .res_addr, .res_color,
    .n_guess, .n_backtrack, .n_cycles,
    .rr_out(rring[0]), .rr_in(rring[N]),
    .cr_out(cring[0]), .cr_in(cring[N]),
    .net_busy
  );

endmodule
