// tb_edge_ctrl: a row edge controller (row 1) and a column edge controller
// (column 2) of a 6x6 array with 4 bins, each driven on its node bus input
// and its edge bus input.
//
// Node bus words are presented for one bus focus period of the edge and the
// node bus output is collected once per focus period; the edge bus is
// collected every cycle.  Checked against values worked out here:
//   * ASSIGN(c): free bit c cleared and REMOVE(c) broadcast; a second ASSIGN
//     of the same colour gives a backtrack request on the edge bus instead;
//   * column edge fill: list AND free list, first M colours in ascending
//     order, then an end word with the complete flag (both flag values);
//   * row edge fill request: free list masked to colours >= floor;
//   * GUESS pushes and BT pops the free list (restoring it), and the column
//     edge turns them into GUESS/STEP/BTRK broadcasts; QUERY is forwarded;
//   * words for other edges pass along the edge bus unchanged;
//   * replies and backtrack requests from nodes are forwarded to the master.
`timescale 1ns/1ps
module tb_edge_ctrl;
  import gc_pkg::*;
  localparam int N = 6, M = 4, CW = cw(N);

  typedef struct packed {
    ntag_e         tag;
    logic [CW-1:0] idx;
    logic [CW-1:0] data;
  } nword_t;

  typedef struct packed {
    etag_e         tag;
    logic [CW-1:0] row;
    logic [CW-1:0] col;
    logic [N-1:0]  data;
  } eword_t;

  localparam nword_t NN = '{tag: NT_NONE, idx: '0, data: '0};
  localparam eword_t EN = '{tag: ET_NONE, row: '0, col: '0, data: '0};

  logic clk = 1'b0, rst_n = 1'b0;
  nword_t r_nin, r_nout, c_nin, c_nout;
  eword_t r_ein, r_eout, c_ein, c_eout;
  logic r_busy, c_busy, r_err, c_err;
  logic [N-1:0] r_free, c_free;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edge_ctrl #(.N(N), .M(M), .ROW_EDGE(1'b1), .IDX(1)) u_row (
    .clk, .rst_n, .nb_in(r_nin), .nb_out(r_nout), .eb_in(r_ein), .eb_out(r_eout),
    .busy(r_busy), .err(r_err), .free_o(r_free)
  );
  edge_ctrl #(.N(N), .M(M), .ROW_EDGE(1'b0), .IDX(2)) u_col (
    .clk, .rst_n, .nb_in(c_nin), .nb_out(c_nout), .eb_in(c_ein), .eb_out(c_eout),
    .busy(c_busy), .err(c_err), .free_o(c_free)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic nword_t nw(input ntag_e t, input int i, input int d);
    return '{tag: t, idx: CW'(i), data: CW'(d)};
  endfunction
  function automatic eword_t ew(input etag_e t, input int r, input int c, input int d);
    return '{tag: t, row: CW'(r), col: CW'(c), data: N'(d)};
  endfunction

  nword_t rnq [$], cnq [$];
  eword_t req [$], ceq [$];
  always @(negedge clk) if (rst_n) begin
    // row edge writes its node bus on row focus, column edge on column focus
    if (u_row.phase == PH_COL && r_nout.tag != NT_NONE) rnq.push_back(r_nout);
    if (u_col.phase == PH_ROW && c_nout.tag != NT_NONE) cnq.push_back(c_nout);
    if (r_eout.tag != ET_NONE) req.push_back(r_eout);
    if (c_eout.tag != ET_NONE) ceq.push_back(c_eout);
  end

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic row_node(input nword_t x);
    while (u_row.phase != PH_ROW) @(negedge clk);
    r_nin = x; idle(2); r_nin = NN;
  endtask
  task automatic col_node(input nword_t x);
    while (u_col.phase != PH_COL) @(negedge clk);
    c_nin = x; idle(2); c_nin = NN;
  endtask
  task automatic row_edge(input eword_t x);
    r_ein = x; idle(1); r_ein = EN;
  endtask
  task automatic col_edge(input eword_t x);
    c_ein = x; idle(1); c_ein = EN;
  endtask

  task automatic exp_n(ref nword_t q [$], input nword_t x, input string msg);
    check(q.size() > 0 && q[0] == x,
          $sformatf("%s: got %p, expected %p", msg, (q.size() > 0) ? q[0] : NN, x));
    if (q.size() > 0) void'(q.pop_front());
  endtask
  task automatic exp_e(ref eword_t q [$], input eword_t x, input string msg);
    check(q.size() > 0 && q[0] == x,
          $sformatf("%s: got %p, expected %p", msg, (q.size() > 0) ? q[0] : EN, x));
    if (q.size() > 0) void'(q.pop_front());
  endtask
  task automatic quiet(input string msg);
    check(rnq.size() == 0 && cnq.size() == 0 && req.size() == 0 && ceq.size() == 0,
          $sformatf("%s: no further output (%0d %0d %0d %0d)", msg,
                    rnq.size(), cnq.size(), req.size(), ceq.size()));
    rnq.delete(); cnq.delete(); req.delete(); ceq.delete();
  endtask

  // expected fill packet from the column edge for list l
  task automatic exp_fill(input int row, input logic [N-1:0] l, input string msg);
    int n = 0, tot = 0;
    for (int c = 0; c < N; c++) if (l[c]) tot++;
    for (int c = 0; c < N && n < M; c++)
      if (l[c]) begin exp_n(cnq, nw(NT_FILL, row, c), msg); n++; end
    exp_n(cnq, nw(NT_FILLEND, row, (tot <= M) ? 1 : 0), {msg, " end"});
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    r_nin = NN; c_nin = NN; r_ein = EN; c_ein = EN;
    idle(3); rst_n = 1'b1; idle(2);
    check(r_free == '1 && c_free == '1 && !r_busy && !c_busy, "all colours free after reset");

    // ASSIGN -> REMOVE broadcast and free list update; repeat -> BTREQ
    row_node(nw(NT_ASSIGN, 4, 3));
    col_node(nw(NT_ASSIGN, 0, 5));
    idle(6);
    exp_n(rnq, nw(NT_REMOVE, 0, 3), "row edge broadcasts REMOVE");
    exp_n(cnq, nw(NT_REMOVE, 0, 5), "column edge broadcasts REMOVE");
    check(r_free == 6'b110111 && c_free == 6'b011111, "free lists updated");
    quiet("assign");
    row_node(nw(NT_ASSIGN, 2, 3));
    col_node(nw(NT_ASSIGN, 4, 5));
    idle(6);
    exp_e(req, ew(ET_BTREQ, 1, 2, 0), "row edge: double assignment -> BTREQ");
    exp_e(ceq, ew(ET_BTREQ, 4, 2, 0), "column edge: double assignment -> BTREQ");
    check(r_free == 6'b110111 && c_free == 6'b011111, "free lists unchanged by a conflict");
    quiet("double assign");

    // row edge fill request with floor 2: free list {0,1,2,4,5} masked
    row_node(nw(NT_FILLREQ, 4, 2));
    idle(4);
    exp_e(req, ew(ET_FILL, 1, 4, 6'b110100), "row edge sends masked free list");
    quiet("fill request");

    // column edge fill: list 111111 & free 011111 = 5 colours -> partial
    col_edge(ew(ET_FILL, 3, 2, 6'b111111));
    idle(20);
    exp_fill(3, 6'b011111, "partial fill");
    quiet("partial fill");
    // list 110110 & 011111 = {1,2,4} -> complete
    col_edge(ew(ET_FILL, 0, 2, 6'b110110));
    idle(16);
    exp_fill(0, 6'b010110, "complete fill");
    quiet("complete fill");
    // list 111101 & 011111 = {0,2,3,4}: exactly M colours is complete
    col_edge(ew(ET_FILL, 2, 2, 6'b111101));
    idle(16);
    exp_fill(2, 6'b011101, "fill of exactly M colours");
    quiet("exact fill");
    // one-colour preset fill
    col_edge(ew(ET_FILL, 5, 2, 6'b000100));
    idle(8);
    exp_fill(5, 6'b000100, "preset fill");
    quiet("preset fill");
    // a fill for another column passes along the ring untouched
    col_edge(ew(ET_FILL, 5, 4, 6'b000100));
    row_edge(ew(ET_FILL, 3, 4, 6'b101010));
    idle(4);
    exp_e(ceq, ew(ET_FILL, 5, 4, 6'b000100), "foreign fill passes the column edge");
    exp_e(req, ew(ET_FILL, 3, 4, 6'b101010), "fill passes the row edge");
    quiet("pass");

    // query forwarding
    col_edge(ew(ET_QUERY, 4, 2, 0));
    col_edge(ew(ET_QUERY, 4, 3, 0));
    idle(6);
    exp_n(cnq, nw(NT_QUERY, 4, 0), "query forwarded to node");
    exp_e(ceq, ew(ET_QUERY, 4, 3, 0), "foreign query passes");
    quiet("query");

    // replies and node backtrack requests forwarded by the row edge
    row_node(nw(NT_RSET, 5, 3));
    row_node(nw(NT_RREADY, 0, 0));
    row_node(nw(NT_BTREQ, 2, 0));
    idle(4);
    exp_e(req, ew(ET_RSET, 1, 5, 3), "RSET forwarded");
    exp_e(req, ew(ET_RREADY, 1, 0, 0), "RREADY forwarded");
    exp_e(req, ew(ET_BTREQ, 1, 2, 0), "node BTREQ forwarded");
    quiet("replies");

    // guess: push; then assign more; backtrack: pop restores the lists
    row_edge(ew(ET_GUESS, 3, 2, 0));
    col_edge(ew(ET_GUESS, 3, 2, 0));
    col_edge(ew(ET_GUESS, 1, 0, 0));
    idle(6);
    exp_e(req, ew(ET_GUESS, 3, 2, 0), "GUESS passes the row edge");
    exp_e(ceq, ew(ET_GUESS, 3, 2, 0), "GUESS passes the column edge");
    exp_e(ceq, ew(ET_GUESS, 1, 0, 0), "second GUESS passes");
    exp_n(cnq, nw(NT_GUESS, 3, 0), "column edge orders node 3 to guess");
    exp_n(cnq, nw(NT_STEP, 0, 0), "guess in another column becomes STEP");
    check(u_row.u_stack.depth == 1 && u_col.u_stack.depth == 2, "stack depths after guesses");
    quiet("guess");
    row_node(nw(NT_ASSIGN, 0, 0));
    col_node(nw(NT_ASSIGN, 0, 1));
    idle(6);
    check(r_free == 6'b110110 && c_free == 6'b011101, "lists after assignments in the guess");
    exp_n(rnq, nw(NT_REMOVE, 0, 0), "REMOVE under guess (row)");
    exp_n(cnq, nw(NT_REMOVE, 0, 1), "REMOVE under guess (column)");
    quiet("assign under guess");
    row_edge(ew(ET_BT, 0, 0, 0));
    col_edge(ew(ET_BT, 0, 0, 0));
    idle(6);
    exp_e(req, ew(ET_BT, 0, 0, 0), "BT passes the row edge");
    exp_e(ceq, ew(ET_BT, 0, 0, 0), "BT passes the column edge");
    exp_n(cnq, nw(NT_BTRK, 0, 0), "column edge broadcasts BTRK");
    check(r_free == 6'b110111, "row list restored by backtrack");
    check(c_free == 6'b011111, "column list restored to its last pushed value");
    quiet("backtrack");
    col_edge(ew(ET_BT, 0, 0, 0));
    idle(6);
    check(c_free == 6'b011111 && u_col.u_stack.depth == 0, "second pop");
    exp_e(ceq, ew(ET_BT, 0, 0, 0), "second BT passes");
    exp_n(cnq, nw(NT_BTRK, 0, 0), "second BTRK");
    quiet("second backtrack");
    check(!r_err && !c_err, "no overflow");
    idle(4);
    check(!r_busy && !c_busy, "edges idle at the end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
