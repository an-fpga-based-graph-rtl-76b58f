// tb_node_proc: one node processor (position row 2, column 3 of a 6x6 array,
// 4 bins) driven word by word on its column and row buses.
//
// Words are presented for the two cycles of a bus focus period, as the
// previous node would hold them.  Words leaving on Right Out and Down Out
// are collected once per focus period and compared with the expected
// sequence.  Scenarios: a one-colour preset fill (immediate implication and
// ASSIGN on both buses), pass-through of foreign words, queries, a partial
// fill drained by removals (refill request), a complete fill reduced to one
// colour (implication), a guess and its backtrack (floor = colour + 1 in the
// refill request), a complete list emptied by removals (backtrack request),
// and the depth rule (a backtrack only undoes assignments of the last guess).
`timescale 1ns/1ps
module tb_node_proc;
  import gc_pkg::*;
  localparam int N = 6, M = 4, ROW = 2, COL = 3;
  localparam int CW = cw(N);

  typedef struct packed {
    ntag_e         tag;
    logic [CW-1:0] idx;
    logic [CW-1:0] data;
  } nword_t;

  logic clk = 1'b0, rst_n = 1'b0;
  nword_t rin, din, rout, dout;
  logic busy;
  nstate_e st;
  logic [CW-1:0] col;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  node_proc #(.N(N), .M(M), .ROW(ROW), .COL(COL)) dut (
    .clk, .rst_n, .right_in(rin), .right_out(rout), .down_in(din), .down_out(dout),
    .busy, .state_o(st), .color_o(col)
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  localparam nword_t NONE = '{tag: NT_NONE, idx: '0, data: '0};

  function automatic nword_t w(input ntag_e t, input int i, input int d);
    return '{tag: t, idx: CW'(i), data: CW'(d)};
  endfunction

  // outputs collected once per focus period
  nword_t rq [$], dq [$];
  always @(negedge clk) if (rst_n) begin
    if (dut.phase == PH_COL && rout.tag != NT_NONE) rq.push_back(rout);  // row edge just taken
    if (dut.phase == PH_ROW && dout.tag != NT_NONE) dq.push_back(dout);
  end

  // present a word on the column bus for one column focus period
  task automatic send_col(input nword_t x);
    while (dut.phase != PH_COL) @(negedge clk);
    din = x;
    @(negedge clk);
    @(negedge clk);
    din = NONE;
  endtask

  task automatic send_row(input nword_t x);
    while (dut.phase != PH_ROW) @(negedge clk);
    rin = x;
    @(negedge clk);
    @(negedge clk);
    rin = NONE;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic expect_row(input nword_t x, input string msg);
    check(rq.size() > 0 && rq[0] == x,
          $sformatf("%s: row out %p, expected %p", msg, (rq.size() > 0) ? rq[0] : NONE, x));
    if (rq.size() > 0) void'(rq.pop_front());
  endtask

  task automatic expect_col(input nword_t x, input string msg);
    check(dq.size() > 0 && dq[0] == x,
          $sformatf("%s: column out %p, expected %p", msg, (dq.size() > 0) ? dq[0] : NONE, x));
    if (dq.size() > 0) void'(dq.pop_front());
  endtask

  task automatic expect_quiet(input string msg);
    check(rq.size() == 0 && dq.size() == 0,
          $sformatf("%s: no further output (%0d row, %0d column words)", msg, rq.size(), dq.size()));
    rq.delete(); dq.delete();
  endtask

  task automatic fill(input int cols [$], input bit complete);
    foreach (cols[k]) send_col(w(NT_FILL, ROW, cols[k]));
    send_col(w(NT_FILLEND, ROW, complete));
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rin = NONE; din = NONE;
    idle(3);
    rst_n = 1'b1;
    idle(2);

    // 1. not loaded: no requests; foreign words pass through in two cycles
    idle(10);
    expect_quiet("unloaded node stays quiet");
    send_row(w(NT_FILLREQ, 1, 0));
    send_col(w(NT_FILL, 4, 2));          // for another node
    idle(4);
    expect_row(w(NT_FILLREQ, 1, 0), "row pass-through");
    expect_col(w(NT_FILL, 4, 2), "column pass-through");
    expect_quiet("pass-through only");

    // 2. preset: one-colour complete fill -> implicate to colour 5
    fill('{5}, 1'b1);
    idle(6);
    expect_row(w(NT_ASSIGN, COL, 5), "preset implication to row edge");
    expect_col(w(NT_ASSIGN, ROW, 5), "preset implication to column edge");
    expect_quiet("preset");
    check(st == NS_PREASSIGNED && col == 5, "node preassigned to colour 5");
    send_col(w(NT_QUERY, ROW, 0));
    idle(4);
    expect_row(w(NT_RSET, COL, 5), "query answered with colour");
    expect_quiet("query");
    send_col(w(NT_REMOVE, 0, 1));        // removal is ignored once assigned
    idle(4);
    expect_col(w(NT_REMOVE, 0, 1), "REMOVE passes on");
    expect_quiet("remove on assigned node");

    // 3. new node life: reset, partial fill {0,1,2,3}, removals drain it
    rst_n = 1'b0; idle(2); rst_n = 1'b1; idle(2);
    fill('{0, 1, 2, 3}, 1'b0);
    idle(4);
    expect_quiet("partial fill waits");
    send_row(w(NT_REMOVE, 0, 0));
    send_col(w(NT_REMOVE, 0, 1));
    send_row(w(NT_REMOVE, 0, 2));
    idle(4);
    rq.delete(); dq.delete();            // the REMOVE words passing on
    send_col(w(NT_REMOVE, 0, 3));
    idle(6);
    expect_col(w(NT_REMOVE, 0, 3), "last REMOVE passes on");
    expect_row(w(NT_FILLREQ, COL, 0), "empty partial list requests a fill");
    expect_quiet("refill request");

    // 4. refill {4,5} complete, remove 4 -> implicate to 5
    fill('{4, 5}, 1'b1);
    idle(4);
    expect_quiet("two colours: no implication yet");
    send_col(w(NT_QUERY, ROW, 0));
    idle(4);
    expect_row(w(NT_RREADY, COL, 0), "unassigned node ready to guess");
    send_row(w(NT_REMOVE, 0, 4));
    idle(6);
    expect_row(w(NT_REMOVE, 0, 4), "REMOVE passes on");
    expect_row(w(NT_ASSIGN, COL, 5), "implication after removal (row)");
    expect_col(w(NT_ASSIGN, ROW, 5), "implication after removal (column)");
    expect_quiet("implication");
    check(st == NS_PREASSIGNED, "implied at depth 0 counts as preassigned");

    // 5. guess and backtrack
    rst_n = 1'b0; idle(2); rst_n = 1'b1; idle(2);
    fill('{1, 3, 4}, 1'b1);
    send_col(w(NT_STEP, 0, 0));          // a guess elsewhere: depth 1
    send_col(w(NT_GUESS, ROW, 0));       // our guess: depth 2, colour 1
    idle(6);
    expect_col(w(NT_STEP, 0, 0), "STEP passes on");
    expect_col(w(NT_GUESS, ROW, 0), "GUESS passes on");
    expect_row(w(NT_ASSIGN, COL, 1), "guess takes lowest colour (row)");
    expect_col(w(NT_ASSIGN, ROW, 1), "guess takes lowest colour (column)");
    expect_quiet("guess");
    check(st == NS_GUESSED && dut.depth == 2 && dut.level == 2, "guessed at depth 2");
    send_col(w(NT_BTRK, 0, 0));          // undo our guess
    idle(6);
    expect_col(w(NT_BTRK, 0, 0), "BTRK passes on");
    expect_row(w(NT_FILLREQ, COL, 2), "refill starts above the failed colour");
    expect_quiet("backtrack");
    check(st == NS_UNASSIGNED && dut.depth == 1, "unassigned at depth 1 after backtrack");

    // 6. implication at depth 1 is undone by a backtrack; depth-0 ones are not
    fill('{3, 4}, 1'b1);
    send_row(w(NT_REMOVE, 0, 3));
    idle(4);
    rq.delete(); dq.delete();
    send_col(w(NT_REMOVE, 0, 1));        // not held: no effect
    idle(6);
    // removing 3 left one colour (4): the node implicated to it at depth 1
    check(st == NS_IMPLIED && col == 4, "implied to colour 4 at depth 1");
    rq.delete(); dq.delete();
    send_col(w(NT_BTRK, 0, 0));          // undo depth 1: implication undone
    idle(6);
    expect_col(w(NT_BTRK, 0, 0), "BTRK passes on");
    expect_row(w(NT_FILLREQ, COL, 0), "implied node cleared, floor reset");
    expect_quiet("undo implication");
    fill('{0, 2}, 1'b1);
    send_row(w(NT_REMOVE, 0, 0));
    send_row(w(NT_REMOVE, 0, 5));
    idle(4);
    rq.delete(); dq.delete();
    check(st == NS_IMPLIED || st == NS_PREASSIGNED, "implied after one of two removed");
    // an assigned node at depth 0 is not undone by a later backtrack
    send_col(w(NT_STEP, 0, 0));
    send_col(w(NT_BTRK, 0, 0));
    idle(6);
    rq.delete(); dq.delete();
    check(st != NS_UNASSIGNED, "assignment of an earlier depth survives a backtrack");

    // 7. contradiction: complete list emptied by removals -> one BTREQ
    rst_n = 1'b0; idle(2); rst_n = 1'b1; idle(2);
    fill('{2, 3, 4}, 1'b1);
    send_col(w(NT_GUESS, 5, 0));         // depth 1, another node guessed
    idle(4);
    rq.delete(); dq.delete();
    check(!busy, "node idle before the contradiction");
    // 2 and 3 go at once (same focus period on both buses is not possible,
    // so the node sees 3 removed, then 2 and 4 removed while it implicates)
    send_col(w(NT_REMOVE, 0, 3));
    send_row(w(NT_REMOVE, 0, 2));
    idle(6);
    check(st == NS_IMPLIED && col == 4, "implied to the last colour");
    rst_n = 1'b0; idle(2); rst_n = 1'b1; idle(2);
    rq.delete(); dq.delete();
    fill('{}, 1'b1);
    idle(6);
    expect_row(w(NT_BTREQ, COL, 0), "complete empty list requests a backtrack");
    idle(20);
    expect_quiet("only one backtrack request");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
