// tb_graph_master: the graph master alone, with this testbench standing in
// for the array of edges and nodes.
//
// The stand-in keeps a table of which cells hold a colour.  It answers a
// QUERY after a few cycles with RSET (colour) or RREADY, marks a cell set when
// the master orders a GUESS, and can inject backtrack requests.  Checked:
//   * after start, one preset fill per cell in row-major order, one-hot for
//     a preset cell and all-ones for a free one;
//   * fill lists arriving on the row ring are forwarded to the column ring;
//   * the scan queries cells in order and guesses only cells that are free;
//   * a GUESS is sent on both rings and the next QUERY follows no sooner
//     than IDLE_WAIT idle cycles later (also held off while net_busy is up);
//   * several backtrack requests after one guess give one BT, on both rings,
//     after which the scan resumes at the guessed cell;
//   * the final read pass fills the result memory and raises done/solved;
//   * a contradiction with no guess outstanding ends with solved = 0.
`timescale 1ns/1ps
module tb_graph_master;
  import gc_pkg::*;
  localparam int N = 6, CW = cw(N), IDLE = 140;

  typedef struct packed {
    etag_e         tag;
    logic [CW-1:0] row;
    logic [CW-1:0] col;
    logic [N-1:0]  data;
  } eword_t;
  localparam eword_t EN = '{tag: ET_NONE, row: '0, col: '0, data: '0};

  logic clk = 1'b0, rst_n = 1'b0;
  logic preset_we = 1'b0, start = 1'b0;
  logic [$clog2(N*N)-1:0] preset_addr = '0, res_addr = '0;
  logic [CW:0] preset_val = '0;
  logic done, solved;
  logic [CW-1:0] res_color;
  logic [31:0] n_guess, n_backtrack, n_cycles;
  eword_t rr_out, rr_in, cr_out, cr_in;
  logic net_busy = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  graph_master #(.N(N)) dut (
    .clk, .rst_n, .preset_we, .preset_addr, .preset_val, .start,
    .done, .solved, .res_addr, .res_color, .n_guess, .n_backtrack, .n_cycles,
    .rr_out, .rr_in, .cr_out, .cr_in, .net_busy
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------- array stand-in
  int   pre [N*N];
  bit   is_set [N*N];
  int   colr [N*N];
  eword_t rin_q [$];        // words the stand-in will present on rr_in
  eword_t cin_q [$];
  eword_t presets [$];
  int   queries [$];
  int   guesses [$];
  int   bt_seen = 0, bt_row_seen = 0;
  int   last_guess_cyc = -1, cyc = 0;
  int   min_gap = 1 << 30;
  int   fwd_seen = 0;
  bit   in_preset = 1'b0;

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    rr_in = (rin_q.size() > 0) ? rin_q.pop_front() : EN;
    cr_in = (cin_q.size() > 0) ? cin_q.pop_front() : EN;
  end

  always @(posedge clk) if (rst_n) begin
    if (rr_out.tag == ET_BT) bt_row_seen++;
    unique case (cr_out.tag)
      ET_FILL: begin
        if (in_preset) presets.push_back(cr_out);
        else fwd_seen++;
      end
      ET_QUERY: begin
        int k;
        k = cr_out.row * N + cr_out.col;
        queries.push_back(k);
        if (last_guess_cyc >= 0 && cyc - last_guess_cyc < min_gap) min_gap = cyc - last_guess_cyc;
        last_guess_cyc = -1;
        fork
          begin
            automatic int kk = k;
            repeat (3) @(negedge clk);
            rin_q.push_back(is_set[kk] ?
              eword_t'{tag: ET_RSET, row: CW'(kk / N), col: CW'(kk % N), data: N'(colr[kk])} :
              eword_t'{tag: ET_RREADY, row: CW'(kk / N), col: CW'(kk % N), data: '0});
          end
        join_none
      end
      ET_GUESS: begin
        int k;
        k = cr_out.row * N + cr_out.col;
        check(rr_out.tag == ET_GUESS && rr_out.row == cr_out.row && rr_out.col == cr_out.col,
              "GUESS sent on both rings");
        guesses.push_back(k);
        is_set[k] = 1'b1;
        colr[k] = (k * 5 + 1) % N;
        last_guess_cyc = cyc;
      end
      ET_BT: bt_seen++;
      default: ;
    endcase
  end

  // ---------------------------------------------------- watchdog
  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_and_start();
    rst_n = 1'b0; repeat (2) @(negedge clk); rst_n = 1'b1; @(negedge clk);
    for (int k = 0; k < N * N; k++) begin
      preset_we = 1'b1; preset_addr = ($clog2(N*N))'(k);
      preset_val = (pre[k] < 0) ? '0 : (CW+1)'(pre[k] + 1);
      @(negedge clk);
    end
    preset_we = 1'b0;
    presets.delete(); queries.delete(); guesses.delete();
    in_preset = 1'b1;
    start = 1'b1; @(negedge clk); start = 1'b0;
  endtask

  initial begin
    rr_in = EN; cr_in = EN;
    // cells 5 and 7 free, the rest preset
    for (int k = 0; k < N * N; k++) begin
      pre[k] = (k == 5 || k == 7) ? -1 : (k % N);
      is_set[k] = (pre[k] >= 0);
      colr[k] = (pre[k] >= 0) ? pre[k] : 0;
    end
    load_and_start();
    repeat (N * N + 4) @(negedge clk);
    in_preset = 1'b0;
    check(presets.size() == N * N, $sformatf("%0d preset fills", presets.size()));
    for (int k = 0; k < N * N && k < presets.size(); k++)
      check(presets[k].row == k / N && presets[k].col == k % N &&
            presets[k].data == ((pre[k] < 0) ? {N{1'b1}} : N'(1) << pre[k]),
            $sformatf("preset fill %0d", k));
    // a fill list from a row edge is forwarded onto the column ring
    rin_q.push_back('{tag: ET_FILL, row: 2, col: 3, data: 6'b101010});
    repeat (4) @(negedge clk);
    check(fwd_seen == 1, "row ring fill forwarded to column ring");
    // hold the array busy for a while: no query may start
    net_busy = 1'b1;
    repeat (300) @(negedge clk);
    check(queries.size() == 0, "no query while the array is busy");
    net_busy = 1'b0;
    // let the scan reach the first guess (cell 5)
    wait (guesses.size() == 1);
    check(guesses[0] == 5, "first guess at cell 5");
    check(queries.size() == 6 && queries[5] == 5, "cells 0..5 queried in order");
    // second guess at cell 7, then three backtrack requests
    wait (guesses.size() == 2);
    check(guesses[1] == 7, "second guess at cell 7");
    repeat (5) @(negedge clk);
    rin_q.push_back('{tag: ET_BTREQ, row: 1, col: 1, data: '0});
    cin_q.push_back('{tag: ET_BTREQ, row: 2, col: 1, data: '0});
    repeat (3) @(negedge clk);
    rin_q.push_back('{tag: ET_BTREQ, row: 1, col: 4, data: '0});
    is_set[7] = 1'b0;              // the array undoes the guess
    wait (bt_seen == 1);
    check(bt_row_seen == 1, "BT sent on the row ring too");
    check(n_backtrack == 1, "one backtrack for several requests");
    // the scan resumes at cell 7, which is guessed again, then finishes
    wait (done);
    check(solved, "solved after the scan passes the last cell");
    check(bt_seen == 1 && n_guess == 3, $sformatf("guesses %0d backtracks %0d", n_guess, bt_seen));
    check(guesses.size() == 3 && guesses[2] == 7, "cell 7 guessed again after the backtrack");
    check(min_gap >= IDLE, $sformatf("query %0d cycles after a guess, idle wait %0d", min_gap, IDLE));
    for (int k = 0; k < N * N; k++) begin
      res_addr = ($clog2(N*N))'(k); #1;
      check(res_color == CW'(colr[k]), $sformatf("result cell %0d", k));
    end

    // contradiction before any guess: no solution
    for (int k = 0; k < N * N; k++) begin
      pre[k] = -1; is_set[k] = 1'b0;
    end
    bt_seen = 0;
    load_and_start();
    repeat (N * N + 4) @(negedge clk);
    in_preset = 1'b0;
    rin_q.push_back('{tag: ET_BTREQ, row: 0, col: 0, data: '0});
    wait (done);
    check(!solved && n_guess == 0 && bt_seen == 0, "unsolvable without a guess");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
