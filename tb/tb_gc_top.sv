// tb_gc_top: end-to-end test of the Latin square completion accelerator at
// its default size (N=6, M=4 bins, 140-cycle idle wait).
//
// Each problem is written into the preset memory, the accelerator is started
// and run to done, and the answer is checked against a software depth-first
// solver in this testbench:
//   * solved must equal the software verdict;
//   * a reported square must be a Latin square and agree with every preset;
//   * each guess costs at least the idle wait, so cycles >= guesses * 140,
//     and no order follows a guess sooner than 140 cycles;
//   * every node has received its preset fill within 140 cycles of start,
//     the preset time given for a 6x6 array (this design needs about 90).
// Problems: the empty square; squares derived from a random Latin square
// with a random fraction of cells kept (always solvable); random consistent
// partial squares at 30-50 % filled (often unsolvable, needing deep search);
// a square that fails by implication alone.  Mechanisms counted: guesses,
// backtracks, regressions (two backtracks with no guess between), node
// contradictions, edge-detected double assignments, partial fills, refill
// requests, implications and proofs of unsolvability; each must occur.
`timescale 1ns/1ps
module tb_gc_top;
  import gc_pkg::*;
  localparam int N  = 6;
  localparam int CW = cw(N);
  localparam int IDLE = 140;
  localparam int PRESET_MAX = 140;

  logic clk = 1'b0, rst_n = 1'b0;
  logic preset_we = 1'b0, start = 1'b0;
  logic [$clog2(N*N)-1:0] preset_addr = '0, res_addr = '0;
  logic [CW:0]   preset_val = '0;
  logic          done, solved, err;
  logic [CW-1:0] res_color;
  logic [31:0]   n_guess, n_backtrack, n_cycles;

  always #5 clk = ~clk;

  gc_top dut (
    .clk, .rst_n, .preset_we, .preset_addr, .preset_val, .start,
    .done, .solved, .res_addr, .res_color,
    .n_guess, .n_backtrack, .n_cycles, .err
  );

  int checks = 0, failures = 0;
  int pre [N][N];          // -1 = free
  int ref_sq [N][N];
  int hw [N][N];

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // ------------------------------------------------ mechanism counters
  int c_guess = 0, c_bt = 0, c_regress = 0, c_node_contra = 0, c_edge_contra = 0;
  int c_partial = 0, c_fillreq = 0, c_implied = 0, c_unsolvable = 0;
  bit last_was_bt = 1'b0;

  // the master must let the array sit idle for IDLE cycles after a guess
  // before its next order (query or backtrack)
  int guess_cyc = -1, cyc = 0, gap_viol = 0, gap_min = 1 << 30;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) guess_cyc = -1;
  end

  always @(posedge clk) if (rst_n) begin
    if ((dut.u_master.cout.tag == ET_QUERY || dut.u_master.cout.tag == ET_BT) && guess_cyc >= 0) begin
      if (cyc - guess_cyc < IDLE) gap_viol++;
      if (cyc - guess_cyc < gap_min) gap_min = cyc - guess_cyc;
      guess_cyc = -1;
    end
    if (dut.u_master.cout.tag == ET_GUESS) begin c_guess++; last_was_bt = 1'b0; guess_cyc = cyc; end
    if (dut.u_master.cout.tag == ET_BT) begin
      c_bt++;
      if (last_was_bt) c_regress++;
      last_was_bt = 1'b1;
    end
  end

  // first memory fill received, per node: the preset time is the time until
  // every node has one
  logic [N*N-1:0] ld;
  int preset_max = 0;

  genvar gi, gj;
  generate
    for (gi = 0; gi < N; gi++) begin : g_mon
      always @(posedge clk) if (rst_n) begin
        if (dut.g_redge[gi].u_edge.eq_push) begin
          if (dut.g_redge[gi].u_edge.eq_din.tag == ET_FILL) c_fillreq++;
          if (dut.g_redge[gi].u_edge.eq_din.tag == ET_BTREQ) begin
            if (dut.g_redge[gi].u_edge.nin.tag == NT_ASSIGN) c_edge_contra++;
            else c_node_contra++;
          end
        end
        if (dut.g_cedge[gi].u_edge.eq_push && dut.g_cedge[gi].u_edge.eq_din.tag == ET_BTREQ)
          c_edge_contra++;
        if (dut.g_cedge[gi].u_edge.nbq_push && dut.g_cedge[gi].u_edge.nbq_din.tag == NT_FILLEND
            && dut.g_cedge[gi].u_edge.nbq_din.data[0] == 1'b0)
          c_partial++;
      end
      for (gj = 0; gj < N; gj++) begin : g_n
        assign ld[gi*N+gj] = dut.g_row[gi].g_col[gj].u_node.loaded;
        always @(posedge clk) if (rst_n) begin
          if (dut.g_row[gi].g_col[gj].u_node.state == NS_UNASSIGNED &&
              dut.g_row[gi].g_col[gj].u_node.n_state == NS_IMPLIED)
            c_implied++;
        end
      end
    end
  endgenerate

  // ------------------------------------------------ software reference
  function automatic bit ok_at(input int r, input int c, input int v);
    for (int k = 0; k < N; k++) begin
      if (k != c && ref_sq[r][k] == v) return 1'b0;
      if (k != r && ref_sq[k][c] == v) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic bit sw_solve();
    int free_r [N*N], free_c [N*N];
    int nf = 0, k;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        ref_sq[r][c] = pre[r][c];
        if (pre[r][c] < 0) begin free_r[nf] = r; free_c[nf] = c; nf++; end
      end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if (pre[r][c] >= 0 && !ok_at(r, c, pre[r][c])) return 1'b0;
    k = 0;
    while (k >= 0 && k < nf) begin
      int r = free_r[k], c = free_c[k], v;
      bit found = 1'b0;
      for (v = ref_sq[r][c] + 1; v < N; v++)
        if (ok_at(r, c, v)) begin found = 1'b1; break; end
      if (found) begin
        ref_sq[r][c] = v;
        k++;
      end else begin
        ref_sq[r][c] = -1;
        k--;
      end
    end
    return (k == nf);
  endfunction

  // ------------------------------------------------ problem generators
  task automatic gen_from_square(input int keep_pct);
    int pr [N], pc [N], ps [N], t, a;
    for (int k = 0; k < N; k++) begin pr[k] = k; pc[k] = k; ps[k] = k; end
    for (int k = N - 1; k > 0; k--) begin
      a = $urandom_range(k, 0); t = pr[k]; pr[k] = pr[a]; pr[a] = t;
      a = $urandom_range(k, 0); t = pc[k]; pc[k] = pc[a]; pc[a] = t;
      a = $urandom_range(k, 0); t = ps[k]; ps[k] = ps[a]; ps[a] = t;
    end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        pre[r][c] = ($urandom_range(99, 0) < keep_pct) ? ps[(pr[r] + pc[c]) % N] : -1;
  endtask

  task automatic gen_random_partial(input int fill_pct);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) pre[r][c] = -1;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        if ($urandom_range(99, 0) < fill_pct) begin
          for (int tries = 0; tries < 8; tries++) begin
            int v = $urandom_range(N - 1, 0);
            bit ok = 1'b1;
            for (int k = 0; k < N; k++)
              if (pre[r][k] == v || pre[k][c] == v) ok = 1'b0;
            if (ok) begin pre[r][c] = v; break; end
          end
        end
  endtask

  // ------------------------------------------------ run one problem
  int total_cycles = 0;

  task automatic run_problem(input string name);
    bit expect_sol;
    bit latin;
    int wait_cyc;
    int preset_cyc;
    expect_sol = sw_solve();
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        preset_we   <= 1'b1;
        preset_addr <= ($clog2(N*N))'(r * N + c);
        preset_val  <= (pre[r][c] < 0) ? '0 : (CW+1)'(pre[r][c] + 1);
        @(posedge clk);
      end
    preset_we <= 1'b0;
    start     <= 1'b1;
    @(posedge clk);
    start     <= 1'b0;
    wait_cyc = 0;
    preset_cyc = -1;
    while (!done && wait_cyc < 2_000_000) begin
      @(posedge clk);
      wait_cyc++;
      if (preset_cyc < 0 && &ld) preset_cyc = wait_cyc;
    end
    // presetting a 6x6 square is specified as 140 cycles
    check(preset_cyc > 0 && preset_cyc <= PRESET_MAX,
          $sformatf("%s: every node preset after %0d cycles (limit %0d)", name, preset_cyc, PRESET_MAX));
    if (preset_cyc > preset_max) preset_max = preset_cyc;
    total_cycles += wait_cyc;
    check(done == 1'b1, $sformatf("%s: finished", name));
    check(err == 1'b0, $sformatf("%s: no internal overflow", name));
    check(solved == expect_sol,
          $sformatf("%s: solved=%0d, reference says %0d", name, solved, expect_sol));
    check(n_cycles >= n_guess * IDLE,
          $sformatf("%s: %0d cycles for %0d guesses", name, n_cycles, n_guess));
    check(gap_viol == 0, $sformatf("%s: %0d orders sooner than %0d cycles after a guess",
                                   name, gap_viol, IDLE));
    gap_viol = 0;
    if (!expect_sol && !solved) c_unsolvable++;
    if (solved) begin
      for (int k = 0; k < N * N; k++) begin
        res_addr = ($clog2(N*N))'(k);
        #1;
        hw[k / N][k % N] = int'(res_color);
      end
      latin = 1'b1;
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) begin
          if (hw[r][c] >= N) latin = 1'b0;
          if (pre[r][c] >= 0 && hw[r][c] != pre[r][c]) latin = 1'b0;
          for (int k = 0; k < N; k++) begin
            if (k != c && hw[r][k] == hw[r][c]) latin = 1'b0;
            if (k != r && hw[k][c] == hw[r][c]) latin = 1'b0;
          end
        end
      check(latin, $sformatf("%s: result is a Latin square matching the presets", name));
    end
    $display("%-24s solvable=%0d solved=%0d guesses=%0d backtracks=%0d cycles=%0d",
             name, expect_sol, solved, n_guess, n_backtrack, n_cycles);
  endtask

  // ------------------------------------------------ watchdog
  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // empty square
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) pre[r][c] = -1;
    run_problem("empty");
    // contradiction by implication alone
    for (int r = 0; r < N; r++) for (int c = 0; c < N; c++) pre[r][c] = -1;
    for (int c = 0; c < N - 1; c++) pre[0][c] = c;
    pre[1][N-1] = N - 1;
    run_problem("implied_conflict");
    for (int t = 0; t < 24; t++) begin
      gen_from_square(20 + 3 * (t % 20));
      run_problem($sformatf("from_square_%0d", t));
    end
    for (int t = 0; t < 60; t++) begin
      gen_random_partial(30 + (t % 5) * 5);
      run_problem($sformatf("random_partial_%0d", t));
    end

    $display("mechanisms: guess=%0d backtrack=%0d regress=%0d node_contra=%0d edge_contra=%0d",
             c_guess, c_bt, c_regress, c_node_contra, c_edge_contra);
    $display("            shortest guess-to-next-order gap=%0d cycles, longest preset %0d cycles",
             gap_min, preset_max);
    $display("            partial_fill=%0d fill_request=%0d implied=%0d unsolvable=%0d cycles=%0d",
             c_partial, c_fillreq, c_implied, c_unsolvable, total_cycles);
    check(c_guess > 0, "a guess happened");
    check(c_bt > 0, "a backtrack happened");
    check(c_regress > 0, "a regression happened");
    check(c_node_contra > 0, "a node detected a contradiction");
    check(c_edge_contra > 0, "an edge detected a double assignment");
    check(c_partial > 0, "a partial fill happened");
    check(c_fillreq > 0, "a node requested a refill");
    check(c_implied > 0, "a node implicated");
    check(c_unsolvable > 0, "an unsolvable square was proved unsolvable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
