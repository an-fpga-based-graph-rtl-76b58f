// tb_implicate_ctrl: exhaustive valid-bit patterns with random colours and
// both values of the complete flag and enable; the count, the lowest valid
// bin's colour and the implicate / backtrack / fill decisions are compared
// with values computed here.
`timescale 1ns/1ps
module tb_implicate_ctrl;
  localparam int N = 6, M = 4, CW = gc_pkg::cw(N);
  logic enable, complete;
  logic [M-1:0] valid;
  logic [M-1:0][CW-1:0] colors;
  logic [$clog2(M+1)-1:0] count;
  logic any_valid, implicate, backtrack, need_fill;
  logic [CW-1:0] sel_color;
  int checks = 0, failures = 0;

  implicate_ctrl #(.N(N), .M(M)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int v = 0; v < (1 << M); v++)
        for (int cf = 0; cf < 2; cf++)
          for (int en = 0; en < 2; en++) begin
            automatic int cnt = 0, low = -1;
            valid = M'(v); complete = cf[0]; enable = en[0];
            for (int b = 0; b < M; b++) colors[b] = CW'($urandom_range(N - 1, 0));
            #1;
            for (int b = 0; b < M; b++) if (v[b]) begin
              cnt++;
              if (low < 0) low = b;
            end
            check(count == cnt, "count of valid bins");
            check(any_valid == (cnt > 0), "any valid");
            if (low >= 0) check(sel_color == colors[low], "lowest valid bin selected");
            check(implicate == (en && cf && cnt == 1), "implicate decision");
            check(backtrack == (en && cf && cnt == 0), "backtrack decision");
            check(need_fill == (en && !cf && cnt == 0), "fill decision");
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
