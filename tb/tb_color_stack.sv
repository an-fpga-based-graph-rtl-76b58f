// tb_color_stack: random pushes and pops of N-bit colour lists against a
// model stack; checks the top of stack, the depth, and the error flag on
// popping an empty stack and pushing a full one.
`timescale 1ns/1ps
module tb_color_stack;
  localparam int N = 6, D = N * N;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [N-1:0] din = '0, dout;
  logic [$clog2(D+1)-1:0] depth;
  logic err;
  int checks = 0, failures = 0;
  logic [N-1:0] model [$];

  always #5 clk = ~clk;

  color_stack #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(depth == 0 && !err, "empty after reset");
    for (int t = 0; t < 3000; t++) begin
      bit p;
      p = ($urandom_range(99, 0) < ((t / 300) % 2 ? 75 : 40));
      if (model.size() == 0) p = 1'b1;
      if (model.size() == D) p = 1'b0;
      push = p; pop = !p; din = N'($urandom);
      if (!p) check(dout == model[$], $sformatf("top of stack at step %0d", t));
      @(posedge clk); #1;
      if (p) model.push_back(din); else void'(model.pop_back());
      push = 0; pop = 0;
      @(negedge clk);
      check(depth == model.size(), "depth");
      check(!err, "no error in legal use");
    end
    // drain, then an illegal pop
    while (model.size() > 0) begin
      check(dout == model[$], "drain order");
      pop = 1; @(posedge clk); #1; pop = 0; void'(model.pop_back()); @(negedge clk);
    end
    pop = 1; @(posedge clk); #1; pop = 0; @(negedge clk);
    check(err && depth == 0, "pop of empty stack flagged");
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    for (int k = 0; k < D; k++) begin
      push = 1; din = N'(k); @(posedge clk); #1; push = 0; @(negedge clk);
    end
    check(!err && depth == D, "full without error");
    push = 1; din = '1; @(posedge clk); #1; push = 0; @(negedge clk);
    check(err && depth == D && dout == N'(D - 1), "push on full stack flagged and ignored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
