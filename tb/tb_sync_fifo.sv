// tb_sync_fifo: random push/pop traffic against a queue model.
// Checks every popped word, the empty/full flags, that a push into a full
// FIFO is dropped and raises overflow, and that a simultaneous push and pop
// on a full FIFO is accepted.
`timescale 1ns/1ps
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 1'b0, pop = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  always #5 clk = ~clk;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(empty && !full && !overflow, "empty after reset");
    for (int t = 0; t < 4000; t++) begin
      bit p, q;
      p = ($urandom_range(99, 0) < ((t / 500) % 2 ? 70 : 35));
      q = ($urandom_range(99, 0) < 50);
      push = p; pop = q; din = W'($urandom);
      // flags and head are checked before the edge
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (q && model.size() > 0) check(dout == model[0], $sformatf("head %0d", t));
      @(posedge clk);
      #1;
      begin
        automatic bit did_pop = q && model.size() > 0;
        automatic bit did_push = p && (model.size() < D || did_pop);
        if (did_pop) void'(model.pop_front());
        if (did_push) model.push_back(din);
      end
      @(negedge clk);
    end
    push = 0; pop = 0;
    // fill to full, then one more push must be dropped with overflow
    while (model.size() > 0) begin
      pop = 1; @(posedge clk); #1; void'(model.pop_front()); pop = 0; @(negedge clk);
    end
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1; @(negedge clk);
    for (int k = 0; k < D; k++) begin
      push = 1; din = W'(k + 100); @(posedge clk); #1; @(negedge clk);
    end
    check(full && !overflow, "full without overflow");
    push = 1; din = W'(999); @(posedge clk); #1; push = 0; @(negedge clk);
    check(overflow, "overflow flagged on push into full FIFO");
    push = 1; pop = 1; din = W'(500); @(posedge clk); #1; push = 0; pop = 0; @(negedge clk);
    check(full, "push with pop on full FIFO keeps it full");
    for (int k = 1; k < D; k++) begin
      check(dout == W'(k + 100), $sformatf("order after overflow %0d", k));
      pop = 1; @(posedge clk); #1; pop = 0; @(negedge clk);
    end
    check(dout == W'(500), "word pushed during pop is last");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
