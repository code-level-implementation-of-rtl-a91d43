// tb_usart_fifo: random pushes and pops against a queue model; checks the
// head, the count and the full and empty flags, and that a push into a
// full buffer or a pop from an empty one changes nothing.
`timescale 1ns/1ps
module tb_usart_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic       push, pop, full, empty;
  logic [7:0] din, head;
  logic [3:0] count;
  logic [7:0] q[$];
  int n_full = 0, n_empty = 0;

  usart_fifo dut (.clk, .rst_n, .push, .din, .pop, .head, .full, .empty, .count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      // phases that fill and drain the buffer
      push = ((k / 100) % 2 == 0) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ((k / 100) % 2 == 0) ? ($urandom % 4 == 0) : ($urandom % 4 != 0);
      din  = 8'($urandom);
      #1;
      check(count == 4'(q.size()), $sformatf("count %0d want %0d", count, q.size()));
      check(full == (q.size() == 8), "full flag");
      check(empty == (q.size() == 0), "empty flag");
      if (q.size() > 0) check(head == q[0], $sformatf("head %h want %h", head, q[0]));
      if (full) n_full++;
      if (empty) n_empty++;
      begin
        bit was_full;
        was_full = (q.size() == 8);
        @(posedge clk);
        if (pop && q.size() > 0) void'(q.pop_front());
        if (push && !was_full) q.push_back(din);
      end
    end
    check(n_full > 0 && n_empty > 0, "buffer was full and empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
