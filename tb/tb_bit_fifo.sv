// tb_bit_fifo: random pushes and pops against a queue model; checks order,
// occupancy, full and empty, including simultaneous push and pop.
`timescale 1ns/1ps
module tb_bit_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, push = 0, din = 0, pop = 0, dout, full, empty;
  logic [4:0] count;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit q [$];
  bit_fifo #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty, .count);
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int fulls = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(count == 5'(q.size()) && full == (q.size() == DEPTH) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) check(dout == q[0], "order");
      fulls += full;
      push = (q.size() < DEPTH) && ($urandom_range(99) < ((i / 1000) % 2 ? 70 : 35));
      pop  = (q.size() > 0) && ($urandom_range(99) < 50);
      din  = 1'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    check(fulls > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
