// tb_cmos_config_mem: fills the table in order, reads every entry back
// (data one cycle after the address), checks the entry count and clear.
`timescale 1ns/1ps
module tb_cmos_config_mem;
  localparam int DEPTH = 64, W = 15;
  logic clk = 0, rst_n = 0, we = 0, clear = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [6:0] count;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  cmos_config_mem #(.DEPTH(DEPTH), .W(W)) dut (.clk, .rst_n, .we, .waddr, .wdata, .clear, .raddr, .rdata, .count);
  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [W-1:0] ref_mem [DEPTH];
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = W'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    check(count == 40, "count");
    for (int i = 0; i < 40; i++) begin
      raddr = 6'(i); @(negedge clk);
      check(rdata == ref_mem[i], $sformatf("entry %0d", i));
    end
    clear = 1; @(negedge clk); clear = 0;
    check(count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
