// tb_nano_mem_array: good cells keep what is written, defective cells read
// their stuck value and ignore writes, the defect map port shows the
// defects, reads return one cycle after re, and with a transient fault
// rate of 5 % the observed flip rate over 20000 reads lies in 4..6 %.
`timescale 1ns/1ps
module tb_nano_mem_array;
  localparam int N = 1024;
  logic clk = 0, we = 0, wdata = 0, re = 0, rdata, dm_defect;
  logic def_we = 0, def_defect = 0, def_stuck = 0;
  logic [9:0] addr = '0, dm_addr = '0, def_addr = '0;
  logic [19:0] tf_ppm = '0;
  logic [31:0] tf_count;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  nano_mem_array #(.N_CELLS(N)) dut (.clk, .addr, .we, .wdata, .re, .rdata, .dm_addr, .dm_defect,
    .def_we, .def_addr, .def_defect, .def_stuck, .tf_ppm, .tf_count);
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    bit dm [N], st [N], val [N];
    int flips;
    for (int a = 0; a < N; a++) begin
      dm[a] = ($urandom_range(9) == 0); st[a] = 1'($urandom);
      if (dm[a]) begin
        @(negedge clk); def_we = 1; def_addr = 10'(a); def_defect = 1; def_stuck = st[a];
      end
    end
    @(negedge clk); def_we = 0;
    for (int a = 0; a < N; a++) begin
      dm_addr = 10'(a); #1; check(dm_defect == dm[a], "defect map");
    end
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1; addr = 10'(a); wdata = 1'($urandom); val[a] = dm[a] ? st[a] : wdata;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < N; a++) begin
      re = 1; addr = 10'(a); @(negedge clk);
      check(rdata == val[a], $sformatf("cell %0d", a));
    end
    tf_ppm = 20'd50000; flips = 0;
    for (int i = 0; i < 20000; i++) begin
      int a; a = $urandom_range(N - 1);
      re = 1; addr = 10'(a); @(negedge clk);
      if (!dm[a] && rdata != val[a]) flips++;
      if (dm[a]) check(rdata == st[a], "defect not subject to transient faults");
    end
    re = 0;
    $display("flips %0d, tf_count %0d", flips, tf_count);
    check(flips == int'(tf_count), "flip counter");
    check(flips > 20000 * 9 / 10 * 4 / 100 && flips < 20000 * 6 / 100, "transient fault rate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
