// tb_workloads: the larger configurations evaluated for the memory, run
// end to end on the full 512 x 512 array (see tb_wl_run):
//   code group on GF(2^11), 1024-bit blocks, 64-cell units, p_tf 1e-3;
//   code group on GF(2^12), 2048-bit blocks, 64-cell units, p_tf 5e-3
//   (S_MAX raised to 128: a 2048-bit block needs at least 64 units).
// The default configuration (GF(2^10), 512-bit blocks, 32-cell units) is
// run by tb_hybrid_mem_top.  Bit defect probability 0.2 % in both.
`timescale 1ns/1ps
module tb_workloads;
  logic clk = 0;
  always #5 clk = ~clk;
  int c11, f11, c12, f12;
  bit d11, d12;

  tb_wl_run #(.M(11), .T_MAX(106), .R_MAX(1023), .L_U(1024), .L_C(64), .S_MAX(64),
              .BIT_PPM(2000), .TF_PPM(1000)) u_gf11 (
    .clk, .checks(c11), .failures(f11), .done(d11));
  tb_wl_run #(.M(12), .T_MAX(198), .R_MAX(2038), .L_U(2048), .L_C(64), .S_MAX(128),
              .BIT_PPM(2000), .TF_PPM(5000)) u_gf12 (
    .clk, .checks(c12), .failures(f12), .done(d12));

  initial begin : watchdog
    repeat (8000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c11 + c12, f11 + f12 + 1);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (d11 && d12);
    $display("TB_RESULT checks=%0d failures=%0d", c11 + c12, f11 + f12);
    $finish;
  end
endmodule
