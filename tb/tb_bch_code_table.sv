// tb_bch_code_table: builds the four code groups and checks them.
// For every group the strongest code's parity length must equal the
// published r_max (510, 1023, 2038, 4095).  For GF(2^10) every generator
// polynomial is also checked to vanish at alpha^j for all j = 1..2t_i
// (evaluated with a multiplier written independently here), to have degree
// r_i <= 10*t_i, and the parity lengths must grow with t_i.
`timescale 1ns/1ps
module tb_bch_code_table;
  import bch_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rdy [4];
  logic ovf [4];
  logic [2:0] gc = '0;

  logic [5:0]  t0 [NUM_CODES];  logic [8:0]  r0 [NUM_CODES]; logic [510:0]  g0;
  logic [6:0]  t1 [NUM_CODES];  logic [9:0]  r1 [NUM_CODES]; logic [1023:0] g1;
  logic [7:0]  t2 [NUM_CODES];  logic [10:0] r2 [NUM_CODES]; logic [2038:0] g2;
  logic [8:0]  t3 [NUM_CODES];  logic [11:0] r3 [NUM_CODES]; logic [4095:0] g3;

  bch_code_table #(.M(10), .T_MAX(57),  .R_MAX(510))  u0 (.clk, .rst_n, .start, .ready(rdy[0]), .overflow(ovf[0]), .t_tab(t0), .r_tab(r0), .g_code(gc), .g_sel(g0));
  bch_code_table #(.M(11), .T_MAX(106), .R_MAX(1023)) u1 (.clk, .rst_n, .start, .ready(rdy[1]), .overflow(ovf[1]), .t_tab(t1), .r_tab(r1), .g_code(gc), .g_sel(g1));
  bch_code_table #(.M(12), .T_MAX(198), .R_MAX(2038)) u2 (.clk, .rst_n, .start, .ready(rdy[2]), .overflow(ovf[2]), .t_tab(t2), .r_tab(r2), .g_code(gc), .g_sel(g2));
  bch_code_table #(.M(13), .T_MAX(366), .R_MAX(4095)) u3 (.clk, .rst_n, .start, .ready(rdy[3]), .overflow(ovf[3]), .t_tab(t3), .r_tab(r3), .g_code(gc), .g_sel(g3));

  // independent GF(2^10) arithmetic, primitive polynomial x^10+x^3+1
  function automatic logic [9:0] m10(logic [9:0] a, logic [9:0] b);
    logic [19:0] p = '0;
    for (int i = 0; i < 10; i++) if (b[i]) p ^= 20'(a) << i;
    for (int i = 19; i >= 10; i--) if (p[i]) p ^= 20'h409 << (i - 10);
    return p[9:0];
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    logic [9:0] aj, acc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    cyc = 1;
    while (!(rdy[0] && rdy[1] && rdy[2] && rdy[3])) begin @(posedge clk); cyc++; end
    $display("code tables built in %0d cycles", cyc);
    check(r0[7] == 510,  $sformatf("GF(2^10) r_max %0d", r0[7]));
    check(r1[7] == 1023, $sformatf("GF(2^11) r_max %0d", r1[7]));
    check(r2[7] == 2038, $sformatf("GF(2^12) r_max %0d", r2[7]));
    check(r3[7] == 4095, $sformatf("GF(2^13) r_max %0d", r3[7]));
    check(t0[7] == 57 && t1[7] == 106 && t2[7] == 198 && t3[7] == 366, "t_max");
    check(!ovf[0] && !ovf[1] && !ovf[2] && !ovf[3], "no overflow");
    check(t0[0] == 0 && r0[0] == 0, "code 0 is uncoded");
    for (int c = 0; c < NUM_CODES; c++) begin
      gc = 3'(c);
      #1;
      $display("code %0d: t=%0d r=%0d (GF(2^10)), t=%0d r=%0d (GF(2^13))", c, t0[c], r0[c], t3[c], r3[c]);
      check(g0[r0[c]] == 1'b1 && (r0[c] == 510 || g0 >> (r0[c] + 1) == '0), $sformatf("degree of g%0d", c));
      check(g0[0] == 1'b1, "g(0)=1");
      check(32'(r0[c]) <= 10 * 32'(t0[c]), "r <= m*t");
      if (c > 0) check(r0[c] > r0[c-1] && t0[c] > t0[c-1], "codes ordered");
      // roots alpha^1 .. alpha^(2t)
      aj = 10'd2;
      for (int jj = 1; jj <= 2 * int'(t0[c]); jj++) begin
        acc = '0;
        for (int k = 510; k >= 0; k--) acc = m10(acc, aj) ^ {9'd0, g0[k]};
        check(acc == 0, $sformatf("g%0d(alpha^%0d) != 0", c, jj));
        aj = m10(aj, 10'd2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
