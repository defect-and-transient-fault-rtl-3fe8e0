// tb_bch_encoder: every code of the GF(2^10) group, shortened to 512
// information bits and at full length; the output must start with the
// information bits unchanged, last exactly k + r cycles, and be a codeword:
// c(alpha^j) = 0 for j = 1..2t, checked with the reference field arithmetic.
`timescale 1ns/1ps
module tb_bch_encoder;
  import bch_pkg::*;
  import tb_gf_pkg::*;
  localparam int R_MAX = 510;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tab_start = 0, tab_ready, ovf;
  logic [5:0] t_tab [NUM_CODES];
  logic [8:0] r_tab [NUM_CODES];
  logic [2:0] code = '0;
  logic [R_MAX:0] g;
  bch_code_table #(.M(10), .T_MAX(57), .R_MAX(R_MAX)) u_tab (.clk, .rst_n, .start(tab_start), .ready(tab_ready),
    .overflow(ovf), .t_tab, .r_tab, .g_code(code), .g_sel(g));
  logic start = 0, busy, din_ready, din_valid = 0, din = 0, dout_valid, dout, done;
  logic [9:0] k_len = '0;
  bch_encoder #(.R_MAX(R_MAX), .K_MAX(1023)) dut (.clk, .rst_n, .start, .g, .r(r_tab[code]), .k_len, .busy,
    .din_ready, .din_valid, .din, .dout_valid, .dout, .done);
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic enc(int c, int k);
    bit u [$], cw [$];
    int cyc, dones;
    code = 3'(c); k_len = 10'(k);
    for (int i = 0; i < k; i++) u.push_back(1'($urandom));
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0; dones = 0;
    while (cw.size() < k + int'(r_tab[c]) && cyc < 3000) begin
      din_valid = din_ready; din = din_ready ? u[cw.size()] : 1'b0;
      #1;
      if (dout_valid) begin cw.push_back(dout); dones += done; end
      @(negedge clk); cyc++;
    end
    din_valid = 0;
    check(cyc == k + int'(r_tab[c]), $sformatf("cycles %0d", cyc));
    check(dones == 1 && !busy, "done once, then idle");
    for (int i = 0; i < k; i++) check(cw[i] == u[i], "systematic");
    for (int j = 1; j <= 2 * int'(t_tab[c]); j++) begin
      logic [9:0] aj, acc;
      aj = apow(j); acc = '0;
      foreach (cw[i]) acc = m10(acc, aj) ^ 10'(cw[i]);
      check(acc == 0, $sformatf("code %0d: c(alpha^%0d) != 0", c, j));
    end
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); tab_start = 1; @(negedge clk); tab_start = 0;
    wait (tab_ready);
    for (int c = 0; c < NUM_CODES; c++) enc(c, 512);
    enc(7, 513);
    enc(3, 1023 - int'(r_tab[3]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
