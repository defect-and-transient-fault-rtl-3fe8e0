// tb_ft_mem_ctrl: the access controller with the real code table, shared
// encoder/decoder, CMOS table and a small array model (8192 cells).  The
// CMOS table is loaded directly with segments of every code.  Checks: a
// write puts exactly L_U + r bits at the segment's cells, in order; a read
// returns the written data; the decoder corrects exactly the defective
// cells whose stuck value differs from the written bit; a segment with
// more defects than its code corrects is not returned as good data; an
// address beyond the table fails at once; write and read cycle counts.
`timescale 1ns/1ps
module tb_ft_mem_ctrl;
  import bch_pkg::*;
  localparam int N = 8192, L_U = 512, ALIGN = 64, T_MAX = 57, R_MAX = 510, MAX_SEG = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask

  logic tab_start = 0, tab_ready, ovf;
  logic [5:0] t_tab [NUM_CODES];
  logic [8:0] r_tab [NUM_CODES];
  logic [2:0] code_sel;
  logic [R_MAX:0] g_sel;
  bch_code_table #(.M(10), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_tab (.clk, .rst_n, .start(tab_start),
    .ready(tab_ready), .overflow(ovf), .t_tab, .r_tab, .g_code(code_sel), .g_sel);

  logic cfg_we = 0;
  logic [3:0] cfg_waddr = '0, cfg_raddr;
  logic [9:0] cfg_wdata = '0, cfg_rdata;     // 7-bit head unit + 3-bit code
  logic [4:0] cfg_count;
  cmos_config_mem #(.DEPTH(MAX_SEG), .W(10)) u_cfg (.clk, .rst_n, .we(cfg_we), .waddr(cfg_waddr),
    .wdata(cfg_wdata), .clear(1'b0), .raddr(cfg_raddr), .rdata(cfg_rdata), .count(cfg_count));

  logic enc_start, enc_busy, enc_din_ready, enc_din_valid, enc_din, enc_dout_valid, enc_dout, enc_done;
  logic [8:0] enc_r;
  logic [9:0] enc_k;
  bch_encoder #(.R_MAX(R_MAX), .K_MAX(L_U)) u_enc (.clk, .rst_n, .start(enc_start), .g(g_sel), .r(enc_r),
    .k_len(enc_k), .busy(enc_busy), .din_ready(enc_din_ready), .din_valid(enc_din_valid), .din(enc_din),
    .dout_valid(enc_dout_valid), .dout(enc_dout), .done(enc_done));

  logic dec_in_valid, dec_in_ready, dec_in_bit, dec_out_valid, dec_out_ready, dec_out_bit;
  logic dec_out_last, dec_out_err, dec_out_fail;
  logic [9:0] dec_len;
  logic [5:0] dec_t;
  bch_decoder #(.M(10), .T_MAX(T_MAX), .N_MAX(1023)) u_dec (.clk, .rst_n, .in_valid(dec_in_valid),
    .in_ready(dec_in_ready), .in_bit(dec_in_bit), .cw_len(dec_len), .cw_t(dec_t), .out_valid(dec_out_valid),
    .out_ready(dec_out_ready), .out_bit(dec_out_bit), .out_last(dec_out_last), .out_err(dec_out_err),
    .out_fail(dec_out_fail));

  logic [12:0] nano_addr, def_addr = '0;
  logic nano_we, nano_wdata, nano_re, nano_rdata, dm_defect, def_we = 0, def_stuck = 0;
  logic [31:0] tf_count;
  nano_mem_array #(.N_CELLS(N)) u_nano (.clk, .addr(nano_addr), .we(nano_we), .wdata(nano_wdata),
    .re(nano_re), .rdata(nano_rdata), .dm_addr(13'd0), .dm_defect, .def_we, .def_addr,
    .def_defect(1'b1), .def_stuck, .tf_ppm(20'd0), .tf_count);

  logic req_valid = 0, req_ready, req_write = 0, resp_valid, resp_fail;
  logic [3:0] req_addr = '0;
  logic [L_U-1:0] req_wdata = '0, resp_rdata;
  logic [9:0] resp_nfix;
  ft_mem_ctrl #(.N_CELLS(N), .L_U(L_U), .ALIGN(ALIGN), .T_MAX(T_MAX), .R_MAX(R_MAX), .MAX_SEG(MAX_SEG)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .resp_fail, .resp_nfix, .cfg_raddr, .cfg_rdata, .num_seg(cfg_count), .t_tab, .r_tab, .code_sel,
    .enc_start, .enc_r, .enc_k, .enc_din_ready, .enc_din_valid, .enc_din, .enc_dout_valid, .enc_dout,
    .enc_done, .dec_in_valid, .dec_in_ready, .dec_in_bit, .dec_len, .dec_t, .dec_out_valid,
    .dec_out_ready, .dec_out_bit, .dec_out_last, .dec_out_err, .dec_out_fail,
    .nano_addr, .nano_we, .nano_wdata, .nano_re, .nano_rdata);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // monitor of array writes
  int wr_addr [$];
  bit wr_bit [$];
  always @(posedge clk) if (nano_we) begin wr_addr.push_back(int'(nano_addr)); wr_bit.push_back(nano_wdata); end

  bit defmap [N], stuck [N];

  task automatic access(bit wr, int addr, logic [L_U-1:0] wdata, output logic [L_U-1:0] rdata,
                        output bit fail, output int nfix, output int cyc);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = 4'(addr); req_wdata = wdata;
    @(posedge clk);
    @(negedge clk); req_valid = 0;
    cyc = 1;
    while (!resp_valid) begin @(negedge clk); cyc++; end
    rdata = resp_rdata; fail = resp_fail; nfix = int'(resp_nfix);
  endtask

  initial begin
    int head [8], code [8], len [8], nseg;
    logic [L_U-1:0] rd, w;
    bit fail;
    int nfix, cyc, h;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); tab_start = 1; @(negedge clk); tab_start = 0;
    while (!tab_ready) @(negedge clk);
    // segments: codes 1..7, then one overloaded segment of code 1
    h = 0; nseg = 8;
    for (int s = 0; s < nseg; s++) begin
      int ndef;
      code[s] = (s < 7) ? s + 1 : 1;
      head[s] = h;
      len[s]  = L_U + int'(r_tab[code[s]]);
      h = ((h + len[s] + ALIGN - 1) / ALIGN) * ALIGN;
      @(negedge clk); cfg_we = 1; cfg_waddr = 4'(s); cfg_wdata = {7'(head[s] / ALIGN), 3'(code[s])};
      ndef = (s < 7) ? int'(t_tab[code[s]]) : int'(t_tab[code[s]]) + 40;
      for (int d = 0; d < ndef; d++) begin
        int a;
        do a = head[s] + $urandom_range(len[s] - 1); while (defmap[a]);
        defmap[a] = 1; stuck[a] = 1'($urandom);
        @(negedge clk); cfg_we = 0; def_we = 1; def_addr = 13'(a); def_stuck = stuck[a];
      end
      @(negedge clk); cfg_we = 0; def_we = 0;
    end
    check(int'(cfg_count) == nseg, "table loaded");
    for (int s = 0; s < nseg; s++) begin
      int diff;
      for (int b = 0; b < L_U; b += 32) w[b +: 32] = $urandom;
      wr_addr = {}; wr_bit = {};
      access(1, s, w, rd, fail, nfix, cyc);
      check(!fail && cyc == 4 + len[s], $sformatf("write %0d cycles %0d", s, cyc));
      check(wr_addr.size() == len[s], "bits written");
      diff = 0;
      foreach (wr_addr[i]) begin
        check(wr_addr[i] == head[s] + i, "write address");
        if (i < L_U) check(wr_bit[i] == w[L_U-1-i], "systematic data bits");
        if (defmap[wr_addr[i]] && stuck[wr_addr[i]] != wr_bit[i]) diff++;
      end
      access(0, s, '0, rd, fail, nfix, cyc);
      if (s < 7) begin
        check(!fail && rd == w, $sformatf("read back %0d", s));
        check(nfix == diff, $sformatf("corrections %0d, expected %0d", nfix, diff));
        check(cyc == 2 * len[s] + 2 * int'(t_tab[code[s]]) + T_MAX + 7, $sformatf("read cycles %0d", cyc));
      end else begin
        check(diff > int'(t_tab[code[s]]), "segment overloaded");
        check(fail || rd != w, "overloaded segment not returned as good");
        $display("overloaded segment: %0d errors, fail=%0d data_ok=%0d", diff, fail, rd == w);
      end
    end
    access(0, nseg, '0, rd, fail, nfix, cyc);
    check(fail && cyc == 1, $sformatf("out of range, %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
