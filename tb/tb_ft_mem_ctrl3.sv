// tb_ft_mem_ctrl3: the three-level access controller with the real code
// table, encoder, decoder, array model and second-level table, on a
// 16384-cell array with 128-bit blocks and 16-cell units.
//  1. A plan of NSEG segments is made here: each data segment starts on a
//     unit, spans the units its code needs plus a few skipped (vector bit
//     0) units at random places; its first-level word follows it and is
//     handed to the controller on the store port; the second-level entry
//     is written into the CMOS table.
//  2. Random open-cell defects (0.5 %) and transient faults (0.2 %) are on.
//  3. Every block is written and read back; data must match, and the
//     cycle count is checked: read (2n1+2t1+T_MAX+6) + (2n2+2t2+T_MAX+6),
//     write (2n1+2t1+T_MAX+6) + 3 + L_U + r2 (n1/t1: first-level word,
//     n2/t2/r2: data word).  No data cell may be written
//     in a skipped unit, and the skipped units must be jumped over.
//  4. A second-level entry with a wrong s and an address past the last
//     segment must both fail.
`timescale 1ns/1ps
module tb_ft_mem_ctrl3;
  import bch_pkg::*;
  localparam int N = 16384, L_U = 128, L_C = 16, T_MAX = 57, R_MAX = 510, S_MAX = 32;
  localparam int MAX_SEG = N / L_U;
  localparam int AW = 14, UW = 10, SBW = 6, SW = 7, TW = 6, RW = 9, NW = 10, KW = 8;
  localparam int L1_FIX = UW + SBW + CODE_W;
  localparam int NSEG = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // code group
  logic tab_start = 0, tab_ready, tab_ovf;
  logic [TW-1:0] t_tab [NUM_CODES];
  logic [RW-1:0] r_tab [NUM_CODES];
  logic [CODE_W-1:0] code_sel;
  logic [R_MAX:0] g_sel;
  bch_code_table #(.M(10), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_codes (
    .clk, .rst_n, .start(tab_start), .ready(tab_ready), .overflow(tab_ovf),
    .t_tab, .r_tab, .g_code(code_sel), .g_sel);

  // codec
  logic enc_start, enc_busy, enc_din_ready, enc_din_valid, enc_din, enc_dout_valid, enc_dout, enc_done;
  logic [RW-1:0] enc_r;
  logic [KW-1:0] enc_k;
  logic dec_in_valid, dec_in_ready, dec_in_bit, dec_out_valid, dec_out_ready, dec_out_bit;
  logic dec_out_last, dec_out_err, dec_out_fail;
  logic [NW-1:0] dec_len;
  logic [TW-1:0] dec_t;
  bch_encoder #(.R_MAX(R_MAX), .K_MAX(L_U)) u_enc (
    .clk, .rst_n, .start(enc_start), .g(g_sel), .r(enc_r), .k_len(enc_k), .busy(enc_busy),
    .din_ready(enc_din_ready), .din_valid(enc_din_valid), .din(enc_din),
    .dout_valid(enc_dout_valid), .dout(enc_dout), .done(enc_done));
  bch_decoder #(.M(10), .T_MAX(T_MAX), .N_MAX(1023)) u_dec (
    .clk, .rst_n, .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_bit(dec_in_bit),
    .cw_len(10'(dec_len)), .cw_t(dec_t), .out_valid(dec_out_valid), .out_ready(dec_out_ready),
    .out_bit(dec_out_bit), .out_last(dec_out_last), .out_err(dec_out_err), .out_fail(dec_out_fail));

  // array
  logic [AW-1:0] nano_addr, dm_addr = '0, def_addr = '0;
  logic nano_we, nano_wdata, nano_re, nano_rdata, dm_defect;
  logic def_we = 0, def_defect = 0, def_stuck = 0;
  logic [19:0] tf_ppm = '0;
  logic [31:0] tf_count;
  nano_mem_array #(.N_CELLS(N)) u_nano (
    .clk, .addr(nano_addr), .we(nano_we), .wdata(nano_wdata), .re(nano_re), .rdata(nano_rdata),
    .dm_addr, .dm_defect, .def_we, .def_addr, .def_defect, .def_stuck, .tf_ppm, .tf_count);

  // second-level table
  logic l2_we = 0;
  logic [SW-1:0] l2_waddr = '0, l2_raddr;
  logic [AW+CODE_W+SBW-1:0] l2_wdata = '0, l2_rdata;
  logic [SW:0] l2_count;
  cmos_config_mem #(.DEPTH(MAX_SEG), .W(AW + CODE_W + SBW)) u_l2 (
    .clk, .rst_n, .we(l2_we), .waddr(l2_waddr), .wdata(l2_wdata), .clear(1'b0),
    .raddr(l2_raddr), .rdata(l2_rdata), .count(l2_count));

  // controller
  logic store_valid = 0, store_ready, idle;
  logic [UW-1:0] store_head_unit = '0;
  logic [SBW-1:0] store_s = '0;
  logic [CODE_W-1:0] store_code = '0, store_cfg_code = '0;
  logic [S_MAX-1:0] store_vec = '0;
  logic [AW-1:0] store_cfg_head = '0;
  logic req_valid = 0, req_ready, req_write = 0, resp_valid, resp_fail;
  logic [SW-1:0] req_addr = '0;
  logic [L_U-1:0] req_wdata = '0, resp_rdata;
  logic [NW-1:0] resp_nfix;

  ft_mem_ctrl3 #(.N_CELLS(N), .L_U(L_U), .L_C(L_C), .T_MAX(T_MAX), .R_MAX(R_MAX),
                 .S_MAX(S_MAX), .MAX_SEG(MAX_SEG)) dut (
    .clk, .rst_n, .store_valid, .store_ready, .store_head_unit, .store_s, .store_code,
    .store_vec, .store_cfg_head, .store_cfg_code, .idle,
    .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .resp_valid, .resp_rdata,
    .resp_fail, .resp_nfix, .cfg_raddr(l2_raddr), .cfg_rdata(l2_rdata), .num_seg(l2_count),
    .t_tab, .r_tab, .code_sel, .enc_start, .enc_r, .enc_k, .enc_din_ready, .enc_din_valid,
    .enc_din, .enc_dout_valid, .enc_dout, .enc_done, .dec_in_valid, .dec_in_ready, .dec_in_bit,
    .dec_len, .dec_t, .dec_out_valid, .dec_out_ready, .dec_out_bit, .dec_out_last,
    .dec_out_err, .dec_out_fail, .nano_addr, .nano_we, .nano_wdata, .nano_re, .nano_rdata);

  // plan made by the testbench
  int seg_hu [NSEG], seg_s [NSEG], seg_code [NSEG], cfg_head [NSEG], cfg_code [NSEG];
  bit seg_vec [NSEG][S_MAX];
  bit cell_in_hole [N];
  int hole_writes = 0, unit_jumps = 0;
  logic [AW-1:0] last_wr;
  bit have_last = 0;

  always @(posedge clk) if (nano_we && dut.data_ph) begin
    if (cell_in_hole[nano_addr]) hole_writes++;
    if (have_last && nano_addr != last_wr + 1) unit_jumps++;
    last_wr = nano_addr; have_last = 1;
  end
  always @(posedge clk) if (!dut.data_ph) have_last = 0;

  int cyc;
  task automatic access(bit wr, int addr, logic [L_U-1:0] wdata, output logic [L_U-1:0] rdata,
                        output bit fail, output int nfix);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = SW'(addr); req_wdata = wdata;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
    cyc = 1;
    while (!resp_valid) begin @(negedge clk); cyc++; end
    rdata = resp_rdata; fail = resp_fail; nfix = int'(resp_nfix);
  endtask

  initial begin
    int unit, nfix, nfix_total, holes_total;
    logic [L_U-1:0] data [NSEG];
    logic [L_U-1:0] rd;
    bit fail;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); tab_start = 1; @(negedge clk); tab_start = 0;
    while (!tab_ready) @(negedge clk);
    // 1. plan
    unit = 2;
    holes_total = 0;
    for (int i = 0; i < NSEG; i++) begin
      int need_units, holes, s, l1len;
      seg_code[i] = 1 + (i % 4);                          // codes 1..4
      need_units = (L_U + int'(r_tab[seg_code[i]]) + L_C - 1) / L_C;
      holes = $urandom_range(3);
      s = need_units + holes;
      for (int k = 0; k < S_MAX; k++) seg_vec[i][k] = (k < s);
      for (int h = 0; h < holes; h++) begin
        int k;
        k = $urandom_range(s - 2, 1);
        while (!seg_vec[i][k]) k = $urandom_range(s - 2, 1);
        seg_vec[i][k] = 0;
      end
      seg_s[i] = s;
      seg_hu[i] = unit;
      for (int k = 0; k < s; k++) if (!seg_vec[i][k]) begin
        holes_total++;
        for (int c = 0; c < L_C; c++) cell_in_hole[(unit + k) * L_C + c] = 1;
      end
      cfg_code[i] = 2;
      cfg_head[i] = (unit + s) * L_C;
      l1len = L1_FIX + s + int'(r_tab[cfg_code[i]]);
      unit = unit + s + (l1len + L_C - 1) / L_C + 1;
    end
    check(unit * L_C <= N, "plan fits the array");
    // 2. defects (not in the holes, which are never read)
    for (int a = 0; a < N; a++) begin
      if ($urandom_range(999) < 5) begin
        @(negedge clk); def_we = 1; def_addr = AW'(a); def_defect = 1; def_stuck = 1'($urandom);
      end
    end
    @(negedge clk); def_we = 0;
    // store the first-level words and the second-level entries
    for (int i = 0; i < NSEG; i++) begin
      @(negedge clk);
      store_valid = 1;
      store_head_unit = UW'(seg_hu[i]); store_s = SBW'(seg_s[i]); store_code = CODE_W'(seg_code[i]);
      for (int k = 0; k < S_MAX; k++) store_vec[k] = seg_vec[i][k];
      store_cfg_head = AW'(cfg_head[i]); store_cfg_code = CODE_W'(cfg_code[i]);
      @(posedge clk); while (!store_ready) @(posedge clk);
      @(negedge clk); store_valid = 0;
      l2_we = 1; l2_waddr = SW'(i);
      l2_wdata = {AW'(cfg_head[i]), CODE_W'(cfg_code[i]), SBW'(seg_s[i])};
      @(negedge clk); l2_we = 0;
      while (!idle) @(negedge clk);
    end
    check(int'(l2_count) == NSEG, "second-level entries");
    // 3. write and read every block
    tf_ppm = 20'd2000;
    nfix_total = 0;
    for (int i = 0; i < NSEG; i++) begin
      int n1, t1, e;
      for (int b = 0; b < L_U; b += 32) data[i][b +: 32] = $urandom;
      access(1, i, data[i], rd, fail, nfix);
      n1 = L1_FIX + seg_s[i] + int'(r_tab[cfg_code[i]]); t1 = int'(t_tab[cfg_code[i]]);
      e = (2 * n1 + 2 * t1 + T_MAX + 6) + 3 + L_U + int'(r_tab[seg_code[i]]);
      check(!fail, $sformatf("write %0d", i));
      check(cyc == e, $sformatf("write %0d cycles %0d expected %0d", i, cyc, e));
      check(int'(dut.hunit) == seg_hu[i] && int'(dut.code_q) == seg_code[i],
            $sformatf("write %0d: first-level fields", i));
    end
    for (int i = 0; i < NSEG; i++) begin
      int n1, t1, n2, t2, e;
      access(0, i, '0, rd, fail, nfix);
      n1 = L1_FIX + seg_s[i] + int'(r_tab[cfg_code[i]]); t1 = int'(t_tab[cfg_code[i]]);
      n2 = L_U + int'(r_tab[seg_code[i]]); t2 = int'(t_tab[seg_code[i]]);
      e = (2 * n1 + 2 * t1 + T_MAX + 6) + (2 * n2 + 2 * t2 + T_MAX + 6);
      check(!fail && rd == data[i], $sformatf("read %0d: fail=%0d", i, fail));
      check(cyc == e, $sformatf("read %0d cycles %0d expected %0d", i, cyc, e));
      nfix_total += nfix;
    end
    // 4. failures
    access(0, NSEG, '0, rd, fail, nfix);
    check(fail, "address past the last segment rejected");
    @(negedge clk);
    l2_we = 1; l2_waddr = SW'(NSEG - 1);
    l2_wdata = {AW'(cfg_head[NSEG-1]), CODE_W'(cfg_code[NSEG-1]), SBW'(seg_s[NSEG-1] - 1)};
    @(negedge clk); l2_we = 0;
    access(0, NSEG - 1, '0, rd, fail, nfix);
    check(fail, "wrong s in the second-level entry is caught");
    $display("holes=%0d unit_jumps=%0d hole_writes=%0d corrected_bits=%0d transient_faults=%0d",
             holes_total, unit_jumps, hole_writes, nfix_total, tf_count);
    check(holes_total > 0 && unit_jumps > 0, "skipped units jumped over");
    check(hole_writes == 0, "no data written into skipped units");
    check(nfix_total > 0, "corrections made");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
