// tb_wl_run: one evaluated configuration of the memory run end to end,
// used by tb_workloads.  Instantiates hybrid_mem_top with the given code
// group, block length and unit length on the full 512 x 512 array, places
// random open-cell defects (BIT_PPM) plus a band in which every third unit
// holds more than floor(L_C/M) defects, computes t_trans from equation (1)
// for TF_PPM, brings the memory up, then writes and reads blocks through
// the two-level scheme and, after a mode switch and a second bring-up,
// through the three-level scheme.  Counts its own checks and failures and
// raises done when finished.
`timescale 1ns/1ps
module tb_wl_run
  import bch_pkg::*;
#(
  parameter int unsigned M       = 11,
  parameter int unsigned T_MAX   = 106,
  parameter int unsigned R_MAX   = 1023,
  parameter int unsigned L_U     = 1024,
  parameter int unsigned L_C     = 64,
  parameter int unsigned S_MAX   = 64,
  parameter int unsigned BIT_PPM = 2000,
  parameter int unsigned TF_PPM  = 1000,
  parameter int unsigned NBLK    = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int N = 262144, ALIGN = 64;
  localparam int N_MAX = (1 << M) - 1, MAX_SEG = N / L_U;
  localparam int AW = $clog2(N), SW = $clog2(MAX_SEG), TW = $clog2(T_MAX + 1);
  localparam int RW = $clog2(R_MAX + 1), NW = $clog2(L_U + R_MAX + 1);
  localparam int UW = $clog2(N / L_C), SBW = $clog2(S_MAX + 1);
  localparam real E_TARGET = 1.0e-15;

  task automatic check(bit c, string w);
    checks++;
    if (!c) begin failures++; $display("FAIL [GF(2^%0d), l_u=%0d]: %s", M, L_U, w); end
  endtask

  logic rst_n = 0, init_start = 0, init_done, mode3 = 0;
  logic [TW-1:0] t_trans [NUM_CODES];
  logic [SW:0] num_seg, num_seg3;
  logic [TW-1:0] t_tab [NUM_CODES];
  logic [RW-1:0] r_tab [NUM_CODES];
  logic [31:0] n_step4, n_step5, n3_step4, n3_step5, tf_count;
  logic l1_valid;
  logic [UW-1:0] l1_head_unit;
  logic [SBW-1:0] l1_s;
  logic [CODE_W-1:0] l1_code;
  logic [S_MAX-1:0] l1_vec;
  logic [UW:0] n_unusable;
  logic req_valid = 0, req_ready, req_write = 0, resp_valid, resp_fail;
  logic [SW-1:0] req_addr = '0;
  logic [L_U-1:0] req_wdata = '0, resp_rdata;
  logic [NW-1:0] resp_nfix;
  logic def_we = 0, def_defect = 0, def_stuck = 0;
  logic [AW-1:0] def_addr = '0;
  logic [19:0] tf_ppm = '0;

  hybrid_mem_top #(.M(M), .T_MAX(T_MAX), .R_MAX(R_MAX), .L_U(L_U), .N_CELLS(N),
                   .ALIGN(ALIGN), .L_C(L_C), .S_MAX(S_MAX)) dut (
    .clk, .rst_n, .init_start, .init_done, .t_trans, .num_seg,
    .code_t_tab(t_tab), .code_r_tab(r_tab), .n_step4, .n_step5,
    .l1_valid, .l1_head_unit, .l1_s, .l1_code, .l1_vec, .num_seg3, .n_unusable,
    .n3_step4, .n3_step5, .mode3, .req_valid, .req_ready, .req_write, .req_addr,
    .req_wdata, .resp_valid, .resp_rdata, .resp_fail, .resp_nfix, .def_we, .def_addr,
    .def_defect, .def_stuck, .tf_ppm, .tf_count);

  // smallest t with P(more than t errors in l bits) <= E_TARGET, eq. (1)
  function automatic int t_needed(int l, real p);
    real pr [$];
    real tail;
    pr.push_back((1.0 - p) ** l);
    for (int i = 1; i <= l; i++) pr.push_back(pr[i-1] * real'(l - i + 1) / real'(i) * p / (1.0 - p));
    tail = 0.0;
    for (int t = l; t >= 0; t--) begin
      if (tail > E_TARGET) return t + 1;
      tail += pr[t];
    end
    return 0;
  endfunction

  task automatic access(bit wr, int addr, logic [L_U-1:0] wdata, output logic [L_U-1:0] rdata,
                        output bit fail, output int nfix);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = SW'(addr); req_wdata = wdata;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
    while (!resp_valid) @(negedge clk);
    rdata = resp_rdata; fail = resp_fail; nfix = int'(resp_nfix);
  endtask

  task automatic bring_up();
    init_start = 1; @(negedge clk); init_start = 0;
    @(negedge clk);
    while (!init_done) @(negedge clk);
  endtask

  task automatic blocks(int nseg, string tag, output int nfix_total);
    logic [L_U-1:0] data [int];
    logic [L_U-1:0] rd;
    bit fail;
    int nfix;
    nfix_total = 0;
    for (int k = 0; k < NBLK; k++) begin
      int a;
      logic [L_U-1:0] w;
      a = (k == 0) ? nseg - 1 : $urandom_range(nseg - 1);
      for (int b = 0; b < int'(L_U); b += 32) w[b +: 32] = $urandom;
      access(1, a, w, rd, fail, nfix);
      check(!fail, $sformatf("%s write %0d", tag, a));
      data[a] = w;
    end
    foreach (data[a]) begin
      access(0, a, '0, rd, fail, nfix);
      check(!fail && rd == data[a], $sformatf("%s read %0d", tag, a));
      nfix_total += nfix;
    end
  endtask

  initial begin
    int ndef, fix2, fix3;
    checks = 0; failures = 0; done = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    ndef = 0;
    for (int a = 0; a < N; a++) begin
      bit d;
      d = ($urandom % 1000000) < BIT_PPM ||
          (a >= 100000 && a < 100000 + 96 * int'(L_C) && ((a / int'(L_C)) % 3 == 0) &&
           (a % int'(L_C)) <= int'(L_C / M));
      if (d) begin
        @(negedge clk); def_we = 1; def_addr = AW'(a); def_defect = 1; def_stuck = 1'($urandom);
        ndef++;
      end
    end
    @(negedge clk); def_we = 0;
    init_start = 1; @(negedge clk); init_start = 0;
    while (!dut.tab_ready) @(negedge clk);
    for (int i = 0; i < NUM_CODES; i++)
      t_trans[i] = TW'(t_needed(int'(L_U) + int'(r_tab[i]), real'(TF_PPM) / 1.0e6));
    check(int'(t_tab[NUM_CODES-1]) == T_MAX && int'(r_tab[NUM_CODES-1]) == R_MAX,
          $sformatf("strongest code t=%0d r=%0d", t_tab[NUM_CODES-1], r_tab[NUM_CODES-1]));
    @(negedge clk);
    while (!init_done) @(negedge clk);
    $display("GF(2^%0d) l_u=%0d l_c=%0d p_tf=%0d ppm: defects=%0d t_trans(strongest)=%0d two-level blocks=%0d three-level blocks=%0d unusable units=%0d",
             M, L_U, L_C, TF_PPM, ndef, t_trans[NUM_CODES-1], num_seg, num_seg3, n_unusable);
    check(num_seg > 0 && num_seg3 > 0, "blocks allocated");
    check(n_step4 > 0 && n_unusable > 0, "code upgrades and unusable units");
    tf_ppm = 20'(TF_PPM);
    blocks(int'(num_seg), "two-level", fix2);
    tf_ppm = '0;
    mode3 = 1;
    bring_up();
    tf_ppm = 20'(TF_PPM);
    blocks(int'(num_seg3), "three-level", fix3);
    $display("GF(2^%0d) l_u=%0d: corrected bits two-level=%0d three-level=%0d transient faults=%0d",
             M, L_U, fix2, fix3, tf_count);
    check(fix2 + fix3 > 0, "corrections made");
    done = 1;
  end
endmodule
