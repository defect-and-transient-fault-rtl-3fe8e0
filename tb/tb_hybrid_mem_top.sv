// tb_hybrid_mem_top: end-to-end run of the two-level fault-tolerant memory
// at its default sizes (GF(2^10) code group, 512-bit blocks, 512 x 512
// array, 64-cell alignment).
//  1. Random open-cell defects (BIT_PPM per million) plus one dense cluster and a band of unusable units
//     are placed in the array; t_trans is computed here from equation (1)
//     for the fault rate TF_PPM and a target block error rate of 1e-15.
//  2. Bring-up: the allocation result (every CMOS table entry and the
//     segment count) is compared with a software run of the same
//     procedure on the same defect map.
//  3. Blocks are written and read back with transient faults switched on;
//     data must come back intact.  Out-of-range addresses must fail.
// Mechanisms counted (each must occur): segment accepted (step 3), code
// upgrade (step 4), relocation past a defect cluster (step 5), more than
// one code in use, bits corrected by the decoder, transient faults
// injected, out-of-range rejection; for the three-level plan computed at
// bring-up: segments, unusable units skipped inside segments, step 4.
//  4. Mode switch: bring-up again with mode3 set and write/read blocks
//     through the three-level scheme (first-level word decoded, unusable
//     units jumped over, no data in unusable units, corrections made).
`timescale 1ns/1ps
module tb_hybrid_mem_top;
  import bch_pkg::*;
  localparam int N = 262144, L_U = 512, ALIGN = 64, T_MAX = 57;
  localparam int BIT_PPM = 3000;     // bit defect probability 0.3 %
  localparam int TF_PPM  = 1000;     // transient fault rate 1e-3
  localparam real E_TARGET = 1.0e-15;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask

  logic init_start = 0, init_done;
  logic [5:0] t_trans [NUM_CODES];
  logic [9:0] num_seg;
  logic [5:0] t_tab [NUM_CODES];
  logic [8:0] r_tab [NUM_CODES];
  logic [31:0] n_step4, n_step5, tf_count;
  logic mode3 = 0, req_valid = 0, req_ready, req_write = 0, resp_valid, resp_fail;
  logic [8:0] req_addr = '0;
  logic [L_U-1:0] req_wdata = '0, resp_rdata;
  logic [9:0] resp_nfix;
  logic def_we = 0, def_defect = 0, def_stuck = 0;
  logic [17:0] def_addr = '0;
  logic [19:0] tf_ppm = '0;
  logic l1_valid;
  logic [12:0] l1_head_unit;
  logic [6:0] l1_s;
  logic [2:0] l1_code;
  logic [63:0] l1_vec;
  logic [9:0] num_seg3;
  logic [13:0] n_unusable;
  logic [31:0] n3_step4, n3_step5;
  int l1_words = 0, l1_holes = 0;
  logic [12:0] l1_hu_log [int];      // emitted first-level words by index
  logic [63:0] l1_vec_log [int];
  always @(posedge clk) if (l1_valid) begin
    l1_hu_log[int'(dut.u_alloc3.emit_idx)] = l1_head_unit;
    l1_vec_log[int'(dut.u_alloc3.emit_idx)] = l1_vec & ((64'(1) << l1_s) - 1);
    l1_words++;
    for (int k = 0; k < int'(l1_s); k++) l1_holes += !l1_vec[k];
  end

  hybrid_mem_top dut (.clk, .rst_n, .init_start, .init_done, .t_trans, .num_seg,
    .code_t_tab(t_tab), .code_r_tab(r_tab), .n_step4, .n_step5,
    .mode3, .req_valid, .req_ready, .req_write, .req_addr, .req_wdata, .resp_valid,
    .resp_rdata, .resp_fail, .resp_nfix, .def_we, .def_addr, .def_defect,
    .def_stuck, .tf_ppm, .tf_count, .l1_valid, .l1_head_unit, .l1_s, .l1_code, .l1_vec,
    .num_seg3, .n_unusable, .n3_step4, .n3_step5);

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit defmap [N];

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

  // software model of the allocation procedure
  typedef struct { int head; int code; } seg_t;
  seg_t ref_seg [$];
  int ref_s4, ref_s5;
  function automatic void ref_alloc();
    int head = 0;
    ref_seg = {}; ref_s4 = 0; ref_s5 = 0;
    while (head + L_U <= N && ref_seg.size() < N / L_U) begin
      int code = 0, len = L_U, tdef = 0, fd = -1, p = head;
      bit placed = 0, abort = 0;
      while (!placed && !abort) begin
        int need;
        for (; p < head + len; p++) begin
          if (p >= N) begin abort = 1; break; end
          if (defmap[p]) begin tdef++; if (fd < 0) fd = p; end
        end
        if (abort) break;
        need = tdef + int'(t_trans[code]);
        if (int'(t_tab[code]) >= need) begin
          seg_t s; s.head = head; s.code = code; ref_seg.push_back(s);
          head = ((head + len + ALIGN - 1) / ALIGN) * ALIGN;
          placed = 1;
        end else if (need <= T_MAX) begin
          for (int i = NUM_CODES - 1; i >= 0; i--) if (int'(t_tab[i]) >= need) code = i;
          len = L_U + int'(r_tab[code]);
          ref_s4++;
        end else begin
          head = (((fd >= 0 ? fd : head) + 1 + ALIGN - 1) / ALIGN) * ALIGN;
          ref_s5++;
          break;
        end
      end
      if (abort) break;
    end
  endfunction

  task automatic access(bit wr, int addr, logic [L_U-1:0] wdata, output logic [L_U-1:0] rdata,
                        output bit fail, output int nfix, output int cyc);
    @(negedge clk);
    req_valid = 1; req_write = wr; req_addr = 9'(addr); req_wdata = wdata;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
    cyc = 1;
    while (!resp_valid) begin @(negedge clk); cyc++; end
    rdata = resp_rdata; fail = resp_fail; nfix = int'(resp_nfix);
  endtask

  // three-level data writes must never land in an unusable unit
  int bad_unit_writes = 0, data_unit_jumps = 0;
  always @(posedge clk) if (mode3 && dut.nano_we && dut.u_ctrl3.data_ph) begin
    if (!dut.u_units.usable[dut.nano_addr / 32]) bad_unit_writes++;
  end
  always @(posedge clk) if (mode3 && dut.u_ctrl3.data_ph && dut.nano_we &&
                            dut.u_ctrl3.ptr_nxt != dut.nano_addr + 1) data_unit_jumps++;

  initial begin
    int ndef, codes_used, nfix_total, nseg, reads_fixed, rejections;
    int used [NUM_CODES];
    logic [L_U-1:0] data [int];
    logic [L_U-1:0] rd;
    bit fail;
    int nfix, cyc, ecyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. defects: random ones, a dense cluster (every 4th cell of 2048), and
    //    a band where every third 32-cell unit holds 4 defects (unusable)
    ndef = 0;
    for (int a = 0; a < N; a++) begin
      defmap[a] = ($urandom % 1000000) < BIT_PPM || (a >= 40000 && a < 42048 && a % 4 == 0) ||
                  (a >= 100000 && a < 104096 && (a / 32) % 3 == 0 && a % 32 < 4);
      if (defmap[a]) begin
        @(negedge clk);
        def_we = 1; def_addr = 18'(a); def_defect = 1; def_stuck = 1'($urandom);
        ndef++;
      end
    end
    @(negedge clk); def_we = 0;
    $display("defective cells: %0d of %0d", ndef, N);
    // bring-up
    init_start = 1; @(negedge clk); init_start = 0;
    while (!(t_tab[7] == 57 && r_tab[7] == 510)) @(negedge clk);
    for (int i = 0; i < NUM_CODES; i++) begin
      t_trans[i] = 6'(t_needed(L_U + int'(r_tab[i]), real'(TF_PPM) / 1.0e6));
      $display("code %0d: t=%0d r=%0d t_trans=%0d", i, t_tab[i], r_tab[i], t_trans[i]);
    end
    @(negedge clk);
    while (!init_done) @(negedge clk);
    // 2. allocation against the software model
    ref_alloc();
    nseg = int'(num_seg);
    $display("segments %0d (model %0d), step4 %0d (model %0d), step5 %0d (model %0d)",
             nseg, ref_seg.size(), n_step4, ref_s4, n_step5, ref_s5);
    check(nseg == ref_seg.size(), "segment count");
    check(int'(n_step4) == ref_s4 && int'(n_step5) == ref_s5, "step counts");
    foreach (used[i]) used[i] = 0;
    for (int s = 0; s < nseg && s < ref_seg.size(); s++) begin
      logic [14:0] e;
      e = dut.u_cfg.mem[s];
      check(int'(e[14:3]) * ALIGN == ref_seg[s].head && int'(e[2:0]) == ref_seg[s].code,
            $sformatf("entry %0d", s));
      used[e[2:0]]++;
    end
    codes_used = 0;
    foreach (used[i]) begin
      if (used[i] > 0) codes_used++;
      if (used[i] > 0) $display("code %0d used by %0d segments", i, used[i]);
    end
    // 3. data path, with transient faults
    tf_ppm = 20'(TF_PPM);
    nfix_total = 0; reads_fixed = 0;
    for (int k = 0; k < 24; k++) begin
      int a;
      logic [L_U-1:0] w;
      a = (k == 0) ? 0 : (k == 1) ? nseg - 1 : $urandom_range(nseg - 1);
      for (int b = 0; b < L_U; b += 32) w[b +: 32] = $urandom;
      access(1, a, w, rd, fail, nfix, cyc);
      ecyc = 4 + L_U + int'(r_tab[dut.u_ctrl.code_q]);
      check(!fail && cyc == ecyc, $sformatf("write %0d: fail=%0d cycles=%0d/%0d", a, fail, cyc, ecyc));
      data[a] = w;
    end
    foreach (data[a]) begin
      int n, t;
      access(0, a, '0, rd, fail, nfix, cyc);
      n = L_U + int'(r_tab[dut.u_ctrl.code_q]);
      t = int'(t_tab[dut.u_ctrl.code_q]);
      check(!fail && rd == data[a], $sformatf("read %0d: fail=%0d", a, fail));
      check(cyc == 2 * n + 2 * t + T_MAX + 7, $sformatf("read time %0d, n=%0d t=%0d", cyc, n, t));
      nfix_total += nfix; reads_fixed += (nfix > 0);
    end
    // out of range
    access(0, nseg, '0, rd, fail, nfix, cyc);
    rejections = fail;
    check(fail, "out-of-range read rejected");
    $display("mechanisms: segments=%0d step4=%0d step5=%0d codes_used=%0d corrected_bits=%0d reads_with_corrections=%0d transient_faults=%0d rejections=%0d",
             nseg, n_step4, n_step5, codes_used, nfix_total, reads_fixed, tf_count, rejections);
    check(nseg > 0, "step 3 happened");
    check(n_step4 > 0, "step 4 happened");
    check(n_step5 > 0, "step 5 happened");
    check(codes_used > 1, "several codes in use");
    check(nfix_total > 0, "decoder corrected bits");
    check(tf_count > 0, "transient faults injected");
    $display("three-level plan: segments=%0d unusable_units=%0d step4=%0d step5=%0d first_level_words=%0d units_skipped=%0d",
             num_seg3, n_unusable, n3_step4, n3_step5, l1_words, l1_holes);
    check(num_seg3 > 0 && l1_words == int'(num_seg3), "three-level segments");
    check(n_unusable > 0 && l1_holes > 0, "unusable units skipped");
    check(n3_step4 > 0, "three-level step 4 happened");
    // 4. mode switch to the three-level scheme: bring up again (this
    //    rewrites the first-level words) and access blocks through it
    tf_ppm = '0;
    mode3 = 1;
    l1_words = 0;
    init_start = 1; @(negedge clk); init_start = 0;
    @(negedge clk);
    while (!init_done) @(negedge clk);
    check(l1_words == int'(num_seg3), "first-level words stored again");
    tf_ppm = 20'(TF_PPM);
    data.delete();
    begin
      int n3fix, n3reads, n3ok;
      n3fix = 0; n3reads = 0; n3ok = 0;
      for (int k = 0; k < 16; k++) begin
        int a;
        logic [L_U-1:0] w;
        a = (k == 0) ? 0 : (k == 1) ? int'(num_seg3) - 1 : $urandom_range(int'(num_seg3) - 1);
        for (int b = 0; b < L_U; b += 32) w[b +: 32] = $urandom;
        access(1, a, w, rd, fail, nfix, cyc);
        check(!fail, $sformatf("three-level write %0d", a));
        check(dut.u_ctrl3.hunit == l1_hu_log[a] && dut.u_ctrl3.vec_q == l1_vec_log[a],
              $sformatf("three-level write %0d: first-level word read back", a));
        data[a] = w;
      end
      foreach (data[a]) begin
        access(0, a, '0, rd, fail, nfix, cyc);
        check(!fail && rd == data[a], $sformatf("three-level read %0d: fail=%0d", a, fail));
        n3fix += nfix; n3reads++;
      end
      access(0, int'(num_seg3), '0, rd, fail, nfix, cyc);
      check(fail, "three-level out-of-range read rejected");
      $display("three-level access: reads=%0d corrected_bits=%0d unit_jumps=%0d writes_into_unusable=%0d",
               n3reads, n3fix, data_unit_jumps, bad_unit_writes);
      check(n3fix > 0, "three-level decoder corrected bits");
      check(data_unit_jumps > 0, "three-level data skipped units");
      check(bad_unit_writes == 0, "no data written into unusable units");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
