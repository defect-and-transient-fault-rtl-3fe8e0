// tb_seg_alloc3: the three-level allocator on 16384 cells with 256-bit
// blocks, 32-cell units and a made-up code group (t_i = 0,4,..,28,
// r_i = 36 i).  The usable-unit map and the defect map are random (plus a
// defect cluster); every emitted first-level word and second-level entry
// and all counters are compared with a software run of the procedure.
// The receiver of the first-level words (emit_ready) stalls at random.
// Steps 3 to 6, unit skipping and the relocation of configuration words
// must all happen.
`timescale 1ns/1ps
module tb_seg_alloc3;
  import bch_pkg::*;
  localparam int N = 16384, L_U = 256, L_C = 32, T_MAX = 28, R_MAX = 252, S_MAX = 32;
  localparam int NU = N / L_C, MAX_SEG = N / L_U, UW = 9, SBW = 6, L1_FIX = UW + SBW + 3;
  logic clk = 0, rst_n = 0, start = 0, busy, done, dm_defect, u_usable, emit;
  logic emit_ready = 1'b1;   // toggled at random: the planner must wait
  always @(negedge clk) emit_ready <= ($urandom % 4) != 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  logic [4:0] t_tab [NUM_CODES], t_trans [NUM_CODES];
  logic [7:0] r_tab [NUM_CODES];
  logic [13:0] dm_addr, l2_cfg_head;
  logic [8:0] u_addr, l1_head_unit;
  logic [5:0] emit_idx, l1_s;
  logic [2:0] l1_code, l2_cfg_code;
  logic [S_MAX-1:0] l1_vec;
  logic [6:0] num_seg;
  logic [31:0] n_step4, n_step5, n_cfg_step4, n_cfg_step5;
  bit defmap [N], usable [NU];
  assign dm_defect = defmap[dm_addr];
  assign u_usable  = usable[u_addr];
  seg_alloc3 #(.N_CELLS(N), .L_U(L_U), .L_C(L_C), .T_MAX(T_MAX), .R_MAX(R_MAX), .S_MAX(S_MAX)) dut (
    .clk, .rst_n, .start, .busy, .done, .t_tab, .r_tab, .t_trans, .dm_addr, .dm_defect, .u_addr, .u_usable,
    .emit, .emit_ready, .emit_idx, .l1_head_unit, .l1_s, .l1_code, .l1_vec, .l2_cfg_head, .l2_cfg_code, .num_seg,
    .n_step4, .n_step5, .n_cfg_step4, .n_cfg_step5);
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct { int hu; int s; int code; bit [S_MAX-1:0] vec; int ch; int cc; } seg_t;
  seg_t ref_seg [$], got [$];
  int r4, r5, rc4, rc5;
  function automatic void ref_alloc();
    int head = 0;
    ref_seg = {}; r4 = 0; r5 = 0; rc4 = 0; rc5 = 0;
    while (1) begin
      int p, code, tgt, tdef, ucnt, s, need;
      bit [S_MAX-1:0] vec;
      bit ok, stop;
      int ch, cc, ctgt, ctdef, cfd;
      if (head >= N) return;
      if (!usable[head / L_C]) begin head += L_C; continue; end
      p = head; code = 0; tgt = L_U; tdef = 0; ucnt = 0; s = 0; vec = '0; ok = 0; stop = 0;
      while (!ok) begin
        while (ucnt < tgt) begin
          if (p >= N) return;
          if (p % L_C == 0 && s == S_MAX) begin stop = 1; break; end
          if (p % L_C == 0 && !usable[p / L_C]) begin s++; p += L_C; continue; end
          if (p % L_C == 0) begin vec[s] = 1; s++; end
          tdef += defmap[p]; ucnt++; p++;
        end
        if (stop) break;
        need = tdef + int'(t_trans[code]);
        if (int'(t_tab[code]) >= need) ok = 1;
        else if (need <= T_MAX) begin
          for (int i = NUM_CODES - 1; i >= 0; i--) if (int'(t_tab[i]) >= need) code = i;
          tgt = L_U + int'(r_tab[code]); r4++;
        end else break;
      end
      if (!ok) begin r5++; head += L_C; continue; end
      // configuration word
      ch = p;
      while (1) begin
        bit placed;
        if (ch + L1_FIX + s > N) return;
        cc = 0; ctgt = ch + L1_FIX + s; ctdef = 0; cfd = -1; placed = 0;
        for (int q = ch; ; ) begin
          int nd;
          for (; q < ctgt; q++) begin
            if (q >= N) return;
            if (defmap[q]) begin ctdef++; if (cfd < 0) cfd = q; end
          end
          nd = ctdef + int'(t_trans[cc]);
          if (int'(t_tab[cc]) >= nd) begin placed = 1; break; end
          else if (nd <= T_MAX) begin
            for (int i = NUM_CODES - 1; i >= 0; i--) if (int'(t_tab[i]) >= nd) cc = i;
            ctgt = ch + L1_FIX + s + int'(r_tab[cc]); rc4++;
          end else break;
        end
        if (placed) break;
        rc5++;
        ch = (cfd >= 0) ? cfd + 1 : ch + 1;
      end
      begin
        seg_t e; e.hu = head / L_C; e.s = s; e.code = code; e.vec = vec; e.ch = ch; e.cc = cc;
        ref_seg.push_back(e);
      end
      head = ((ctgt + L_C - 1) / L_C) * L_C;
      if (ref_seg.size() == MAX_SEG) return;
    end
  endfunction

  always @(posedge clk) if (emit) begin
    seg_t e;
    e.hu = int'(l1_head_unit); e.s = int'(l1_s); e.code = int'(l1_code); e.vec = l1_vec;
    e.ch = int'(l2_cfg_head); e.cc = int'(l2_cfg_code);
    check(int'(emit_idx) == got.size(), "emit index");
    got.push_back(e);
  end

  initial begin
    int skipped;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NUM_CODES; i++) begin
      t_tab[i] = 5'(4 * i); r_tab[i] = 8'(36 * i); t_trans[i] = 5'(i < 4 ? 2 : 3);
    end
    for (int a = 0; a < N; a++) defmap[a] = ($urandom_range(999) < 12) || (a >= 5000 && a < 5600 && a % 3 == 0);
    skipped = 0;
    for (int u = 0; u < NU; u++) begin usable[u] = $urandom_range(99) < 85; skipped += !usable[u]; end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    ref_alloc();
    $display("segments %0d (model %0d), step4 %0d/%0d, step5 %0d/%0d, cfg step4 %0d/%0d, cfg step5 %0d/%0d",
             num_seg, ref_seg.size(), n_step4, r4, n_step5, r5, n_cfg_step4, rc4, n_cfg_step5, rc5);
    check(int'(num_seg) == ref_seg.size() && got.size() == ref_seg.size(), "segment count");
    check(int'(n_step4) == r4 && int'(n_step5) == r5 && int'(n_cfg_step4) == rc4 && int'(n_cfg_step5) == rc5, "counters");
    for (int i = 0; i < got.size() && i < ref_seg.size(); i++)
      check(got[i] == ref_seg[i], $sformatf("segment %0d", i));
    begin
      int holes; holes = 0;
      foreach (got[i]) for (int k = 0; k < got[i].s; k++) holes += !got[i].vec[k];
      $display("units skipped inside segments: %0d", holes);
      check(holes > 0 && n_step4 > 0 && n_step5 > 0 && n_cfg_step4 > 0 && num_seg > 0, "mechanisms exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
