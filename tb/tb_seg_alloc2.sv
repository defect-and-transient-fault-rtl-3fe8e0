// tb_seg_alloc2: the allocator runs on a 16384-cell defect map with
// 256-bit blocks and a made-up code group (t_i = 0,4,..,28, r_i = 9 t_i);
// every table write and the final segment and step counts are compared
// with a software run of the same procedure.  Two defect densities plus a
// defect cluster make steps 3, 4 and 5 all happen; alignment is 32.
`timescale 1ns/1ps
module tb_seg_alloc2;
  import bch_pkg::*;
  localparam int N = 16384, L_U = 256, ALIGN = 32, T_MAX = 28, R_MAX = 252;
  localparam int MAX_SEG = N / L_U;
  logic clk = 0, rst_n = 0, start = 0, busy, done, dm_defect, cfg_we;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  logic [4:0] t_tab [NUM_CODES], t_trans [NUM_CODES];
  logic [7:0] r_tab [NUM_CODES];
  logic [13:0] dm_addr;
  logic [5:0] cfg_waddr;
  logic [11:0] cfg_wdata;
  logic [6:0] num_seg;
  logic [31:0] n_step4, n_step5;
  bit defmap [N];
  assign dm_defect = defmap[dm_addr];
  seg_alloc2 #(.N_CELLS(N), .L_U(L_U), .ALIGN(ALIGN), .T_MAX(T_MAX), .R_MAX(R_MAX)) dut (
    .clk, .rst_n, .start, .busy, .done, .t_tab, .r_tab, .t_trans, .dm_addr, .dm_defect,
    .cfg_we, .cfg_waddr, .cfg_wdata, .num_seg, .n_step4, .n_step5);
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  typedef struct { int head; int code; } seg_t;
  seg_t ref_seg [$];
  int ref_s4, ref_s5;
  function automatic void ref_alloc();
    int head = 0;
    ref_seg = {}; ref_s4 = 0; ref_s5 = 0;
    while (head + L_U <= N && ref_seg.size() < MAX_SEG) begin
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
  // capture table writes
  seg_t got [$];
  always @(posedge clk) if (cfg_we) begin
    seg_t s; s.head = int'(cfg_wdata[11:3]) * ALIGN; s.code = int'(cfg_wdata[2:0]);
    check(int'(cfg_waddr) == got.size(), "write address in order");
    got.push_back(s);
  end
  initial begin
    int dens [2] = '{5000, 25000};
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < NUM_CODES; i++) begin
      t_tab[i] = 5'(4 * i); r_tab[i] = 8'(36 * i); t_trans[i] = 5'(i < 4 ? 2 : 3);
    end
    foreach (dens[d]) begin
      int cyc;
      for (int a = 0; a < N; a++)
        defmap[a] = ($urandom % 1000000) < dens[d] || (a >= 3000 && a < 3400 && a % 3 == 0);
      got = {};
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      ref_alloc();
      $display("density %0d ppm: %0d segments, step4 %0d, step5 %0d, %0d cycles",
               dens[d], num_seg, n_step4, n_step5, cyc);
      check(int'(num_seg) == ref_seg.size() && got.size() == ref_seg.size(), "segment count");
      check(int'(n_step4) == ref_s4 && int'(n_step5) == ref_s5, "step counts");
      check(n_step4 > 0 && n_step5 > 0 && num_seg > 0, "all steps exercised");
      for (int s = 0; s < got.size() && s < ref_seg.size(); s++)
        check(got[s].head == ref_seg[s].head && got[s].code == ref_seg[s].code, $sformatf("segment %0d", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
