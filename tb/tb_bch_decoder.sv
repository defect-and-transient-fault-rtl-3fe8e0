// tb_bch_decoder: end-to-end check of the serial BCH decoder over GF(2^10)
// with t_max = 57.  Codewords are built here by polynomial division with
// the generator polynomials of the code table, corrupted at random
// positions, decoded, and compared bit by bit with the sent codeword.
// Covered: several codes of the group, shortened (512 information bits)
// and full-length (n = 1023) words, 0..t errors, words with more than t
// errors (must not be returned as clean), the first-bit latency
// n + 2t + T_MAX + 3, and back-to-back words (one bit per cycle in and out).
`timescale 1ns/1ps
module tb_bch_decoder;
  import bch_pkg::*;
  localparam int M = 10, T_MAX = 57, N_MAX = 1023, R_MAX = 510;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(negedge clk) cycle++;
  logic rdy_ne = 0;                  // in_ready as seen by the next edge
  always @(negedge clk) rdy_ne <= in_ready;

  // code table
  logic tab_start = 0, tab_ready, tab_ovf;
  logic [5:0] t_tab [NUM_CODES];
  logic [8:0] r_tab [NUM_CODES];
  logic [2:0] g_code = '0;
  logic [R_MAX:0] g_sel;
  bch_code_table #(.M(M), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_tab (
    .clk, .rst_n, .start(tab_start), .ready(tab_ready), .overflow(tab_ovf),
    .t_tab, .r_tab, .g_code, .g_sel);

  // DUT
  logic in_valid = 0, in_ready, in_bit = 0;
  logic [9:0] cw_len = '0;
  logic [5:0] cw_t = '0;
  logic out_valid, out_ready = 1, out_bit, out_last, out_err, out_fail;
  bch_decoder #(.M(M), .T_MAX(T_MAX), .N_MAX(N_MAX)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_bit, .cw_len, .cw_t,
    .out_valid, .out_ready, .out_bit, .out_last, .out_err, .out_fail);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected words, queued in send order
  typedef struct { bit bits [$]; int nerr; int t; longint t0; bit over; } word_t;
  word_t sent [$];

  function automatic void make_word(int code, int k, int nerr, output bit cw [$], output bit rx [$]);
    bit par [$];
    int r = int'(r_tab[code]);
    bit fb;
    cw = {};
    for (int i = 0; i < r; i++) par.push_back(0);    // par[0] = x^(r-1)
    for (int i = 0; i < k; i++) begin
      bit u = 1'($urandom);
      cw.push_back(u);
      if (r > 0) begin
        fb = u ^ par[0];
        void'(par.pop_front());
        par.push_back(0);
        for (int j = 0; j < r; j++) if (fb && g_sel[r - 1 - j]) par[j] = !par[j];
      end
    end
    foreach (par[i]) cw.push_back(par[i]);
    rx = cw;
    for (int e = 0; e < nerr; e++) begin
      int p;
      do p = $urandom_range(cw.size() - 1); while (rx[p] != cw[p]);
      rx[p] = !rx[p];
    end
  endfunction

  task automatic send(int code, int k, int nerr);
    bit cw [$], rx [$];
    word_t w;
    g_code = 3'(code);
    #1;
    make_word(code, k, nerr, cw, rx);
    w.bits = cw; w.nerr = nerr; w.t = int'(t_tab[code]); w.over = nerr > w.t;
    for (int i = 0; i < rx.size(); i++) begin
      in_valid <= 1; in_bit <= rx[i];
      cw_len <= 10'(rx.size()); cw_t <= t_tab[code];
      do @(posedge clk); while (!rdy_ne);
      if (i == 0) begin w.t0 = cycle; sent.push_back(w); end
    end
    in_valid <= 0;
  endtask

  // checker
  int words_ok = 0, idx = 0, nfix = 0, corrected = 0, detected = 0;
  bit bad = 0;
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    if (idx == 0) begin
      longint lat;
      lat = cycle - sent[0].t0;
      if (!sent[0].over)
        check(lat == longint'(sent[0].bits.size() + 2 * sent[0].t + T_MAX + 3) || lat > longint'(sent[0].bits.size() + 2 * sent[0].t + T_MAX + 3) && back2back,
              $sformatf("latency %0d", lat));
    end
    if (out_bit != sent[0].bits[idx]) bad = 1;
    nfix += out_err;
    idx++;
    if (out_last) begin
      if (sent[0].over) begin
        check(out_fail || bad, "word with too many errors reported clean");
        detected += out_fail;
      end else begin
        check(!bad && !out_fail && nfix == sent[0].nerr,
              $sformatf("word t=%0d nerr=%0d bad=%0d fail=%0d fixed=%0d", sent[0].t, sent[0].nerr, bad, out_fail, nfix));
        corrected += (nfix > 0);
        $display("word t=%0d n=%0d errors=%0d fixed=%0d", sent[0].t, sent[0].bits.size(), sent[0].nerr, nfix);
      end
      check(idx == sent[0].bits.size(), "word length");
      void'(sent.pop_front());
      idx = 0; bad = 0; nfix = 0; words_ok++;
    end
  end

  bit back2back = 0;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nwords;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); tab_start <= 1; @(posedge clk); tab_start <= 0;
    wait (tab_ready);
    @(posedge clk);
    // isolated words: every code, shortened to 512 info bits, 0..t errors
    for (int c = 0; c < NUM_CODES; c++) begin
      int t;
      t = int'(t_tab[c]);
      send(c, 512, 0);
      wait (sent.size() == 0); @(posedge clk);
      send(c, 512, t);
      wait (sent.size() == 0); @(posedge clk);
      send(c, 512, $urandom_range(t));
      wait (sent.size() == 0); @(posedge clk);
    end
    // full-length code (1023, 513, 57)
    send(7, 513, 57);
    wait (sent.size() == 0); @(posedge clk);
    // too many errors
    send(2, 512, 40);
    wait (sent.size() == 0); @(posedge clk);
    send(5, 512, 70);
    wait (sent.size() == 0); @(posedge clk);
    // back-to-back words, with output stalls
    back2back = 1;
    fork
      begin
        for (int i = 0; i < 6; i++) send(i % 2 == 0 ? 7 : 3, 512, 5 + i);
      end
      begin
        repeat (3000) begin @(posedge clk); out_ready <= ($urandom_range(7) != 0); end
        out_ready <= 1;
      end
    join
    wait (sent.size() == 0); @(posedge clk);
    nwords = words_ok;
    $display("words=%0d corrected=%0d detected_failures=%0d", nwords, corrected, detected);
    check(nwords == 8 * 3 + 3 + 6, "all words returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
