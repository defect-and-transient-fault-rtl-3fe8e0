// bch_decoder: fully serial decoder shared by all codes of a BCH group.
//
// Structure: syndrome computation -> error locator calculation
// (inversion-free Berlekamp-Massey) -> Chien search, with a FIFO carrying
// the received bits past the three computation stages to the correcting
// XOR at the output.  One bit enters and one corrected bit leaves per
// cycle.  The three stages work on different codewords at the same time:
// when a codeword's syndromes are complete they are handed to the
// Berlekamp-Massey unit and the next codeword may stream in, and the
// Chien search corrects one word while the next is still arriving.
//
// Each codeword carries its own length n (<= N_MAX, shortened codes) and
// correction capability t (<= T_MAX), sampled with its first bit.  For one
// isolated codeword the first corrected bit is taken n + 2t + T_MAX + 3
// clock edges after the first received bit (n-1 further input edges, one
// hand-off edge into Berlekamp-Massey, 2t iteration edges, one hand-off
// edge into the Chien search, T_MAX+1 set-up edges, one output edge), and
// the word leaves in n further cycles.
//
// Interface: in_valid/in_ready/in_bit with cw_len/cw_t; out_valid/
// out_ready/out_bit, out_last on the final bit, out_fail with out_last when
// the word was not correctable, out_err on every corrected bit.
// From the document: the block structure, the algorithm, bit-serial
// operation, one decoder for the whole group, the group sizes.  This
// design's own: the stage hand-off, the FIFO depth, the failure flag.
module bch_decoder
  import bch_pkg::*;
#(
  parameter int unsigned M          = 10,
  parameter int unsigned T_MAX      = 57,
  parameter int unsigned N_MAX      = 1023,
  parameter int unsigned FIFO_DEPTH = 2048,
  localparam int unsigned NW        = $clog2(N_MAX + 1),
  localparam int unsigned TW        = $clog2(T_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic          in_bit,
  input  logic [NW-1:0] cw_len,
  input  logic [TW-1:0] cw_t,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_bit,
  output logic          out_last,
  output logic          out_err,
  output logic          out_fail
);

  // ---------------- syndrome stage ----------------
  logic          acc, first, last;
  logic [NW-1:0] cnt_in, len_q, len_cur;
  logic [TW-1:0] t_q;
  logic          syn_full;
  gf_t           synd [2*T_MAX];
  gf_t           beta;
  logic          syn_done;
  logic          fifo_full, fifo_empty, fifo_dout;

  assign first    = (cnt_in == '0);
  assign len_cur  = first ? cw_len : len_q;
  assign last     = (cnt_in + 1'b1 == len_cur);
  assign in_ready = !syn_full && !fifo_full;
  assign acc      = in_valid && in_ready;

  bch_syndrome #(.M(M), .T_MAX(T_MAX)) u_syn (
    .clk, .rst_n, .in_valid(acc), .in_bit, .first, .last,
    .synd, .beta, .done(syn_done)
  );

  bit_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(acc), .din(in_bit), .pop(out_valid && out_ready),
    .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty), .count()
  );

  // ---------------- Berlekamp-Massey stage ----------------
  logic          bm_start, bm_busy, bm_valid, bm_take;
  gf_t           lambda [T_MAX+1];
  gf_t           bm_beta;
  logic [NW-1:0] bm_len;

  assign bm_start = syn_full && !bm_busy;

  bch_ibm #(.M(M), .T_MAX(T_MAX)) u_ibm (
    .clk, .rst_n, .start(bm_start), .synd, .t(t_q), .busy(bm_busy),
    .valid(bm_valid), .take(bm_take), .lambda
  );

  // ---------------- Chien stage ----------------
  logic ch_busy;
  assign bm_take = bm_valid && !ch_busy;

  bch_chien #(.M(M), .T_MAX(T_MAX), .N_MAX(N_MAX)) u_chien (
    .clk, .rst_n, .start(bm_take), .lambda, .beta(bm_beta), .n_len(bm_len),
    .busy(ch_busy), .fifo_bit(fifo_dout), .out_valid, .out_ready, .out_bit,
    .out_err, .out_last, .fail(out_fail)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_in   <= '0;
      len_q    <= '0;
      t_q      <= '0;
      syn_full <= 1'b0;
      bm_beta  <= '0;
      bm_len   <= '0;
    end else begin
      if (acc) begin
        if (first) begin
          len_q <= cw_len;
          t_q   <= cw_t;
        end
        cnt_in <= last ? '0 : cnt_in + 1'b1;
        if (last) syn_full <= 1'b1;
      end
      if (bm_start) begin
        syn_full <= 1'b0;
        bm_beta  <= beta;
        bm_len   <= len_q;
      end
    end
  end

  a_fifo_has_word: assert property (@(posedge clk) disable iff (!rst_n)
                                    out_valid |-> !fifo_empty);

endmodule
