// bch_chien: Chien search and bit correction of the serial BCH decoder.
//
// Bit position p of an n-bit codeword is in error when Lambda(alpha^-p) = 0.
// Bits leave highest position first (p = n-1 down to 0), so the search
// starts from c_i = Lambda_i * beta^i with beta = alpha^-(n-1), computed in
// T_MAX+1 set-up cycles by rotating the coefficients through one
// multiplier while beta^i builds up in another.  Then each output cycle it
// evaluates sum(c_i), flips the buffered bit when the sum is zero, and
// multiplies every c_i by the constant alpha^i.  The roots found are
// counted; if they differ from the degree of Lambda the word had more
// errors than the code corrects, which `fail` reports with the last bit.
//
// Interface: `start` with lambda, beta and n_len; the buffered received
// bit comes in on fifo_bit; one corrected bit per cycle on out_bit when
// out_valid and out_ready (then the FIFO is popped); out_last marks the
// final bit.  The block is named by the document; the set-up scheme for
// shortened codes and the failure test are this design's choices.
module bch_chien
  import bch_pkg::*;
#(
  parameter int unsigned M     = 10,
  parameter int unsigned T_MAX = 57,
  parameter int unsigned N_MAX = 1023,
  localparam int unsigned NW   = $clog2(N_MAX + 1),
  localparam int unsigned TW   = $clog2(T_MAX + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  gf_t           lambda [T_MAX+1],
  input  gf_t           beta,
  input  logic [NW-1:0] n_len,
  output logic          busy,
  input  logic          fifo_bit,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          out_bit,
  output logic          out_err,
  output logic          out_last,
  output logic          fail
);

  typedef enum logic [1:0] {C_IDLE, C_INIT, C_RUN} state_t;
  state_t state;

  gf_t           c [T_MAX+1];
  gf_t           pw, beta_q, sum;
  logic [TW-1:0] idx, deg, roots;
  logic [NW-1:0] cnt;
  logic          err;
  gf_t           c_step [T_MAX+1];

  // c[i] advances by the constant alpha^i per tested position
  for (genvar i = 0; i <= int'(T_MAX); i++) begin : g_step
    localparam gf_t ALPHA_I = gf_alpha_pow(i, M);
    assign c_step[i] = gf_mul(c[i], ALPHA_I, M);
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i <= int'(T_MAX); i++) sum = sum ^ c[i];
  end

  assign err       = (sum == '0);
  assign busy      = (state != C_IDLE);
  assign out_valid = (state == C_RUN);
  assign out_bit   = fifo_bit ^ err;
  assign out_err   = err;
  assign out_last  = (state == C_RUN) && (cnt == 1);
  assign fail      = out_last && ((roots + TW'(err)) != deg);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= C_IDLE;
      for (int i = 0; i <= int'(T_MAX); i++) c[i] <= '0;
      pw     <= '0;
      beta_q <= '0;
      idx    <= '0;
      deg    <= '0;
      roots  <= '0;
      cnt    <= '0;
    end else begin
      case (state)
        C_IDLE: if (start) begin
          for (int i = 0; i <= int'(T_MAX); i++) c[i] <= lambda[i];
          pw     <= gf_t'(1);
          beta_q <= beta;
          idx    <= '0;
          deg    <= '0;
          roots  <= '0;
          cnt    <= n_len;
          state  <= C_INIT;
        end
        // c[0] holds Lambda_idx: scale it by beta^idx and rotate it to the top
        C_INIT: begin
          for (int i = 0; i < int'(T_MAX); i++) c[i] <= c[i+1];
          c[T_MAX] <= gf_mul(c[0], pw, M);
          pw       <= gf_mul(pw, beta_q, M);
          if (c[0] != '0) deg <= idx;
          idx <= idx + 1'b1;
          if (32'(idx) == T_MAX) state <= (n_len == 0) ? C_IDLE : C_RUN;
        end
        C_RUN: if (out_ready) begin
          for (int i = 0; i <= int'(T_MAX); i++) c[i] <= c_step[i];
          roots <= roots + TW'(err);
          cnt   <= cnt - 1'b1;
          if (cnt == 1) state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
