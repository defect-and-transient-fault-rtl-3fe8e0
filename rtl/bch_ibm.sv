// bch_ibm: error locator calculation by the inversion-free Berlekamp-Massey
// algorithm, specialised to binary BCH codes.
//
// For a binary code every second discrepancy is zero, so t iterations
// suffice for a t-error-correcting code.  Iteration r (r = 0..t-1) takes two
// cycles:
//   cycle A: delta = sum_i Lambda_i * S_(2r+1-i)      (T_MAX+1 multipliers)
//   cycle B: Lambda <- gamma*Lambda + delta*x*B
//            if delta != 0 and k >= 0:  B <- x*Lambda_old, gamma <- delta, k <- -k
//            else                       B <- x^2*B,                        k <- k+2
// No field inversion is needed; the result is a scalar multiple of the
// error locator, which has the same roots.  The syndromes needed for
// delta sit in a window register that shifts by two per iteration, so no
// wide multiplexer indexes the syndrome array.
//
// Interface: `start` with the syndromes and the code's t (<= T_MAX);
// `valid` is high from the 2t-th edge after the start edge on, and Lambda
// (lambda[i] = coefficient of x^i) is held until `take`.  `busy` is high
// from start until take.
// From the document: the inversion-free Berlekamp-Massey algorithm; the
// binary two-cycle iteration is this design's choice.
module bch_ibm
  import bch_pkg::*;
#(
  parameter int unsigned M     = 10,
  parameter int unsigned T_MAX = 57,
  localparam int unsigned TW   = $clog2(T_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  gf_t           synd [2*T_MAX],
  input  logic [TW-1:0] t,
  output logic          busy,
  output logic          valid,
  input  logic          take,
  output gf_t           lambda [T_MAX+1]
);

  typedef enum logic [1:0] {B_IDLE, B_DISC, B_UPD, B_HOLD} state_t;
  state_t state;

  gf_t                  b   [T_MAX+1];
  gf_t                  w   [T_MAX+1];   // w[i] = S_(2r+1-i)
  gf_t                  q   [2*T_MAX];   // remaining syndromes, next first
  gf_t                  gamma, delta;
  logic signed [TW+2:0] k;
  logic [TW-1:0]        r, t_q;

  assign busy  = (state != B_IDLE);
  assign valid = (state == B_HOLD);

  function automatic gf_t disc(gf_t l [T_MAX+1], gf_t s [T_MAX+1]);
    gf_t acc = '0;
    for (int i = 0; i <= int'(T_MAX); i++) acc = acc ^ gf_mul(l[i], s[i], M);
    return acc;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= B_IDLE;
      for (int i = 0; i <= int'(T_MAX); i++) begin
        lambda[i] <= '0;
        b[i]      <= '0;
        w[i]      <= '0;
      end
      for (int i = 0; i < 2 * int'(T_MAX); i++) q[i] <= '0;
      gamma <= '0;
      delta <= '0;
      k     <= '0;
      r     <= '0;
      t_q   <= '0;
    end else begin
      case (state)
        B_IDLE: if (start) begin
          for (int i = 0; i <= int'(T_MAX); i++) begin
            lambda[i] <= gf_t'(i == 0);
            b[i]      <= gf_t'(i == 0);
            w[i]      <= (i == 0) ? synd[0] : '0;
          end
          for (int i = 0; i < 2 * int'(T_MAX); i++)
            q[i] <= (i + 1 < 2 * int'(T_MAX)) ? synd[(i + 1 < 2 * int'(T_MAX)) ? i + 1 : 0] : '0;
          gamma <= gf_t'(1);
          k     <= '0;
          r     <= '0;
          t_q   <= t;
          state <= (t == 0) ? B_HOLD : B_DISC;
        end
        B_DISC: begin
          delta <= disc(lambda, w);
          state <= B_UPD;
        end
        B_UPD: begin
          for (int i = 0; i <= int'(T_MAX); i++)
            lambda[i] <= gf_mul(gamma, lambda[i], M) ^
                         ((i > 0) ? gf_mul(delta, b[(i > 0) ? i - 1 : 0], M) : '0);
          if (delta != '0 && k >= 0) begin
            for (int i = 0; i <= int'(T_MAX); i++)
              b[i] <= (i > 0) ? lambda[(i > 0) ? i - 1 : 0] : '0;
            gamma <= delta;
            k     <= -k;
          end else begin
            for (int i = 0; i <= int'(T_MAX); i++)
              b[i] <= (i > 1) ? b[(i > 1) ? i - 2 : 0] : '0;
            k     <= k + 2;
          end
          // slide the syndrome window by two
          for (int i = 2; i <= int'(T_MAX); i++) w[i] <= w[i-2];
          w[0] <= q[1];
          w[1] <= q[0];
          for (int i = 0; i < 2 * int'(T_MAX); i++)
            q[i] <= (i + 2 < 2 * int'(T_MAX)) ? q[(i + 2 < 2 * int'(T_MAX)) ? i + 2 : 0] : '0;
          r     <= r + 1'b1;
          state <= (r + 1'b1 == t_q) ? B_HOLD : B_DISC;
        end
        B_HOLD: if (take) state <= B_IDLE;
        default: state <= B_IDLE;
      endcase
    end
  end

endmodule
