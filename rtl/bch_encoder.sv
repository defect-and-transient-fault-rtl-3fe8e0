// bch_encoder: serial systematic encoder shared by every code of a BCH
// code group.
//
// Encoding is polynomial division by the selected generator g(x): the k
// information bits enter most significant (highest power of x) first and
// are passed straight to the output, while an R_MAX-bit LFSR accumulates
// u(x)*x^r mod g(x); the r parity bits are then shifted out, again highest
// power first.  The code is chosen per codeword by loading g(x), its degree
// r and the information length k at `start`; shortened codes need nothing
// more than a smaller k.  Throughput is one bit per cycle: a codeword of
// k + r bits leaves in k + r cycles after `start`.
//
// Interface: `start` (with g, r, k_len); info bits on din when din_ready
// (din_valid must be high, the encoder does not wait for data); every cycle
// with dout_valid carries one code bit; `done` pulses with the last one.
// The document only states that encoding is a Galois-field polynomial
// multiplication and that one encoder serves the whole group; the
// systematic LFSR form is this design's choice.
module bch_encoder #(
  parameter int unsigned R_MAX = 510,
  parameter int unsigned K_MAX = 512,
  localparam int unsigned RW   = $clog2(R_MAX + 1),
  localparam int unsigned KW   = $clog2(K_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [R_MAX:0] g,
  input  logic [RW-1:0] r,
  input  logic [KW-1:0] k_len,
  output logic          busy,
  output logic          din_ready,
  input  logic          din_valid,
  input  logic          din,
  output logic          dout_valid,
  output logic          dout,
  output logic          done
);

  typedef enum logic [1:0] {E_IDLE, E_INFO, E_PAR} state_t;
  state_t state;

  logic [R_MAX-1:0] p, g_low, mask;
  logic [RW-1:0]    r_q;
  logic [KW-1:0]    cnt_k;
  logic [RW-1:0]    cnt_r;
  logic             p_top, fb;

  assign p_top = (r_q == 0) ? 1'b0 : p[r_q - 1'b1];
  assign fb    = din ^ p_top;

  assign busy       = (state != E_IDLE);
  assign din_ready  = (state == E_INFO);
  assign dout_valid = (state == E_INFO && din_valid) || (state == E_PAR);
  assign dout       = (state == E_PAR) ? p_top : din;
  assign done       = (state == E_PAR && cnt_r == 1) ||
                      (state == E_INFO && din_valid && cnt_k == 1 && r_q == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= E_IDLE;
      p     <= '0;
      g_low <= '0;
      mask  <= '0;
      r_q   <= '0;
      cnt_k <= '0;
      cnt_r <= '0;
    end else begin
      case (state)
        E_IDLE: if (start) begin
          p     <= '0;
          g_low <= g[R_MAX-1:0];
          mask  <= R_MAX'(({{R_MAX{1'b0}}, 1'b1} << r) - 1'b1);
          r_q   <= r;
          cnt_k <= k_len;
          cnt_r <= r;
          state <= (k_len == 0) ? ((r == 0) ? E_IDLE : E_PAR) : E_INFO;
        end
        E_INFO: if (din_valid) begin
          p     <= ((p << 1) ^ (fb ? g_low : '0)) & mask;
          cnt_k <= cnt_k - 1'b1;
          if (cnt_k == 1) state <= (r_q == 0) ? E_IDLE : E_PAR;
        end
        E_PAR: begin
          p     <= (p << 1) & mask;
          cnt_r <= cnt_r - 1'b1;
          if (cnt_r == 1) state <= E_IDLE;
        end
        default: state <= E_IDLE;
      endcase
    end
  end

endmodule
