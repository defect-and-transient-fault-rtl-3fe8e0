// bch_code_table: builds the BCH code group shared by the encoder and the
// decoder.
//
// A group holds NUM_CODES (8) binary primitive BCH codes over GF(2^M) whose
// correction capabilities t_i are spread evenly between 0 and T_MAX.  After
// `start`, a small sequential engine constructs every generator polynomial
// itself instead of reading a stored table: it walks the odd exponents
// j = 1, 3, ..., 2*T_MAX-1, keeps those that lead their cyclotomic coset
// (j*2^k mod 2^M-1 never smaller than j), forms the minimal polynomial
// prod(x + alpha^e) over the coset with GF(2^M) arithmetic, and multiplies
// it into the running binary product g(x).  Because the codes are nested,
// one pass suffices: when j passes 2*t_i-1 the running g(x) is the
// generator of code i and is stored together with its degree r_i (the
// number of parity bits).  The whole build takes about 2*M cycles per odd
// exponent (roughly 1.2k cycles for GF(2^10), T_MAX = 57); `ready` then
// stays high until the next `start`.
//
// Interface: start/ready; t_tab/r_tab give t_i and r_i of all codes;
// g_sel returns the generator polynomial (bit k = coefficient of x^k) of
// code g_code.  `overflow` flags a generator of degree above R_MAX.
// From the document: group sizes (M, T_MAX, R_MAX from Table I), 8 codes
// per group sharing one encoder/decoder.  This design's own choices: the
// exact t_i values, the primitive polynomial, building the table in
// hardware.
module bch_code_table
  import bch_pkg::*;
#(
  parameter int unsigned M     = 10,
  parameter int unsigned T_MAX = 57,
  parameter int unsigned R_MAX = 510,
  localparam int unsigned RW   = $clog2(R_MAX + 1),
  localparam int unsigned TW   = $clog2(T_MAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  output logic             ready,
  output logic             overflow,
  output logic [TW-1:0]    t_tab [NUM_CODES],
  output logic [RW-1:0]    r_tab [NUM_CODES],
  input  logic [CODE_W-1:0] g_code,
  output logic [R_MAX:0]   g_sel
);

  typedef enum logic [2:0] {S_IDLE, S_SNAP, S_SCAN, S_MINP, S_MUL, S_NEXT, S_DONE} state_t;
  state_t state;

  localparam int unsigned JW = M;   // 2*T_MAX+1 < 2^M always holds

  logic [R_MAX:0]        g_tab [NUM_CODES];
  logic [R_MAX:0]        g;
  logic [RW:0]           r;
  logic [JW-1:0]         j;
  gf_t                   aj, a;
  logic [M-1:0]          e, e_rot;
  logic [$clog2(M+1):0]  csize, cnt;
  gf_t                   mp [M+1];
  logic [CODE_W:0]       ci;

  for (genvar i = 0; i < NUM_CODES; i++) begin : g_t
    assign t_tab[i] = TW'(code_t(i, T_MAX));
  end

  assign g_sel = g_tab[g_code];
  assign ready = (state == S_DONE);
  assign e_rot = {e[M-2:0], e[M-1]};   // e*2 mod (2^M-1)

  // binary product g(x) * mp(x) (mp coefficients are 0/1 after the coset)
  function automatic logic [R_MAX:0] mul_bin(logic [R_MAX:0] gi, gf_t mpc [M+1]);
    logic [R_MAX:0] acc = '0;
    for (int i = 0; i <= int'(M); i++)
      if (mpc[i][0]) acc = acc ^ (gi << i);
    return acc;
  endfunction

  logic [31:0] t_cur;
  assign t_cur = (32'(ci) < NUM_CODES) ? code_t(32'(ci), T_MAX) : 32'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      overflow <= 1'b0;
      g        <= '0;
      r        <= '0;
      j        <= '0;
      aj       <= '0;
      a        <= '0;
      e        <= '0;
      csize    <= '0;
      cnt      <= '0;
      ci       <= '0;
      for (int i = 0; i < NUM_CODES; i++) begin
        g_tab[i] <= '0;
        r_tab[i] <= '0;
      end
      for (int i = 0; i <= int'(M); i++) mp[i] <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: if (start) begin
          g        <= (R_MAX+1)'(1);
          r        <= '0;
          j        <= JW'(1);
          aj       <= gf_alpha_pow(1, M);
          ci       <= '0;
          overflow <= 1'b0;
          state    <= S_SNAP;
        end
        // store every code whose odd exponents 1..2t-1 are all covered
        S_SNAP: begin
          if (32'(ci) == NUM_CODES) state <= S_DONE;
          else if (2 * t_cur < 32'(j) + 1) begin
            g_tab[ci[CODE_W-1:0]] <= g;
            r_tab[ci[CODE_W-1:0]] <= RW'(r);
            ci <= ci + 1'b1;
          end else begin
            e     <= j;
            csize <= 1;
            state <= S_SCAN;
          end
        end
        // is j the smallest member of its cyclotomic coset?
        S_SCAN: begin
          if (e_rot < j) state <= S_NEXT;
          else if (e_rot == j) begin
            for (int i = 0; i <= int'(M); i++) mp[i] <= gf_t'(i == 0);
            a     <= aj;
            cnt   <= csize;
            state <= S_MINP;
          end else begin
            e     <= e_rot;
            csize <= csize + 1'b1;
          end
        end
        // minimal polynomial: multiply by (x + alpha^e) for each coset member
        S_MINP: begin
          for (int i = 0; i <= int'(M); i++)
            mp[i] <= gf_mul(a, mp[i], M) ^ ((i > 0) ? mp[(i > 0) ? i - 1 : 0] : '0);
          a   <= gf_mul(a, a, M);
          cnt <= cnt - 1'b1;
          if (cnt == 1) state <= S_MUL;
        end
        S_MUL: begin
          g     <= mul_bin(g, mp);
          r     <= r + (RW+1)'(csize);
          if (32'(r) + 32'(csize) > R_MAX) overflow <= 1'b1;
          state <= S_NEXT;
        end
        S_NEXT: begin
          j     <= j + JW'(2);
          aj    <= gf_mul(aj, gf_alpha_pow(2, M), M);
          state <= S_SNAP;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
