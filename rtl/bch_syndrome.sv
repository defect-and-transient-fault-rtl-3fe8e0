// bch_syndrome: serial syndrome computation of the BCH decoder.
//
// Received bits arrive one per cycle, highest power of x first.  For every
// j = 1..2*T_MAX a register accumulates S_j = r(alpha^j) by Horner's rule,
// S_j <- S_j * alpha^j + bit, using one constant multiplier per syndrome.
// In parallel a register tracks beta = alpha^-(n-1), where n is the length
// of the (possibly shortened) codeword seen so far; the Chien search uses
// beta to start at the first bit without stepping through the positions
// removed by shortening.  The first bit of a codeword (first=1) restarts
// all registers; with `last` the results are frozen and `done` pulses one
// cycle later, the values then stay on the outputs until the next first bit.
// Latency: one cycle after the last bit.  The block is named by the
// document; the Horner structure and the beta register are this design's.
module bch_syndrome
  import bch_pkg::*;
#(
  parameter int unsigned M     = 10,
  parameter int unsigned T_MAX = 57
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  logic   in_bit,
  input  logic   first,
  input  logic   last,
  output gf_t    synd [2*T_MAX],   // synd[j-1] = S_j
  output gf_t    beta,
  output logic   done
);

  localparam int unsigned N = (1 << M) - 1;

  // One Horner cell per syndrome, each with its constant alpha^(j+1).
  for (genvar j = 0; j < 2 * int'(T_MAX); j++) begin : g_cell
    localparam gf_t ALPHA_J = gf_alpha_pow(j + 1, M);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)        synd[j] <= '0;
      else if (in_valid) synd[j] <= (first ? '0 : gf_mul(synd[j], ALPHA_J, M)) ^ gf_t'(in_bit);
    end
  end

  localparam gf_t AINV = gf_alpha_pow(N - 1, M);   // alpha^-1

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beta <= '0;
      done <= 1'b0;
    end else begin
      done <= in_valid && last;
      if (in_valid) beta <= first ? gf_t'(1) : gf_mul(beta, AINV, M);
    end
  end

endmodule
