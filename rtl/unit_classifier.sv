// unit_classifier: first step of the three-level hierarchical scheme.  The
// array is cut into indivisible memory units of L_C consecutive cells; a
// unit holding more than floor(L_C / M) defective cells is marked unusable
// (one more correctable error costs M parity bits in GF(2^M), so leaving
// such a unit out is cheaper than covering it with parity).
//
// After `start` it reads the defect map one cell per cycle (dm_addr ->
// dm_defect, same cycle) and writes one usable bit per unit into an
// internal N_CELLS/L_C-bit table; `done` after N_CELLS cycles.  The table
// is read through u_addr -> u_usable (combinational).  n_unusable counts
// the units marked unusable.  The rule and threshold follow the document;
// the scan order and table organisation are this design's choice.
module unit_classifier #(
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned L_C     = 32,
  parameter int unsigned M       = 10,
  localparam int unsigned N_UNITS = N_CELLS / L_C,
  localparam int unsigned AW     = $clog2(N_CELLS),
  localparam int unsigned UW     = $clog2(N_UNITS),
  localparam int unsigned CW     = $clog2(L_C + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] dm_addr,
  input  logic          dm_defect,
  input  logic [UW-1:0] u_addr,
  output logic          u_usable,
  output logic [UW:0]   n_unusable
);

  localparam int unsigned THRESH = L_C / M;   // floor(l_c / m)

  logic          usable [N_UNITS];
  logic [AW:0]   pos;
  logic [CW-1:0] cnt, cnt_next;
  logic          run, fin;

  assign dm_addr  = pos[AW-1:0];
  assign busy     = run;
  assign done     = fin;
  assign u_usable = usable[u_addr];
  assign cnt_next = cnt + CW'(dm_defect);

  always_ff @(posedge clk) begin
    if (run && (32'(pos) % L_C == L_C - 1))
      usable[UW'(32'(pos) / L_C)] <= (32'(cnt_next) <= THRESH);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos        <= '0;
      cnt        <= '0;
      run        <= 1'b0;
      fin        <= 1'b0;
      n_unusable <= '0;
    end else if (start) begin
      pos        <= '0;
      cnt        <= '0;
      run        <= 1'b1;
      fin        <= 1'b0;
      n_unusable <= '0;
    end else if (run) begin
      if (32'(pos) % L_C == L_C - 1) begin
        cnt <= '0;
        if (32'(cnt_next) > THRESH) n_unusable <= n_unusable + 1'b1;
      end else cnt <= cnt_next;
      pos <= pos + 1'b1;
      if (32'(pos) == N_CELLS - 1) begin
        run <= 1'b0;
        fin <= 1'b1;
      end
    end
  end

endmodule
