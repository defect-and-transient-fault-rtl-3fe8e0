// seg_alloc3: allocation engine of the three-level hierarchical fault
// tolerance scheme.  Like the two-level engine it places one codeword of
// L_U user bits plus parity per segment and picks the weakest sufficient
// BCH code, but a segment is no longer a run of consecutive cells: it
// counts only cells of usable indivisible units (see unit_classifier) and
// steps over unusable ones.  Which units a segment covers is recorded as
// first-level configuration data, itself stored as a short BCH codeword in
// consecutive nanodevice cells placed with the two-level procedure; only
// the second-level entry describing that short codeword goes to CMOS.
//
// Data segment (one cell or one skipped unit per cycle), head on a unit:
//   step 1  span of L_U usable cells from head; t_c = 0 (code 0)
//   step 2  need = (defects in the usable cells) + t_trans[code]
//   step 3  t_c >= need: go to step 6
//   step 4  t_c < need <= T_MAX: weakest code with t >= need; extend the
//           span to L_U + r usable cells; go to step 2
//   step 5  need > T_MAX (or more than S_MAX units): head <- next usable
//           unit; go to step 1
//   step 6  first-level word {head unit, s, code, s-bit usable vector},
//           L1_FIX + s bits long, placed from the cell after the data span
//           with the two-level procedure (all cells count, the code is
//           shortened to the word's length); emit the first-level word
//           and the second-level entry {config head, config code, s};
//           head <- first unit boundary after the configuration codeword.
// t_trans is the same per-code table as in the two-level engine (its
// values for L_U-bit words are conservative for the shorter configuration
// words).  Ends when a span runs past the array or MAX_SEG segments exist.
// Interface: start/busy/done; dm_addr -> dm_defect and u_addr -> u_usable
// (same cycle); emit (only while emit_ready is high) with l1_* and l2_*
// fields; num_seg; step counters.
// From the document: the steps, the usable-unit rule, the content of both
// configuration levels.  This design's own: the word layout, S_MAX, where
// the configuration codeword is placed, reuse of t_trans.
module seg_alloc3
  import bch_pkg::*;
#(
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned L_U     = 512,
  parameter int unsigned L_C     = 32,
  parameter int unsigned T_MAX   = 57,
  parameter int unsigned R_MAX   = 510,
  parameter int unsigned S_MAX   = 64,
  parameter int unsigned MAX_SEG = N_CELLS / L_U,
  localparam int unsigned AW     = $clog2(N_CELLS),
  localparam int unsigned UW     = $clog2(N_CELLS / L_C),
  localparam int unsigned SBW    = $clog2(S_MAX + 1),
  localparam int unsigned L1_FIX = UW + SBW + CODE_W,
  localparam int unsigned SW     = $clog2(MAX_SEG),
  localparam int unsigned TW     = $clog2(T_MAX + 1),
  localparam int unsigned RW     = $clog2(R_MAX + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  input  logic [TW-1:0]     t_tab   [NUM_CODES],
  input  logic [RW-1:0]     r_tab   [NUM_CODES],
  input  logic [TW-1:0]     t_trans [NUM_CODES],
  output logic [AW-1:0]     dm_addr,
  input  logic              dm_defect,
  output logic [UW-1:0]     u_addr,
  input  logic              u_usable,
  // one segment found: first-level word and second-level (CMOS) entry;
  // the planner waits in step 6 until emit_ready takes the word
  output logic              emit,
  input  logic              emit_ready,
  output logic [SW-1:0]     emit_idx,
  output logic [UW-1:0]     l1_head_unit,
  output logic [SBW-1:0]    l1_s,
  output logic [CODE_W-1:0] l1_code,
  output logic [S_MAX-1:0]  l1_vec,
  output logic [AW-1:0]     l2_cfg_head,
  output logic [CODE_W-1:0] l2_cfg_code,
  output logic [SW:0]       num_seg,
  output logic [31:0]       n_step4,
  output logic [31:0]       n_step5,
  output logic [31:0]       n_cfg_step4,
  output logic [31:0]       n_cfg_step5
);

  typedef enum logic [2:0] {G_IDLE, G_STEP1, G_SCAN, G_EVAL, G_CSTEP1, G_CSCAN, G_CEVAL, G_DONE} state_t;
  state_t state;

  logic [AW:0]          head, pos, chead, cpos, ctgt, cfd;
  logic                 cfd_valid;
  logic [AW:0]          tdef, ctdef, ucnt, tgt_l;
  logic [CODE_W-1:0]    code, ccode, up_d, up_c;
  logic [SBW-1:0]       s;
  logic [S_MAX-1:0]     vec;
  logic [AW+1:0]        need_d, need_c;
  logic                 found_d, found_c, unit_start;

  assign need_d = (AW+2)'(tdef)  + (AW+2)'(t_trans[code]);
  assign need_c = (AW+2)'(ctdef) + (AW+2)'(t_trans[ccode]);

  // weakest code covering a requirement
  always_comb begin
    up_d = code;  found_d = 1'b0;
    up_c = ccode; found_c = 1'b0;
    for (int i = NUM_CODES - 1; i >= 0; i--) begin
      if ((AW+2)'(t_tab[i]) >= need_d) begin up_d = CODE_W'(i); found_d = 1'b1; end
      if ((AW+2)'(t_tab[i]) >= need_c) begin up_c = CODE_W'(i); found_c = 1'b1; end
    end
  end

  function automatic logic [AW:0] unit_up(logic [AW:0] x);   // next unit boundary >= x
    return (AW+1)'(((32'(x) + L_C - 1) / L_C) * L_C);
  endfunction

  assign unit_start = (32'(pos) % L_C == 0);
  assign u_addr     = UW'(32'(pos) / L_C);
  assign dm_addr    = (state == G_CSCAN) ? cpos[AW-1:0] : pos[AW-1:0];
  assign busy       = (state != G_IDLE) && (state != G_DONE);
  assign done       = (state == G_DONE);

  assign emit         = (state == G_CEVAL) && ((AW+2)'(t_tab[ccode]) >= need_c) && emit_ready;
  assign emit_idx     = num_seg[SW-1:0];
  assign l1_head_unit = UW'(32'(head) / L_C);
  assign l1_s         = s;
  assign l1_code      = code;
  assign l1_vec       = vec;
  assign l2_cfg_head  = chead[AW-1:0];
  assign l2_cfg_code  = ccode;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= G_IDLE;
      head <= '0; pos <= '0; chead <= '0; cpos <= '0; ctgt <= '0; cfd <= '0;
      cfd_valid <= 1'b0; tdef <= '0; ctdef <= '0; ucnt <= '0; tgt_l <= '0;
      code <= '0; ccode <= '0; s <= '0; vec <= '0;
      num_seg <= '0; n_step4 <= '0; n_step5 <= '0; n_cfg_step4 <= '0; n_cfg_step5 <= '0;
    end else begin
      case (state)
        G_IDLE, G_DONE: if (start) begin
          head <= '0; pos <= '0;
          num_seg <= '0; n_step4 <= '0; n_step5 <= '0; n_cfg_step4 <= '0; n_cfg_step5 <= '0;
          state <= G_STEP1;
        end
        // head sits on a unit boundary; skip unusable units
        G_STEP1: begin
          if (32'(head) >= N_CELLS) state <= G_DONE;
          else if (!u_usable) begin
            head <= head + (AW+1)'(L_C);
            pos  <= head + (AW+1)'(L_C);
          end else begin
            pos   <= head;
            ucnt  <= '0;
            tgt_l <= (AW+1)'(L_U);
            tdef  <= '0;
            code  <= '0;
            s     <= '0;
            vec   <= '0;
            state <= G_SCAN;
          end
        end
        G_SCAN: begin
          if (ucnt == tgt_l) state <= G_EVAL;
          else if (32'(pos) >= N_CELLS) state <= G_DONE;
          else if (unit_start && 32'(s) == S_MAX) begin      // vector too long: step 5
            head    <= head + (AW+1)'(L_C);
            pos     <= head + (AW+1)'(L_C);
            n_step5 <= n_step5 + 1;
            state   <= G_STEP1;
          end else if (unit_start && !u_usable) begin         // step over the unit
            s   <= s + 1'b1;
            pos <= pos + (AW+1)'(L_C);
          end else begin
            if (unit_start) begin
              vec[s[$clog2(S_MAX)-1:0]] <= 1'b1;
              s <= s + 1'b1;
            end
            tdef <= tdef + (AW+1)'(dm_defect);
            ucnt <= ucnt + 1'b1;
            pos  <= pos + 1'b1;
          end
        end
        G_EVAL: begin
          if ((AW+2)'(t_tab[code]) >= need_d) begin           // step 3 -> step 6
            chead     <= pos;
            state     <= G_CSTEP1;
          end else if (found_d) begin                          // step 4
            code    <= up_d;
            tgt_l   <= (AW+1)'(L_U) + (AW+1)'(r_tab[up_d]);
            n_step4 <= n_step4 + 1;
            state   <= G_SCAN;
          end else begin                                       // step 5
            head    <= head + (AW+1)'(L_C);
            pos     <= head + (AW+1)'(L_C);
            n_step5 <= n_step5 + 1;
            state   <= G_STEP1;
          end
        end
        // step 6: two-level placement of the first-level word
        G_CSTEP1: begin
          if (32'(chead) + L1_FIX + 32'(s) > N_CELLS) state <= G_DONE;
          else begin
            cpos      <= chead;
            ctgt      <= chead + (AW+1)'(L1_FIX) + (AW+1)'(s);
            ctdef     <= '0;
            ccode     <= '0;
            cfd_valid <= 1'b0;
            state     <= G_CSCAN;
          end
        end
        G_CSCAN: begin
          if (cpos == ctgt) state <= G_CEVAL;
          else if (32'(cpos) >= N_CELLS) state <= G_DONE;
          else begin
            ctdef <= ctdef + (AW+1)'(dm_defect);
            if (dm_defect && !cfd_valid) begin
              cfd       <= cpos;
              cfd_valid <= 1'b1;
            end
            cpos <= cpos + 1'b1;
          end
        end
        G_CEVAL: begin
          if ((AW+2)'(t_tab[ccode]) >= need_c) begin
            if (emit_ready) begin
              num_seg <= num_seg + 1'b1;
              head    <= unit_up(ctgt);
              pos     <= unit_up(ctgt);
              state   <= (32'(num_seg) + 1 == MAX_SEG) ? G_DONE : G_STEP1;
            end
          end else if (found_c) begin
            ccode       <= up_c;
            ctgt        <= chead + (AW+1)'(L1_FIX) + (AW+1)'(s) + (AW+1)'(r_tab[up_c]);
            n_cfg_step4 <= n_cfg_step4 + 1;
            state       <= G_CSCAN;
          end else begin
            chead       <= cfd_valid ? cfd + 1'b1 : chead + 1'b1;
            n_cfg_step5 <= n_cfg_step5 + 1;
            state       <= G_CSTEP1;
          end
        end
        default: state <= G_IDLE;
      endcase
    end
  end

endmodule
