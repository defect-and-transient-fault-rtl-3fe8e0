// seg_alloc2: allocation engine of the two-level hierarchical fault
// tolerance scheme.  It walks the defect map of the nanodevice array once
// (with restarts) and cuts it into segments, each holding one codeword of
// L_U user bits plus the parity of the weakest BCH code of the group that
// covers both the defects inside the segment and the transient faults
// expected for its length.
//
// Procedure (one cell of the defect map per cycle):
//   step 1  tail <- head + L_U; t_c <- 0 (code 0); count defects in the span
//   step 2  need = t_def + t_trans[code]   (t_trans is an input table)
//   step 3  t_c >= need: store {head/ALIGN, code} as the next logical block,
//           head <- tail rounded up to a multiple of ALIGN, go to step 1
//   step 4  t_c < need <= T_MAX: code <- weakest code with t >= need,
//           extend the span to L_U + r(code) cells (only the new cells are
//           counted), go to step 2
//   step 5  need > T_MAX: head <- just past the first defective cell of the
//           span, rounded up to ALIGN, go to step 1
// It stops when a span would run past the end of the array or the CMOS
// table is full.  t_trans[i] is the transient-error allowance for a word of
// L_U + r_i bits, the smallest t meeting the target block error rate
// (equation (1)); it is computed off chip, being a fixed function of the
// fault rate and the target.  Counters report how often steps 3, 4 and 5
// were taken.
// Interface: start/busy/done; defect map read dm_addr -> dm_defect (same
// cycle); table writes cfg_we/cfg_waddr/cfg_wdata; num_seg.
// From the document: the steps, the pointers, the alignment.  This design's
// own: one cell per cycle, incremental counting, table-driven t_trans.
module seg_alloc2
  import bch_pkg::*;
#(
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned L_U     = 512,
  parameter int unsigned ALIGN   = 64,
  parameter int unsigned T_MAX   = 57,
  parameter int unsigned R_MAX   = 510,
  parameter int unsigned MAX_SEG = N_CELLS / L_U,
  localparam int unsigned AW     = $clog2(N_CELLS),
  localparam int unsigned HW     = $clog2(N_CELLS / ALIGN),
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
  output logic              cfg_we,
  output logic [SW-1:0]     cfg_waddr,
  output logic [HW+CODE_W-1:0] cfg_wdata,
  output logic [SW:0]       num_seg,
  output logic [31:0]       n_step4,
  output logic [31:0]       n_step5
);

  typedef enum logic [2:0] {A_IDLE, A_STEP1, A_SCAN, A_EVAL, A_DONE} state_t;
  state_t state;

  logic [AW:0]          head, pos, tgt, first_def;
  logic                 fd_valid;
  logic [AW:0]          t_def;
  logic [CODE_W-1:0]    code, code_up;
  logic [AW+1:0]        need;
  logic                 found;

  function automatic logic [AW:0] align_up(logic [AW+1:0] x);
    logic [AW+1:0] y = (x + (AW+2)'(ALIGN - 1)) / (AW+2)'(ALIGN);
    return (AW+1)'(y * (AW+2)'(ALIGN));
  endfunction

  assign need = (AW+2)'(t_def) + (AW+2)'(t_trans[code]);

  // weakest code able to correct `need` errors
  always_comb begin
    code_up = code;
    found   = 1'b0;
    for (int i = NUM_CODES - 1; i >= 0; i--)
      if ((AW+2)'(t_tab[i]) >= need) begin
        code_up = CODE_W'(i);
        found   = 1'b1;
      end
  end

  assign dm_addr   = pos[AW-1:0];
  assign busy      = (state != A_IDLE) && (state != A_DONE);
  assign done      = (state == A_DONE);
  assign cfg_we    = (state == A_EVAL) && ((AW+2)'(t_tab[code]) >= need);
  assign cfg_waddr = num_seg[SW-1:0];
  assign cfg_wdata = {head[AW-1:$clog2(ALIGN)], code};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= A_IDLE;
      head      <= '0;
      pos       <= '0;
      tgt       <= '0;
      first_def <= '0;
      fd_valid  <= 1'b0;
      t_def     <= '0;
      code      <= '0;
      num_seg   <= '0;
      n_step4   <= '0;
      n_step5   <= '0;
    end else begin
      case (state)
        A_IDLE, A_DONE: if (start) begin
          head    <= '0;
          num_seg <= '0;
          n_step4 <= '0;
          n_step5 <= '0;
          state   <= A_STEP1;
        end
        A_STEP1: begin
          if (32'(head) + L_U > N_CELLS) state <= A_DONE;
          else begin
            pos      <= head;
            tgt      <= head + (AW+1)'(L_U);
            t_def    <= '0;
            code     <= '0;
            fd_valid <= 1'b0;
            state    <= A_SCAN;
          end
        end
        A_SCAN: begin
          if (pos == tgt) state <= A_EVAL;
          else if (32'(pos) >= N_CELLS) state <= A_DONE;
          else begin
            t_def <= t_def + (AW+1)'(dm_defect);
            if (dm_defect && !fd_valid) begin
              first_def <= pos;
              fd_valid  <= 1'b1;
            end
            pos <= pos + 1'b1;
          end
        end
        A_EVAL: begin
          if ((AW+2)'(t_tab[code]) >= need) begin            // step 3
            num_seg <= num_seg + 1'b1;
            head    <= align_up((AW+2)'(tgt));
            state   <= (32'(num_seg) + 1 == MAX_SEG) ? A_DONE : A_STEP1;
          end else if (found) begin                          // step 4
            code    <= code_up;
            tgt     <= head + (AW+1)'(L_U) + (AW+1)'(r_tab[code_up]);
            n_step4 <= n_step4 + 1;
            state   <= A_SCAN;
          end else begin                                     // step 5
            head    <= align_up(fd_valid ? (AW+2)'(first_def) + 1'b1 : (AW+2)'(head) + 1'b1);
            n_step5 <= n_step5 + 1;
            state   <= A_STEP1;
          end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

endmodule
