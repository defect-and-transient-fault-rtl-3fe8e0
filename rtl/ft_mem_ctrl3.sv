// ft_mem_ctrl3: access controller of the three-level fault-tolerant memory.
//
// Storing (bring-up): each first-level configuration word produced by the
// three-level planner (seg_alloc3) is taken on store_valid/store_ready,
// encoded with the code the planner chose for it (shortened to the word's
// length) and written into consecutive nanodevice cells from its head.
// Word layout, first bit written first: vec[s-1] .. vec[0], head unit
// (UW bits, MSB first), s (SBW bits), data code (CODE_W bits); L1_FIX + s
// bits in all, so the fixed fields land at fixed positions on read-back.
//
// Access: a request for logical block a
//  1. reads the second-level CMOS entry a = {word head, word code, s};
//  2. reads and decodes the first-level word (L1_FIX + s + r cells);
//  3. checks that the decoded s equals the CMOS s, then writes or reads
//     the data codeword (L_U + r bits) through the shared encoder or
//     decoder, cell by cell from the head unit, jumping over every unit
//     whose vector bit is 0.
// An uncorrectable first-level word, an s mismatch or an address at or
// beyond the number of planned segments fails the access.
// Timing, request accepted to response, with n1/t1 the length and strength
// of the first-level word and n2/t2/r2 those of the data word:
//   read  (2 n1 + 2 t1 + T_MAX + 6) + (2 n2 + 2 t2 + T_MAX + 6) cycles,
//   write (2 n1 + 2 t1 + T_MAX + 6) + 3 + L_U + r2 cycles.
// A store takes one encoder pass over the L1_FIX + s + r bits.
// Interface as ft_mem_ctrl (req_*/resp_*, encoder, decoder and nano ports)
// plus the store port and the second-level table read port.
// From the document: the two decodings per access and the content of both
// configuration levels.  This design's own: the bit layout of the word,
// the s consistency check, the handshakes and the cycle timing.
module ft_mem_ctrl3
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
  localparam int unsigned LCW    = $clog2(L_C),
  localparam int unsigned L1_FIX = UW + SBW + CODE_W,
  localparam int unsigned SW     = $clog2(MAX_SEG),
  localparam int unsigned TW     = $clog2(T_MAX + 1),
  localparam int unsigned RW     = $clog2(R_MAX + 1),
  localparam int unsigned NW     = $clog2(L_U + R_MAX + 1),
  localparam int unsigned KW     = $clog2(L_U + 1),
  localparam int unsigned CW2    = AW + CODE_W + SBW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // first-level words from the planner
  input  logic                 store_valid,
  output logic                 store_ready,
  input  logic [UW-1:0]        store_head_unit,
  input  logic [SBW-1:0]       store_s,
  input  logic [CODE_W-1:0]    store_code,
  input  logic [S_MAX-1:0]     store_vec,
  input  logic [AW-1:0]        store_cfg_head,
  input  logic [CODE_W-1:0]    store_cfg_code,
  output logic                 idle,
  // requests
  input  logic                 req_valid,
  output logic                 req_ready,
  input  logic                 req_write,
  input  logic [SW-1:0]        req_addr,
  input  logic [L_U-1:0]       req_wdata,
  output logic                 resp_valid,
  output logic [L_U-1:0]       resp_rdata,
  output logic                 resp_fail,
  output logic [NW-1:0]        resp_nfix,
  // second-level CMOS table {word head, word code, s}
  output logic [SW-1:0]        cfg_raddr,
  input  logic [CW2-1:0]       cfg_rdata,
  input  logic [SW:0]          num_seg,
  // code table
  input  logic [TW-1:0]        t_tab [NUM_CODES],
  input  logic [RW-1:0]        r_tab [NUM_CODES],
  output logic [CODE_W-1:0]    code_sel,
  // encoder
  output logic                 enc_start,
  output logic [RW-1:0]        enc_r,
  output logic [KW-1:0]        enc_k,
  input  logic                 enc_din_ready,
  output logic                 enc_din_valid,
  output logic                 enc_din,
  input  logic                 enc_dout_valid,
  input  logic                 enc_dout,
  input  logic                 enc_done,
  // decoder
  output logic                 dec_in_valid,
  input  logic                 dec_in_ready,
  output logic                 dec_in_bit,
  output logic [NW-1:0]        dec_len,
  output logic [TW-1:0]        dec_t,
  input  logic                 dec_out_valid,
  output logic                 dec_out_ready,
  input  logic                 dec_out_bit,
  input  logic                 dec_out_last,
  input  logic                 dec_out_err,
  input  logic                 dec_out_fail,
  // nanodevice array
  output logic [AW-1:0]        nano_addr,
  output logic                 nano_we,
  output logic                 nano_wdata,
  output logic                 nano_re,
  input  logic                 nano_rdata
);

  typedef enum logic [3:0] {
    X_IDLE, X_LOOK, X_CFG, X_PARSE, X_WSTART, X_WRITE, X_READ, X_COLLECT, X_RESP
  } state_t;
  state_t state;

  logic              wr_q, store_q, data_ph;   // data_ph: data word (not first-level)
  logic [L_U-1:0]    data_q, wdata_q;
  logic [AW-1:0]     ptr;
  logic [UW-1:0]     hunit;
  logic [SBW-1:0]    s_q;
  logic [S_MAX-1:0]  vec_q;
  logic [$clog2(S_MAX)-1:0] u_q, u_nxt;
  logic [CODE_W-1:0] code_q;
  logic [KW-1:0]     k_q;
  logic [NW-1:0]     len, issued, outcnt;
  logic              rd_pending, fail_q;
  logic [NW-1:0]     nfix;
  logic [AW-1:0]     ptr_nxt;

  // next unit of the segment whose vector bit is 1
  always_comb begin
    u_nxt = u_q;
    for (int j = S_MAX - 1; j >= 0; j--)
      if (j > int'(u_q) && vec_q[j]) u_nxt = $clog2(S_MAX)'(j);
  end

  // next cell: consecutive, except at the end of a unit in a data word
  always_comb begin
    if (data_ph && (&ptr[LCW-1:0]))
      ptr_nxt = AW'((32'(hunit) + 32'(u_nxt)) * L_C);
    else
      ptr_nxt = ptr + 1'b1;
  end

  // first-level word, left-aligned in an L_U-bit shift register
  function automatic logic [L_U-1:0] l1_word(logic [S_MAX-1:0] v, logic [UW-1:0] hu,
                                              logic [SBW-1:0] s, logic [CODE_W-1:0] c);
    logic [L_U-1:0] w;
    w = L_U'({hu, s, c});
    for (int j = 0; j < S_MAX; j++)
      if (j < int'(s)) w[L1_FIX + j] = v[j];
    return w << (L_U - L1_FIX - int'(s));
  endfunction

  assign idle        = (state == X_IDLE);
  assign store_ready = (state == X_IDLE);
  assign req_ready   = (state == X_IDLE) && !store_valid;
  assign cfg_raddr   = req_addr;
  assign code_sel    = code_q;
  assign enc_r       = r_tab[code_q];
  assign enc_k       = k_q;
  assign enc_start   = (state == X_WSTART);
  assign enc_din_valid = (state == X_WRITE) && enc_din_ready;
  assign enc_din     = data_q[L_U-1];
  assign dec_len     = len;
  assign dec_t       = t_tab[code_q];
  assign dec_in_valid = rd_pending;
  assign dec_in_bit  = nano_rdata;
  assign dec_out_ready = 1'b1;
  assign nano_addr   = ptr;
  assign nano_we     = (state == X_WRITE) && enc_dout_valid;
  assign nano_wdata  = enc_dout;
  assign nano_re     = (state == X_READ) && (issued != len);
  assign resp_valid  = (state == X_RESP) && !store_q;
  assign resp_rdata  = data_q;
  assign resp_fail   = fail_q;
  assign resp_nfix   = nfix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= X_IDLE;
      wr_q <= 1'b0; store_q <= 1'b0; data_ph <= 1'b0;
      data_q <= '0; wdata_q <= '0; ptr <= '0; hunit <= '0; s_q <= '0;
      vec_q <= '0; u_q <= '0; code_q <= '0; k_q <= '0; len <= '0;
      issued <= '0; outcnt <= '0; rd_pending <= 1'b0; fail_q <= 1'b0; nfix <= '0;
    end else begin
      rd_pending <= nano_re;
      case (state)
        X_IDLE: begin
          data_ph <= 1'b0;
          fail_q  <= 1'b0;
          nfix    <= '0;
          issued  <= '0;
          outcnt  <= '0;
          if (store_valid) begin
            store_q <= 1'b1;
            data_q  <= l1_word(store_vec, store_head_unit, store_s, store_code);
            ptr     <= store_cfg_head;
            code_q  <= store_cfg_code;
            k_q     <= KW'(L1_FIX) + KW'(store_s);
            state   <= X_WSTART;
          end else if (req_valid) begin
            store_q <= 1'b0;
            data_q  <= '0;
            wr_q    <= req_write;
            wdata_q <= req_wdata;
            if ((SW+1)'(req_addr) >= num_seg) begin
              fail_q <= 1'b1;
              state  <= X_RESP;
            end else state <= X_LOOK;
          end
        end
        X_LOOK: state <= X_CFG;                  // synchronous table read
        X_CFG: begin                             // first-level word: always read
          ptr    <= cfg_rdata[CW2-1 -: AW];
          code_q <= cfg_rdata[SBW +: CODE_W];
          s_q    <= cfg_rdata[SBW-1:0];
          k_q    <= KW'(L1_FIX) + KW'(cfg_rdata[SBW-1:0]);
          len    <= NW'(L1_FIX) + NW'(cfg_rdata[SBW-1:0]) + NW'(r_tab[cfg_rdata[SBW +: CODE_W]]);
          state  <= X_READ;
        end
        X_PARSE: begin                           // decoded first-level word in data_q
          if (fail_q || data_q[CODE_W +: SBW] != s_q) begin
            fail_q <= 1'b1;
            state  <= X_RESP;
          end else begin
            hunit   <= data_q[CODE_W + SBW +: UW];
            code_q  <= data_q[CODE_W-1:0];
            vec_q   <= data_q[L1_FIX +: S_MAX] & ((S_MAX'(1) << s_q) - 1'b1);
            u_q     <= '0;
            ptr     <= AW'(32'(data_q[CODE_W + SBW +: UW]) * L_C);
            k_q     <= KW'(L_U);
            len     <= NW'(L_U) + NW'(r_tab[data_q[CODE_W-1:0]]);
            data_ph <= 1'b1;
            issued  <= '0;
            outcnt  <= '0;
            data_q  <= wr_q ? wdata_q : '0;
            state   <= wr_q ? X_WSTART : X_READ;
          end
        end
        X_WSTART: state <= X_WRITE;
        X_WRITE: begin
          if (enc_din_valid) data_q <= data_q << 1;
          if (enc_dout_valid) begin
            ptr <= ptr_nxt;
            if (data_ph && (&ptr[LCW-1:0])) u_q <= u_nxt;
          end
          if (enc_done) state <= X_RESP;
        end
        X_READ: begin
          if (nano_re) begin
            ptr    <= ptr_nxt;
            issued <= issued + 1'b1;
            if (data_ph && (&ptr[LCW-1:0])) u_q <= u_nxt;
          end
          if (dec_out_valid) state <= X_COLLECT;
        end
        X_COLLECT: ;
        X_RESP: state <= X_IDLE;
        default: state <= X_IDLE;
      endcase
      // decoder output: keep the first k bits
      if ((state == X_READ || state == X_COLLECT) && dec_out_valid) begin
        if (outcnt < NW'(k_q)) data_q <= {data_q[L_U-2:0], dec_out_bit};
        outcnt <= outcnt + 1'b1;
        nfix   <= nfix + NW'(dec_out_err);
        if (dec_out_last) begin
          fail_q <= fail_q | dec_out_fail;
          state  <= data_ph ? X_RESP : X_PARSE;
        end
      end
    end
  end

  a_dec_ready: assert property (@(posedge clk) disable iff (!rst_n) dec_in_valid |-> dec_in_ready);

endmodule
