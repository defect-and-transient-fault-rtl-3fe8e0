// ft_mem_ctrl: access controller of the two-level fault-tolerant memory.
//
// Every access to a logical block first reads its entry from the CMOS
// configuration memory (segment head and code designation), then:
//  write: loads the chosen code into the shared BCH encoder and streams
//         the L_U user bits (bit L_U-1 first) through it; each code bit is
//         written to the next nanodevice cell from the segment head on,
//         L_U + r cells in all.
//  read:  reads the same L_U + r cells one per cycle into the shared BCH
//         decoder with the code's length and t; the first L_U corrected
//         bits are the user data, the parity is dropped.
// One access at a time.  Timing per access: 2 cycles of table lookup, then
// a write takes L_U + r cycles; a read takes the decoder latency
// (L_U + r + 2t + T_MAX + 3 edges to the first bit) plus L_U + r cycles.
// An address at or beyond the number of allocated segments is answered
// at once with resp_fail.
// Interface: req_valid/req_ready/req_write/req_addr/req_wdata ->
// resp_valid (one cycle) with resp_rdata, resp_fail (decoder reported an
// uncorrectable word) and resp_nfix (bits corrected).  The two-step access
// follows the document; everything else is this design's choice.
module ft_mem_ctrl
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
  localparam int unsigned RW     = $clog2(R_MAX + 1),
  localparam int unsigned NW     = $clog2(L_U + R_MAX + 1),
  localparam int unsigned KW     = $clog2(L_U + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
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
  // CMOS configuration memory
  output logic [SW-1:0]        cfg_raddr,
  input  logic [HW+CODE_W-1:0] cfg_rdata,
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

  typedef enum logic [2:0] {M_IDLE, M_LOOK, M_CFG, M_WSTART, M_WRITE, M_READ, M_COLLECT, M_RESP} state_t;
  state_t state;

  logic              wr_q;
  logic [L_U-1:0]    data_q;
  logic [AW-1:0]     ptr;
  logic [CODE_W-1:0] code_q;
  logic [NW-1:0]     len, issued, outcnt;
  logic              rd_pending;
  logic              fail_q;
  logic [NW-1:0]     nfix;

  assign req_ready  = (state == M_IDLE);
  assign cfg_raddr  = req_addr;
  assign code_sel   = code_q;
  assign enc_r      = r_tab[code_q];
  assign enc_k      = KW'(L_U);
  assign enc_start  = (state == M_WSTART);
  assign enc_din_valid = (state == M_WRITE) && enc_din_ready;
  assign enc_din    = data_q[L_U-1];
  assign dec_len    = len;
  assign dec_t      = t_tab[code_q];
  assign dec_in_valid = rd_pending;
  assign dec_in_bit = nano_rdata;
  assign dec_out_ready = 1'b1;
  assign nano_addr  = ptr;
  assign nano_we    = (state == M_WRITE) && enc_dout_valid;
  assign nano_wdata = enc_dout;
  assign nano_re    = (state == M_READ) && (issued != len);
  assign resp_valid = (state == M_RESP);
  assign resp_rdata = data_q;
  assign resp_fail  = fail_q;
  assign resp_nfix  = nfix;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= M_IDLE;
      wr_q       <= 1'b0;
      data_q     <= '0;
      ptr        <= '0;
      code_q     <= '0;
      len        <= '0;
      issued     <= '0;
      outcnt     <= '0;
      rd_pending <= 1'b0;
      fail_q     <= 1'b0;
      nfix       <= '0;
    end else begin
      rd_pending <= nano_re;
      case (state)
        M_IDLE: if (req_valid) begin
          wr_q   <= req_write;
          data_q <= req_write ? req_wdata : '0;
          fail_q <= 1'b0;
          nfix   <= '0;
          if ((SW+1)'(req_addr) >= num_seg) begin
            fail_q <= 1'b1;
            state  <= M_RESP;
          end else state <= M_LOOK;
        end
        M_LOOK: state <= M_CFG;                  // synchronous table read
        M_CFG: begin
          ptr    <= AW'({cfg_rdata[HW+CODE_W-1:CODE_W], {$clog2(ALIGN){1'b0}}});
          code_q <= cfg_rdata[CODE_W-1:0];
          len    <= NW'(L_U) + NW'(r_tab[cfg_rdata[CODE_W-1:0]]);
          issued <= '0;
          outcnt <= '0;
          state  <= wr_q ? M_WSTART : M_READ;
        end
        M_WSTART: state <= M_WRITE;
        M_WRITE: begin
          if (enc_din_valid) data_q <= data_q << 1;
          if (enc_dout_valid) ptr <= ptr + 1'b1;
          if (enc_done) state <= M_RESP;
        end
        M_READ: begin
          if (nano_re) begin
            ptr    <= ptr + 1'b1;
            issued <= issued + 1'b1;
          end
          if (dec_out_valid) state <= M_COLLECT;
        end
        M_COLLECT: ;
        M_RESP: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
      // decoder output: keep the first L_U bits
      if ((state == M_READ || state == M_COLLECT) && dec_out_valid) begin
        if (32'(outcnt) < L_U) data_q <= {data_q[L_U-2:0], dec_out_bit};
        outcnt <= outcnt + 1'b1;
        nfix   <= nfix + NW'(dec_out_err);
        if (dec_out_last) begin
          fail_q <= dec_out_fail;
          state  <= M_RESP;
        end
      end
    end
  end

  a_dec_ready: assert property (@(posedge clk) disable iff (!rst_n) dec_in_valid |-> dec_in_ready);

endmodule
