// hybrid_mem_top: a hybrid CMOS/nanodevice memory with defect and
// transient fault tolerance, offering both the two-level and the
// three-level hierarchical scheme over one nanodevice cell array.
//
// One nanodevice cell array (modelled behaviourally) stores BCH codewords
// in segments; the CMOS side holds the code group, one shared serial BCH
// encoder and decoder, and for each scheme its allocation engine, its
// CMOS configuration table and its access controller:
//   two-level:   seg_alloc2 -> u_cfg {head/ALIGN, code} -> ft_mem_ctrl
//   three-level: unit_classifier + seg_alloc3 -> first-level words stored
//                in the array by ft_mem_ctrl3, u_cfg3 {word head, word
//                code, s} -> ft_mem_ctrl3
// Bring-up: pulse init_start.  The code table builds its generator
// polynomials; then the two-level allocator, the unit classifier and the
// three-level planner run in turn (the planner waits while ft_mem_ctrl3
// encodes and writes each first-level word).  init_done rises when all
// have finished; num_seg / num_seg3 tell how many L_U-bit logical blocks
// each scheme offers.  t_trans gives, per code i, the transient-error
// allowance for a word of L_U + r_i bits (equation (1), computed off chip).
// Accesses use the req/resp ports; mode3 selects which scheme serves them
// (0: two-level, 1: three-level).  Both schemes place data in the same
// cells, so after using mode3 = 0 a new bring-up is needed before
// mode3 = 1 (it rewrites the first-level words); mode3 must only change
// while no access is in flight.  The def_* port places defects in the
// array model and tf_ppm sets its transient fault rate; both are there
// for simulation only.
// Timing: see ft_mem_ctrl and ft_mem_ctrl3; one access at a time.
// code_t_tab is fixed by T_MAX (t_i = round(i t_max / 7)), so its bits are
// constants; it is brought out so the off-chip t_trans table can be made
// for the codes actually in use.
// Default sizes: code group on GF(2^10) (t_max 57, r_max 510), 512 user
// bits per block, a 512 x 512 array (262144 addressable cells), segment
// heads aligned to 64 cells, 32-cell indivisible units.
// From the document: the two schemes, their procedures and table
// contents.  This design's own: keeping both in one top with a mode
// input, the bring-up order, all handshakes and timing.
module hybrid_mem_top
  import bch_pkg::*;
#(
  parameter int unsigned M       = 10,
  parameter int unsigned T_MAX   = 57,
  parameter int unsigned R_MAX   = 510,
  parameter int unsigned L_U     = 512,
  parameter int unsigned N_CELLS = 262144,
  parameter int unsigned ALIGN   = 64,
  parameter int unsigned L_C     = 32,
  parameter int unsigned S_MAX   = 64,
  localparam int unsigned N_MAX  = (1 << M) - 1,
  localparam int unsigned MAX_SEG = N_CELLS / L_U,
  localparam int unsigned AW     = $clog2(N_CELLS),
  localparam int unsigned HW     = $clog2(N_CELLS / ALIGN),
  localparam int unsigned SW     = $clog2(MAX_SEG),
  localparam int unsigned TW     = $clog2(T_MAX + 1),
  localparam int unsigned RW     = $clog2(R_MAX + 1),
  localparam int unsigned NW     = $clog2(L_U + R_MAX + 1),
  localparam int unsigned UW     = $clog2(N_CELLS / L_C),
  localparam int unsigned SBW    = $clog2(S_MAX + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // bring-up
  input  logic            init_start,
  output logic            init_done,
  input  logic [TW-1:0]   t_trans [NUM_CODES],
  output logic [SW:0]     num_seg,
  output logic [TW-1:0]   code_t_tab [NUM_CODES],
  output logic [RW-1:0]   code_r_tab [NUM_CODES],
  output logic [31:0]     n_step4,
  output logic [31:0]     n_step5,
  // three-level plan of the same array: first-level words and counters
  output logic            l1_valid,
  output logic [UW-1:0]   l1_head_unit,
  output logic [SBW-1:0]  l1_s,
  output logic [CODE_W-1:0] l1_code,
  output logic [S_MAX-1:0] l1_vec,
  output logic [SW:0]     num_seg3,
  output logic [UW:0]     n_unusable,
  output logic [31:0]     n3_step4,
  output logic [31:0]     n3_step5,
  // logical block access; mode3 selects the scheme that serves it
  input  logic            mode3,
  input  logic            req_valid,
  output logic            req_ready,
  input  logic            req_write,
  input  logic [SW-1:0]   req_addr,
  input  logic [L_U-1:0]  req_wdata,
  output logic            resp_valid,
  output logic [L_U-1:0]  resp_rdata,
  output logic            resp_fail,
  output logic [NW-1:0]   resp_nfix,
  // nanodevice array model: defect placement and transient fault rate
  input  logic            def_we,
  input  logic [AW-1:0]   def_addr,
  input  logic            def_defect,
  input  logic            def_stuck,
  input  logic [19:0]     tf_ppm,
  output logic [31:0]     tf_count
);

  // signals one access controller drives towards the shared codec and array
  typedef struct packed {
    logic [CODE_W-1:0]        code_sel;
    logic                     enc_start;
    logic [RW-1:0]            enc_r;
    logic [$clog2(L_U+1)-1:0] enc_k;
    logic                     enc_din_valid;
    logic                     enc_din;
    logic                     dec_in_valid;
    logic                     dec_in_bit;
    logic [NW-1:0]            dec_len;
    logic [TW-1:0]            dec_t;
    logic                     dec_out_ready;
    logic [AW-1:0]            nano_addr;
    logic                     nano_we;
    logic                     nano_wdata;
    logic                     nano_re;
  } ctrl_bus_t;

  // ---------------- code group ----------------
  logic              tab_ready, tab_ovf;
  logic [CODE_W-1:0] code_sel;
  logic [R_MAX:0]    g_sel;

  bch_code_table #(.M(M), .T_MAX(T_MAX), .R_MAX(R_MAX)) u_codes (
    .clk, .rst_n, .start(init_start), .ready(tab_ready), .overflow(tab_ovf),
    .t_tab(code_t_tab), .r_tab(code_r_tab), .g_code(code_sel), .g_sel);

  // ---------------- bring-up sequencing ----------------
  // code table -> two-level allocation -> unit classification ->
  // three-level allocation, each started when the previous one is done
  logic alloc_start, alloc_busy, alloc_done, init_pend;
  logic cls_start, cls_busy, cls_done, a3_start, a3_busy, a3_done;
  logic [1:0] phase;
  logic c3_idle, c3_store_ready;   // three-level controller (below)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_pend <= 1'b0;
      phase     <= '0;
    end else if (init_start) begin
      init_pend <= 1'b1;
      phase     <= '0;
    end else begin
      if (tab_ready) init_pend <= 1'b0;
      if (alloc_start) phase <= 2'd1;
      if (cls_start)   phase <= 2'd2;
      if (a3_start)    phase <= 2'd3;
    end
  end
  assign alloc_start = init_pend && tab_ready;
  assign cls_start   = (phase == 2'd1) && alloc_done;
  assign a3_start    = (phase == 2'd2) && cls_done;
  assign init_done   = (phase == 2'd3) && a3_done && alloc_done && c3_idle;

  // ---------------- nanodevice array ----------------
  logic [AW-1:0] nano_addr, dm_addr, dm_addr2, dm_addr_c, dm_addr3;
  logic          nano_we, nano_wdata, nano_re, nano_rdata, dm_defect;

  // the defect map serves one allocation step at a time
  assign dm_addr = alloc_busy ? dm_addr2 : cls_busy ? dm_addr_c : dm_addr3;

  nano_mem_array #(.N_CELLS(N_CELLS)) u_nano (
    .clk, .addr(nano_addr), .we(nano_we), .wdata(nano_wdata), .re(nano_re),
    .rdata(nano_rdata), .dm_addr, .dm_defect, .def_we, .def_addr, .def_defect,
    .def_stuck, .tf_ppm, .tf_count);

  // ---------------- allocation and CMOS configuration memory ----------------
  logic                 cfg_we;
  logic [SW-1:0]        cfg_waddr, cfg_raddr;
  logic [HW+CODE_W-1:0] cfg_wdata, cfg_rdata;
  logic [SW:0]          cfg_count;

  seg_alloc2 #(.N_CELLS(N_CELLS), .L_U(L_U), .ALIGN(ALIGN), .T_MAX(T_MAX),
               .R_MAX(R_MAX), .MAX_SEG(MAX_SEG)) u_alloc (
    .clk, .rst_n, .start(alloc_start), .busy(alloc_busy), .done(alloc_done),
    .t_tab(code_t_tab), .r_tab(code_r_tab), .t_trans, .dm_addr(dm_addr2), .dm_defect,
    .cfg_we, .cfg_waddr, .cfg_wdata, .num_seg, .n_step4, .n_step5);

  cmos_config_mem #(.DEPTH(MAX_SEG), .W(HW + CODE_W)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .clear(alloc_start), .raddr(cfg_raddr), .rdata(cfg_rdata), .count(cfg_count));

  // ---------------- three-level allocation ----------------
  logic [UW-1:0]     u_addr;
  logic              u_usable, emit3;
  logic [SW-1:0]     emit3_idx;
  logic [AW-1:0]     l2_cfg_head;
  logic [CODE_W-1:0] l2_cfg_code;
  logic [31:0]       n3_cfg_step4, n3_cfg_step5;
  logic [AW+CODE_W+SBW-1:0] l2_rdata;
  logic [SW:0]       l2_count;
  logic [SW-1:0]     l2_raddr;

  unit_classifier #(.N_CELLS(N_CELLS), .L_C(L_C), .M(M)) u_units (
    .clk, .rst_n, .start(cls_start), .busy(cls_busy), .done(cls_done),
    .dm_addr(dm_addr_c), .dm_defect, .u_addr, .u_usable, .n_unusable);

  seg_alloc3 #(.N_CELLS(N_CELLS), .L_U(L_U), .L_C(L_C), .T_MAX(T_MAX),
               .R_MAX(R_MAX), .S_MAX(S_MAX), .MAX_SEG(MAX_SEG)) u_alloc3 (
    .clk, .rst_n, .start(a3_start), .busy(a3_busy), .done(a3_done),
    .t_tab(code_t_tab), .r_tab(code_r_tab), .t_trans, .dm_addr(dm_addr3), .dm_defect,
    .u_addr, .u_usable, .emit(emit3), .emit_ready(c3_store_ready), .emit_idx(emit3_idx), .l1_head_unit, .l1_s,
    .l1_code, .l1_vec, .l2_cfg_head, .l2_cfg_code, .num_seg(num_seg3),
    .n_step4(n3_step4), .n_step5(n3_step5), .n_cfg_step4(n3_cfg_step4),
    .n_cfg_step5(n3_cfg_step5));

  assign l1_valid = emit3;

  // second-level configuration of the three-level plan: {head, code, s}
  cmos_config_mem #(.DEPTH(MAX_SEG), .W(AW + CODE_W + SBW)) u_cfg3 (
    .clk, .rst_n, .we(emit3), .waddr(emit3_idx), .wdata({l2_cfg_head, l2_cfg_code, l1_s}),
    .clear(a3_start), .raddr(l2_raddr), .rdata(l2_rdata), .count(l2_count));

  // ---------------- shared BCH encoder and decoder ----------------
  logic                 enc_start, enc_busy, enc_din_ready, enc_din_valid, enc_din;
  logic                 enc_dout_valid, enc_dout, enc_done;
  logic [RW-1:0]        enc_r;
  logic [$clog2(L_U+1)-1:0] enc_k;
  logic                 dec_in_valid, dec_in_ready, dec_in_bit;
  logic [NW-1:0]        dec_len;
  logic [TW-1:0]        dec_t;
  logic                 dec_out_valid, dec_out_ready, dec_out_bit, dec_out_last;
  logic                 dec_out_err, dec_out_fail;

  bch_encoder #(.R_MAX(R_MAX), .K_MAX(L_U)) u_enc (
    .clk, .rst_n, .start(enc_start), .g(g_sel), .r(enc_r), .k_len(enc_k),
    .busy(enc_busy), .din_ready(enc_din_ready), .din_valid(enc_din_valid),
    .din(enc_din), .dout_valid(enc_dout_valid), .dout(enc_dout), .done(enc_done));

  bch_decoder #(.M(M), .T_MAX(T_MAX), .N_MAX(N_MAX),
                .FIFO_DEPTH(2 * (N_MAX + 1))) u_dec (
    .clk, .rst_n, .in_valid(dec_in_valid), .in_ready(dec_in_ready),
    .in_bit(dec_in_bit), .cw_len($clog2(N_MAX+1)'(dec_len)), .cw_t(dec_t),
    .out_valid(dec_out_valid), .out_ready(dec_out_ready), .out_bit(dec_out_bit),
    .out_last(dec_out_last), .out_err(dec_out_err), .out_fail(dec_out_fail));

  // ---------------- access controllers ----------------
  // mode3 = 0: blocks are served through the two-level table (ft_mem_ctrl);
  // mode3 = 1: through the three-level plan (ft_mem_ctrl3).  The shared
  // encoder, decoder and array port follow whichever controller is busy;
  // ft_mem_ctrl3 is also busy at bring-up while it stores first-level words.
  logic                 c2_req_ready, c2_resp_valid, c2_resp_fail;
  logic                 c3_req_ready, c3_resp_valid, c3_resp_fail;
  logic [L_U-1:0]       c2_resp_rdata, c3_resp_rdata;
  logic [NW-1:0]        c2_resp_nfix, c3_resp_nfix;
  ctrl_bus_t            c2, c3;

  ft_mem_ctrl #(.N_CELLS(N_CELLS), .L_U(L_U), .ALIGN(ALIGN), .T_MAX(T_MAX),
                .R_MAX(R_MAX), .MAX_SEG(MAX_SEG)) u_ctrl (
    .clk, .rst_n,
    .req_valid(req_valid && init_done && !mode3), .req_ready(c2_req_ready), .req_write,
    .req_addr, .req_wdata, .resp_valid(c2_resp_valid), .resp_rdata(c2_resp_rdata),
    .resp_fail(c2_resp_fail), .resp_nfix(c2_resp_nfix),
    .cfg_raddr, .cfg_rdata, .num_seg(cfg_count),
    .t_tab(code_t_tab), .r_tab(code_r_tab), .code_sel(c2.code_sel),
    .enc_start(c2.enc_start), .enc_r(c2.enc_r), .enc_k(c2.enc_k), .enc_din_ready,
    .enc_din_valid(c2.enc_din_valid), .enc_din(c2.enc_din),
    .enc_dout_valid, .enc_dout, .enc_done,
    .dec_in_valid(c2.dec_in_valid), .dec_in_ready, .dec_in_bit(c2.dec_in_bit),
    .dec_len(c2.dec_len), .dec_t(c2.dec_t),
    .dec_out_valid, .dec_out_ready(c2.dec_out_ready), .dec_out_bit, .dec_out_last,
    .dec_out_err, .dec_out_fail,
    .nano_addr(c2.nano_addr), .nano_we(c2.nano_we), .nano_wdata(c2.nano_wdata),
    .nano_re(c2.nano_re), .nano_rdata);

  ft_mem_ctrl3 #(.N_CELLS(N_CELLS), .L_U(L_U), .L_C(L_C), .T_MAX(T_MAX),
                 .R_MAX(R_MAX), .S_MAX(S_MAX), .MAX_SEG(MAX_SEG)) u_ctrl3 (
    .clk, .rst_n,
    .store_valid(emit3), .store_ready(c3_store_ready), .store_head_unit(l1_head_unit),
    .store_s(l1_s), .store_code(l1_code), .store_vec(l1_vec),
    .store_cfg_head(l2_cfg_head), .store_cfg_code(l2_cfg_code), .idle(c3_idle),
    .req_valid(req_valid && init_done && mode3), .req_ready(c3_req_ready), .req_write,
    .req_addr, .req_wdata, .resp_valid(c3_resp_valid), .resp_rdata(c3_resp_rdata),
    .resp_fail(c3_resp_fail), .resp_nfix(c3_resp_nfix),
    .cfg_raddr(l2_raddr), .cfg_rdata(l2_rdata), .num_seg(l2_count),
    .t_tab(code_t_tab), .r_tab(code_r_tab), .code_sel(c3.code_sel),
    .enc_start(c3.enc_start), .enc_r(c3.enc_r), .enc_k(c3.enc_k), .enc_din_ready,
    .enc_din_valid(c3.enc_din_valid), .enc_din(c3.enc_din),
    .enc_dout_valid, .enc_dout, .enc_done,
    .dec_in_valid(c3.dec_in_valid), .dec_in_ready, .dec_in_bit(c3.dec_in_bit),
    .dec_len(c3.dec_len), .dec_t(c3.dec_t),
    .dec_out_valid, .dec_out_ready(c3.dec_out_ready), .dec_out_bit, .dec_out_last,
    .dec_out_err, .dec_out_fail,
    .nano_addr(c3.nano_addr), .nano_we(c3.nano_we), .nano_wdata(c3.nano_wdata),
    .nano_re(c3.nano_re), .nano_rdata);

  ctrl_bus_t cb;
  assign cb            = c3_idle ? c2 : c3;
  assign code_sel      = cb.code_sel;
  assign enc_start     = cb.enc_start;
  assign enc_r         = cb.enc_r;
  assign enc_k         = cb.enc_k;
  assign enc_din_valid = cb.enc_din_valid;
  assign enc_din       = cb.enc_din;
  assign dec_in_valid  = cb.dec_in_valid;
  assign dec_in_bit    = cb.dec_in_bit;
  assign dec_len       = cb.dec_len;
  assign dec_t         = cb.dec_t;
  assign dec_out_ready = cb.dec_out_ready;
  assign nano_addr     = cb.nano_addr;
  assign nano_we       = cb.nano_we;
  assign nano_wdata    = cb.nano_wdata;
  assign nano_re       = cb.nano_re;

  assign req_ready  = mode3 ? c3_req_ready : c2_req_ready;
  assign resp_valid = c2_resp_valid | c3_resp_valid;
  assign resp_rdata = c3_resp_valid ? c3_resp_rdata : c2_resp_rdata;
  assign resp_fail  = c3_resp_valid ? c3_resp_fail  : c2_resp_fail;
  assign resp_nfix  = c3_resp_valid ? c3_resp_nfix  : c2_resp_nfix;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !tab_ovf);

endmodule
