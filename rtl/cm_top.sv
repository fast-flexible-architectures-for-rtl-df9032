// cm_top: the CryptoManiac cryptographic co-processor system, plus the
// cipher instruction-set extension units beside it.
//
// CryptoManiac system: a host pushes requests (tag, session, code, four data
// words) into the input queue. The request scheduler gives each, in order,
// to a free processing element (PE), preferring one that already holds the
// session, else the least recently used one; when the chosen PE holds
// another session the keystore first swaps the 5 KB key context (SBOX tables
// and key words). The PE runs the handler selected by the request code and
// sends a tagged result; results from several PEs are merged into the output
// queue (lowest PE index first), so they may leave out of order and are
// matched by tag. adm_* lets the host load PE programs and data, write
// keystore words, and start or hold each PE (adm_run). adm_pc_we sets the
// bundle at which the PE selected by adm_pe resumes when its adm_run rises
// (reset value 0), which redirects execution of that PE.
//
// Instruction-set extension units: a 64-bit rotate/rotate-xor unit, an
// XBOX partial-permutation unit, a 16-bit modular multiplier (MULMOD) and
// a sector SBOX cache with its data-cache fill port, each with its own
// ports; they belong to the extended general-purpose core, which is not
// part of this design.
//
// Structure follows the document; NUM_PE, queue depths, the output merge
// order and the administrative port are this design's choices.
// The low five bits of sc_fill_addr are constant zero (fills are whole
// 32-byte sectors), and only the low 16 bits of the MULMOD unit's result are
// brought out.
module cm_top
  import cm_pkg::*;
#(
  parameter int NUM_PE    = 4,
  parameter int INQ_DEPTH = 16,
  parameter int OUTQ_DEPTH = 16,
  localparam int PW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // host request / result queues
  input  logic            in_valid,
  output logic            in_ready,
  input  request_t        in_req,
  output logic            out_valid,
  input  logic            out_ready,
  output response_t       out_rsp,
  // administration
  input  logic [NUM_PE-1:0] adm_run,
  input  logic [PW-1:0]   adm_pe,
  input  logic            adm_pc_we,
  input  logic [PC_W-1:0] adm_pc,
  input  logic            adm_imem_we,
  input  logic [PC_W-1:0] adm_imem_addr,
  input  bundle_t         adm_imem_data,
  input  logic            adm_dmem_we,
  input  logic [9:0]      adm_dmem_addr,
  input  logic [31:0]     adm_dmem_data,
  input  logic            adm_ks_we,
  input  logic [SESS_W-1:0] adm_ks_sess,
  input  logic [CTX_AW-1:0] adm_ks_idx,
  input  logic [31:0]     adm_ks_data,
  // instruction-set extension units
  input  logic [1:0]      rx_op,
  input  logic            rx_w32,
  input  logic [63:0]     rx_a,
  input  logic [63:0]     rx_b,
  input  logic [5:0]      rx_rot,
  output logic [63:0]     rx_y,
  input  logic [2:0]      xb_bsel,
  input  logic [63:0]     xb_src,
  input  logic [63:0]     xb_map,
  output logic [63:0]     xb_y,
  input  logic            mm_start,
  input  logic [15:0]     mm_a,
  input  logic [15:0]     mm_b,
  output logic            mm_done,
  output logic [15:0]     mm_y,
  input  logic            sc_req_valid,
  output logic            sc_req_ready,
  input  logic [31:0]     sc_table,
  input  logic [31:0]     sc_index,
  input  logic [1:0]      sc_bb,
  output logic            sc_rsp_valid,
  output logic [31:0]     sc_rsp_data,
  output logic            sc_fill_req,
  output logic [31:0]     sc_fill_addr,
  input  logic            sc_fill_valid,
  input  logic [255:0]    sc_fill_data,
  input  logic            sc_sync,
  input  logic            sc_flush
);
  // ---------------- input queue ----------------
  logic     inq_valid, inq_ready;
  request_t inq_data;
  req_fifo #(.T(request_t), .DEPTH(INQ_DEPTH)) u_inq (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_req),
    .out_valid(inq_valid), .out_ready(inq_ready), .out_data(inq_data), .count());

  // ---------------- scheduler + keystore ----------------
  logic [NUM_PE-1:0] pe_idle, pe_rq_valid, pe_rq_ready, pe_rs_valid, pe_rs_ready;
  request_t          pe_req;
  response_t         pe_rs [NUM_PE];
  logic [PW-1:0]     sel;
  logic              ctx_start, ctx_old_valid, ctx_done, ks_inv;
  logic [SESS_W-1:0] ctx_old_sess, ctx_new_sess, ks_inv_sess;
  logic [CTX_AW-1:0] ctx_addr;
  logic              ctx_we;
  logic [31:0]       ctx_wdata, ctx_rdata;
  logic [31:0]       pe_ctx_rdata [NUM_PE];

  request_scheduler #(.NUM_PE(NUM_PE)) u_sched (
    .clk, .rst_n, .req_valid(inq_valid), .req_ready(inq_ready), .req(inq_data),
    .pe_idle, .pe_valid(pe_rq_valid), .pe_ready(pe_rq_ready), .pe_req, .sel,
    .ctx_start, .ctx_old_valid, .ctx_old_sess, .ctx_new_sess, .ctx_done,
    .ks_invalidate(ks_inv), .ks_inv_sess,
    .ks_wr(adm_ks_we), .ks_wr_sess(adm_ks_sess));

  keystore #(.NUM_SESS(NUM_SESS), .CTX_WORDS(CTX_WORDS)) u_ks (
    .clk, .rst_n, .start(ctx_start), .old_valid(ctx_old_valid), .old_sess(ctx_old_sess),
    .new_sess(ctx_new_sess), .busy(), .done(ctx_done), .invalidate(ks_inv), .inv_sess(ks_inv_sess),
    .ctx_addr, .ctx_we, .ctx_wdata, .ctx_rdata,
    .adm_we(adm_ks_we), .adm_sess(adm_ks_sess), .adm_idx(adm_ks_idx), .adm_data(adm_ks_data),
    .sess_valid());

  assign ctx_rdata = pe_ctx_rdata[sel];

  // ---------------- processing elements ----------------
  logic [PC_W-1:0] start_pc [NUM_PE];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int p = 0; p < NUM_PE; p++) start_pc[p] <= '0;
    end else if (adm_pc_we) begin
      start_pc[adm_pe] <= adm_pc;
    end

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    cm_pe u_pe (
      .clk, .rst_n, .run(adm_run[p]), .start_pc(start_pc[p]),
      .rq_valid(pe_rq_valid[p]), .rq_ready(pe_rq_ready[p]), .rq_data(pe_req),
      .rs_valid(pe_rs_valid[p]), .rs_ready(pe_rs_ready[p]), .rs_data(pe_rs[p]),
      .idle(pe_idle[p]),
      .adm_imem_we(adm_imem_we && adm_pe == PW'(p)), .adm_imem_addr, .adm_imem_data,
      .adm_dmem_we(adm_dmem_we && adm_pe == PW'(p)), .adm_dmem_addr, .adm_dmem_data,
      .ctx_addr, .ctx_we(ctx_we && sel == PW'(p)), .ctx_wdata, .ctx_rdata(pe_ctx_rdata[p]));
  end

  // ---------------- output queue: fixed-priority merge ----------------
  logic      outq_in_valid, outq_in_ready;
  response_t outq_in;
  always_comb begin
    outq_in_valid = 1'b0;
    outq_in       = pe_rs[0];
    pe_rs_ready   = '0;
    for (int p = NUM_PE - 1; p >= 0; p--)
      if (pe_rs_valid[p]) begin
        outq_in_valid = 1'b1;
        outq_in       = pe_rs[p];
        pe_rs_ready   = '0;
        pe_rs_ready[p] = outq_in_ready;
      end
  end

  req_fifo #(.T(response_t), .DEPTH(OUTQ_DEPTH)) u_outq (
    .clk, .rst_n, .in_valid(outq_in_valid), .in_ready(outq_in_ready), .in_data(outq_in),
    .out_valid, .out_ready, .out_data(out_rsp), .count());

  // ---------------- instruction-set extension units ----------------
  rot_xor_unit #(.XLEN(64)) u_rotx (
    .op(rx_op), .w32(rx_w32), .a(rx_a), .b(rx_b), .rot(rx_rot), .y(rx_y));

  xbox_unit u_xbox (.bsel(xb_bsel), .src(xb_src), .map(xb_map), .y(xb_y));

  logic [31:0] mm_y32;
  long_unit #(.MUL_LAT(4)) u_mulmod (
    .clk, .rst_n, .start(mm_start), .mulmod(1'b1), .a({16'd0, mm_a}), .b({16'd0, mm_b}),
    .done(mm_done), .y(mm_y32));
  assign mm_y = mm_y32[15:0];

  sbox_sector_cache u_sbc (
    .clk, .rst_n, .req_valid(sc_req_valid), .req_ready(sc_req_ready),
    .table_reg(sc_table), .index_reg(sc_index), .bb(sc_bb),
    .rsp_valid(sc_rsp_valid), .rsp_data(sc_rsp_data),
    .fill_req(sc_fill_req), .fill_addr(sc_fill_addr), .fill_valid(sc_fill_valid),
    .fill_data(sc_fill_data), .sync(sc_sync), .flush(sc_flush));
endmodule
