// cm_pe: one CryptoManiac processing element, a 4-wide, 4-stage VLIW
// processor (IF, ID, EX/MEM, WB) for secret-key cipher kernels.
//
//  IF   The bundle address indexes the instruction memory (1 KB, 64 bundles)
//       and, in parallel, the 16-entry BTB; a BTB hit predicts a taken branch.
//  ID   The four instructions read 3 operands each from the 12R/4W register
//       file (write-through from WB).
//  EX   A full crossbar bypasses the previous bundle's four results into any
//       operand. Four functional units (logic -> add/rotate/SBOX -> logic)
//       execute combined instruction pairs; units 0 and 1 also have the
//       multiplier. Slot 0 reaches the 4 KB data memory. Slot 3 resolves
//       branches; a wrong prediction flushes IF and ID (two bubbles). Taken
//       branches enter the BTB; a loop-exit (not-taken) branch keeps its entry.
//  WB   Results are written to the register file.
//
// Stalls: a bundle holding MUL/MULMOD stays in EX for MUL_LAT cycles; RECV
// waits in EX for a request, SEND for room in the output queue. While EX
// stalls its operands are re-captured through the bypass so a result that
// leaves WB is not lost.
//
// Requests: RECV accepts a request (rq_valid/rq_ready), latches it and jumps
// to bundle VEC_BASE+code, so the request code selects the handler. RQR
// reads request fields, RSW sets result words (RECV clears them), SEND
// pushes {tag, session, words} (rs_valid/rs_ready). idle is high while RECV waits in EX.
// run low holds the element at bundle start_pc with an empty pipeline, so
// the host can load memories through adm_* and choose where the element
// resumes when run rises; the keystore uses ctx_* while idle.
//
// The pipeline, widths, memory sizes, BTB and bypass follow the document.
// The encoding of memory, branch and mailbox operations, the slot
// restrictions (memory in slot 0, control in slot 3) and the stall scheme
// are this design's choices.
// rst_n is the asynchronous reset and also disables the assertions during
// reset, which is why a linter may report it as used both ways.
module cm_pe
  import cm_pkg::*;
#(
  parameter int IMEM_BUNDLES = 64,
  parameter int DMEM_WORDS   = 1024,
  parameter int BTB_ENTRIES  = 16,
  parameter int NUM_MUL      = 2,
  parameter int MUL_LAT      = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [PC_W-1:0]  start_pc,
  // request in
  input  logic             rq_valid,
  output logic             rq_ready,
  input  request_t         rq_data,
  // result out
  output logic             rs_valid,
  input  logic             rs_ready,
  output response_t        rs_data,
  output logic             idle,
  // host memory load
  input  logic             adm_imem_we,
  input  logic [PC_W-1:0]  adm_imem_addr,
  input  bundle_t          adm_imem_data,
  input  logic             adm_dmem_we,
  input  logic [$clog2(DMEM_WORDS)-1:0] adm_dmem_addr,
  input  logic [XLEN-1:0]  adm_dmem_data,
  // keystore context port
  input  logic [CTX_AW-1:0] ctx_addr,
  input  logic             ctx_we,
  input  logic [XLEN-1:0]  ctx_wdata,
  output logic [XLEN-1:0]  ctx_rdata
);
  localparam int NOPND = 3 * WIDTH;
  localparam int DAW   = $clog2(DMEM_WORDS);

  // ---------------- IF ----------------
  logic [PC_W-1:0] pc, btb_tgt, redirect_pc;
  logic            btb_hit, redirect, ex_stall;
  logic            btb_upd, btb_upd_taken;
  logic [PC_W-1:0] ex_pc, br_tgt;
  logic            id_valid, id_pred;
  logic [PC_W-1:0] id_pc, id_ptgt;
  bundle_t         id_bundle;

  btb #(.ENTRIES(BTB_ENTRIES), .PC_W(PC_W)) u_btb (
    .clk, .rst_n, .pc, .hit(btb_hit), .target(btb_tgt),
    .upd_valid(btb_upd), .upd_taken(btb_upd_taken), .upd_pc(ex_pc), .upd_target(br_tgt));

  imem #(.BUNDLES(IMEM_BUNDLES), .BW(WIDTH*XLEN)) u_imem (
    .clk, .re(!ex_stall), .raddr(pc), .rdata(id_bundle),
    .we(adm_imem_we), .waddr(adm_imem_addr), .wdata(adm_imem_data));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc <= '0; id_valid <= 1'b0; id_pred <= 1'b0; id_pc <= '0; id_ptgt <= '0;
    end else if (!run) begin
      pc <= start_pc; id_valid <= 1'b0; id_pred <= 1'b0;
    end else if (redirect) begin
      pc <= redirect_pc; id_valid <= 1'b0; id_pred <= 1'b0;
    end else if (!ex_stall) begin
      pc       <= btb_hit ? btb_tgt : pc + 1'b1;
      id_valid <= 1'b1;
      id_pc    <= pc;
      id_pred  <= btb_hit;
      id_ptgt  <= btb_tgt;
    end

  // ---------------- ID ----------------
  instr_t [WIDTH-1:0]            id_ins;
  logic   [NOPND-1:0][RW-1:0]    id_src;
  logic   [NOPND-1:0][XLEN-1:0]  id_rdata;
  logic   [WIDTH-1:0]            wb_we;
  logic   [WIDTH-1:0][RW-1:0]    wb_rd;
  logic   [WIDTH-1:0][XLEN-1:0]  wb_data;

  always_comb
    for (int k = 0; k < WIDTH; k++) begin
      id_ins[k]       = instr_t'(id_bundle[k*XLEN +: XLEN]);
      id_src[3*k]     = id_ins[k].ra;
      id_src[3*k + 1] = id_ins[k].rb;
      id_src[3*k + 2] = id_ins[k].rc;
    end

  regfile #(.NREGS(NREGS), .DW(XLEN), .NR(NOPND), .NW(WIDTH)) u_rf (
    .clk, .raddr(id_src), .rdata(id_rdata), .we(wb_we), .waddr(wb_rd), .wdata(wb_data));

  // ---------------- EX ----------------
  logic                          ex_valid, ex_pred;
  logic   [PC_W-1:0]             ex_ptgt;
  instr_t [WIDTH-1:0]            ex_ins;
  logic   [NOPND-1:0][RW-1:0]    ex_src;
  logic   [NOPND-1:0][XLEN-1:0]  ex_rf, opnd;
  logic                          ex_fire;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ex_valid <= 1'b0; ex_pred <= 1'b0; ex_pc <= '0; ex_ptgt <= '0;
      ex_ins <= '0; ex_src <= '0; ex_rf <= '0;
    end else if (!run) begin
      ex_valid <= 1'b0;
    end else if (ex_stall) begin
      ex_rf <= opnd;                      // keep bypassed values across the stall
    end else begin
      ex_valid <= id_valid && !redirect;
      ex_pred  <= id_pred;
      ex_pc    <= id_pc;
      ex_ptgt  <= id_ptgt;
      ex_ins   <= id_ins;
      ex_src   <= id_src;
      ex_rf    <= id_rdata;
    end

  bypass_xbar #(.WIDTH(WIDTH), .NOPND(NOPND), .DW(XLEN), .AW(RW)) u_byp (
    .src(ex_src), .rf_data(ex_rf), .wb_we, .wb_rd, .wb_data, .opnd, .fwd());

  // per-slot decode
  logic [WIDTH-1:0] is_sp, is_long, alu_we;
  special_e [WIDTH-1:0] sp;
  logic [WIDTH-1:0][XLEN-1:0] fu_y, res;
  logic [WIDTH-1:0] long_done, long_start;
  logic [WIDTH-1:0] sbw;
  logic [WIDTH-1:0][31:0] imm9;

  always_comb
    for (int k = 0; k < WIDTH; k++) begin
      is_sp[k]   = ex_ins[k].op1 == OP_SPECIAL;
      sp[k]      = special_e'(ex_ins[k].op2);
      is_long[k] = !is_sp[k] && op_class(ex_ins[k].op1) == CLS_LONG && k < NUM_MUL;
      imm9[k]    = 32'(signed'(ex_ins[k][8:0]));
      sbw[k]     = is_sp[k] && sp[k] == SP_SBW;
      long_start[k] = ex_valid && is_long[k];
    end

  logic long_pending, is_recv, is_send, is_br, br_taken;
  logic [PC_W-1:0] pred_next, actual_next;

  always_comb begin
    long_pending = 1'b0;
    for (int k = 0; k < WIDTH; k++)
      if (is_long[k] && !long_done[k]) long_pending = 1'b1;
    long_pending = long_pending && ex_valid;
    is_recv  = is_sp[BR_SLOT] && sp[BR_SLOT] == SP_RECV;
    is_send  = is_sp[BR_SLOT] && sp[BR_SLOT] == SP_SEND;
    is_br    = is_sp[BR_SLOT] && (sp[BR_SLOT] == SP_BEQZ || sp[BR_SLOT] == SP_BNEZ ||
                                   sp[BR_SLOT] == SP_JMP);
    br_tgt   = PC_W'(ex_ins[BR_SLOT][8:0]);
    br_taken = is_br && (sp[BR_SLOT] == SP_JMP ||
                         (sp[BR_SLOT] == SP_BEQZ && opnd[3*BR_SLOT] == '0) ||
                         (sp[BR_SLOT] == SP_BNEZ && opnd[3*BR_SLOT] != '0));
    ex_stall = ex_valid && (long_pending || (is_recv && !rq_valid) || (is_send && !rs_ready));
    ex_fire  = ex_valid && !ex_stall;
    pred_next   = ex_pred ? ex_ptgt : ex_pc + 1'b1;
    actual_next = is_recv  ? PC_W'(VEC_BASE + int'(rq_data.code)) :
                  br_taken ? br_tgt : ex_pc + 1'b1;
    redirect    = ex_fire && run && (actual_next != pred_next || is_recv);
    redirect_pc = actual_next;
    // a taken branch writes its entry; a bundle that hit but holds no branch
    // (stale entry) removes it; a not-taken branch keeps its entry for the
    // next pass through the loop
    btb_upd       = ex_fire && (br_taken || (ex_pred && !is_br));
    btb_upd_taken = br_taken;
  end

  assign rq_ready = ex_valid && is_recv && !long_pending;
  assign rs_valid = ex_valid && is_send && !long_pending;
  assign idle     = ex_valid && is_recv;

  // functional units
  logic [WIDTH-1:0]       sb_we;
  logic [WIDTH-1:0][7:0]  sb_waddr;
  logic [WIDTH-1:0][31:0] sb_wdata, sb_crdata;
  logic ctx_is_sbox;
  assign ctx_is_sbox = ctx_addr < CTX_AW'(WIDTH * SBOX_WORDS);

  for (genvar k = 0; k < WIDTH; k++) begin : g_fu
    always_comb begin
      sb_we[k]    = (ex_fire && sbw[k]) || (ctx_we && ctx_is_sbox && int'(ctx_addr[9:8]) == k);
      sb_waddr[k] = (ex_fire && sbw[k]) ? opnd[3*k][7:0] : ctx_addr[7:0];
      sb_wdata[k] = (ex_fire && sbw[k]) ? opnd[3*k+1] : ctx_wdata;
    end
    functional_unit #(.HAS_MUL(k < NUM_MUL), .MUL_LAT(MUL_LAT)) u_fu (
      .clk, .rst_n,
      .op1(is_sp[k] ? OP_NOP : ex_ins[k].op1),
      .op2(is_sp[k] ? OP_NOP : ex_ins[k].op2),
      .bsel(ex_ins[k].bsel),
      .a(opnd[3*k]), .b(opnd[3*k+1]), .c(opnd[3*k+2]),
      .long_start(long_start[k]), .long_done(long_done[k]), .y(fu_y[k]),
      .sbox_we(sb_we[k]), .sbox_waddr(sb_waddr[k]), .sbox_wdata(sb_wdata[k]),
      .sbox_cidx(ctx_addr[7:0]), .sbox_crdata(sb_crdata[k]));
  end

  // data memory (slot MEM_SLOT) and context port
  logic [DAW-1:0]  d_addr, d_baddr;
  logic [XLEN-1:0] d_rdata, d_brdata;
  logic            d_we;
  assign d_addr = DAW'(opnd[3*MEM_SLOT] + imm9[MEM_SLOT]);
  assign d_we   = ex_fire && is_sp[MEM_SLOT] && sp[MEM_SLOT] == SP_ST;
  assign d_baddr = adm_dmem_we ? adm_dmem_addr :
                   DAW'(DMEM_WORDS - KEY_WORDS) + DAW'(ctx_addr - CTX_AW'(WIDTH * SBOX_WORDS));

  dmem #(.WORDS(DMEM_WORDS), .DW(XLEN)) u_dmem (
    .clk, .a_addr(d_addr), .a_rdata(d_rdata), .a_we(d_we), .a_wdata(opnd[3*MEM_SLOT+1]),
    .b_addr(d_baddr), .b_rdata(d_brdata),
    .b_we(adm_dmem_we || (ctx_we && !ctx_is_sbox)),
    .b_wdata(adm_dmem_we ? adm_dmem_data : ctx_wdata));

  assign ctx_rdata = ctx_is_sbox ? sb_crdata[ctx_addr[9:8]] : d_brdata;

  // request / result mailbox
  request_t           rq_q;
  logic [3:0][XLEN-1:0] rsp_q, rsp_d;

  always_comb begin
    rsp_d = rsp_q;
    for (int k = 0; k < WIDTH; k++)
      if (is_sp[k] && sp[k] == SP_RSW) rsp_d[ex_ins[k][1:0]] = opnd[3*k];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rq_q <= '0; rsp_q <= '0;
    end else if (ex_fire) begin
      if (is_recv) rq_q <= rq_data;
      rsp_q <= is_recv ? '0 : rsp_d;   // a new request starts with zero result words
    end

  assign rs_data = '{tag: rq_q.tag, sess: rq_q.sess, data: rsp_d};

  // results
  always_comb
    for (int k = 0; k < WIDTH; k++) begin
      res[k]    = fu_y[k];
      alu_we[k] = 1'b0;
      if (!is_sp[k]) begin
        alu_we[k] = !(ex_ins[k].op1 == OP_NOP && ex_ins[k].op2 == OP_NOP) &&
                    !(op_class(ex_ins[k].op1) == CLS_LONG && k >= NUM_MUL);
      end else begin
        case (sp[k])
          SP_LD:   begin res[k] = d_rdata; alu_we[k] = (k == MEM_SLOT); end
          SP_LDI:  begin res[k] = 32'(signed'(ex_ins[k][18:0])); alu_we[k] = 1'b1; end
          SP_RQR:  begin
            alu_we[k] = 1'b1;
            case (ex_ins[k][2:0])
              3'd0, 3'd1, 3'd2, 3'd3: res[k] = rq_q.data[ex_ins[k][1:0]];
              3'd4:    res[k] = 32'(rq_q.sess);
              3'd5:    res[k] = 32'(rq_q.code);
              default: res[k] = 32'(rq_q.tag);
            endcase
          end
          default: ;
        endcase
      end
    end

  // ---------------- WB ----------------
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb_we <= '0; wb_rd <= '0; wb_data <= '0;
    end else begin
      for (int k = 0; k < WIDTH; k++) begin
        wb_we[k]   <= ex_fire && alu_we[k];
        wb_rd[k]   <= ex_ins[k].rd;
        wb_data[k] <= res[k];
      end
    end

  // program rules this implementation relies on
  for (genvar k = 0; k < WIDTH; k++) begin : g_chk
    if (k != BR_SLOT) begin : g_ctl
      assert property (@(posedge clk) disable iff (!rst_n)
        ex_valid && is_sp[k] |-> !(sp[k] inside {SP_BEQZ, SP_BNEZ, SP_JMP, SP_RECV, SP_SEND}))
        else $error("control operation outside slot %0d", BR_SLOT);
    end
    if (k != MEM_SLOT) begin : g_mem
      assert property (@(posedge clk) disable iff (!rst_n)
        ex_valid && is_sp[k] |-> !(sp[k] inside {SP_LD, SP_ST}))
        else $error("memory operation outside slot %0d", MEM_SLOT);
    end
  end
endmodule
