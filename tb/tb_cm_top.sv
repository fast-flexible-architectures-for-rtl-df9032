// tb_cm_top: end-to-end test of the whole CryptoManiac system at its default
// size (four processing elements, 16-entry queues, eight sessions).
//
// Every element is loaded with the demonstration program (cm_asm_pkg) through
// the administration port and started. The host side then pushes traffic over
// six sessions -- more than there are elements, so contexts are written back
// to the keystore and restored later: a CREATE per session, then ENCRYPT
// requests with strong session locality, a DELETE and a re-CREATE of one
// session with a new key, and more encrypts; every fifth is a DECRYPT. Every response is matched by tag
// against the reference model using the key that was current for its session
// when the request was queued (requests of one session are served in order).
// The result queue is throttled, and held off entirely until result sends
// stall and several elements compete for the merge.
//
// Rate and latency checks: a context switch takes CTX_WORDS+1 cycles; the
// fastest encrypt on an element (request accepted to first result-send
// cycle) is 9 + ROUNDS*(3+3) = 33 cycles, and most encrypts run that fast;
// the MULMOD extension unit answers after 4 cycles; the SBOX sector cache
// answers a hit in one cycle.
//
// Each mechanism is counted and a mechanism that never happened is a failure:
// context switch, write-back of an old session, affinity dispatch, LRU
// dispatch, waiting for a busy holder of the session, one session served
// by two elements at once (from a current keystore copy), delete, input-queue
// full, result-queue backpressure, send stall, merge conflict, several
// elements busy at once, multiplier stall, branch mispredict, correct
// taken-branch prediction, operand bypass, sector-cache hit, miss and fill.
module tb_cm_top;
  import cm_pkg::*;
  import cm_asm_pkg::*;
  localparam int NP = 4;
  localparam int NSESS_USED = 6;
  localparam int N_ENC = 240;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  request_t in_req;
  response_t out_rsp;
  logic [NP-1:0] adm_run;
  logic [1:0] adm_pe;
  logic adm_pc_we = 0;
  logic [PC_W-1:0] adm_pc = 0;
  logic adm_imem_we, adm_dmem_we, adm_ks_we;
  logic [PC_W-1:0] adm_imem_addr;
  bundle_t adm_imem_data;
  logic [9:0] adm_dmem_addr;
  logic [31:0] adm_dmem_data, adm_ks_data;
  logic [SESS_W-1:0] adm_ks_sess;
  logic [CTX_AW-1:0] adm_ks_idx;
  logic [1:0] rx_op; logic rx_w32; logic [63:0] rx_a, rx_b, rx_y; logic [5:0] rx_rot;
  logic [2:0] xb_bsel; logic [63:0] xb_src, xb_map, xb_y;
  logic mm_start, mm_done; logic [15:0] mm_a, mm_b, mm_y;
  logic sc_req_valid, sc_req_ready, sc_rsp_valid, sc_fill_req, sc_fill_valid, sc_sync, sc_flush;
  logic [31:0] sc_table, sc_index, sc_rsp_data, sc_fill_addr;
  logic [1:0] sc_bb;
  logic [255:0] sc_fill_data;

  cm_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- expected results by tag ----------------
  words_t exp_data [256];
  bit     pending  [256];
  logic [SESS_W-1:0] exp_sess [256];
  int n_sent = 0, n_recv = 0;

  // ---------------- mechanism counters ----------------
  longint cyc = 0;
  int n_switch = 0, n_writeback = 0, n_affinity = 0, n_lru = 0, n_sess_wait = 0, n_shared = 0;
  int n_delete = 0, n_inq_full = 0, n_outq_bp = 0, n_send_stall = 0, n_merge = 0;
  int n_parallel = 0, n_long = 0, n_redirect = 0, n_pred = 0, n_fwd = 0;
  int n_sc_hit = 0, n_sc_miss = 0, n_sc_fill = 0;
  int n_enc_lat = 0, n_lat33 = 0, lat_min = 1000000;
  longint sw_t0 = 0;
  longint t_acc [NP];
  bit armed [NP];
  logic [2:0] acc_code [NP];

  logic [NP-1:0] long_p, redir_p, pred_p, fwd_p;
  assign long_p  = {dut.g_pe[3].u_pe.long_pending, dut.g_pe[2].u_pe.long_pending,
                    dut.g_pe[1].u_pe.long_pending, dut.g_pe[0].u_pe.long_pending};
  assign redir_p = {dut.g_pe[3].u_pe.redirect, dut.g_pe[2].u_pe.redirect,
                    dut.g_pe[1].u_pe.redirect, dut.g_pe[0].u_pe.redirect};
  assign pred_p  = {dut.g_pe[3].u_pe.ex_fire && dut.g_pe[3].u_pe.ex_pred,
                    dut.g_pe[2].u_pe.ex_fire && dut.g_pe[2].u_pe.ex_pred,
                    dut.g_pe[1].u_pe.ex_fire && dut.g_pe[1].u_pe.ex_pred,
                    dut.g_pe[0].u_pe.ex_fire && dut.g_pe[0].u_pe.ex_pred};
  assign fwd_p   = {dut.g_pe[3].u_pe.ex_valid && dut.g_pe[3].u_pe.u_byp.fwd != 0,
                    dut.g_pe[2].u_pe.ex_valid && dut.g_pe[2].u_pe.u_byp.fwd != 0,
                    dut.g_pe[1].u_pe.ex_valid && dut.g_pe[1].u_pe.u_byp.fwd != 0,
                    dut.g_pe[0].u_pe.ex_valid && dut.g_pe[0].u_pe.u_byp.fwd != 0};

  always @(posedge clk) if (rst_n) begin
    int lat;
    cyc++;
    if (dut.ctx_start) begin
      n_switch++; sw_t0 = cyc;
      if (dut.ctx_old_valid) n_writeback++;
    end
    if (dut.ctx_done)
      chk(cyc - sw_t0 == longint'(CTX_WORDS) + 1, $sformatf("context switch took %0d cycles", cyc - sw_t0));
    if (dut.u_sched.accept) begin
      if (dut.u_sched.same_found) n_affinity++; else n_lru++;
      if (!dut.u_sched.same_found && dut.u_sched.busy_holds) n_shared++;
    end
    if (dut.u_sched.state == 0 && dut.inq_valid && dut.u_sched.found &&
        dut.u_sched.busy_holds && !dut.u_sched.same_found) n_sess_wait++;
    if (dut.ks_inv) n_delete++;
    if (in_valid && !in_ready) n_inq_full++;
    if (out_valid && !out_ready) n_outq_bp++;
    if ((dut.pe_rs_valid & ~dut.pe_rs_ready) != 0) n_send_stall++;
    if ($countones(dut.pe_rs_valid) > 1) n_merge++;
    if ($countones(~dut.pe_idle) > 1) n_parallel++;
    n_long     += $countones(long_p);
    n_redirect += $countones(redir_p);
    n_pred     += $countones(pred_p & ~redir_p);
    n_fwd      += $countones(fwd_p);
    for (int p = 0; p < NP; p++) begin
      if (dut.pe_rq_valid[p] && dut.pe_rq_ready[p]) begin
        t_acc[p] = cyc; armed[p] = 1; acc_code[p] = dut.pe_req.code;
      end else if (dut.pe_rs_valid[p] && armed[p]) begin
        armed[p] = 0;
        if (acc_code[p] == RQ_ENCRYPT || acc_code[p] == RQ_DECRYPT) begin
          lat = int'(cyc - t_acc[p]);
          n_enc_lat++;
          if (lat < lat_min) lat_min = lat;
          if (lat == 9 + ROUNDS * 6) n_lat33++;
        end
      end
    end
  end

  // ---------------- result side ----------------
  bit hold_out = 0;
  always @(negedge clk) out_ready <= rst_n && !hold_out && ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    n_recv++;
    chk(pending[out_rsp.tag], $sformatf("unexpected result tag %0d", out_rsp.tag));
    chk(out_rsp.sess == exp_sess[out_rsp.tag], $sformatf("tag %0d session", out_rsp.tag));
    chk(out_rsp.data == exp_data[out_rsp.tag],
        $sformatf("tag %0d: got %h expected %h", out_rsp.tag, out_rsp.data, exp_data[out_rsp.tag]));
    pending[out_rsp.tag] = 0;
  end

  // ---------------- request side ----------------
  logic [31:0] key [8];
  int tag_next = 0;

  task automatic push(logic [2:0] code, int s, logic [31:0] d0, logic [31:0] d1);
    int t;
    t = tag_next % 256;
    while (pending[t]) begin @(posedge clk); #1; end
    tag_next++;
    @(negedge clk);
    in_req = '0; in_req.code = code; in_req.sess = SESS_W'(s); in_req.tag = 8'(t);
    in_req.data[0] = d0; in_req.data[1] = d1;
    case (code)
      RQ_CREATE:  begin key[s] = d0; exp_data[t] = {96'd0, d0}; end
      RQ_ENCRYPT: exp_data[t] = ref_encrypt(d0, d1, key[s], 8'(t));
      RQ_DECRYPT: exp_data[t] = ref_decrypt(d0, d1, key[s], 8'(t));
      default:    exp_data[t] = {96'd0, 32'(code)};
    endcase
    exp_sess[t] = SESS_W'(s);
    pending[t] = 1;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    n_sent++;
  endtask

  // ---------------- extension units ----------------
  initial begin
    sc_fill_valid = 0; sc_fill_data = '0;
    forever begin
      @(posedge clk); #1;
      sc_fill_valid = 0;
      if (sc_fill_req) begin
        n_sc_fill++;
        @(posedge clk); #1;
        for (int w = 0; w < 8; w++) sc_fill_data[32*w +: 32] = 32'(sc_fill_addr[9:2] + 8'(w)) ^ 32'hA5A5_0000;
        sc_fill_valid = 1;
        @(posedge clk); #1; sc_fill_valid = 0;
      end
    end
  end

  task automatic ext_units();
    logic [63:0] a, b, e;
    int lat, idx;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      rx_op = 2'(n % 4); rx_w32 = 0; rx_a = a; rx_b = b; rx_rot = 6'($urandom);
      xb_bsel = 3'($urandom); xb_src = a; xb_map = b;
      #1;
      case (n % 4)
        0: e = (a << b[5:0]) | (b[5:0] == 0 ? 64'd0 : a >> (64 - b[5:0]));
        1: e = (a >> b[5:0]) | (b[5:0] == 0 ? 64'd0 : a << (64 - b[5:0]));
        2: e = ((a << rx_rot) | (rx_rot == 0 ? 64'd0 : a >> (64 - rx_rot))) ^ b;
        default: e = ((a >> rx_rot) | (rx_rot == 0 ? 64'd0 : a << (64 - rx_rot))) ^ b;
      endcase
      chk(rx_y == e, "rotate unit");
      e = '0;
      for (int j = 0; j < 8; j++) e[8 * xb_bsel + j] = a[b[6*j +: 6]];
      chk(xb_y == e, "xbox unit");
    end
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      mm_a = 16'($urandom); mm_b = (n == 0) ? 16'd0 : 16'($urandom); mm_start = 1;
      @(negedge clk); mm_start = 0; lat = 2;   // start cycle counts as 1
      while (!mm_done) begin @(negedge clk); lat++; end
      chk(mm_y == ref_mulmod(mm_a, mm_b), "MULMOD unit result");
      chk(lat == 4, $sformatf("MULMOD unit latency %0d", lat));
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      idx = (n < 200) ? $urandom_range(0, 63) : $urandom_range(0, 255);
      sc_table = 32'h0000_4000; sc_index = 32'(idx) << 8; sc_bb = 2'd1; sc_req_valid = 1;
      @(posedge clk); #1; sc_req_valid = 0; lat = 1;
      while (!sc_rsp_valid) begin @(posedge clk); #1; lat++; end
      chk(sc_rsp_data == (32'(idx) ^ 32'hA5A5_0000), "sector cache data");
      if (lat == 1) n_sc_hit++; else n_sc_miss++;
    end
  endtask

  // ---------------- main sequence ----------------
  initial begin
    prog_t p;
    int s, prev;
    in_valid = 0; in_req = '0; adm_run = '0; adm_pe = 0;
    adm_imem_we = 0; adm_imem_addr = 0; adm_imem_data = '0;
    adm_dmem_we = 0; adm_dmem_addr = 0; adm_dmem_data = 0;
    adm_ks_we = 0; adm_ks_sess = 0; adm_ks_idx = 0; adm_ks_data = 0;
    rx_op = 0; rx_w32 = 0; rx_a = 0; rx_b = 0; rx_rot = 0; xb_bsel = 0; xb_src = 0; xb_map = 0;
    mm_start = 0; mm_a = 0; mm_b = 0;
    sc_req_valid = 0; sc_table = 0; sc_index = 0; sc_bb = 0; sc_sync = 0; sc_flush = 0;
    for (int t = 0; t < 256; t++) pending[t] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    p = demo_program();
    for (int e = 0; e < NP; e++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        adm_pe = 2'(e); adm_imem_we = 1; adm_imem_addr = PC_W'(i); adm_imem_data = p[i];
      end
    @(negedge clk); adm_imem_we = 0; adm_run = '1;

    fork
      ext_units();
      begin
        for (int i = 0; i < NSESS_USED; i++) push(RQ_CREATE, i, $urandom, 0);
        prev = 0;
        for (int n = 0; n < N_ENC; n++) begin
          s = ($urandom_range(0, 9) < 6) ? prev : $urandom_range(0, NSESS_USED - 1);
          prev = s;
          if (n == 60) begin
            push(RQ_DELETE, 2, 0, 0);
            push(RQ_CREATE, 2, $urandom, 0);
          end
          if (n == 100) fork begin
            // hold results off until elements stall on a full result queue
            hold_out = 1;
            for (int c = 0; c < 60000 && (n_send_stall < 200 || n_merge < 50); c++) @(posedge clk);
            hold_out = 0;
          end join_none
          push((n % 5 == 4) ? RQ_DECRYPT : RQ_ENCRYPT, s, $urandom,
               (n % 17 == 3) ? 32'h1234_0000 : $urandom);
        end
      end
    join
    // drain
    while (n_recv < n_sent) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int t = 0; t < 256; t++) chk(!pending[t], $sformatf("tag %0d never answered", t));

    chk(lat_min == 9 + ROUNDS * 6, $sformatf("fastest encrypt %0d cycles", lat_min));
    chk(n_lat33 * 2 > n_enc_lat, $sformatf("only %0d of %0d encrypts at full speed", n_lat33, n_enc_lat));
    chk(n_switch > 0,     "context switch");
    chk(n_writeback > 0,  "old session written back");
    chk(n_affinity > 0,   "affinity dispatch");
    chk(n_lru > 0,        "LRU dispatch");
    chk(n_sess_wait > 0,  "wait for busy session holder");
    chk(n_shared > 0,     "session loaded into a second element");
    chk(n_delete == 1,    "session delete");
    chk(n_inq_full > 0,   "input queue full");
    chk(n_outq_bp > 0,    "result queue backpressure");
    chk(n_send_stall > 0, "send stall");
    chk(n_merge > 0,      "merge conflict");
    chk(n_parallel > 0,   "several elements busy");
    chk(n_long > 0,       "multiplier stall");
    chk(n_redirect > 0,   "branch mispredict");
    chk(n_pred > 0,       "taken branch predicted");
    chk(n_fwd > 0,        "operand bypass");
    chk(n_sc_hit > 0 && n_sc_miss > 0 && n_sc_fill > 0, "sector cache hit, miss and fill");
    $display("requests=%0d results=%0d switches=%0d writebacks=%0d affinity=%0d lru=%0d waits=%0d shared=%0d",
             n_sent, n_recv, n_switch, n_writeback, n_affinity, n_lru, n_sess_wait, n_shared);
    $display("inq_full=%0d outq_bp=%0d send_stall=%0d merge=%0d parallel=%0d long=%0d redirect=%0d pred=%0d fwd=%0d",
             n_inq_full, n_outq_bp, n_send_stall, n_merge, n_parallel, n_long, n_redirect, n_pred, n_fwd);
    $display("encrypts=%0d at_33=%0d min=%0d sc_hit=%0d sc_miss=%0d cycles=%0d",
             n_enc_lat, n_lat33, lat_min, n_sc_hit, n_sc_miss, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
