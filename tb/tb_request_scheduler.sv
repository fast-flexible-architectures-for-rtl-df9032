// tb_request_scheduler: drives the scheduler with model processing elements
// and a model keystore handshake. Checks: requests leave in order; a free
// element holding the session is preferred (no context switch); otherwise
// the least recently used free element is chosen and a context switch is
// started with the right old/new session; a busy element is never chosen;
// a delete request invalidates the session without a switch; a request
// whose session is held only by a busy element waits for it unless the
// keystore copy is current (saved by a switch or written by the host), in
// which case a second element loads it; a CREATE invalidates other copies.
module tb_request_scheduler;
  import cm_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, ctx_start, ctx_old_valid, ctx_done, ks_invalidate;
  request_t req, pe_req;
  logic [NP-1:0] pe_idle, pe_valid, pe_ready;
  logic [1:0] sel;
  logic [SESS_W-1:0] ctx_old_sess, ctx_new_sess, ks_inv_sess, ks_wr_sess;
  logic ks_wr;
  int checks = 0, failures = 0;
  int n_affinity = 0, n_lru = 0, n_switch = 0, n_wait = 0, n_shared = 0;

  request_scheduler #(.NUM_PE(NP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model keystore: done 5 cycles after start
  initial begin
    ctx_done = 0;
    forever begin
      @(posedge clk);
      if (ctx_start) begin repeat (4) @(posedge clk); ctx_done <= 1; @(posedge clk); ctx_done <= 0; end
    end
  end

  // model state
  int  m_sess [NP];
  bit  m_valid [NP];
  bit  m_kscur [8];   // keystore copy of the session is current
  int  m_last [NP];   // time of last dispatch
  int  now = 0;

  // send one request, return the chosen element
  task automatic send(int sess, logic [2:0] code, logic [7:0] tag, output int who);
    int exp; bit same, sw;
    int best;
    bit busy_holds;
    @(negedge clk);
    req = '0; req.sess = SESS_W'(sess); req.code = code; req.tag = tag;
    req.data[0] = $urandom;
    req_valid = 1;
    // expected choice
    same = 0; best = -1;
    for (int i = 0; i < NP; i++)
      if (pe_idle[i] && m_valid[i] && m_sess[i] == sess && (!same || m_last[i] > m_last[best])) begin
        same = 1; best = i;
      end
    if (!same)
      for (int i = 0; i < NP; i++)
        if (pe_idle[i] && (best < 0 || m_last[i] < m_last[best])) best = i;
    busy_holds = 0;
    for (int i = 0; i < NP; i++) if (!pe_idle[i] && m_valid[i] && m_sess[i] == sess) busy_holds = 1;
    if (busy_holds && !same && m_kscur[sess]) n_shared++;
    if (busy_holds && !same && !m_kscur[sess]) begin
      // session held only by a busy element: the request must wait
      repeat (5) begin @(posedge clk); #1; chk(!req_ready && pe_valid == 0, "waits for the busy holder"); end
      n_wait++;
      pe_idle = '1;
      best = -1;
      for (int i = 0; i < NP; i++) if (m_valid[i] && m_sess[i] == sess) best = i;
      same = 1;
    end
    #1;
    while (!req_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1; req_valid = 0;
    sw = 0;
    while (pe_valid == 0) begin
      if (ctx_start) begin
        sw = 1;
        chk(ctx_new_sess == SESS_W'(sess), "switch to the request's session");
        chk(ctx_old_valid == m_valid[best], "old session validity");
        if (m_valid[best]) chk(ctx_old_sess == SESS_W'(m_sess[best]), "old session number");
      end
      @(posedge clk); #1;
    end
    who = int'(sel);
    chk(pe_valid == NP'(1) << best, $sformatf("chose %0d expected %0d", sel, best));
    chk(pe_req.tag == tag && pe_req.sess == SESS_W'(sess), "request passed intact");
    if (code == RQ_DELETE) chk(!sw, "no switch for delete");
    else chk(sw == !same, "switch exactly when the session is not resident");
    if (same) n_affinity++; else if (code != RQ_DELETE) n_lru++;
    if (sw) n_switch++;
    pe_ready = pe_valid; @(posedge clk); #1; pe_ready = '0;
    now++;
    m_last[best] = now;
    if (sw && m_valid[best]) m_kscur[m_sess[best]] = 1;
    if (code == RQ_CREATE || code == RQ_DELETE) m_kscur[sess] = 0;
    if (code == RQ_CREATE)
      for (int i = 0; i < NP; i++) if (i != best && m_sess[i] == sess) m_valid[i] = 0;
    if (code == RQ_DELETE) begin
      for (int i = 0; i < NP; i++) if (m_sess[i] == sess) m_valid[i] = 0;
    end else begin
      m_sess[best] = sess; m_valid[best] = 1;
    end
  endtask

  initial begin
    int who;
    req_valid = 0; req = '0; pe_idle = '1; pe_ready = '0;
    ks_wr = 0; ks_wr_sess = 0;
    for (int i = 0; i < NP; i++) begin m_sess[i] = 0; m_valid[i] = 0; m_last[i] = 0; end
    for (int i = 0; i < 8; i++) m_kscur[i] = 0;
    // ages start equal: first choice is element 0 (lowest index among equals)
    repeat (2) @(posedge clk); rst_n = 1;
    send(1, RQ_CREATE, 8'd1, who);
    send(2, RQ_CREATE, 8'd2, who);
    send(3, RQ_CREATE, 8'd3, who);
    send(1, RQ_ENCRYPT, 8'd4, who);          // affinity
    send(4, RQ_CREATE, 8'd5, who);            // LRU (the never-used one)
    send(5, RQ_CREATE, 8'd6, who);            // LRU with switch-out
    // busy elements are skipped
    pe_idle = 4'b0101;
    for (int n = 0; n < 10; n++) send($urandom_range(0, 6), RQ_ENCRYPT, 8'(10 + n), who);
    pe_idle = '1;
    for (int n = 0; n < 40; n++) begin
      pe_idle = 4'($urandom) | 4'b0001 << $urandom_range(0, 3);
      send($urandom_range(0, 6), ($urandom_range(0, 5) == 0) ? RQ_DELETE : RQ_ENCRYPT,
           8'(100 + n), who);
    end
    // host writes session 7 into the keystore: it may then be shared
    @(negedge clk); ks_wr = 1; ks_wr_sess = 3'd7; @(negedge clk); ks_wr = 0; m_kscur[7] = 1;
    pe_idle = '1;
    send(7, RQ_ENCRYPT, 8'd200, who);
    pe_idle = ~(NP'(1) << who);
    send(7, RQ_ENCRYPT, 8'd201, who);
    chk(m_valid[0] + m_valid[1] + m_valid[2] + m_valid[3] >= 2, "session held by two elements");
    send(7, RQ_CREATE, 8'd202, who);
    pe_idle = '1;
    send(7, RQ_ENCRYPT, 8'd203, who);
    // a request waits while no element is free
    pe_idle = '0;
    @(negedge clk); req_valid = 1; req.tag = 8'hEE;
    repeat (5) begin @(posedge clk); #1; chk(!req_ready && pe_valid == 0, "waits for a free element"); end
    req_valid = 0;
    chk(n_affinity > 0 && n_lru > 0 && n_switch > 0 && n_wait > 0 && n_shared > 0, "all selection cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
