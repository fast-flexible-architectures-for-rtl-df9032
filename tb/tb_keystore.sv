// tb_keystore: context switching. A model processing element (an array of
// CTX_WORDS words behind the context port) is switched between sessions:
// first load of an unused session must give zeros; the element's words
// must be saved into the old session and come back unchanged when that
// session is loaded again; host-written words must load; an invalidated
// session must load as zeros. Each switch must take CTX_WORDS+1 cycles.
// Runs with a reduced context of 64 words.
module tb_keystore;
  localparam int NS = 4, CW = 64;
  logic clk = 0, rst_n = 0;
  logic start, old_valid, busy, done, invalidate, adm_we, ctx_we;
  logic [1:0] old_sess, new_sess, inv_sess, adm_sess;
  logic [5:0] ctx_addr, adm_idx;
  logic [31:0] ctx_wdata, ctx_rdata, adm_data;
  logic [NS-1:0] sess_valid;
  logic [31:0] pe [CW];
  logic [31:0] saved [NS][CW];
  int checks = 0, failures = 0;

  keystore #(.NUM_SESS(NS), .CTX_WORDS(CW)) dut (.*);
  always #5 clk = ~clk;
  assign ctx_rdata = pe[ctx_addr];
  always_ff @(posedge clk) if (ctx_we) pe[ctx_addr] <= ctx_wdata;

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

  task automatic switch_ctx(bit ov, int os, int ns);
    int cyc;
    @(negedge clk);
    start = 1; old_valid = ov; old_sess = 2'(os); new_sess = 2'(ns);
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    chk(cyc == CW + 1, $sformatf("switch took %0d cycles", cyc));
  endtask

  task automatic scramble();
    for (int i = 0; i < CW; i++) pe[i] = $urandom;
  endtask

  initial begin
    logic [31:0] snap [CW];
    start = 0; old_valid = 0; old_sess = 0; new_sess = 0; invalidate = 0; inv_sess = 0;
    adm_we = 0; adm_sess = 0; adm_idx = 0; adm_data = 0;
    scramble();
    repeat (2) @(posedge clk); rst_n = 1;
    // first load of session 0: zeros
    switch_ctx(0, 0, 0);
    for (int i = 0; i < CW; i++) chk(pe[i] == 0, "unused session loads zero");
    // element computes a context for session 0, then switches to 1
    scramble(); for (int i = 0; i < CW; i++) snap[i] = pe[i];
    switch_ctx(1, 0, 1);
    for (int i = 0; i < CW; i++) chk(pe[i] == 0, "session 1 empty");
    chk(sess_valid[0] && !sess_valid[1], "valid flags after save");
    scramble(); for (int i = 0; i < CW; i++) saved[1][i] = pe[i];
    switch_ctx(1, 1, 0);
    for (int i = 0; i < CW; i++) chk(pe[i] == snap[i], "session 0 restored");
    switch_ctx(1, 0, 1);
    for (int i = 0; i < CW; i++) chk(pe[i] == saved[1][i], "session 1 restored");
    // host writes session 3
    for (int i = 0; i < CW; i++) begin
      @(negedge clk); adm_we = 1; adm_sess = 2'd3; adm_idx = 6'(i); adm_data = 32'hA000_0000 + i;
    end
    @(negedge clk); adm_we = 0;
    switch_ctx(1, 1, 3);
    for (int i = 0; i < CW; i++) chk(pe[i] == 32'hA000_0000 + i, "host-written session");
    // delete session 0
    @(negedge clk); invalidate = 1; inv_sess = 2'd0; @(negedge clk); invalidate = 0;
    chk(!sess_valid[0], "invalidate clears valid");
    switch_ctx(1, 3, 0);
    for (int i = 0; i < CW; i++) chk(pe[i] == 0, "deleted session loads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
