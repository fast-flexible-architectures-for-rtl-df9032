// tb_cm_workloads: the two traffic patterns the CryptoManiac system is sized
// for, run on the full system at its default size with the demonstration
// program (cm_asm_pkg) in every element. Each request carries one 16-byte
// block.
//
// Disk: one session (a volume) whose tables were computed by the host and
// written straight into the keystore (adm_ks_*). Eight 512-byte sectors
// = 8 x 32 blocks are queued back to back. The scheduler may then load the
// session into every element, so sectors are processed in parallel. Checks:
// every result; all four elements served the volume; at some moment all four
// were busy with it at once; the steady-state rate is better than two
// elements' worth (fewer than 33/2 cycles per block after the start-up
// context loads).
//
// Network: three connections, each created by a CREATE request, then two
// 1500-byte packets per connection = 2 x 94 blocks. Blocks of a chained
// stream must stay in order, so each connection's host thread sends a block
// only after the previous block's result came back; the three connections
// run concurrently. Checks: every result; connections ran on different
// elements at the same time; each block's round trip is at least the 33-cycle
// encrypt time; the mean round trip is printed.
module tb_cm_workloads;
  import cm_pkg::*;
  import cm_asm_pkg::*;
  localparam int NP = 4;
  localparam int SECTORS = 8;
  localparam int BLK_PER_SECTOR = 512 / 16;
  localparam int BLK_PER_PACKET = (1500 + 15) / 16;   // 94
  localparam int PACKETS = 2;
  localparam int NCONN = 3;

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
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- results by tag ----------------
  words_t exp_data [256];
  bit     pending  [256];
  longint t_recv   [256];
  int n_recv = 0;
  longint t_first_disk = 0, t_64 = 0, t_last_disk = 0;

  always @(negedge clk) out_ready <= rst_n;

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    n_recv++;
    chk(pending[out_rsp.tag], $sformatf("unexpected tag %0d", out_rsp.tag));
    chk(out_rsp.data == exp_data[out_rsp.tag], $sformatf("tag %0d data", out_rsp.tag));
    pending[out_rsp.tag] = 0;
    t_recv[out_rsp.tag] = cyc;
  end

  // ---------------- request side ----------------
  logic [31:0] key [8];
  int tag_next = 0;
  semaphore in_port = new(1);

  task automatic push(logic [2:0] code, int s, logic [31:0] d0, logic [31:0] d1, output int t);
    in_port.get(1);
    t = tag_next % 256;
    while (pending[t]) begin @(posedge clk); #1; end
    tag_next++;
    @(negedge clk);
    in_req = '0; in_req.code = code; in_req.sess = SESS_W'(s); in_req.tag = 8'(t);
    in_req.data[0] = d0; in_req.data[1] = d1;
    if (code == RQ_CREATE) begin key[s] = d0; exp_data[t] = {96'd0, d0}; end
    else exp_data[t] = ref_encrypt(d0, d1, key[s], 8'(t));
    pending[t] = 1;
    in_valid = 1;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 0;
    in_port.put(1);
  endtask

  // ---------------- disk monitors ----------------
  localparam int DISK_SESS = 1;
  bit disk_phase = 0;
  int disk_by_pe [NP];
  int all_busy_disk = 0;
  always @(posedge clk) if (rst_n && disk_phase) begin
    int n;
    n = 0;
    for (int p = 0; p < NP; p++) begin
      if (dut.pe_rq_valid[p] && dut.pe_rq_ready[p] && dut.pe_req.sess == SESS_W'(DISK_SESS))
        disk_by_pe[p]++;
      if (!dut.pe_idle[p] && dut.u_sched.sess_valid[p] && dut.u_sched.sess[p] == SESS_W'(DISK_SESS)) n++;
    end
    if (n == NP) all_busy_disk++;
  end

  // ---------------- network monitors ----------------
  bit net_phase = 0;
  int conc_conn = 0;
  always @(posedge clk) if (rst_n && net_phase) begin
    logic [7:0] seen;
    seen = '0;
    for (int p = 0; p < NP; p++)
      if (!dut.pe_idle[p] && dut.u_sched.sess_valid[p]) seen[dut.u_sched.sess[p]] = 1'b1;
    if ($countones(seen) >= 2) conc_conn++;
  end

  longint rt_sum = 0;
  int rt_n = 0, rt_min = 1000000;

  task automatic connection(int s);
    int t;
    longint t0;
    for (int pk = 0; pk < PACKETS; pk++)
      for (int b = 0; b < BLK_PER_PACKET; b++) begin
        push(RQ_ENCRYPT, s, $urandom, $urandom, t);
        t0 = cyc;
        while (pending[t]) @(posedge clk);
        rt_sum += t_recv[t] - t0; rt_n++;
        if (int'(t_recv[t] - t0) < rt_min) rt_min = int'(t_recv[t] - t0);
      end
  endtask

  initial begin
    prog_t p;
    int t;
    real cpb;
    in_valid = 0; in_req = '0; adm_run = '0; adm_pe = 0;
    adm_imem_we = 0; adm_imem_addr = 0; adm_imem_data = '0;
    adm_dmem_we = 0; adm_dmem_addr = 0; adm_dmem_data = 0;
    adm_ks_we = 0; adm_ks_sess = 0; adm_ks_idx = 0; adm_ks_data = 0;
    rx_op = 0; rx_w32 = 0; rx_a = 0; rx_b = 0; rx_rot = 0; xb_bsel = 0; xb_src = 0; xb_map = 0;
    mm_start = 0; mm_a = 0; mm_b = 0; sc_fill_valid = 0; sc_fill_data = '0;
    sc_req_valid = 0; sc_table = 0; sc_index = 0; sc_bb = 0; sc_sync = 0; sc_flush = 0;
    for (int i = 0; i < 256; i++) pending[i] = 0;
    for (int i = 0; i < NP; i++) disk_by_pe[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    p = demo_program();
    for (int e = 0; e < NP; e++)
      for (int i = 0; i < 64; i++) begin
        @(negedge clk);
        adm_pe = 2'(e); adm_imem_we = 1; adm_imem_addr = PC_W'(i); adm_imem_data = p[i];
      end
    @(negedge clk); adm_imem_we = 0; adm_run = '1;

    // ---- disk: host-computed context written into the keystore ----
    key[DISK_SESS] = 32'h5EC7_0A11;
    for (int a = 0; a < CTX_WORDS; a++) begin
      @(negedge clk);
      adm_ks_we = 1; adm_ks_sess = SESS_W'(DISK_SESS); adm_ks_idx = CTX_AW'(a);
      adm_ks_data = (a < 1024) ? ref_table(a / 256, a % 256, key[DISK_SESS])
                               : (a == 1024 ? key[DISK_SESS] : 32'd0);
    end
    @(negedge clk); adm_ks_we = 0;
    disk_phase = 1;
    t_first_disk = cyc;
    for (int n = 0; n < SECTORS * BLK_PER_SECTOR; n++) begin
      push(RQ_ENCRYPT, DISK_SESS, $urandom, $urandom, t);
      if (n == 64) t_64 = cyc;
    end
    while (n_recv < SECTORS * BLK_PER_SECTOR) @(posedge clk);
    t_last_disk = cyc;
    disk_phase = 0;
    for (int i = 0; i < NP; i++) chk(disk_by_pe[i] > 0, $sformatf("element %0d served the volume", i));
    chk(all_busy_disk > 0, "all elements busy with one session at once");
    cpb = real'(t_last_disk - t_64) / real'(SECTORS * BLK_PER_SECTOR - 64);
    chk(cpb < 33.0 / 2.0, $sformatf("disk steady state %0.2f cycles per block", cpb));
    $display("disk: %0d blocks in %0d cycles, steady state %0.2f cycles/block (%0.2f bytes/cycle)",
             SECTORS * BLK_PER_SECTOR, t_last_disk - t_first_disk, cpb, 16.0 / cpb);

    // ---- network: three chained connections ----
    net_phase = 1;
    for (int c = 0; c < NCONN; c++) push(RQ_CREATE, 2 + c, $urandom, 0, t);
    while (n_recv < SECTORS * BLK_PER_SECTOR + NCONN) @(posedge clk);
    fork
      connection(2);
      connection(3);
      connection(4);
    join
    net_phase = 0;
    chk(conc_conn > 0, "connections processed concurrently");
    chk(rt_min >= 9 + ROUNDS * 6, $sformatf("block round trip %0d below the encrypt time", rt_min));
    chk(rt_n == NCONN * PACKETS * BLK_PER_PACKET, "all packet blocks sent");
    $display("network: %0d blocks, round trip min %0d mean %0.1f cycles; %0.0f cycles per 1500-byte packet",
             rt_n, rt_min, real'(rt_sum) / real'(rt_n), real'(rt_sum) / real'(rt_n) * BLK_PER_PACKET);
    repeat (10) @(posedge clk);
    for (int i = 0; i < 256; i++) chk(!pending[i], $sformatf("tag %0d never answered", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
