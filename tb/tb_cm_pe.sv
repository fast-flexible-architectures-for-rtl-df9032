// tb_cm_pe: runs the demonstration program (cm_asm_pkg) on one processing
// element at its default sizes. The testbench plays scheduler and keystore:
//   * CREATE builds four SBOX tables from a key; all 1024 entries and the
//     stored key word are read back through the context port and compared
//     with the model;
//   * ENCRYPT requests are compared with the model cipher; the result
//     queue is held off for a while so SEND must stall;
//   * a context for another key is written through the context port and an
//     ENCRYPT with it must use the new tables;
//   * DECRYPT undoes ENCRYPT and matches the model's inverse rounds;
//   * the Blowfish kernel (S-boxes = the loaded tables, P = data words)
//     matches a reference Blowfish; warm, it takes 9 + 16*3 cycles, three
//     per round;
//   * DELETE gets its acknowledgement;
//   * the IDEA kernel, with subkeys from the IDEA key schedule placed in the
//     SBOX tables, matches a reference IDEA (which itself reproduces the
//     published test vector); warm, it takes 14 + 8*(3 + 3*MUL_LAT) cycles;
//   * redirection: with run low the host loads a three-bundle routine at
//     bundle 60 and sets start_pc to 60; when run rises the element must
//     execute it (a result with word 0 = 0x1234 appears without any request)
//     and then return to RECV.
// Timing: each MULMOD bundle must hold EX for exactly MUL_LAT (3) cycles,
// and a warm ENCRYPT or DECRYPT (branches already in the BTB) must send its result
// 9 + ROUNDS*(3 + MUL_LAT) cycles after RECV accepts it: 4 bundles per
// round plus the multiply stall, 6 bundles of set-up and vector jump, and a
// two-cycle flush for the loop exit.
module tb_cm_pe;
  import cm_pkg::*;
  import cm_asm_pkg::*;
  localparam int MUL_LAT = 3;

  logic clk = 0, rst_n = 0, run = 0;
  logic [5:0] start_pc = '0;
  logic rq_valid, rq_ready, rs_valid, rs_ready, idle;
  request_t rq_data;
  response_t rs_data;
  logic adm_imem_we, adm_dmem_we, ctx_we;
  logic [5:0] adm_imem_addr;
  bundle_t adm_imem_data;
  logic [9:0] adm_dmem_addr;
  logic [31:0] adm_dmem_data, ctx_wdata, ctx_rdata;
  logic [10:0] ctx_addr;
  int checks = 0, failures = 0;
  int long_run = 0, n_long = 0, n_redirect = 0, n_pred_ok = 0, n_fwd = 0, n_send_stall = 0;
  longint cyc = 0, t_acc = 0;
  int lat_m = 0;
  bit first_rs = 0;

  cm_pe dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event monitors
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.long_pending) long_run++;
    else if (long_run != 0) begin
      chk(long_run == MUL_LAT - 1, $sformatf("long stall of %0d cycles", long_run));
      n_long++; long_run = 0;
    end
    if (dut.redirect) n_redirect++;
    if (dut.ex_fire && dut.ex_pred && !dut.redirect) n_pred_ok++;
    if (dut.ex_valid && dut.u_byp.fwd != 0) n_fwd++;
    if (rs_valid && !rs_ready) n_send_stall++;
    if (rq_valid && rq_ready) begin t_acc = cyc; first_rs = 1; end
    if (rs_valid && first_rs) begin lat_m = int'(cyc - t_acc); first_rs = 0; end
  end

  task automatic request(logic [2:0] code, logic [7:0] tag, logic [31:0] d0, logic [31:0] d1,
                         int hold, output response_t r, output int lat);
    @(negedge clk);
    rq_data = '0; rq_data.code = code; rq_data.tag = tag; rq_data.sess = 3'd1;
    rq_data.data[0] = d0; rq_data.data[1] = d1; rq_valid = 1;
    @(posedge clk);
    while (!rq_ready) @(posedge clk);
    #1 rq_valid = 0;
    while (!rs_valid) @(posedge clk);
    repeat (hold) @(posedge clk);
    #1 rs_ready = 1;
    r = rs_data;
    lat = lat_m;
    @(posedge clk); #1 rs_ready = 0;
  endtask

  initial begin
    prog_t p;
    response_t r;
    words_t e;
    logic [31:0] key, key2, l, rr;
    int lat;
    rq_valid = 0; rq_data = '0; rs_ready = 0;
    adm_imem_we = 0; adm_imem_addr = 0; adm_imem_data = '0;
    adm_dmem_we = 0; adm_dmem_addr = 0; adm_dmem_data = 0;
    ctx_we = 0; ctx_addr = 0; ctx_wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    p = demo_program();
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); adm_imem_we = 1; adm_imem_addr = 6'(i); adm_imem_data = p[i];
    end
    @(negedge clk); adm_imem_we = 0; run = 1;
    repeat (5) @(posedge clk);
    chk(idle, "waits in RECV after start");

    key = 32'h1357_9BDF;
    request(RQ_CREATE, 8'h11, key, 0, 0, r, lat);
    chk(r.tag == 8'h11 && r.data[0] == key && r.data[1] == 0, "create reply");
    @(negedge clk);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 256; i++) begin
        ctx_addr = 11'(k * 256 + i); #1;
        chk(ctx_rdata == ref_table(k, i, key), $sformatf("table %0d[%0d]", k, i));
      end
    ctx_addr = 11'd1024; #1; chk(ctx_rdata == key, "key word stored");

    for (int n = 0; n < 6; n++) begin
      l = $urandom; rr = $urandom;
      if (n == 2) rr[15:0] = 0;                           // mulmod zero operand
      request(RQ_ENCRYPT, 8'(n), l, rr, (n == 1) ? 7 : 0, r, lat);
      e = ref_encrypt(l, rr, key, 8'(n));
      chk(r.data == e, $sformatf("encrypt %0d: got %h exp %h", n, r.data, e));
      if (n >= 1) chk(lat == 9 + ROUNDS * (3 + MUL_LAT), $sformatf("warm encrypt latency %0d", lat));
    end

    // load another session's context through the context port
    key2 = 32'hFEDC_0042;
    for (int a = 0; a < CTX_WORDS; a++) begin
      @(negedge clk); ctx_we = 1; ctx_addr = 11'(a);
      ctx_wdata = (a < 1024) ? ref_table(a / 256, a % 256, key2) : (a == 1024 ? key2 : ref_bf_p(a - 1025));
    end
    @(negedge clk); ctx_we = 0;
    l = 32'h0123_4567; rr = 32'h89AB_CDEF;
    request(RQ_ENCRYPT, 8'h77, l, rr, 0, r, lat);
    chk(r.data == ref_encrypt(l, rr, key2, 8'h77), "encrypt with loaded context");

    // decrypt: exact reference, round trip back to the plaintext, warm latency
    for (int n = 0; n < 3; n++) begin
      e = ref_decrypt(r.data[0], r.data[1], key2, 8'(40 + n));
      request(RQ_DECRYPT, 8'(40 + n), r.data[0], r.data[1], 0, r, lat);
      chk(r.data == e, $sformatf("decrypt %0d against reference", n));
      if (n == 0) chk(r.data[0] == l && r.data[1] == rr, "decrypt undoes encrypt");
      if (n > 0) chk(lat == 9 + ROUNDS * (3 + MUL_LAT), $sformatf("warm decrypt latency %0d", lat));
    end
    request(RQ_DECRYPT, 8'h55, 32'hDEAD_BEEF, 32'h0000_1234, 0, r, lat);
    chk(r.data == ref_decrypt(32'hDEAD_BEEF, 32'h0000_1234, key2, 8'h55), "decrypt against reference");

    // Blowfish kernel on the loaded context (S-boxes = tables, P = data words)
    for (int n = 0; n < 3; n++) begin
      l = (n == 0) ? 32'd0 : $urandom; rr = (n == 0) ? 32'd0 : $urandom;
      request(RQ_BLOWFISH, 8'(60 + n), l, rr, 0, r, lat);
      chk(r.data == ref_blowfish(l, rr, key2, 8'(60 + n)),
          $sformatf("blowfish %0d: got %h exp %h", n, r.data, ref_blowfish(l, rr, key2, 8'(60 + n))));
      if (n > 0) chk(lat == 9 + BF_ROUNDS * 3, $sformatf("warm blowfish latency %0d", lat));
    end

    request(RQ_DELETE, 8'h99, 0, 0, 0, r, lat);
    chk(r.tag == 8'h99 && r.data[0] == 32'(RQ_DELETE), "delete acknowledged");

    // redirect the element to a routine at bundle 60
    @(negedge clk); run = 0;
    p[60] = bnd(ldi(6, 32'h1234));
    p[61] = bnd(spc(SP_RSW, 0, 6, 0, 0), 0, 0, spc(SP_SEND, 0, 0, 0, 0));
    p[62] = bnd(0, 0, 0, spc(SP_JMP, 0, 0, 0, 0));
    for (int i = 60; i < 63; i++) begin
      @(negedge clk); adm_imem_we = 1; adm_imem_addr = 6'(i); adm_imem_data = p[i];
    end
    @(negedge clk); adm_imem_we = 0; start_pc = 6'd60;
    @(negedge clk); run = 1; lat = 0;
    while (!rs_valid && lat < 100) begin @(posedge clk); lat++; end
    chk(rs_valid && rs_data.data[0] == 32'h1234, "redirected routine sent its result");
    chk(lat == 4, $sformatf("redirected result after %0d cycles", lat));
    #1 rs_ready = 1; @(posedge clk); #1 rs_ready = 0;
    repeat (5) @(posedge clk);
    chk(idle && !rs_valid, "back in RECV after the redirected routine");

    // restore the program bundles the redirect test replaced
    p = demo_program();
    for (int i = 60; i < 63; i++) begin
      @(negedge clk); adm_imem_we = 1; adm_imem_addr = 6'(i); adm_imem_data = p[i];
    end
    @(negedge clk); adm_imem_we = 0;

    // IDEA kernel: subkeys from the key schedule placed in the SBOX tables
    for (int v = 0; v < 3; v++) begin
      logic [127:0] ik;
      idea_keys_t z;
      ik = (v == 0) ? 128'h0001_0002_0003_0004_0005_0006_0007_0008 : {$urandom, $urandom, $urandom, $urandom};
      z = ref_idea_keys(ik);
      for (int i = 0; i <= IDEA_ROUNDS; i++) begin
        logic [15:0] zz [6];
        for (int j = 0; j < 6; j++) zz[j] = (i < IDEA_ROUNDS || j < 4) ? z[6 * i + j] : 16'd0;
        for (int j = 0; j < 6; j++) begin
          @(negedge clk); ctx_we = 1;
          case (j)
            0: ctx_addr = 11'(2 * 256 + 3 * i);        // T2[3i] = Z1
            1: ctx_addr = 11'(0 * 256 + 3 * i);        // T0[3i] = Z2
            2: ctx_addr = 11'(0 * 256 + 3 * i + 1);    // T0[3i+1] = Z3
            3: ctx_addr = 11'(3 * 256 + 3 * i);        // T3[3i] = Z4
            4: ctx_addr = 11'(0 * 256 + 3 * i + 2);    // T0[3i+2] = Z5
            default: ctx_addr = 11'(1 * 256 + 3 * i);  // T1[3i] = Z6
          endcase
          ctx_wdata = {16'd0, zz[j]};
        end
      end
      @(negedge clk); ctx_we = 0;
      if (v == 0) begin
        e = ref_idea(32'h0000_0001, 32'h0002_0003, z, 8'h70);
        chk(e[0] == 32'h11FB_ED2B && e[1] == 32'h0198_6DE5, $sformatf("IDEA model test vector %h", e));
      end
      for (int n = 0; n < 3; n++) begin
        l = (v == 0 && n == 0) ? 32'h0000_0001 : $urandom; rr = (v == 0 && n == 0) ? 32'h0002_0003 : $urandom;
        request(RQ_IDEA, 8'(70 + n), l, rr, 0, r, lat);
        e = ref_idea(l, rr, z, 8'(70 + n));
        chk(r.data == e, $sformatf("idea %0d.%0d: got %h exp %h", v, n, r.data, e));
        if (n > 0) chk(lat == 14 + IDEA_ROUNDS * (3 + 3 * MUL_LAT), $sformatf("warm idea latency %0d", lat));
      end
    end

    chk(n_long == 11 * ROUNDS + 9 * (3 * IDEA_ROUNDS + 1), $sformatf("MULMOD bundles %0d", n_long));
    chk(n_redirect > 0 && n_pred_ok > 0, "BTB predicted and mispredicted");
    chk(n_fwd > 0, "bypass used");
    chk(n_send_stall > 0, "SEND stalled on a full result queue");
    $display("long=%0d redirects=%0d predicted=%0d fwd=%0d", n_long, n_redirect, n_pred_ok, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
