// tb_btb: branch target buffer. After reset every lookup misses; a taken
// update makes that address hit with its target on the next cycle; a
// not-taken update removes it; a taken branch at an address with the same
// index replaces the entry (the old one then misses). Random traffic is
// compared against a model of the 16 entries.
module tb_btb;
  logic clk = 0, rst_n = 0;
  logic [5:0] pc, target, upd_pc, upd_target;
  logic hit, upd_valid, upd_taken;
  int checks = 0, failures = 0;
  bit mv [16]; logic [5:0] mtag [16], mtgt [16];

  btb dut (.*);
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

  task automatic upd(logic [5:0] a, logic [5:0] t, bit taken);
    @(negedge clk);
    upd_valid = 1; upd_pc = a; upd_target = t; upd_taken = taken;
    @(posedge clk); #1; upd_valid = 0;
    if (taken) begin mv[a[3:0]] = 1; mtag[a[3:0]] = a; mtgt[a[3:0]] = t; end
    else if (mv[a[3:0]] && mtag[a[3:0]] == a) mv[a[3:0]] = 0;
  endtask

  initial begin
    upd_valid = 0; upd_taken = 0; upd_pc = 0; upd_target = 0; pc = 0;
    for (int i = 0; i < 16; i++) mv[i] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int a = 0; a < 64; a++) begin pc = 6'(a); #1; chk(!hit, "miss after reset"); end
    upd(6'd20, 6'd18, 1);
    pc = 6'd20; #1; chk(hit && target == 6'd18, "hit after taken update");
    pc = 6'd36; #1; chk(!hit, "same index, other tag misses");
    upd(6'd36, 6'd2, 1);
    pc = 6'd36; #1; chk(hit && target == 6'd2, "replacement hits");
    pc = 6'd20; #1; chk(!hit, "replaced entry misses");
    upd(6'd36, 6'd2, 0);
    pc = 6'd36; #1; chk(!hit, "not-taken removes");
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 2) == 0) upd(6'($urandom), 6'($urandom), 1'($urandom));
      pc = 6'($urandom); #1;
      chk(hit == (mv[pc[3:0]] && mtag[pc[3:0]] == pc), "random hit");
      if (hit) chk(target == mtgt[pc[3:0]], "random target");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
