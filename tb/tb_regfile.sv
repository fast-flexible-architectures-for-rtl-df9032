// tb_regfile: random 4-write / 12-read traffic against a register model.
// Checks every read port each cycle, the write-through of a same-cycle
// write to a read of that register, and that the highest slot wins when
// several slots write one register.
module tb_regfile;
  logic clk = 0;
  logic [11:0][4:0]  raddr;
  logic [11:0][31:0] rdata;
  logic [3:0]        we;
  logic [3:0][4:0]   waddr;
  logic [3:0][31:0]  wdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.*);
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

  initial begin
    logic [31:0] exp;
    // initialise every register
    raddr = '0; we = '0; waddr = '0; wdata = '0;
    for (int r = 0; r < 32; r += 4) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        we[w] = 1; waddr[w] = 5'(r + w); wdata[w] = $urandom; model[r + w] = wdata[w];
      end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int w = 0; w < 4; w++) begin
        we[w] = 1'($urandom); waddr[w] = 5'($urandom_range(0, 7) + 16 * $urandom_range(0, 1)); wdata[w] = $urandom;
      end
      for (int r = 0; r < 12; r++) raddr[r] = 5'($urandom_range(0, 9) + 16 * $urandom_range(0, 1));
      #1;
      for (int r = 0; r < 12; r++) begin
        exp = model[raddr[r]];
        for (int w = 0; w < 4; w++) if (we[w] && waddr[w] == raddr[r]) exp = wdata[w];
        chk(rdata[r] == exp, $sformatf("read port %0d", r));
      end
      for (int w = 0; w < 4; w++) if (we[w]) model[waddr[w]] = wdata[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
