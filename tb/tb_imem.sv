// tb_imem: loads all 64 bundles with random data, then reads them back in
// random order, checking the one-cycle synchronous read and that the output
// holds its bundle while re is low.
module tb_imem;
  logic clk = 0;
  logic re, we;
  logic [5:0] raddr, waddr;
  logic [127:0] rdata, wdata;
  logic [127:0] model [64];
  int checks = 0, failures = 0;

  imem dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] held;
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = {$urandom, $urandom, $urandom, $urandom};
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk); re = 1; raddr = 6'($urandom);
      @(posedge clk); #1;
      chk(rdata == model[raddr], "read back");
      held = rdata; re = 0; raddr = raddr + 1'b1;
      @(posedge clk); #1;
      chk(rdata == held, "hold when re low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
