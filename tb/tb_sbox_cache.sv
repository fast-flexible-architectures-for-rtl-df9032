// tb_sbox_cache: writes all 256 entries of the SBOX table with random words,
// then reads them back on both read ports in random order and compares with
// a model array; checks that a write is visible on the next cycle.
module tb_sbox_cache;
  logic clk = 0;
  logic [7:0] idx, cidx, waddr;
  logic [31:0] rdata, crdata, wdata;
  logic we;
  logic [31:0] model [256];
  int checks = 0, failures = 0;

  sbox_cache dut (.*);
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
    we = 0; idx = 0; cidx = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1; waddr = 8'(i); wdata = $urandom; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      idx = 8'($urandom); cidx = 8'($urandom); #1;
      chk(rdata == model[idx], "unit read port");
      chk(crdata == model[cidx], "context read port");
    end
    // overwrite one entry, read it next cycle
    @(negedge clk); we = 1; waddr = 8'h5A; wdata = 32'h1234_5678; model[8'h5A] = wdata;
    @(negedge clk); we = 0; idx = 8'h5A; #1;
    chk(rdata == 32'h1234_5678, "rewrite visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
