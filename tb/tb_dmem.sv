// tb_dmem: random stores and loads on both ports of the 4 KB data memory
// against a model, including reads of a word written the cycle before and
// the priority of port A when both ports write the same word.
module tb_dmem;
  logic clk = 0;
  logic [9:0] a_addr, b_addr;
  logic [31:0] a_rdata, a_wdata, b_rdata, b_wdata;
  logic a_we, b_we;
  logic [31:0] model [1024];
  int checks = 0, failures = 0;

  dmem dut (.*);
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
    a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); b_we = 1; b_addr = 10'(i); b_wdata = $urandom; model[i] = b_wdata;
    end
    @(negedge clk); b_we = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a_addr = 10'($urandom_range(0, 31)); b_addr = 10'($urandom_range(0, 31));
      a_we = 1'($urandom); b_we = 1'($urandom); a_wdata = $urandom; b_wdata = $urandom;
      #1;
      chk(a_rdata == model[a_addr], "port A read");
      chk(b_rdata == model[b_addr], "port B read");
      if (b_we) model[b_addr] = b_wdata;
      if (a_we) model[a_addr] = a_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
