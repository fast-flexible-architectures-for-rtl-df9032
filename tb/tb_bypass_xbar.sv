// tb_bypass_xbar: random operand/result patterns for the full-crossbar
// bypass. Every one of the 12 operands must take the newest matching result
// of the previous bundle (highest slot on a tie), from any of the 4 slots,
// and fall back to the register-file value otherwise.
module tb_bypass_xbar;
  logic clk = 0;
  logic [11:0][4:0]  src;
  logic [11:0][31:0] rf_data, opnd;
  logic [3:0]        wb_we;
  logic [3:0][4:0]   wb_rd;
  logic [3:0][31:0]  wb_data;
  logic [11:0]       fwd;
  int checks = 0, failures = 0;
  int per_slot [4] = '{0, 0, 0, 0};

  bypass_xbar dut (.*);
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
    logic [31:0] exp;
    int hit;
    for (int n = 0; n < 3000; n++) begin
      for (int o = 0; o < 12; o++) begin src[o] = 5'($urandom_range(0, 7)); rf_data[o] = $urandom; end
      for (int s = 0; s < 4; s++) begin
        wb_we[s] = 1'($urandom); wb_rd[s] = 5'($urandom_range(0, 7)); wb_data[s] = $urandom;
      end
      #1;
      for (int o = 0; o < 12; o++) begin
        exp = rf_data[o]; hit = -1;
        for (int s = 0; s < 4; s++) if (wb_we[s] && wb_rd[s] == src[o]) begin exp = wb_data[s]; hit = s; end
        if (hit >= 0) per_slot[hit]++;
        chk(opnd[o] == exp, $sformatf("operand %0d", o));
        chk(fwd[o] == (hit >= 0), "forward flag");
      end
      @(posedge clk);
    end
    for (int s = 0; s < 4; s++) chk(per_slot[s] > 0, "every slot forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
