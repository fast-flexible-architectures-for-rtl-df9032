// tb_rot_xor_unit: random ROL, ROR, ROLX and RORX in 64- and 32-bit modes,
// compared with rotates built from a doubled operand in the testbench.
module tb_rot_xor_unit;
  logic clk = 0;
  logic [1:0] op; logic w32;
  logic [63:0] a, b, y; logic [5:0] rot;
  int checks = 0, failures = 0;

  rot_xor_unit dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] model(logic [1:0] o, bit w, logic [63:0] x, logic [63:0] z, logic [5:0] r);
    int n; logic [127:0] d; logic [63:0] d32; logic [63:0] res;
    n = o[1] ? int'(r) : int'(z[5:0]);
    if (w) begin
      n = n % 32; if (o[0]) n = (32 - n) % 32;
      d32 = {x[31:0], x[31:0]};
      res = {32'd0, d32[63 - n -: 32]};
    end else begin
      if (o[0]) n = (64 - n) % 64;
      d = {x, x};
      res = d[127 - n -: 64];
    end
    return o[1] ? res ^ z : res;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      op = 2'($urandom); w32 = 1'($urandom); a = {$urandom, $urandom}; b = {$urandom, $urandom};
      rot = 6'($urandom);
      @(posedge clk);
      chk(y == model(op, w32, a, b, rot), $sformatf("op %0d w32 %0d", op, w32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
