// tb_long_unit: random MUL and MULMOD operations, including zero operands
// (which stand for 2^16 in MULMOD). Expected values come from plain 64-bit
// arithmetic and a % 65537 reduction. Also checks the latency: done must
// rise in the third cycle after start (MUL_LAT = 3) and not before.
module tb_long_unit;
  logic clk = 0, rst_n = 0;
  logic start, mulmod, done;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  long_unit #(.MUL_LAT(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] expect_y(bit m, logic [31:0] x, logic [31:0] z);
    longint unsigned p, q, r;
    if (!m) return 32'(longint'(x) * longint'(z));
    p = (x[15:0] == 0) ? 65536 : x[15:0];
    q = (z[15:0] == 0) ? 65536 : z[15:0];
    r = (p * q) % 65537;
    return (r == 65536) ? 32'd0 : 32'(r);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    start = 0; mulmod = 0; a = 0; b = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      mulmod = 1'($urandom); a = $urandom; b = $urandom;
      if (n % 7 == 0) a[15:0] = 0;
      if (n % 11 == 0) b[15:0] = 0;
      if (n % 13 == 0) begin a[15:0] = 16'hFFFF; b[15:0] = 16'hFFFF; end
      start = 1; cyc = 1;
      #1;
      while (!done) begin @(posedge clk); #1; cyc++; end
      chk(cyc == 3, $sformatf("latency %0d", cyc));
      chk(y == expect_y(mulmod, a, b),
          $sformatf("%s %h %h -> %h", mulmod ? "mulmod" : "mul", a, b, y));
      @(posedge clk); #1; start = 0;
      chk(!done, "done drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
