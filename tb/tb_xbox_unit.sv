// tb_xbox_unit: random XBOX permutations. Also builds a full 64-bit
// permutation from the eight byte operations ORed together and checks that
// it equals the permutation applied bit by bit.
module tb_xbox_unit;
  logic clk = 0;
  logic [2:0] bsel; logic [63:0] src, map, y;
  int checks = 0, failures = 0;

  xbox_unit dut (.*);
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
    int perm [64];
    logic [63:0] full, expf, e;
    for (int n = 0; n < 2000; n++) begin
      bsel = 3'($urandom); src = {$urandom, $urandom}; map = {$urandom, $urandom};
      @(posedge clk);
      e = '0;
      for (int j = 0; j < 8; j++) e[8*bsel + j] = src[(map >> (6*j)) & 63];
      chk(y == e, "partial permutation");
    end
    for (int t = 0; t < 50; t++) begin
      for (int i = 0; i < 64; i++) perm[i] = i;
      for (int i = 63; i > 0; i--) begin
        int j, tmp; j = $urandom_range(0, i); tmp = perm[i]; perm[i] = perm[j]; perm[j] = tmp;
      end
      src = {$urandom, $urandom}; full = '0;
      for (int bb = 0; bb < 8; bb++) begin
        bsel = 3'(bb); map = '0;
        for (int j = 0; j < 8; j++) map[6*j +: 6] = 6'(perm[8*bb + j]);
        @(posedge clk);
        full |= y;
      end
      for (int i = 0; i < 64; i++) expf[i] = src[perm[i]];
      chk(full == expf, "full permutation from 8 XBOX ops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
