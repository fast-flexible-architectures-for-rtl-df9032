// tb_functional_unit: random legal operation pairs (short-tiny, tiny-short,
// tiny-tiny, single operations and long operations) on random operands,
// compared with rd = OP2(OP1(a,b),c) computed by an independent model. The
// SBOX table is filled first through the write port and also read through
// the context port.
module tb_functional_unit;
  import cm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] op1, op2;
  logic [1:0] bsel;
  logic [31:0] a, b, c, y;
  logic long_start, long_done;
  logic sbox_we;
  logic [7:0] sbox_waddr, sbox_cidx;
  logic [31:0] sbox_wdata, sbox_crdata;
  logic [31:0] tbl [256];
  int checks = 0, failures = 0;
  int npair [4] = '{0, 0, 0, 0};

  functional_unit #(.HAS_MUL(1'b1), .MUL_LAT(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] rol(logic [31:0] x, int n);
    n = n & 31;
    return n == 0 ? x : (x << n) | (x >> (32 - n));
  endfunction

  function automatic logic [31:0] m_op(logic [3:0] op, logic [31:0] x, logic [31:0] z, int bs);
    longint unsigned p, q;
    case (op)
      OP_XOR:  return x ^ z;
      OP_AND:  return x & z;
      OP_INC:  return x + 1;
      OP_SEXT: return 32'(signed'(x[7:0]));
      OP_ADD:  return x + z;
      OP_ROL:  return rol(x, int'(z[4:0]));
      OP_ROR:  return rol(x, 32 - int'(z[4:0]));
      OP_SBOX: return tbl[x[8*bs +: 8]];
      OP_MUL:  return 32'(longint'(x) * longint'(z));
      OP_MULMOD: begin
        p = x[15:0] == 0 ? 65536 : x[15:0];
        q = z[15:0] == 0 ? 65536 : z[15:0];
        p = (p * q) % 65537;
        return p == 65536 ? 0 : 32'(p);
      end
      default: return x;
    endcase
  endfunction

  logic [3:0] tiny [4] = '{OP_XOR, OP_AND, OP_INC, OP_SEXT};
  logic [3:0] shrt [4] = '{OP_ADD, OP_ROL, OP_ROR, OP_SBOX};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    int kind;
    long_start = 0; sbox_we = 0; sbox_waddr = 0; sbox_wdata = 0; sbox_cidx = 0;
    op1 = 0; op2 = 0; a = 0; b = 0; c = 0; bsel = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); sbox_we = 1; sbox_waddr = 8'(i); sbox_wdata = $urandom; tbl[i] = sbox_wdata;
    end
    @(negedge clk); sbox_we = 0;
    for (int i = 0; i < 256; i += 17) begin
      sbox_cidx = 8'(i); #1; chk(sbox_crdata == tbl[i], "context read");
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      a = $urandom; b = $urandom; c = $urandom; bsel = 2'($urandom);
      kind = $urandom_range(0, 4);
      case (kind)
        0: begin op1 = shrt[$urandom_range(0, 3)]; op2 = tiny[$urandom_range(0, 3)]; end
        1: begin op1 = tiny[$urandom_range(0, 3)]; op2 = shrt[$urandom_range(0, 3)]; end
        2: begin op1 = tiny[$urandom_range(0, 3)]; op2 = tiny[$urandom_range(0, 3)]; end
        3: begin op1 = OP_NOP; op2 = OP_NOP; end
        default: begin op1 = ($urandom_range(0, 1) != 0) ? OP_MUL : OP_MULMOD; op2 = OP_NOP; end
      endcase
      if (kind < 4) begin
        npair[kind > 3 ? 3 : kind]++;
        #1;
        exp = m_op(op2, m_op(op1, a, b, int'(bsel)), c, int'(bsel));
        chk(y == exp, $sformatf("pair %0d/%0d a=%h b=%h c=%h y=%h exp=%h", op1, op2, a, b, c, y, exp));
      end else begin
        long_start = 1; #1;
        while (!long_done) begin @(posedge clk); #1; end
        chk(y == m_op(op1, a, b, 0), "long op");
        @(posedge clk); #1; long_start = 0;
      end
    end
    for (int k = 0; k < 3; k++) chk(npair[k] > 0, "every pair kind exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
