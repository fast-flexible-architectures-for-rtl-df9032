// long_unit: the multiplier of a CryptoManiac functional unit, used for the
// two "long" operations: MUL (low 32 bits of a 32x32 product) and MULMOD
// (16-bit multiply modulo 0x10001, as in IDEA, with 0 standing for 2^16).
// MULMOD uses one 16x16 multiply, then the two parallel 16-bit differences
// lo-hi and lo-hi+1 and two levels of selection: the reduction the document
// describes for its modular multiplier.
// Timing: operands are captured when start is seen while idle; done is high
// in the MUL_LAT-th cycle counted from that one (3 by default, the document's
// "under three cycles"), with y valid. The caller holds start until done.
module long_unit #(
  parameter int MUL_LAT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        mulmod,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        done,
  output logic [31:0] y
);
  logic [31:0] ra, rb;
  logic        rmod, busy;
  logic [$clog2(MUL_LAT+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; cnt <= '0;
    end else if (!busy && start && MUL_LAT > 1) begin
      busy <= 1'b1; cnt <= 1;
    end else if (busy) begin
      if (done) begin busy <= 1'b0; cnt <= '0; end
      else cnt <= cnt + 1'b1;
    end

  always_ff @(posedge clk)
    if (!busy && start) begin
      ra <= a; rb <= b; rmod <= mulmod;
    end

  // with MUL_LAT == 1 the result is produced combinationally from the inputs
  logic [31:0] oa, ob;
  logic        om;
  assign oa = (MUL_LAT > 1) ? ra : a;
  assign ob = (MUL_LAT > 1) ? rb : b;
  assign om = (MUL_LAT > 1) ? rmod : mulmod;
  assign done = (MUL_LAT > 1) ? (busy && int'(cnt) == MUL_LAT-1) : start;

  logic [31:0] p16;
  logic [15:0] lo, hi, d0, d1, mm;
  always_comb begin
    p16 = oa[15:0] * ob[15:0];
    lo  = p16[15:0];
    hi  = p16[31:16];
    d0  = lo - hi;
    d1  = lo - hi + 16'd1;
    // first level: wrap-around correction; second level: zero operands
    mm  = (lo < hi) ? d1 : d0;
    if (oa[15:0] == '0)      mm = 16'd1 - ob[15:0];
    else if (ob[15:0] == '0) mm = 16'd1 - oa[15:0];
    y   = om ? {16'd0, mm} : oa * ob;
  end
endmodule
