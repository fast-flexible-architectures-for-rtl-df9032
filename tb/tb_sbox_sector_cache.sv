// tb_sbox_sector_cache: random SBOX accesses to a few 1 KB tables held in a
// model data-cache memory. Checks every returned word, that a hit answers
// one cycle after the request, that a miss requests the right 32-byte line
// and refills it, that switching tables flushes the cache, and that
// SBOXSYNC makes later accesses see table updates made in memory.
module tb_sbox_sector_cache;
  logic clk = 0, rst_n = 0;
  logic req_valid, req_ready, rsp_valid, fill_req, fill_valid, sync, flush;
  logic [31:0] table_reg, index_reg, rsp_data, fill_addr;
  logic [1:0] bb;
  logic [255:0] fill_data;
  logic [31:0] dmem [4096];            // 16 KB backing store, word addressed
  int checks = 0, failures = 0, hits = 0, misses = 0;

  sbox_sector_cache dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // model data cache: answers a fill two cycles after the request
  initial begin
    fill_valid = 0; fill_data = '0;
    forever begin
      @(posedge clk); #1;
      fill_valid = 0;
      if (fill_req) begin
        @(posedge clk); #1;
        for (int w = 0; w < 8; w++) fill_data[32*w +: 32] = dmem[(fill_addr[13:0] >> 2) + w];
        fill_valid = 1;
        @(posedge clk); #1; fill_valid = 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(int tbl, logic [31:0] idxr, int b, output int lat);
    logic [31:0] exp;
    @(negedge clk);
    table_reg = 32'(tbl * 1024) | 32'($urandom_range(0, 1023));   // low bits ignored
    index_reg = idxr; bb = 2'(b); req_valid = 1;
    exp = dmem[tbl * 256 + int'(idxr[8*b +: 8])];
    @(posedge clk); #1; req_valid = 0; lat = 1;
    while (!rsp_valid) begin @(posedge clk); #1; lat++; end
    chk(rsp_data == exp, $sformatf("table %0d index %h byte %0d", tbl, idxr, b));
  endtask

  initial begin
    int lat;
    req_valid = 0; table_reg = 0; index_reg = 0; bb = 0; sync = 0; flush = 0;
    for (int i = 0; i < 4096; i++) dmem[i] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1;
    access(2, 32'h0000_0010, 0, lat); chk(lat > 1, "cold access misses"); misses++;
    access(2, 32'h0000_0013, 0, lat); chk(lat == 1, "same sector hits in one cycle"); hits++;
    access(2, 32'h0000_1300, 1, lat); chk(lat == 1, "byte select, same sector"); hits++;
    access(2, 32'h0000_0020, 0, lat); chk(lat > 1, "other sector misses"); misses++;
    access(3, 32'h0000_0010, 0, lat); chk(lat > 1, "other table misses"); misses++;
    access(2, 32'h0000_0010, 0, lat); chk(lat > 1, "table switch flushed"); misses++;
    // SBOXSYNC: update memory, old value cached until sync
    dmem[2 * 256 + 16] = 32'hCAFE_F00D;
    @(negedge clk); sync = 1; @(negedge clk); sync = 0;
    access(2, 32'h0000_0010, 0, lat); chk(lat > 1, "miss after SBOXSYNC"); misses++;
    // task switch flush
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    access(2, 32'h0000_0010, 0, lat); chk(lat > 1, "miss after flush"); misses++;
    for (int n = 0; n < 3000; n++) begin
      access($urandom_range(0, 15) == 0 ? 6 : 5, $urandom, $urandom_range(0, 3), lat);
      if (lat == 1) hits++; else misses++;
    end
    chk(hits > 100 && misses > 10, "hits and misses both seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
