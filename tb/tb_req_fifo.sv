// tb_req_fifo: self-checking test of req_fifo. Fills the queue to full with
// random words (in_ready must drop exactly at DEPTH), drains it checking the
// order, then runs random simultaneous push/pop traffic against a queue
// model, including pointer wrap-around.
module tb_req_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [31:0] in_data, out_data;
  logic [4:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  req_fifo #(.T(logic [31:0]), .DEPTH(DEPTH)) dut (.*);
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
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid && in_ready, "empty after reset");
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      in_valid = 1; in_data = $urandom; q.push_back(in_data);
      @(posedge clk); #1;
    end
    in_valid = 0;
    chk(!in_ready, "full after DEPTH pushes");
    chk(count == DEPTH, "count at full");
    // a push while full is dropped
    in_valid = 1; in_data = 32'hDEAD_BEEF; @(posedge clk); #1; in_valid = 0;
    // drain
    for (int i = 0; i < DEPTH; i++) begin
      chk(out_valid, "valid while draining");
      chk(out_data == q[0], $sformatf("drain order %0d", i));
      void'(q.pop_front());
      out_ready = 1; @(posedge clk); #1; out_ready = 0;
    end
    chk(!out_valid, "empty after drain");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 1);
      out_ready = $urandom_range(0, 1);
      in_data   = $urandom;
      if (out_valid) chk(out_data == q[0], "random order");
      chk(out_valid == (q.size() != 0), "valid matches model");
      chk(in_ready == (q.size() != DEPTH), "ready matches model");
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
