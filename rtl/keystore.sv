// keystore: high-density storage of per-session key context for the
// CryptoManiac system. Each of NUM_SESS sessions owns CTX_WORDS 32-bit words
// (default 1280 = 5 KB: the four 256-entry SBOX tables of a processing
// element, then 256 words of key data kept at the top of its data memory).
//
// A context switch (start, with old_sess/old_valid/new_sess) walks the
// context once, one word per cycle: at word i it saves the element's word i
// (ctx_rdata) into the old session when old_valid, and writes the new
// session's word i into the element (ctx_we/ctx_wdata). A session never
// written loads as zeros. done pulses in the cycle after the last word, so a
// switch takes CTX_WORDS+1 cycles. invalidate releases a session (delete
// request). The host may also write words directly (adm_*), which marks the
// session valid.
// The 5 KB context bound follows the document; the word-serial transfer and
// the write-back-on-switch policy are this design's choices.
// rst_n is the asynchronous reset and also disables the assertion during
// reset, which is why a linter may report it as used both ways.
module keystore #(
  parameter int NUM_SESS  = 8,
  parameter int CTX_WORDS = 1280,
  localparam int SW = $clog2(NUM_SESS),
  localparam int AW = $clog2(CTX_WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          old_valid,
  input  logic [SW-1:0] old_sess,
  input  logic [SW-1:0] new_sess,
  output logic          busy,
  output logic          done,
  input  logic          invalidate,
  input  logic [SW-1:0] inv_sess,
  // word-serial context bus to the selected processing element
  output logic [AW-1:0] ctx_addr,
  output logic          ctx_we,
  output logic [31:0]   ctx_wdata,
  input  logic [31:0]   ctx_rdata,
  // host writes
  input  logic          adm_we,
  input  logic [SW-1:0] adm_sess,
  input  logic [AW-1:0] adm_idx,
  input  logic [31:0]   adm_data,
  output logic [NUM_SESS-1:0] sess_valid
);
  localparam int DEPTH = NUM_SESS * CTX_WORDS;
  localparam int MW    = $clog2(DEPTH);

  logic [31:0]   mem [DEPTH];
  logic [AW-1:0] idx;
  logic [SW-1:0] os, ns;
  logic          ov;

  function automatic logic [MW-1:0] flat(logic [SW-1:0] s, logic [AW-1:0] i);
    return MW'(s) * MW'(CTX_WORDS) + MW'(i);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; idx <= '0; os <= '0; ns <= '0; ov <= 1'b0;
      sess_valid <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy <= 1'b1; idx <= '0; os <= old_sess; ns <= new_sess; ov <= old_valid;
      end else if (busy) begin
        if (idx == AW'(CTX_WORDS-1)) begin
          busy <= 1'b0; done <= 1'b1;
          if (ov) sess_valid[os] <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
      if (adm_we) sess_valid[adm_sess] <= 1'b1;
      if (invalidate) sess_valid[inv_sess] <= 1'b0;
    end

  always_ff @(posedge clk) begin
    if (busy && ov) mem[flat(os, idx)] <= ctx_rdata;
    if (adm_we)     mem[flat(adm_sess, adm_idx)] <= adm_data;
  end

  assign ctx_addr  = idx;
  assign ctx_we    = busy;
  assign ctx_wdata = sess_valid[ns] ? mem[flat(ns, idx)] : '0;

  assert property (@(posedge clk) disable iff (!rst_n) start && !busy && old_valid |-> old_sess != new_sess);
endmodule
