// request_scheduler: hands requests from the input queue, in arrival order,
// to CryptoManiac processing elements (PEs).
// Choice of element, among those waiting for work (pe_idle):
//   1. a free PE that holds the request's session (most recently used first);
//   2. otherwise the least recently used free PE.
// Staying in the same session avoids reloading key tables; the LRU element
// is the one most likely to hold a context nobody needs.
// If the chosen PE holds another session, the scheduler first runs a
// keystore context switch (ctx_start ... ctx_done) that saves the old
// context and loads the new one. Dispatch then raises pe_valid[sel] until
// that PE accepts (pe_ready[sel]). One request is in flight at a time;
// req_ready pops the queue head when a PE is chosen.
//
// Coherence of contexts. A per-session bit ks_cur says the keystore copy is
// current: it is set when the session is saved by a switch or written by the
// host (ks_wr), and cleared when a CREATE (which rebuilds the context in a
// PE) or a DELETE is dispatched. A session that is held only by busy PEs is
// loaded into another PE only while ks_cur is set, so several PEs can serve
// one session in parallel (a disk volume) once its tables are in the
// keystore; otherwise the request waits for the busy holder (the queue head
// blocks). A CREATE invalidates the session in every other PE, so no stale
// copy is used or written back later. A DELETE releases the session in the
// keystore and in every PE and goes to the chosen PE without a switch.
// Contexts are treated as read-only outside CREATE.
// Recency is kept as one saturating age counter per PE, cleared on dispatch.
// The selection rule follows the document; the counters, the FSM, the
// coherence rule and the delete handling are this design's choices.
module request_scheduler
  import cm_pkg::*;
#(
  parameter int NUM_PE = 4,
  localparam int PW = (NUM_PE > 1) ? $clog2(NUM_PE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  request_t          req,
  input  logic [NUM_PE-1:0] pe_idle,
  output logic [NUM_PE-1:0] pe_valid,
  input  logic [NUM_PE-1:0] pe_ready,
  output request_t          pe_req,
  output logic [PW-1:0]     sel,
  // keystore control
  output logic              ctx_start,
  output logic              ctx_old_valid,
  output logic [SESS_W-1:0] ctx_old_sess,
  output logic [SESS_W-1:0] ctx_new_sess,
  input  logic              ctx_done,
  output logic              ks_invalidate,
  output logic [SESS_W-1:0] ks_inv_sess,
  // host writes a session's context straight into the keystore
  input  logic              ks_wr,
  input  logic [SESS_W-1:0] ks_wr_sess
);
  typedef enum logic [1:0] {S_IDLE, S_CTX, S_WAIT, S_DISP} state_e;
  state_e state;

  logic [NUM_PE-1:0]             sess_valid;
  logic [NUM_PE-1:0][SESS_W-1:0] sess;
  logic [NUM_PE-1:0][7:0]        age;
  logic [NUM_SESS-1:0]           ks_cur;

  // selection (combinational)
  logic          found, same_found;
  logic [PW-1:0] pick;
  always_comb begin
    found = 1'b0; same_found = 1'b0; pick = '0;
    for (int i = 0; i < NUM_PE; i++)
      if (pe_idle[i] && sess_valid[i] && sess[i] == req.sess &&
          (!same_found || age[i] < age[pick])) begin
        same_found = 1'b1; found = 1'b1; pick = PW'(i);
      end
    if (!same_found)
      for (int i = 0; i < NUM_PE; i++)
        if (pe_idle[i] && (!found || age[i] > age[pick])) begin
          found = 1'b1; pick = PW'(i);
        end
  end

  // a session held only by busy PEs waits unless the keystore copy is current
  logic busy_holds;
  always_comb begin
    busy_holds = 1'b0;
    for (int i = 0; i < NUM_PE; i++)
      if (!pe_idle[i] && sess_valid[i] && sess[i] == req.sess) busy_holds = 1'b1;
  end

  logic accept;
  assign accept    = state == S_IDLE && req_valid && found && !(busy_holds && !same_found && !ks_cur[req.sess]);
  assign req_ready = accept;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= S_IDLE; sel <= '0; pe_req <= '0;
      sess_valid <= '0; sess <= '0; age <= '0; ks_cur <= '0;
      ctx_start <= 1'b0; ctx_old_valid <= 1'b0; ctx_old_sess <= '0; ctx_new_sess <= '0;
      ks_invalidate <= 1'b0; ks_inv_sess <= '0;
    end else begin
      ctx_start     <= 1'b0;
      ks_invalidate <= 1'b0;
      if (ks_wr) ks_cur[ks_wr_sess] <= 1'b1;
      case (state)
        S_IDLE: if (accept) begin
          sel    <= pick;
          pe_req <= req;
          if (req.code == RQ_DELETE || req.code == RQ_CREATE) ks_cur[req.sess] <= 1'b0;
          if (req.code == RQ_CREATE)
            for (int i = 0; i < NUM_PE; i++)
              if (PW'(i) != pick && sess[i] == req.sess) sess_valid[i] <= 1'b0;
          if (req.code == RQ_DELETE) begin
            ks_invalidate <= 1'b1;
            ks_inv_sess   <= req.sess;
            for (int i = 0; i < NUM_PE; i++)
              if (sess[i] == req.sess) sess_valid[i] <= 1'b0;
            state <= S_DISP;
          end else if (same_found) begin
            state <= S_DISP;
          end else begin
            ctx_start     <= 1'b1;
            ctx_old_valid <= sess_valid[pick];
            if (sess_valid[pick]) ks_cur[sess[pick]] <= 1'b1;
            ctx_old_sess  <= sess[pick];
            ctx_new_sess  <= req.sess;
            state         <= S_CTX;
          end
        end
        S_CTX:  state <= S_WAIT;
        S_WAIT: if (ctx_done) begin
          sess[sel]       <= ctx_new_sess;
          sess_valid[sel] <= 1'b1;
          state           <= S_DISP;
        end
        S_DISP: if (pe_ready[sel]) begin
          for (int i = 0; i < NUM_PE; i++)
            if (PW'(i) == sel) age[i] <= '0;
            else if (age[i] != 8'hFF) age[i] <= age[i] + 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end

  always_comb
    for (int i = 0; i < NUM_PE; i++)
      pe_valid[i] = state == S_DISP && PW'(i) == sel;
endmodule
