// sbox_sector_cache: dedicated SBOX cache of the cipher instruction-set
// extensions (one of four in the aggressive configuration).
// The SBOX address is the table register with its low 10 bits cleared,
// concatenated with byte bb of the index register times 4: tables are 1 KB
// aligned so no adder is needed. The cache holds one table: a single
// virtual tag (address bits [31:10]) and 32 sectors of 32 bytes (8 words),
// each with a valid bit.
//   hit  (tag matches, sector valid): rsp_valid/rsp_data the next cycle.
//   miss : a different tag flushes all sectors and takes the new tag; the
//          sector is requested from the data cache (fill_req, fill_addr)
//          and, once fill_valid brings the 32-byte line, written and
//          answered the next cycle.
//   sync : SBOXSYNC clears every sector valid bit so later accesses refetch.
//   flush: task switch invalidates the tag.
// The cache is read-only, so nothing is ever written back.
// Organisation from the document; handshakes and timing are this design's.
module sbox_sector_cache (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         req_valid,
  output logic         req_ready,
  input  logic [31:0]  table_reg,
  input  logic [31:0]  index_reg,
  input  logic [1:0]   bb,
  output logic         rsp_valid,
  output logic [31:0]  rsp_data,
  output logic         fill_req,
  output logic [31:0]  fill_addr,
  input  logic         fill_valid,
  input  logic [255:0] fill_data,
  input  logic         sync,
  input  logic         flush
);
  typedef enum logic [1:0] {C_IDLE, C_FILL, C_RESP} cstate_e;
  cstate_e state;

  logic [21:0]  tag;
  logic         tag_ok;
  logic [31:0]  sec_valid;
  logic [31:0]  mem [256];
  logic [7:0]   widx, pend_idx;
  logic [21:0]  rtag;
  logic         hit;

  assign rtag      = table_reg[31:10];
  assign widx      = index_reg[8*bb +: 8];
  assign hit       = tag_ok && tag == rtag && sec_valid[widx[7:3]];
  assign req_ready = state == C_IDLE;
  assign fill_req  = state == C_FILL;
  assign fill_addr = {tag, pend_idx[7:3], 5'b0};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= C_IDLE; tag_ok <= 1'b0; tag <= '0; sec_valid <= '0;
      pend_idx <= '0; rsp_valid <= 1'b0; rsp_data <= '0;
    end else begin
      rsp_valid <= 1'b0;
      case (state)
        C_IDLE: if (req_valid) begin
          pend_idx <= widx;
          if (hit) begin
            rsp_valid <= 1'b1;
            rsp_data  <= mem[widx];
          end else begin
            if (!(tag_ok && tag == rtag)) begin
              tag <= rtag; tag_ok <= 1'b1; sec_valid <= '0;
            end
            state <= C_FILL;
          end
        end
        C_FILL: if (fill_valid) begin
          sec_valid[pend_idx[7:3]] <= 1'b1;
          state <= C_RESP;
        end
        C_RESP: begin
          rsp_valid <= 1'b1;
          rsp_data  <= mem[pend_idx];
          state     <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
      if (sync)  sec_valid <= '0;
      if (flush) tag_ok <= 1'b0;
    end

  always_ff @(posedge clk)
    if (state == C_FILL && fill_valid)
      for (int w = 0; w < 8; w++)
        mem[{pend_idx[7:3], 3'(w)}] <= fill_data[32*w +: 32];
endmodule
