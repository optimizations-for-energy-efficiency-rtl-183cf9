// scratchpad: banked per-SM scratchpad (CUDA shared memory) with a valid bit
// per 32-bit word.
//
// The memory is split into BANKS word-interleaved banks (word w lives in
// bank w mod BANKS). A 64-byte line request touches 16 words; each bank does
// one access per cycle, so the words that fall in the same bank are
// serialised: with 8 banks a line takes two bank cycles. Every word carries
// a valid bit. Reading a word whose valid bit is clear returns zero; writing
// it first clears its unwritten bytes, then sets the bit. kernel_end clears
// all valid bits at once, so nothing written by one kernel can be read by
// the next one. Addresses at or beyond SIZE_BYTES read as zero and ignore
// writes.
//
// Interface: the line request/response port of gpgpu_pkg (MEM_RD, MEM_WR,
// MEM_AMO), one request at a time; the response comes one cycle after the
// last bank cycle. kernel_end must not coincide with a request in progress.
//
// From the document: 48 KB, 8 banks (Tables 4.2, 5.1), serialisation of
// same-bank accesses, zero for reads without a valid bit, discarding the
// contents when the kernel completes. This design's own choices: word
// granularity of the valid bits, word interleaving, byte-offset addressing
// with the address's low 16 bits.
module scratchpad
  import gpgpu_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 48 * 1024,
  parameter int unsigned BANKS      = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     kernel_end,
  input  logic     req_valid,
  output logic     req_ready,
  input  mem_req_t req,
  output logic     rsp_valid,
  output mem_rsp_t rsp
);
  localparam int unsigned WORDS   = SIZE_BYTES / 4;
  localparam int unsigned ROWS    = WORDS / BANKS;
  localparam int unsigned LWORDS  = LINE_BYTES / 4;          // 16 words per line
  localparam int unsigned PASSES  = (LWORDS + BANKS - 1) / BANKS;
  localparam int unsigned ROW_W   = $clog2(ROWS);
  localparam int unsigned BANK_W  = (BANKS > 1) ? $clog2(BANKS) : 1;
  localparam int unsigned PASS_W  = (PASSES > 1) ? $clog2(PASSES) : 1;
  localparam int unsigned WADDR_W = ADDR_W - 2;

  logic [31:0] mem [BANKS][ROWS];
  logic        vbit [BANKS][ROWS];

  mem_req_t          r;
  logic              busy;
  logic [PASS_W-1:0] pass;
  line_t             acc;

  assign req_ready = !busy;

  // word index of line word i of the captured request
  function automatic logic [WADDR_W-1:0] widx(int i);
    return WADDR_W'(r.addr[ADDR_W-1:2] & ~WADDR_W'(LWORDS - 1)) + WADDR_W'(i);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; pass <= '0; r <= '0; acc <= '0;
      rsp_valid <= 1'b0; rsp <= '0;
      for (int b = 0; b < BANKS; b++) for (int k = 0; k < ROWS; k++) vbit[b][k] <= 1'b0;
    end else begin
      rsp_valid <= 1'b0;
      if (kernel_end) begin
        for (int b = 0; b < BANKS; b++) for (int k = 0; k < ROWS; k++) vbit[b][k] <= 1'b0;
      end else if (!busy) begin
        if (req_valid) begin
          r <= req; busy <= 1'b1; pass <= '0; acc <= '0;
        end
      end else begin
        // one bank cycle: line words pass*BANKS .. pass*BANKS+BANKS-1, one per bank
        for (int j = 0; j < BANKS; j++) begin
          int i;
          logic [WADDR_W-1:0] w;
          logic [BANK_W-1:0]  bk;
          logic [ROW_W-1:0]   rw;
          logic               inr;
          logic [31:0]        cur, nw;
          logic [3:0]         bm;
          i   = int'(pass) * BANKS + j;
          if (i < int'(LWORDS)) begin
            w   = widx(i);
            bk  = BANK_W'(w % WADDR_W'(BANKS));
            rw  = ROW_W'(w / WADDR_W'(BANKS));
            inr = w < WADDR_W'(WORDS);
            cur = (inr && vbit[bk][rw]) ? mem[bk][rw] : 32'h0;
            unique case (r.op)
              MEM_RD:  acc[i*32 +: 32] <= cur;
              MEM_WR: begin
                bm = r.wmask[i*4 +: 4];
                nw = cur;
                for (int y = 0; y < 4; y++) if (bm[y]) nw[y*8 +: 8] = r.wdata[i*32 + y*8 +: 8];
                if (inr && bm != 4'b0) begin mem[bk][rw] <= nw; vbit[bk][rw] <= 1'b1; end
              end
              default: begin
                if (r.addr[OFF_W-1:2] == (OFF_W-2)'(i)) begin
                  acc[31:0] <= cur;
                  if (inr) begin mem[bk][rw] <= cur + r.wdata[31:0]; vbit[bk][rw] <= 1'b1; end
                end
              end
            endcase
          end
        end
        if (pass == PASS_W'(PASSES - 1)) begin
          busy <= 1'b0;
          rsp_valid <= 1'b1;
          // words of the last pass are still being written into acc: bypass them
          rsp.rdata <= last_pass_view();
        end else pass <= pass + 1'b1;
      end
    end
  end

  // response line: earlier passes from acc, the final pass read directly
  function automatic line_t last_pass_view();
    line_t v;
    v = acc;
    for (int j = 0; j < BANKS; j++) begin
      int i;
      logic [WADDR_W-1:0] w;
      logic [31:0] cur;
      i = int'(PASSES - 1) * BANKS + j;
      if (i < int'(LWORDS)) begin
        w   = widx(i);
        cur = (w < WADDR_W'(WORDS) && vbit[BANK_W'(w % WADDR_W'(BANKS))][ROW_W'(w / WADDR_W'(BANKS))])
              ? mem[BANK_W'(w % WADDR_W'(BANKS))][ROW_W'(w / WADDR_W'(BANKS))] : 32'h0;
        if (r.op == MEM_RD) v[i*32 +: 32] = cur;
        else if (r.op == MEM_AMO && r.addr[OFF_W-1:2] == (OFF_W-2)'(i)) v = LINE_BITS'(cur);
      end
    end
    if (r.op == MEM_WR) v = '0;
    return v;
  endfunction

endmodule
