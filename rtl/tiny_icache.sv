// tiny_icache: per-lane tiny instruction cache (TC-I) of the EESI design.
//
// A small fully associative, read-only cache of instruction lines that sits
// between a lane's own fetch unit and the IL1 shared by the SM, so that the
// lanes do not access the large IL1 every cycle. A hit returns the 32-bit
// instruction word at the fetch address one cycle after the request is
// accepted; a miss fetches the line from the IL1 (one outstanding request),
// fills the next entry in round-robin order and then answers. The cache is
// virtually indexed and tagged; inval clears every entry, as needed when
// code is modified.
//
// Interface: freq_valid/freq_ready/freq_pc, frsp_valid/frsp_instr; the line
// port mreq/mrsp of gpgpu_pkg towards the IL1 (MEM_RD only).
//
// From the document: one per lane, 8 entries of 64 B (Section 6.3, 6.5.4),
// one-cycle access, virtual tags, invalidation on code modification. Table
// 6.2 lists 1 KB / 8-way instead; the 8-entry size of the text is used.
// This design's own choices: full associativity, round-robin replacement.
module tiny_icache
  import gpgpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        inval,
  input  logic        freq_valid,
  output logic        freq_ready,
  input  addr_t       freq_pc,
  output logic        frsp_valid,
  output logic [31:0] frsp_instr,
  output logic        mreq_valid,
  input  logic        mreq_ready,
  output mem_req_t    mreq,
  input  logic        mrsp_valid,
  input  mem_rsp_t    mrsp
);
  localparam int unsigned EW    = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned TAG_W = ADDR_W - OFF_W;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RSP} fsm_e;

  logic             vld  [ENTRIES];
  logic [TAG_W-1:0] tag  [ENTRIES];
  line_t            data [ENTRIES];
  logic [EW-1:0]    rr;
  fsm_e             fsm;
  addr_t            r_pc;

  logic          hit;
  logic [EW-1:0] hidx;
  always_comb begin
    hit = 1'b0; hidx = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (vld[e] && tag[e] == freq_pc[ADDR_W-1:OFF_W]) begin hit = 1'b1; hidx = EW'(e); end
  end

  assign freq_ready = (fsm == S_IDLE) && !inval;
  assign mreq_valid = (fsm == S_REQ);
  always_comb begin
    mreq       = '0;
    mreq.op    = MEM_RD;
    mreq.space = SP_GLOBAL;
    mreq.addr  = line_base(r_pc);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm <= S_IDLE; rr <= '0; r_pc <= '0; frsp_valid <= 1'b0; frsp_instr <= '0;
      for (int e = 0; e < ENTRIES; e++) begin vld[e] <= 1'b0; tag[e] <= '0; end
    end else begin
      frsp_valid <= 1'b0;
      unique case (fsm)
        S_IDLE: begin
          if (inval) begin
            for (int e = 0; e < ENTRIES; e++) vld[e] <= 1'b0;
          end else if (freq_valid) begin
            if (hit) begin
              frsp_valid <= 1'b1;
              frsp_instr <= pick_word(freq_pc, data[hidx]);
            end else begin
              r_pc <= freq_pc;
              fsm  <= S_REQ;
            end
          end
        end
        S_REQ: if (mreq_ready) fsm <= S_RSP;
        S_RSP: if (mrsp_valid) begin
          vld[rr]  <= 1'b1;
          tag[rr]  <= r_pc[ADDR_W-1:OFF_W];
          data[rr] <= mrsp.rdata;
          rr       <= (rr == EW'(ENTRIES - 1)) ? '0 : rr + 1'b1;
          frsp_valid <= 1'b1;
          frsp_instr <= pick_word(r_pc, mrsp.rdata);
          fsm <= S_IDLE;
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end
endmodule
