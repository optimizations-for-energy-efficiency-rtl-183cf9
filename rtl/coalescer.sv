// coalescer: merges the line requests of the lanes of an SM that go to the
// same cache line into a single request to the SM-L1 / scratchpad.
//
// Each lane's tinyCache presents at most one line request. When the
// coalescer is idle it picks the next requesting lane in round-robin order.
// If that request is a line read, every other lane that is requesting a read
// of the same line in the same address space and kernel is accepted in the
// same cycle, and the single response is broadcast to all of them. Writes
// and atomics are passed on one at a time. The number of lanes merged into
// the request is reported on merged_count for one cycle when it is issued.
// The same module serves as the merging round-robin arbiter in front of the
// IL1, between the IL1 and the SM-L1 of an SM, and between the SMs at the
// SM-L2.
//
// Interface: per-lane ureq_valid/ureq_ready/ureq and ursp_valid with a
// shared ursp bus; one downstream request/response port. One downstream
// request is outstanding at a time.
//
// From the document: merging accesses to the same line into one request to
// reduce power (Sections 2.3, 4.4.1). This design's own choices: merging of
// reads only, round-robin selection, a single outstanding request.
module coalescer
  import gpgpu_pkg::*;
#(
  parameter int unsigned LANES = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] ureq_valid,
  output logic [LANES-1:0] ureq_ready,
  input  mem_req_t         ureq [LANES],
  output logic [LANES-1:0] ursp_valid,
  output mem_rsp_t         ursp,
  output logic             dreq_valid,
  input  logic             dreq_ready,
  output mem_req_t         dreq,
  input  logic             drsp_valid,
  input  mem_rsp_t         drsp,
  output logic [$clog2(LANES+1)-1:0] merged_count
);
  localparam int unsigned LW = (LANES > 1) ? $clog2(LANES) : 1;

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RSP} fsm_e;
  fsm_e             fsm;
  logic [LW-1:0]    rr;
  logic [LANES-1:0] grp;      // lanes served by the outstanding request

  // round-robin pick and the set of lanes that merge with it
  logic             any;
  logic [LW-1:0]    pick;
  logic [LANES-1:0] sel;
  always_comb begin
    any = 1'b0; pick = '0;
    for (int k = LANES - 1; k >= 0; k--) begin
      int l;
      l = (int'(rr) + k) % LANES;
      if (ureq_valid[l]) begin any = 1'b1; pick = LW'(l); end
    end
    sel = '0;
    if (any) begin
      sel[pick] = 1'b1;
      if (ureq[pick].op == MEM_RD)
        for (int l = 0; l < LANES; l++)
          if (ureq_valid[l] && ureq[l].op == MEM_RD && ureq[l].space == ureq[pick].space &&
              ureq[l].kid == ureq[pick].kid &&
              line_base(ureq[l].addr) == line_base(ureq[pick].addr))
            sel[l] = 1'b1;
    end
  end

  assign ureq_ready = (fsm == S_IDLE) ? sel : '0;
  assign dreq_valid = (fsm == S_REQ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm <= S_IDLE; rr <= '0; grp <= '0; dreq <= '0;
      ursp_valid <= '0; ursp <= '0; merged_count <= '0;
    end else begin
      ursp_valid   <= '0;
      merged_count <= '0;
      unique case (fsm)
        S_IDLE: if (any) begin
          grp  <= sel;
          dreq <= ureq[pick];
          rr   <= (pick == LW'(LANES - 1)) ? '0 : pick + 1'b1;
          merged_count <= $bits(merged_count)'($countones(sel));
          fsm  <= S_REQ;
        end
        S_REQ: if (dreq_ready) fsm <= S_RSP;
        S_RSP: if (drsp_valid) begin
          ursp_valid <= grp;
          ursp       <= drsp;
          fsm        <= S_IDLE;
        end
        default: fsm <= S_IDLE;
      endcase
    end
  end

  property p_dreq_stable;
    @(posedge clk) disable iff (!rst_n) dreq_valid && !dreq_ready |=> dreq_valid && $stable(dreq);
  endproperty
  assert property (p_dreq_stable);

endmodule
