// stlb: shared TLB between the CPU cores and the GPU, placed just before the
// last-level cache (LLC).
//
// For the GPU it is the only TLB: SM-L2 misses and write-backs arrive with
// virtual addresses on the g* port, are translated here and leave on the
// llc* port with physical addresses; the LLC's answer goes back unchanged.
// For the CPU cores it is a second-level TLB: a lookup on the c* port
// returns the physical page number of a virtual page.
// A miss on either side raises miss_valid with the virtual page number. The
// refill comes from the operating system's handler on the fill port, after
// which the waiting lookup is retried. Each entry has a gpu bit, set when the
// GPU translates through it. The SM caches are virtual, so an entry with the
// gpu bit needs care: when a CPU lookup hits it, or when it is invalidated
// (page deallocation on the inv port), the TLB first
// asks for a write-back and invalidate of that virtual page in the whole SM
// hierarchy (pf_req with pf_vpn, held until pf_done) and only then answers
// the CPU or drops the entry. GPU traffic and refills keep flowing while a
// page flush is in progress, since the flush's own write-backs are
// translated here. Replacing an entry on a refill needs no flush: the
// virtual caches do not depend on the entry, and all GPU lines are flushed
// at the end of every kernel anyway.
//
// Interface: g*/llc* follow the request/response rule of gpgpu_pkg. CPU
// lookups (creq_valid/creq_ready, creq_vpn) are answered by a one-cycle
// crsp_valid with crsp_ppn; a hit without a page flush answers in the next
// cycle (the document's 1-cycle TLB). fill_valid/fill_ready and
// inv_valid/inv_ready are handshakes from the handler.
//
// From the document: sharing between CPU and GPU, placement before the LLC,
// 512 entries / 4-way / 1 cycle (Table 4.2), miss exception handled by a
// core, page writeback-invalidate when the CPU touches a GPU page or a GPU
// entry is deallocated. This design's own choices: 4 KiB pages, one address
// space (no address-space ids), round-robin replacement, the gpu bit.
module stlb
  import gpgpu_pkg::*;
#(
  parameter int unsigned ENTRIES = 512,
  parameter int unsigned WAYS    = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  // GPU side, from the SM-L2
  input  logic     greq_valid,
  output logic     greq_ready,
  input  mem_req_t greq,
  output logic     grsp_valid,
  output mem_rsp_t grsp,
  // towards the LLC
  output logic     llc_req_valid,
  input  logic     llc_req_ready,
  output mem_req_t llc_req,
  input  logic     llc_rsp_valid,
  input  mem_rsp_t llc_rsp,
  // CPU cores' second-level lookups
  input  logic     creq_valid,
  output logic     creq_ready,
  input  vpn_t     creq_vpn,
  output logic     crsp_valid,
  output vpn_t     crsp_ppn,
  // miss exception and refill
  output logic     miss_valid,
  output vpn_t     miss_vpn,
  input  logic     fill_valid,
  output logic     fill_ready,
  input  vpn_t     fill_vpn,
  input  vpn_t     fill_ppn,
  // page deallocation
  input  logic     inv_valid,
  output logic     inv_ready,
  input  vpn_t     inv_vpn,
  // page write-back/invalidate request to the SM hierarchy
  output logic     pf_req,
  output vpn_t     pf_vpn,
  input  logic     pf_done
);
  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = VPN_W - SET_W;

  logic             vld [SETS][WAYS];
  logic             gpu [SETS][WAYS];
  logic [TAG_W-1:0] tag [SETS][WAYS];
  vpn_t             ppn [SETS][WAYS];
  logic [WAY_W-1:0] rr  [SETS];

  // ---- lookup function (shared by both sides) ----
  typedef struct packed {
    logic             hit;
    logic [WAY_W-1:0] way;
    logic             has_inv;
    logic [WAY_W-1:0] iway;
  } look_t;

  function automatic look_t look(vpn_t v);
    look_t r;
    r = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (vld[v[SET_W-1:0]][w] && tag[v[SET_W-1:0]][w] == v[VPN_W-1:SET_W]) begin
        r.hit = 1'b1; r.way = WAY_W'(w);
      end
      if (!vld[v[SET_W-1:0]][w]) begin r.has_inv = 1'b1; r.iway = WAY_W'(w); end
    end
    return r;
  endfunction

  // ---- GPU side ----
  typedef enum logic [2:0] {G_IDLE, G_LOOK, G_MISS, G_REQ, G_RSP} gfsm_e;
  gfsm_e    gfsm;
  mem_req_t g_r;
  vpn_t     g_vpn;
  look_t    g_l;
  assign g_vpn = g_r.addr[ADDR_W-1:PAGE_OFF_W];
  assign g_l   = look(g_vpn);
  assign greq_ready = (gfsm == G_IDLE);

  vpn_t g_ppn_r;
  always_comb begin
    llc_req_valid = (gfsm == G_REQ);
    llc_req       = g_r;
    llc_req.addr  = {g_ppn_r, g_r.addr[PAGE_OFF_W-1:0]};
  end

  // ---- control side: CPU lookups, refills, invalidations ----
  typedef enum logic [2:0] {C_IDLE, C_CPU, C_CMISS, C_PF} cfsm_e;
  typedef enum logic {PF_CPU, PF_INV} pfwhy_e;
  cfsm_e            cfsm;
  vpn_t             c_vpn;
  look_t            c_l;
  pfwhy_e           pf_why;
  logic [SET_W-1:0] pf_set;
  logic [WAY_W-1:0] pf_way;
  assign c_l = look(c_vpn);

  // refill victim and invalidation lookup, evaluated on the request inputs
  look_t            fl_l, iv_l, cin_l;
  logic [SET_W-1:0] fl_set;
  logic [WAY_W-1:0] fl_way;

  assign creq_ready = (cfsm == C_IDLE) && !fill_valid && !inv_valid;
  // refills are taken whenever they cannot disturb the control path: a GPU
  // miss may be waiting for one while a page flush is in progress
  assign fill_ready = (cfsm == C_IDLE) || ((cfsm == C_CPU || cfsm == C_CMISS) && !c_l.hit) ||
                      ((cfsm == C_PF) && !(fl_set == pf_set && fl_way == pf_way));
  assign inv_ready  = (cfsm == C_IDLE) && !fill_valid;
  assign pf_req     = (cfsm == C_PF);

  assign fl_l   = look(fill_vpn);
  assign iv_l   = look(inv_vpn);
  assign cin_l  = look(creq_vpn);
  assign fl_set = fill_vpn[SET_W-1:0];
  assign fl_way = fl_l.hit ? fl_l.way : (fl_l.has_inv ? fl_l.iway : rr[fl_set]);

  assign miss_valid = (gfsm == G_MISS) || (cfsm == C_CMISS);
  assign miss_vpn   = (gfsm == G_MISS) ? g_vpn : c_vpn;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gfsm <= G_IDLE; g_r <= '0; g_ppn_r <= '0; grsp_valid <= 1'b0; grsp <= '0;
      cfsm <= C_IDLE; c_vpn <= '0; crsp_valid <= 1'b0; crsp_ppn <= '0;
      pf_why <= PF_CPU; pf_set <= '0; pf_way <= '0; pf_vpn <= '0;
      for (int s = 0; s < SETS; s++) begin
        rr[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          vld[s][w] <= 1'b0; gpu[s][w] <= 1'b0; tag[s][w] <= '0; ppn[s][w] <= '0;
        end
      end
    end else begin
      grsp_valid <= 1'b0;
      crsp_valid <= 1'b0;

      // GPU translation path
      unique case (gfsm)
        G_IDLE: if (greq_valid) begin g_r <= greq; gfsm <= G_LOOK; end
        G_LOOK, G_MISS: if (g_l.hit) begin
          g_ppn_r <= ppn[g_vpn[SET_W-1:0]][g_l.way];
          gpu[g_vpn[SET_W-1:0]][g_l.way] <= 1'b1;
          gfsm <= G_REQ;
        end else gfsm <= G_MISS;               // wait for the refill
        G_REQ: if (llc_req_ready) gfsm <= G_RSP;
        G_RSP: if (llc_rsp_valid) begin grsp_valid <= 1'b1; grsp <= llc_rsp; gfsm <= G_IDLE; end
        default: gfsm <= G_IDLE;
      endcase

      // control path (its writes come after the GPU side's and win)
      unique case (cfsm)
        C_IDLE: begin
          if (fill_valid) begin
            // installed by the refill block below
          end else if (inv_valid) begin
            if (iv_l.hit) begin
              if (gpu[inv_vpn[SET_W-1:0]][iv_l.way]) begin
                pf_why <= PF_INV; pf_set <= inv_vpn[SET_W-1:0]; pf_way <= iv_l.way;
                pf_vpn <= inv_vpn;
                cfsm   <= C_PF;
              end else vld[inv_vpn[SET_W-1:0]][iv_l.way] <= 1'b0;
            end
          end else if (creq_valid) begin
            c_vpn <= creq_vpn;
            if (cin_l.hit && !gpu[creq_vpn[SET_W-1:0]][cin_l.way]) begin
              crsp_valid <= 1'b1;                   // plain hit: answer next cycle
              crsp_ppn   <= ppn[creq_vpn[SET_W-1:0]][cin_l.way];
            end else cfsm <= C_CPU;
          end
        end
        C_CPU, C_CMISS: begin
          if (c_l.hit) begin
            if (gpu[c_vpn[SET_W-1:0]][c_l.way]) begin
              // CPU touches a page used by the GPU
              pf_why <= PF_CPU; pf_set <= c_vpn[SET_W-1:0]; pf_way <= c_l.way;
              pf_vpn <= c_vpn;
              cfsm   <= C_PF;
            end else begin
              crsp_valid <= 1'b1;
              crsp_ppn   <= ppn[c_vpn[SET_W-1:0]][c_l.way];
              cfsm       <= C_IDLE;
            end
          end else if (fill_valid) begin
            cfsm <= C_CPU;                          // retry after the refill below
          end else cfsm <= C_CMISS;
        end
        C_PF: if (pf_done) begin
          gpu[pf_set][pf_way] <= 1'b0;
          unique case (pf_why)
            PF_CPU:  cfsm <= C_CPU;            // answer on the retry
            default: begin vld[pf_set][pf_way] <= 1'b0; cfsm <= C_IDLE; end
          endcase
        end
        default: cfsm <= C_IDLE;
      endcase

      // refill from the handler, accepted whenever fill_ready is high
      if (fill_valid && fill_ready) begin
        vld[fl_set][fl_way] <= 1'b1;
        gpu[fl_set][fl_way] <= 1'b0;
        tag[fl_set][fl_way] <= fill_vpn[VPN_W-1:SET_W];
        ppn[fl_set][fl_way] <= fill_ppn;
        if (!fl_l.hit && !fl_l.has_inv) rr[fl_set] <= rr[fl_set] + 1'b1;
      end
    end
  end

  // Only one flush request at a time, held until done.
  property p_pf_hold;
    @(posedge clk) disable iff (!rst_n) pf_req && !pf_done |=> pf_req && $stable(pf_vpn);
  endproperty
  assert property (p_pf_hold);

endmodule
